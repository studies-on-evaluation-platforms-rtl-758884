// tb_mpe_tree: drives one Tree with a memory model that answers loads in 18
// clocks and stores in 12 (the document's Gantt chart). Checks the read and
// write latencies (109 / 182 clocks), the decrypted data, the ciphertext and
// tag left in memory against the reference model, and that tampering with a
// CL, a Meta counter or an L1 node is reported as corrupt.
module tb_mpe_tree;
  import nvmm_pkg::*;
  import mpe_pkg::*;
  import sit_ref_pkg::*;

  localparam addr_t PB = 34'h0_C000_0000;
  localparam int unsigned NR = 384;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [127:0] key_e = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic [63:0]  key_p = 64'h0123456789abcdef;
  logic [127:0] key_m = 128'h00112233445566778899aabbccddeeff;

  logic assign_valid = 0, assign_ready, rsp_valid, rsp_ready = 1;
  mem_req_t assign_req;
  logic [ROOT_IDX_W-1:0] assign_root, rsp_root;
  ctr_t assign_root_ctr, rsp_root_ctr;
  mem_rsp_t rsp;
  logic mreq_valid, mreq_ready, mrsp_valid, mrsp_ready;
  mem_req_t mreq;
  mem_rsp_t mrsp;

  mpe_tree #(.PROT_BASE(PB), .N_ROOTS(NR)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- memory model: load answered 16 clocks after acceptance
  line_t mem [addr_t];
  function automatic line_t rd(addr_t a);
    if (!mem.exists(a)) mem[a] = ref_init_line(key_e, key_p, key_m, PB, NR, a);
    return mem[a];
  endfunction
  int mcnt = 0; bit mbusy = 0; mem_req_t mq; line_t mdata;
  assign mreq_ready = !mbusy;
  assign mrsp_valid = mbusy && mcnt == 0;
  always_ff @(posedge clk) begin
    if (mreq_valid && mreq_ready) begin
      mbusy <= 1; mq <= mreq; mcnt <= mreq.we ? 10 : 16;
      if (mreq.we) mem[mreq.addr] = mreq.data;
      else mdata <= rd(mreq.addr);
    end else if (mbusy) begin
      if (mcnt == 0) mbusy <= 0; else mcnt <= mcnt - 1;
    end
  end
  assign mrsp = '{id: '0, we: mq.we, corrupt: 1'b0, data: mdata};

  ctr_t roots [NR];
  initial foreach (roots[i]) roots[i] = '0;

  task automatic op(input bit we, input addr_t a, input line_t d,
                    output line_t rdata, output bit corrupt, output int lat);
    int r = int'((a - PB) >> 18);
    @(negedge clk);
    assign_valid = 1; assign_req = '{id: 6'd5, addr: a, we: we, data: d};
    assign_root = 9'(r); assign_root_ctr = roots[r];
    @(posedge clk); #1 assign_valid = 0;
    lat = 0;
    while (!rsp_valid) begin @(posedge clk); #1 lat++; end
    lat++;   // the clock edge that takes the response
    rdata = rsp.data; corrupt = rsp.corrupt;
    check(rsp.id == 6'd5 && rsp.we == we, "response id/we");
    check(rsp_root == 9'(r), "response root index");
    if (!corrupt) roots[r] = rsp_root_ctr;
    @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t d, rdat; bit cor; int lat;
    addr_t a = PB + 34'h4_1a40;   // root 1, some CL
    addr_t ma;
    repeat (3) @(posedge clk); rst_n = 1;

    // fresh line reads as zeros
    op(0, a, '0, rdat, cor, lat);
    check(!cor && rdat == '0, "fresh read is zero and verified");
    check(lat == 109, $sformatf("read latency %0d, expected 109", lat));

    // write then read back
    d = {16{32'hcafe0000 + 32'(a)}};
    op(1, a, d, rdat, cor, lat);
    check(!cor, "write verified");
    check(lat == 182, $sformatf("write latency %0d, expected 182", lat));
    check(roots[1] == 1, "root counter incremented");
    check(mem[a] == (d ^ ref_otp(key_e, a, 56'd1)), "ciphertext in memory");
    ma = node_addr(PB, NR, NK_TAG, cl_idx_t'((a - PB) >> 6));
    check(mem[ma][56*((a>>6)&7) +: 56] == ref_cl_mac(key_p, key_m, mem[a], 56'd1, a), "tag in PD_Tag node");
    check(mem[a] != d, "plaintext does not reach memory");
    op(0, a, '0, rdat, cor, lat);
    check(!cor && rdat == d, "read back written data");

    // neighbouring line in same Meta node still reads zero
    op(0, a + 64, '0, rdat, cor, lat);
    check(!cor && rdat == '0, "neighbour line intact");

    // second write updates counter to 2
    op(1, a, ~d, rdat, cor, lat);
    op(0, a, '0, rdat, cor, lat);
    check(!cor && rdat == ~d, "second write read back");
    check(roots[1] == 2, "root counter 2");

    // tamper with ciphertext
    mem[a][3] = ~mem[a][3];
    op(0, a, '0, rdat, cor, lat);
    check(cor && rdat == '0, "tampered CL detected");
    mem[a][3] = ~mem[a][3];
    op(0, a, '0, rdat, cor, lat);
    check(!cor && rdat == ~d, "restored CL verifies");

    // replay: roll back the Meta counter
    ma = node_addr(PB, NR, NK_META, cl_idx_t'((a - PB) >> 6));
    begin
      line_t save;
      save = mem[ma];
      mem[ma][0] = ~mem[ma][0];
      op(0, a, '0, rdat, cor, lat);
      check(cor, "tampered Meta node detected");
      // a write to a corrupted path is refused and changes nothing
      op(1, a, d, rdat, cor, lat);
      check(cor, "write to corrupted path refused");
      check(roots[1] == 2, "root unchanged by refused write");
      mem[ma] = save;
    end
    // tamper with an L1 node of another root's path
    ma = node_addr(PB, NR, NK_L1, cl_idx_t'((a - PB) >> 6));
    mem[ma][460] = ~mem[ma][460];
    op(0, a, '0, rdat, cor, lat);
    check(cor, "tampered L1 MAC detected");
    mem[ma][460] = ~mem[ma][460];
    op(0, a, '0, rdat, cor, lat);
    check(!cor && rdat == ~d, $sformatf("path verifies again cor=%0d", cor));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
