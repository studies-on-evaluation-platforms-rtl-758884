// tb_mpe: the whole MPE (Frontend, 8 Trees, Backend) against a cacheline
// memory model. An LLC model issues bursts of requests with distinct IDs and
// matches the out-of-order responses by ID against a shadow copy of the data.
// It checks protected writes and reads, unprotected pass-through, that
// requests under different roots run in parallel on several Trees, that a
// second request under a locked root stalls, that more than eight requests
// stall for an idle Tree, and that tampering yields the corrupt bit.
module tb_mpe;
  import nvmm_pkg::*;
  import mpe_pkg::*;

  localparam addr_t PB = 34'h0_C000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic llc_req_valid = 0, llc_req_ready, llc_rsp_valid, llc_rsp_ready = 1;
  mem_req_t llc_req; mem_rsp_t llc_rsp;
  logic key_we = 0; logic [3:0] key_sel; logic [31:0] key_wdata;
  logic mreq_valid, mreq_ready, mrsp_valid, mrsp_ready;
  mem_req_t mreq; mem_rsp_t mrsp;
  logic [31:0] stat_lock_stalls, stat_tree_stalls, stat_corrupt;
  logic [7:0] tree_busy;

  mpe dut (.*);
  line_mem_model #(.PROT_BASE(PB)) u_mem (.clk, .key_e(dut.key_e), .key_p(dut.key_p), .key_m(dut.key_m),
    .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp_ready, .mrsp);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // outstanding requests by ID
  bit     pend [64];
  bit     pend_we [64];
  addr_t  pend_addr [64];
  line_t  shadow [addr_t];
  bit     expect_corrupt [addr_t];
  int     nrsp = 0, max_busy = 0;

  function automatic line_t expv(addr_t a);
    return shadow.exists(a) ? shadow[a] : '0;
  endfunction

  always @(negedge clk) if (rst_n) begin
    int nb;
    nb = $countones(tree_busy);
    if (nb > max_busy) max_busy = nb;
    if (llc_rsp_valid && llc_rsp_ready) begin
      int id;
      id = int'(llc_rsp.id);
      nrsp++;
      check(pend[id], $sformatf("response for pending id %0d at %0t pick %0d", id, $time, dut.u_front.pick));
      pend[id] = 0;
      check(llc_rsp.we == pend_we[id], "response we");
      if (expect_corrupt.exists(pend_addr[id]))
        check(llc_rsp.corrupt, $sformatf("corrupt expected at %h", pend_addr[id]));
      else begin
        check(!llc_rsp.corrupt, $sformatf("no corrupt at %h", pend_addr[id]));
        if (!pend_we[id]) check(llc_rsp.data == expv(pend_addr[id]),
                                $sformatf("read data at %h", pend_addr[id]));
      end
    end
  end

  int next_id = 0;
  task automatic issue(input bit we, input addr_t a, input line_t d);
    int id;
    while (pend[next_id]) begin @(posedge clk); #1; end
    id = next_id; next_id = (next_id + 1) % 64;
    pend[id] = 1; pend_we[id] = we; pend_addr[id] = a;
    @(negedge clk);
    llc_req_valid = 1; llc_req = '{id: 6'(id), addr: a, we: we, data: d};
    forever begin
      bit r;
      #1 r = llc_req_ready;
      @(posedge clk);
      if (r) break;
      @(negedge clk);
    end
    #1 llc_req_valid = 0;
    if (we) shadow[a] = d;
  endtask

  task automatic drain();
    int t = 0;
    while (t < 20000) begin
      bit any = 0;
      foreach (pend[i]) any |= pend[i];
      if (!any) break;
      @(posedge clk); t++;
    end
    repeat (2) @(posedge clk);
  endtask

  task automatic wkey(input int s, input logic [31:0] v);
    @(negedge clk); key_we = 1; key_sel = 4'(s); key_wdata = v;
    @(negedge clk); key_we = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t a;
    int t0, lat;
    foreach (pend[i]) pend[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) wkey(i, 32'h1000_0000 * (i + 1) + 32'h1234_5678);
    check(dut.key_p == {32'h7234_5678, 32'h6234_5678}, "K_P written");

    // single protected read latency through Frontend + Backend
    @(negedge clk); t0 = $time;
    issue(0, PB + 34'h100, '0); drain();
    lat = int'(($time - t0) / 10);
    check(lat >= 109 && lat <= 125, $sformatf("protected read latency %0d", lat));

    // 8 writes under 8 different roots: run in parallel on the Trees
    for (int r = 0; r < 8; r++) issue(1, PB + 34'(r) * 34'h4_0000 + 34'h40 * 34'(r), {16{32'(r) + 32'hA5A5_0000}});
    // a 9th and 10th: stalls for a free Tree
    issue(1, PB + 34'h20_0000, {16{32'h9999_0000}});
    issue(1, PB + 34'h24_0000, {16{32'hAAAA_0000}});
    drain();
    check(max_busy >= 8, $sformatf("eight Trees busy at once (max %0d)", max_busy));
    check(stat_tree_stalls > 0, "stall for idle Tree happened");
    // read them back
    for (int r = 0; r < 8; r++) issue(0, PB + 34'(r) * 34'h4_0000 + 34'h40 * 34'(r), '0);
    drain();

    $display("phase lock at %0t", $time);
    // same root twice: lock stall
    issue(1, PB + 34'h80, {16{32'h1111_2222}});
    issue(0, PB + 34'hC0, '0);
    drain();
    check(stat_lock_stalls > 0, "stall on a locked root happened");
    issue(0, PB + 34'h80, '0); drain();

    // unprotected pass-through (system RAM)
    issue(1, 34'h0_8000_1000, {16{32'h5555_aaaa}});
    issue(0, 34'h0_8000_1000, '0);
    drain();
    check(u_mem.mem[34'h0_8000_1000] == {16{32'h5555_aaaa}}, "unprotected data stored in clear");
    check(u_mem.mem[PB + 34'h80] != {16{32'h1111_2222}}, "protected data stored encrypted");

    $display("phase tamper at %0t", $time);
    // tampering
    u_mem.tamper(PB + 34'h80);
    expect_corrupt[PB + 34'h80] = 1;
    issue(0, PB + 34'h80, '0); drain();
    check(stat_corrupt == 1, $sformatf("corrupt counted once (%0d)", stat_corrupt));

    $display("phase random at %0t rsp %0d", $time, nrsp);
    // random traffic over a few roots
    for (int i = 0; i < 60; i++) begin
      addr_t ra = PB + 34'($urandom_range(0, 5)) * 34'h4_0000 + 34'($urandom_range(0, 15)) * 34'h40;
      if (ra == PB + 34'h80) ra = ra + 34'h40;
      issue($urandom_range(0, 1), ra, {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    end
    drain();
    check(nrsp > 80, $sformatf("responses %0d", nrsp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
