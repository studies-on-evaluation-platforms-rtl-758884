// tb_nvmm_sim_top: end-to-end test of the secure NVMM emulation memory
// path at its default parameters (8 Trees, 384 roots), with a DDR3 model
// behind the controller. Software-style MMIO writes set the keys, the NVMM
// range and the injection latencies; an LLC model issues cacheline
// requests with distinct ids and checks every response against a shadow
// memory. Checked: data of protected (encrypted, tree-verified) and
// unprotected (bypass) accesses, that protected data reach the DDR3 model
// encrypted, corrupt on tampered data, zero DDR3 timing violations, and
// exact latency additions for coarse-grain delay, DCPMM 256 B / 4 KiB
// crossings and the fine-grain extra tRCD. Every mechanism is counted
// and a mechanism that never happened counts as a failure. Also serves as
// the full-size test (no parameter overrides).
module tb_nvmm_sim_top;
  import nvmm_pkg::*;

  localparam addr_t PB    = 34'h0_C000_0000;   // protected region
  localparam addr_t NV_UP = 34'h0_F000_0000;   // unprotected NVMM address
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic llc_req_valid = 0, llc_req_ready, llc_rsp_valid, llc_rsp_ready = 1;
  mem_req_t llc_req = '0; mem_rsp_t llc_rsp;
  logic mmio_we = 0; logic [7:0] mmio_addr = '0; logic [31:0] mmio_wdata = '0, mmio_rdata;
  logic ddr_cmd_valid, ddr_rvalid; ddr_cmd_t ddr_cmd; line_t ddr_rdata;
  logic [7:0] tree_busy;

  nvmm_sim_top dut (.*);
  ddr3_model u_ddr (.clk, .key_e(dut.u_mpe.key_e), .key_p(dut.u_mpe.key_p), .key_m(dut.u_mpe.key_m),
                    .ddr_cmd_valid, .ddr_cmd, .ddr_rvalid, .ddr_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  bit    pend [64];
  bit    pend_we [64];
  addr_t pend_addr [64];
  line_t shadow [addr_t];
  bit    expect_corrupt [addr_t];
  int    nrsp = 0, n_bypass = 0, max_busy = 0;
  longint cyc = 0, last_rsp_cyc = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    int nb;
    nb = $countones(tree_busy);
    if (nb > max_busy) max_busy = nb;
    if (llc_req_valid && llc_req_ready && !(llc_req.addr >= PB && llc_req.addr < PB + 34'h600_0000))
      n_bypass++;
    if (llc_rsp_valid && llc_rsp_ready) begin
      int id;
      id = int'(llc_rsp.id);
      nrsp++; last_rsp_cyc = cyc;
      check(pend[id], $sformatf("response for pending id %0d", id));
      pend[id] = 0;
      check(llc_rsp.we == pend_we[id], "response we");
      if (expect_corrupt.exists(pend_addr[id]))
        check(llc_rsp.corrupt, $sformatf("corrupt expected at %h", pend_addr[id]));
      else begin
        check(!llc_rsp.corrupt, $sformatf("no corrupt at %h", pend_addr[id]));
        if (!pend_we[id])
          check(llc_rsp.data == (shadow.exists(pend_addr[id]) ? shadow[pend_addr[id]] : '0),
                $sformatf("read data at %h", pend_addr[id]));
      end
    end
  end

  int next_id = 0;
  task automatic issue(input bit we, input addr_t a, input line_t d);
    int id;
    while (pend[next_id]) @(posedge clk);
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
    while (t < 50000) begin
      bit any;
      any = 0;
      foreach (pend[i]) any |= pend[i];
      if (!any) break;
      @(posedge clk); t++;
    end
    check(t < 50000, "all responses returned");
    repeat (2) @(posedge clk);
  endtask

  // latency in clocks of one request issued alone
  task automatic lat1(input bit we, input addr_t a, output int lat);
    longint t0;
    repeat (30) @(posedge clk);          // let banks precharge
    t0 = cyc;
    issue(we, a, {16{32'hC0DE_0000 + 32'(a[11:0])}});
    drain();
    lat = int'(last_rsp_cyc - t0);
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] v);
    @(negedge clk); mmio_we = 1; mmio_addr = a; mmio_wdata = v;
    @(negedge clk); mmio_we = 0;
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < 16; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  function automatic int stat(int i);
    return int'(dut.u_csr.stat[i]);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int l_dram, l_nv, l_coarse, l_same, l_256, l_4k, l_prot;
  initial begin
    foreach (pend[i]) pend[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // keys and NVMM range: DRAM below 0xC000_0000, NVMM above
    for (int i = 0; i < 10; i++) wr(8'(16 + i), 32'h0BAD_F00D ^ (32'h0101_0101 * (i + 3)));
    wr(0, 32'(PB >> 12)); wr(1, 32'h0010_0000);
    @(negedge clk); mmio_addr = 0;
    #1 check(mmio_rdata == 32'(PB >> 12), "MMIO readback of NVMM_BASE");

    // ---- fine-grain latency: extra tRCD on NVMM rows only
    lat1(0, 34'h0_8000_2000, l_dram);
    lat1(0, NV_UP + 34'h2000, l_nv);
    check(l_nv == l_dram, $sformatf("no injection yet: DRAM %0d NVMM %0d", l_dram, l_nv));
    wr(9, 20); wr(10, 15); wr(11, 25);          // add tRCD, tRP, tRAS
    lat1(0, NV_UP + 34'h4000, l_nv);
    check(l_nv == l_dram + 20, $sformatf("extra tRCD: DRAM %0d NVMM %0d", l_dram, l_nv));
    lat1(0, 34'h0_8000_4000, l_same);
    check(l_same == l_dram, "DRAM rows get no extra tRCD");

    // ---- protected traffic: writes/reads under 10 roots at once
    for (int r = 0; r < 10; r++) issue(1, PB + 34'(r) * 34'h4_0000 + 34'h40 * 34'(r), rnd_line());
    for (int r = 0; r < 10; r++) issue(0, PB + 34'(r) * 34'h4_0000 + 34'h40 * 34'(r), '0);
    drain();
    check(u_ddr.peek(PB) != shadow[PB], "protected line stored encrypted");
    lat1(0, PB + 34'h40, l_prot);
    $display("protected read %0d clocks, unprotected %0d", l_prot, l_nv);
    check(l_prot > 109, "protected read slower than the tree's 109-clock path");
    // same root back to back: lock
    issue(1, PB + 34'h1000, rnd_line()); issue(0, PB + 34'h1040, '0); issue(1, PB + 34'h1000, rnd_line());
    // unprotected mixed in: bypass
    issue(1, 34'h0_8000_8000, rnd_line()); issue(1, NV_UP + 34'h8000, rnd_line());
    issue(0, 34'h0_8000_8000, '0); issue(0, NV_UP + 34'h8000, '0);
    drain();
    check(u_ddr.peek(34'h0_8000_8000) == shadow[34'h0_8000_8000], "unprotected line stored in clear");

    // ---- coarse-grain delay
    wr(3, 40); wr(4, 60); wr(2, 1);
    lat1(0, NV_UP + 34'h4000, l_coarse);
    check(l_coarse == l_nv + 40, $sformatf("coarse read delay: %0d vs %0d", l_coarse, l_nv));
    lat1(0, 34'h0_8000_4000, l_same);
    check(l_same == l_dram, "coarse delay only for NVMM");
    for (int i = 0; i < 6; i++) issue(i % 2, NV_UP + 34'h1_0000 + 34'(i) * 34'h40, rnd_line());
    drain();

    // ---- DCPMM mode: base 10, +30 crossing 256 B, +80 crossing 4 KiB
    wr(3, 10); wr(5, 30); wr(6, 80); wr(4, 10); wr(7, 30); wr(8, 80); wr(2, 2);
    lat1(0, NV_UP + 34'h3_0000, l_4k);
    lat1(0, NV_UP + 34'h3_0040, l_same);
    lat1(0, NV_UP + 34'h3_0100, l_256);
    check(l_4k - l_same == 80, $sformatf("4-KiB crossing adds %0d", l_4k - l_same));
    check(l_256 - l_same == 30, $sformatf("256-B crossing adds %0d", l_256 - l_same));
    for (int i = 0; i < 20; i++) issue($urandom_range(0, 1), NV_UP + 34'h4_0000 + 34'($urandom_range(0, 255)) * 34'h40, rnd_line());
    drain();

    // ---- protected traffic on NVMM with DCPMM timing, then tampering
    for (int i = 0; i < 30; i++) begin
      addr_t a;
      a = PB + 34'($urandom_range(0, 11)) * 34'h4_0000 + 34'($urandom_range(0, 7)) * 34'h40;
      issue($urandom_range(0, 1), a, rnd_line());
    end
    drain();
    begin
      line_t v;
      v = u_ddr.peek(PB + 34'h1000); v[7] = ~v[7]; u_ddr.poke(PB + 34'h1000, v);
    end
    expect_corrupt[PB + 34'h1000] = 1;
    issue(0, PB + 34'h1000, '0);
    drain();

    // ---- mechanisms
    check(u_ddr.violations == 0, $sformatf("DDR3 timing violations: %0d", u_ddr.violations));
    $display("mechanisms: lock_stall=%0d tree_stall=%0d bypass=%0d corrupt=%0d act_nvmm=%0d row_hit=%0d tras_hold=%0d dirty_trp=%0d bus_delay=%0d bus_stall=%0d cross256=%0d cross4k=%0d max_trees=%0d",
             stat(0), stat(1), n_bypass, stat(2), stat(4), stat(7), stat(8), stat(9), stat(10), stat(11), stat(12), stat(13), max_busy);
    check(stat(0) > 0, "lock stall happened");
    check(stat(1) > 0, "stall for an idle Tree happened");
    check(n_bypass > 0, "bypass happened");
    check(stat(2) == 1, "one corrupt response");
    check(stat(4) > 0, "ACT to NVMM row (extra tRCD) happened");
    check(stat(7) > 0, "row hit happened");
    check(stat(8) > 0, "precharge held by extra tRAS happened");
    check(stat(9) > 0, "extra tRP after dirty row happened");
    check(stat(10) > 0, "bus delay injection happened");
    check(stat(12) > 0, "256-B crossing happened");
    check(stat(13) > 0, "4-KiB crossing happened");
    check(max_busy >= 8, "all eight Trees busy at once");
    check(nrsp > 90, $sformatf("responses %0d", nrsp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
