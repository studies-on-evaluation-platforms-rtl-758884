// tb_nvmm_mc: memory controller with its bank machines against the DDR3
// model, which flags every breach of tRCD, tRAS, tRP, tRTP and tWR and any
// column command to a closed row. Random reads and writes over a few rows
// of all eight banks, DRAM and NVMM, check data and ids of the responses.
// Single-request latencies check the command sequence timing exactly: a
// row-closed read costs ACT + tRCD; an NVMM row adds add_trcd; a request to
// another row of an NVMM bank just written waits add_tras on the open row and
// add_trp after its precharge. Also checks the ACT, RD, WR and row-hit
// counters. This testbench also serves the bank_machine block.
module tb_nvmm_mc;
  import nvmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  nvmm_cfg_t cfg;
  logic req_valid = 0, req_ready, rsp_valid, rsp_ready = 1;
  mem_req_t req = '0; mem_rsp_t rsp;
  logic ddr_cmd_valid, ddr_rvalid; ddr_cmd_t ddr_cmd; line_t ddr_rdata;
  logic [31:0] stat_act, stat_act_nvmm, stat_rd, stat_wr, stat_hit, stat_tras_hold, stat_dirty_trp;
  nvmm_mc dut (.*);
  ddr3_model #(.N_ROOTS(1), .PROT_BASE(34'h3_0000_0000)) u_ddr (.clk, .key_e('0), .key_p('0), .key_m('0),
    .ddr_cmd_valid, .ddr_cmd, .ddr_rvalid, .ddr_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit pend [64]; bit pend_we [64]; addr_t pend_a [64]; line_t pend_exp [64];
  line_t shadow [addr_t];
  longint cyc = 0, last_rsp = 0;
  int nrsp = 0, nhit_exp = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    int id;
    id = int'(rsp.id);
    nrsp++; last_rsp = cyc;
    check(pend[id] && rsp.we == pend_we[id], $sformatf("response id %0d", id));
    if (!rsp.we) check(rsp.data == pend_exp[id],
                       $sformatf("read data %h", pend_a[id]));
    pend[id] = 0;
  end

  int nid = 0;
  task automatic issue(input bit we, input addr_t a);
    int id;
    while (pend[nid]) @(posedge clk);
    id = nid; nid = (nid + 1) % 64;
    pend[id] = 1; pend_we[id] = we; pend_a[id] = a;
    pend_exp[id] = shadow.exists(a) ? shadow[a] : '0;   // reads see the writes accepted before them
    @(negedge clk);
    req_valid = 1; req = '{id: 6'(id), addr: a, we: we, data: {$urandom, 480'(a), $urandom}};
    forever begin
      bit r;
      #1 r = req_ready;
      @(posedge clk);
      if (r) break;
      @(negedge clk);
    end
    #1 req_valid = 0;
    if (we) shadow[a] = req.data;
  endtask
  task automatic drain();
    bit any;
    do begin any = 0; foreach (pend[i]) any |= pend[i]; if (any) @(posedge clk); end while (any);
    repeat (2) @(posedge clk);
  endtask
  task automatic lat1(input bit we, input addr_t a, input int idle, output int lat);
    longint t0;
    repeat (idle) @(posedge clk);
    t0 = cyc;
    issue(we, a); drain();
    lat = int'(last_rsp - t0);
  endtask

  // banks 0-1 are DRAM, banks 2-7 NVMM (range set below)
  function automatic addr_t mk(int bank, int row, int col);
    return 34'h0_8000_0000 + {2'b0, 3'(bank), 16'(row), 7'(col), 6'b0};
  endfunction

  initial begin
    int l0, l1, l2, l3, a0;
    foreach (pend[i]) pend[i] = 0;
    cfg = '0;
    cfg.nvmm_base = 34'h0_C000_0000; cfg.nvmm_limit = 34'h1_8000_0000;
    repeat (3) @(posedge clk); rst_n = 1;
    // closed-row read: accept 1, ACT->RD tRCD 3, RD->data RL 6, FIFO 1, + 1 measured
    // from the clock before the request is presented
    lat1(0, 34'h0_8000_0040, 20, l0);
    $display("closed-row read latency %0d", l0);
    check(l0 == 12, $sformatf("closed-row read latency %0d (expected 12)", l0));
    // row hit: a second read to the same row right after
    a0 = stat_act;
    issue(0, 34'h0_8000_0080); issue(0, 34'h0_8000_00C0); drain();
    check(stat_hit >= 1, "row hit counted");
    // fine-grain: extra tRCD on NVMM (bank 6 = 0xC000_0000 region)
    cfg.add_trcd = 16'd10; cfg.add_trp = 16'd9; cfg.add_tras = 16'd30;
    lat1(0, 34'h0_C000_0040, 20, l1);
    check(l1 == l0 + 10, $sformatf("NVMM read with extra tRCD %0d", l1));
    lat1(0, 34'h0_8000_0100, 20, l2);
    check(l2 == l0, $sformatf("DRAM read unaffected %0d", l2));
    // write NVMM row then read another row of the same bank at once:
    // PRE waits for tRAS+add_tras, ACT waits tRP+add_trp (dirty)
    issue(1, 34'h0_C010_0000);
    lat1(0, 34'h0_C020_0000, 0, l3);
    $display("NVMM row conflict after write: %0d clocks", l3);
    check(l3 >= 30 + 9 + 10 + 7, $sformatf("conflict latency %0d includes extra tRAS, tRP, tRCD", l3));
    check(stat_tras_hold > 0 && stat_dirty_trp > 0, "extra tRAS hold and dirty tRP counted");
    // random traffic over all banks, a few rows, DRAM and NVMM
    for (int i = 0; i < 400; i++)
      issue($urandom_range(0, 1), mk($urandom_range(0, 7), $urandom_range(0, 2), $urandom_range(0, 5)));
    drain();
    check(u_ddr.violations == 0, $sformatf("DDR3 timing violations %0d", u_ddr.violations));
    check(stat_rd == 32'(u_ddr.n_rd) && stat_wr == 32'(u_ddr.n_wr) && stat_act == 32'(u_ddr.n_act),
          "RD/WR/ACT counters match the DDR3 model");
    check(nrsp == 407, $sformatf("responses %0d", nrsp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
