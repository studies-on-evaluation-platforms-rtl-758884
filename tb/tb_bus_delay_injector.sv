// tb_bus_delay_injector: measures, request by request, the clocks from
// acceptance to the request appearing at the output, for DRAM and NVMM
// addresses in the off, coarse-grain and DCPMM modes, and compares them with
// 1 + the expected injected delay (the DCPMM one computed in the testbench
// from the previous address of the same direction). Also checks that the
// request comes out unchanged, that a second read waits while the first is
// held (one request per bus) while a write passes it, and the counters.
module tb_bus_delay_injector;
  import nvmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  nvmm_cfg_t cfg;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  mem_req_t in_req = '0, out_req;
  logic [31:0] stat_delayed, stat_stall, stat_cross256, stat_cross4k;
  bus_delay_injector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one request and return the clocks until it is seen at the output
  task automatic one(input bit we, input addr_t a, output int lat);
    int t;
    @(negedge clk);
    in_valid = 1; in_req = '{id: 6'(a[11:6]), addr: a, we: we, data: {16{32'(a)}}};
    while (!in_ready) @(negedge clk);
    @(posedge clk); #1 in_valid = 0;
    t = 1;
    while (!(out_valid && out_ready)) begin @(negedge clk); if (!(out_valid && out_ready)) t++; end
    check(out_req.addr == a && out_req.we == we && out_req.data == {16{32'(a)}}, "request unchanged");
    @(posedge clk);
    lat = t;
  endtask

  addr_t prev [2]; bit first [2];
  function automatic int dc_exp(bit we, addr_t a);
    int c; int e;
    c = int'(we);
    if (first[c] || a[33:12] != prev[c][33:12]) e = int'(we ? cfg.wr_delay + cfg.wr_add4k : cfg.rd_delay + cfg.rd_add4k);
    else if (a[11:8] != prev[c][11:8]) e = int'(we ? cfg.wr_delay + cfg.wr_add256 : cfg.rd_delay + cfg.rd_add256);
    else e = int'(we ? cfg.wr_delay : cfg.rd_delay);
    first[c] = 0; prev[c] = a;
    return e;
  endfunction

  initial begin
    int lat, e;
    cfg = '0;
    cfg.nvmm_base = 34'h0_C000_0000; cfg.nvmm_limit = 34'h1_0000_0000;
    cfg.rd_delay = 16'd23; cfg.wr_delay = 16'd41;
    cfg.rd_add256 = 16'd7; cfg.rd_add4k = 16'd19; cfg.wr_add256 = 16'd5; cfg.wr_add4k = 16'd13;
    cfg.bus_mode = BUS_OFF;
    first[0] = 1; first[1] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    one(0, 34'h0_C000_0000, lat); check(lat == 1, $sformatf("off mode NVMM read %0d", lat));
    cfg.bus_mode = BUS_COARSE;
    one(0, 34'h0_8000_0040, lat); check(lat == 1, $sformatf("coarse DRAM read %0d", lat));
    one(0, 34'h0_C000_0040, lat); check(lat == 24, $sformatf("coarse NVMM read %0d", lat));
    one(1, 34'h0_C000_0080, lat); check(lat == 42, $sformatf("coarse NVMM write %0d", lat));
    one(1, 34'h0_BFFF_FFC0, lat); check(lat == 1, "address below range not delayed");
    one(1, 34'h1_0000_0000, lat); check(lat == 1, "limit is exclusive");
    // one request per bus: the second read waits, the write does not
    @(negedge clk);
    in_valid = 1; in_req = '{id: 1, addr: 34'h0_C000_1000, we: 0, data: '0};
    @(posedge clk); #1 in_req = '{id: 2, addr: 34'h0_C000_2000, we: 0, data: '0};
    repeat (3) @(negedge clk);
    check(!in_ready, "second read held while the read bus is busy");
    in_req.we = 1; #1;
    check(in_ready, "write accepted while the read bus is busy");
    @(posedge clk); #1 in_valid = 0;
    repeat (80) @(posedge clk);
    check(stat_stall > 0, "stall counted");
    // DCPMM mode, random addresses around a few pages
    cfg.bus_mode = BUS_DCPMM;
    for (int i = 0; i < 120; i++) begin
      bit we; addr_t a;
      we = $urandom_range(0, 1);
      a = 34'h0_C000_0000 + 34'($urandom_range(0, 3)) * 34'h1000 + 34'($urandom_range(0, 63)) * 34'h40;
      e = dc_exp(we, a);
      one(we, a, lat);
      check(lat == e + 1, $sformatf("DCPMM %s %h: %0d expected %0d", we ? "write" : "read", a, lat, e + 1));
    end
    check(stat_cross4k > 0 && stat_cross256 > 0, "crossings counted");
    check(stat_delayed == 32'd124, $sformatf("delayed count %0d", stat_delayed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
