// tb_micro_bench: the latency micro benchmark run on the full memory path
// (default parameters): a pointer-free sequential walk of cacheline reads
// with a 64-byte stride, one request at a time, over an unprotected and a
// protected area, first as plain DRAM and then as NVMM with DCPMM timing
// (base 1,000 ns = 200 clocks, reads crossing 256 B / 4 KiB +2,000 ns /
// +2,500 ns = 400 / 500 clocks). Prints the average latency of each of the
// four cases and checks their ordering and the DCPMM arithmetic: a 64-byte
// stride crosses a 256-byte block every 4th read and a 4-KiB page every
// 64th, so the NVMM average must exceed the DRAM one by
// 200 + (15*400 + 500)/64 clocks exactly for unprotected reads. Protected
// reads run the six tree loads one after another, each paying the DCPMM delay.
module tb_micro_bench;
  import nvmm_pkg::*;

  localparam addr_t PB = 34'h0_C000_0000;
  localparam addr_t UP = 34'h0_F000_0000;
  localparam int    N  = 64;               // reads per case (one 4-KiB page)
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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] v);
    @(negedge clk); mmio_we = 1; mmio_addr = a; mmio_wdata = v;
    @(negedge clk); mmio_we = 0;
  endtask

  // one read; returns clocks from request to response
  task automatic rd(input addr_t a, output int lat);
    int t;
    @(negedge clk);
    llc_req_valid = 1; llc_req = '{id: 6'd1, addr: a, we: 1'b0, data: '0};
    t = 0;
    forever begin
      bit r;
      #1 r = llc_req_ready;
      @(posedge clk);
      if (r) break;
      @(negedge clk); t++;
    end
    @(negedge clk); llc_req_valid = 0; t++;
    while (!llc_rsp_valid) begin @(negedge clk); t++; end
    check(!llc_rsp.corrupt && llc_rsp.data == '0, $sformatf("fresh line %h reads as zero", a));
    lat = t;
  endtask

  task automatic walk(input addr_t base, output real avg);
    int lat; longint sum;
    sum = 0;
    for (int i = 0; i < N; i++) begin rd(base + 34'(i) * 34'd64, lat); sum += lat; end
    avg = real'(sum) / N;
  endtask

  initial begin
    real dram_up, dram_p, nv_up, nv_p, extra;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) wr(8'(16 + i), 32'h1357_9BDF * (i + 1));
    walk(UP, dram_up); walk(PB, dram_p);
    wr(0, 32'(PB >> 12)); wr(1, 32'h0010_0000);
    wr(3, 200); wr(5, 400); wr(6, 500); wr(4, 200); wr(7, 1000); wr(8, 1600); wr(2, 2);
    walk(UP + 34'h10_0000, nv_up); walk(PB + 34'h10_0000, nv_p);
    $display("average read latency [clocks]: DRAM w/o MPE %0.2f, DRAM w/ MPE %0.2f, NVMM w/o MPE %0.2f, NVMM w/ MPE %0.2f",
             dram_up, dram_p, nv_up, nv_p);
    $display("normalized w/ MPE against w/o MPE: DRAM %0.2f, NVMM %0.2f", dram_p / dram_up, nv_p / nv_up);
    extra = 200.0 + (15.0 * 400.0 + 500.0) / 64.0;
    check(nv_up - dram_up > extra - 0.01 && nv_up - dram_up < extra + 0.01,
          $sformatf("DCPMM adds %0.3f clocks on average (expected %0.3f)", nv_up - dram_up, extra));
    check(dram_p > dram_up && nv_p > nv_up, "protection costs latency");
    check(u_ddr.violations == 0, "no DDR3 timing violations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
