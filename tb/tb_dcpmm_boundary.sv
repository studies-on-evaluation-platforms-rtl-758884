// tb_dcpmm_boundary: drives random addresses (mostly near the previous
// one) into the DCPMM latency calculator and compares the delay and the
// crossing flags with a model kept in the testbench: first request and
// every change of 4-KiB page pay base+add4k, a change of 256-byte block
// inside the page pays base+add256, otherwise base.
module tb_dcpmm_boundary;
  import nvmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fire = 0; addr_t addr = '0; lat_t base = 16'd100, add256 = 16'd37, add4k = 16'd211;
  lat_t delay; logic cross256, cross4k;
  dcpmm_boundary dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    addr_t prev; bit first; lat_t exp;
    first = 1; prev = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: addr = prev + 34'h40;
        1: addr = prev + 34'(($urandom_range(0, 15)) << 8);
        2: addr = {prev[33:12], 12'(($urandom_range(0, 63)) << 6)};
        default: addr = 34'h0_8000_0000 + 34'($urandom) & 34'h3_FFFF_FFC0;
      endcase
      fire = $urandom_range(0, 3) != 0;
      #1;
      if (first || addr[33:12] != prev[33:12]) exp = base + add4k;
      else if (addr[11:8] != prev[11:8]) exp = base + add256;
      else exp = base;
      checks++;
      if (delay != exp || cross4k != (exp == base + add4k) || cross256 != (exp == base + add256)) begin
        failures++;
        $display("FAIL: addr %h prev %h delay %0d exp %0d", addr, prev, delay, exp);
      end
      @(posedge clk);
      if (fire) begin prev = addr; first = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
