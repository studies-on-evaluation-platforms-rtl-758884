// tb_aes_otp: compares the 64-byte counter-mode pad with the reference for
// random keys, addresses and counters, and checks the 10-clock latency.
module tb_aes_otp;
  import nvmm_pkg::*;
  import mpe_pkg::*;
  import sit_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key; addr_t addr; ctr_t ctr; line_t otp;
  int checks = 0, failures = 0;
  aes_otp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int cyc; line_t exp;
      @(negedge clk);
      key = {$urandom, $urandom, $urandom, $urandom};
      addr = {$urandom, $urandom} & ~34'h3f; ctr = {$urandom, $urandom};
      exp = ref_otp(key, addr, ctr);
      start = 1;
      @(negedge clk); start = 0; cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (otp !== exp) begin failures++; $display("FAIL otp"); end
      checks++; if (cyc != 10) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++; if (otp[127:0] == otp[255:128]) begin failures++; $display("FAIL lanes equal"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
