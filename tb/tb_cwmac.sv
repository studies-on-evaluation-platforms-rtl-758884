// tb_cwmac: compares the CWMAC unit with the reference Carter-Wegman MAC for
// random keys, messages and tweaks of 9 and 10 words, and checks its
// 10-clock latency.
module tb_cwmac;
  import mpe_pkg::*;
  import sit_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [63:0] key_p; logic [127:0] key_m, tweak;
  logic [639:0] msg; logic [3:0] nwords;
  mac_t mac;
  int checks = 0, failures = 0;
  cwmac dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int cyc;
      mac_t exp;
      @(negedge clk);
      key_p = {$urandom, $urandom}; key_m = {$urandom, $urandom, $urandom, $urandom};
      tweak = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 20; i++) msg[32*i +: 32] = $urandom;
      nwords = (t % 2) ? 4'd10 : 4'd9;
      exp = ref_cwmac(key_p, key_m, msg, int'(nwords), tweak);
      start = 1;
      @(negedge clk); start = 0; cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (mac !== exp) begin failures++; $display("FAIL mac %h exp %h", mac, exp); end
      checks++; if (cyc != 10) begin failures++; $display("FAIL latency %0d", cyc); end
      @(negedge clk);
      checks++; if (busy || done) begin failures++; $display("FAIL idle after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
