// tb_nvmm_csr: writes random values to every configuration register and
// checks the read-back and the decoded configuration fields, checks that
// key writes reach the key port with the right select, that statistics read
// back at their words, that unmapped words read 0 and that reset clears all.
module tb_nvmm_csr;
  import nvmm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mmio_we = 0; logic [7:0] mmio_addr = '0; logic [31:0] mmio_wdata = '0, mmio_rdata;
  nvmm_cfg_t cfg; logic key_we; logic [3:0] key_sel; logic [31:0] key_wdata;
  logic [31:0] stat [16];
  nvmm_csr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nkey = 0;
  always @(posedge clk) if (key_we) begin
    nkey++;
    check(key_wdata == 32'hFEED_0000 + 32'(key_sel), $sformatf("key word %0d", key_sel));
  end

  initial begin
    logic [31:0] v [12];
    foreach (stat[i]) stat[i] = 32'h5A00_0000 + 32'(i);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); mmio_addr = 8'(i); #1 check(mmio_rdata == 0, "reset value 0");
    end
    for (int i = 0; i < 12; i++) begin
      v[i] = $urandom;
      if (i == 2) v[i] = 32'($urandom_range(0, 2));
      @(negedge clk); mmio_we = 1; mmio_addr = 8'(i); mmio_wdata = v[i];
    end
    @(negedge clk); mmio_we = 0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); mmio_addr = 8'(i); #1 check(mmio_rdata == v[i], $sformatf("readback %0d", i));
    end
    check(cfg.nvmm_base == {v[0][21:0], 12'h0} && cfg.nvmm_limit == {v[1][21:0], 12'h0}, "range decode");
    check(cfg.bus_mode == bus_mode_e'(v[2][1:0]), "mode decode");
    check(cfg.rd_delay == v[3][15:0] && cfg.wr_delay == v[4][15:0] && cfg.rd_add256 == v[5][15:0]
          && cfg.rd_add4k == v[6][15:0] && cfg.wr_add256 == v[7][15:0] && cfg.wr_add4k == v[8][15:0],
          "bus latency decode");
    check(cfg.add_trcd == v[9][15:0] && cfg.add_trp == v[10][15:0] && cfg.add_tras == v[11][15:0],
          "bank latency decode");
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); mmio_we = 1; mmio_addr = 8'(16 + i); mmio_wdata = 32'hFEED_0000 + 32'(i);
    end
    @(negedge clk); mmio_we = 0;
    check(nkey == 10, $sformatf("ten key writes forwarded (%0d)", nkey));
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); mmio_addr = 8'(32 + i); #1 check(mmio_rdata == stat[i], $sformatf("stat %0d", i));
    end
    @(negedge clk); mmio_addr = 8'd20; #1 check(mmio_rdata == 0, "key words read 0");
    @(negedge clk); mmio_addr = 8'd200; #1 check(mmio_rdata == 0, "unmapped reads 0");
    rst_n = 0; #1 rst_n = 1;
    @(negedge clk); mmio_addr = 8'd3; #1 check(mmio_rdata == 0 && cfg.bus_mode == BUS_OFF, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
