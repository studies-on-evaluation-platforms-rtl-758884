// nvmm_csr: MMIO register file of the NVMM/secure-memory emulation.
// Software sets the NVMM address range, the bus injection mode and every
// latency (in memory clocks), writes the MPE keys and reads the counters.
// Word-addressed, 32-bit registers; writes take effect the next clock,
// reads are combinational.
//   0 NVMM_BASE  (4-KiB page number)   1 NVMM_LIMIT (page number, exclusive)
//   2 BUS_MODE   (0 off, 1 coarse-grain, 2 DCPMM)
//   3 RD_DELAY   4 WR_DELAY   5 RD_ADD256  6 RD_ADD4K  7 WR_ADD256
//   8 WR_ADD4K   9 ADD_TRCD  10 ADD_TRP   11 ADD_TRAS      (low 16 bits)
//  16..25 KEY words (write-only: forwarded to the MPE key port, word
//         0-3 K_E, 4-5 K_P, 6-9 K_M, least significant word first)
//  32..32+N_STAT-1 statistics counters (read-only)
// Reset: all latencies 0, BUS_MODE off, empty NVMM range (plain DRAM).
// Source: latencies set from software through MMIO registers. Own: the
// register map, widths, page granularity and reset values.
module nvmm_csr
  import nvmm_pkg::*;
#(
  parameter int unsigned N_STAT = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mmio_we,
  input  logic [7:0]  mmio_addr,
  input  logic [31:0] mmio_wdata,
  output logic [31:0] mmio_rdata,
  output nvmm_cfg_t   cfg,
  output logic        key_we,
  output logic [3:0]  key_sel,
  output logic [31:0] key_wdata,
  input  logic [31:0] stat [N_STAT]
);
  logic [31:0] regs_q [12];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 12; i++) regs_q[i] <= '0;
    end else if (mmio_we && mmio_addr < 8'd12) begin
      regs_q[mmio_addr[3:0]] <= mmio_wdata;
    end
  end

  assign key_we    = mmio_we && mmio_addr >= 8'd16 && mmio_addr < 8'd26;
  assign key_sel   = 4'(mmio_addr - 8'd16);
  assign key_wdata = mmio_wdata;

  always_comb begin
    cfg.nvmm_base  = {regs_q[0][ADDR_W-13:0], 12'h000};
    cfg.nvmm_limit = {regs_q[1][ADDR_W-13:0], 12'h000};
    cfg.bus_mode   = bus_mode_e'(regs_q[2][1:0]);
    cfg.rd_delay   = regs_q[3][LAT_W-1:0];
    cfg.wr_delay   = regs_q[4][LAT_W-1:0];
    cfg.rd_add256  = regs_q[5][LAT_W-1:0];
    cfg.rd_add4k   = regs_q[6][LAT_W-1:0];
    cfg.wr_add256  = regs_q[7][LAT_W-1:0];
    cfg.wr_add4k   = regs_q[8][LAT_W-1:0];
    cfg.add_trcd   = regs_q[9][LAT_W-1:0];
    cfg.add_trp    = regs_q[10][LAT_W-1:0];
    cfg.add_tras   = regs_q[11][LAT_W-1:0];
  end

  always_comb begin
    mmio_rdata = '0;
    if (mmio_addr < 8'd12) mmio_rdata = regs_q[mmio_addr[3:0]];
    else if (mmio_addr >= 8'd32 && mmio_addr < 8'(32 + N_STAT)) mmio_rdata = stat[mmio_addr - 8'd32];
  end
endmodule
