// nvmm_sim_top: memory path of the secure DRAM/NVMM emulation platform.
// Last-level-cache side cacheline port -> MPE (counter-mode encryption and
// SGX-style integrity tree over the protected region) -> bus delay
// injector (coarse-grain / DCPMM latency) -> memory controller with
// fine-grain and extended fine-grain bank timing -> DDR command port to
// the PHY. Memory responses go straight from the controller back to the
// MPE. An MMIO register file configures the emulation, loads the MPE keys
// and exposes the counters.
// Interface: llc_req/llc_rsp valid/ready cacheline streams (one request
// per id outstanding), mmio_* word register port, ddr_cmd/ddr_rvalid/
// ddr_rdata to the PHY (not part of this design), one clock domain (the
// 200-MHz memory clock of the source design), active-low async reset.
// Statistics at MMIO words 32..: 0 lock stalls, 1 tree stalls, 2 corrupt
// responses, 3 ACT, 4 ACT to NVMM rows, 5 RD, 6 WR, 7 row hits, 8 clocks
// precharge held by extra tRAS, 9 dirty-row extra tRP, 10 delayed bus
// requests, 11 bus stall clocks, 12 256-B crossings, 13 4-KiB crossings.
// Source: the order of the blocks and the injection methods. Own: the
// port encodings, register map and counter set.
module nvmm_sim_top
  import nvmm_pkg::*;
#(
  parameter int unsigned N_TREES   = 8,
  parameter int unsigned N_ROOTS   = 384,
  parameter addr_t       PROT_BASE = 34'h0_C000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        llc_req_valid,
  output logic        llc_req_ready,
  input  mem_req_t    llc_req,
  output logic        llc_rsp_valid,
  input  logic        llc_rsp_ready,
  output mem_rsp_t    llc_rsp,
  input  logic        mmio_we,
  input  logic [7:0]  mmio_addr,
  input  logic [31:0] mmio_wdata,
  output logic [31:0] mmio_rdata,
  output logic        ddr_cmd_valid,
  output ddr_cmd_t    ddr_cmd,
  input  logic        ddr_rvalid,
  input  line_t       ddr_rdata,
  output logic [N_TREES-1:0] tree_busy   // Trees currently working on a request
);
  localparam int unsigned N_STAT = 14;

  nvmm_cfg_t   cfg;
  logic        key_we;
  logic [3:0]  key_sel;
  logic [31:0] key_wdata;
  logic [31:0] stat [N_STAT];

  logic     m_valid, m_ready, d_valid, d_ready, r_valid, r_ready;
  mem_req_t m_req, d_req;
  mem_rsp_t r_rsp;

  nvmm_csr #(.N_STAT(N_STAT)) u_csr (
    .clk, .rst_n, .mmio_we, .mmio_addr, .mmio_wdata, .mmio_rdata,
    .cfg, .key_we, .key_sel, .key_wdata, .stat);

  mpe #(.N_TREES(N_TREES), .N_ROOTS(N_ROOTS), .PROT_BASE(PROT_BASE)) u_mpe (
    .clk, .rst_n,
    .llc_req_valid, .llc_req_ready, .llc_req, .llc_rsp_valid, .llc_rsp_ready, .llc_rsp,
    .key_we, .key_sel, .key_wdata,
    .mreq_valid (m_valid), .mreq_ready (m_ready), .mreq (m_req),
    .mrsp_valid (r_valid), .mrsp_ready (r_ready), .mrsp (r_rsp),
    .stat_lock_stalls (stat[0]), .stat_tree_stalls (stat[1]), .stat_corrupt (stat[2]),
    .tree_busy);

  bus_delay_injector u_bus (
    .clk, .rst_n, .cfg,
    .in_valid (m_valid), .in_ready (m_ready), .in_req (m_req),
    .out_valid (d_valid), .out_ready (d_ready), .out_req (d_req),
    .stat_delayed (stat[10]), .stat_stall (stat[11]),
    .stat_cross256 (stat[12]), .stat_cross4k (stat[13]));

  nvmm_mc u_mc (
    .clk, .rst_n, .cfg,
    .req_valid (d_valid), .req_ready (d_ready), .req (d_req),
    .rsp_valid (r_valid), .rsp_ready (r_ready), .rsp (r_rsp),
    .ddr_cmd_valid, .ddr_cmd, .ddr_rvalid, .ddr_rdata,
    .stat_act (stat[3]), .stat_act_nvmm (stat[4]), .stat_rd (stat[5]), .stat_wr (stat[6]),
    .stat_hit (stat[7]), .stat_tras_hold (stat[8]), .stat_dirty_trp (stat[9]));
endmodule
