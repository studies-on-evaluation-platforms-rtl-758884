// mpe: the Memory Protection Engine, placed between the LLC and the memory
// controller. It consists of one Frontend, N_TREES Tree modules and one
// Backend (Fig. 4.2 of the source design: 8 Trees, 384 roots of a 4-level
// SGX-style integrity tree, 96 MiB of protected data and its metadata).
//
// Requests to the protected data region are verified (reads and writes) and
// updated (writes) by a Tree, which does its node and cacheline traffic
// through the Backend; other requests pass to the Backend directly. Several
// Trees work in parallel on requests under different roots. Each response
// carries a corrupt bit that is set when verification failed.
//
// Interface: LLC side request/response (valid/ready, one 64-byte line per
// request), the key write port, a memory-controller port, and statistics.
// Timing: see mpe_tree (109 / 182 clocks per read / write with an 18 / 12
// clock memory), plus one memory round trip through the Backend for every
// unprotected request.
module mpe
  import nvmm_pkg::*;
  import mpe_pkg::*;
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
  input  logic        key_we,
  input  logic [3:0]  key_sel,
  input  logic [31:0] key_wdata,
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  input  logic        mrsp_valid,
  output logic        mrsp_ready,
  input  mem_rsp_t    mrsp,
  output logic [31:0] stat_lock_stalls,
  output logic [31:0] stat_tree_stalls,
  output logic [31:0] stat_corrupt,
  output logic [N_TREES-1:0] tree_busy
);
  logic [127:0] key_e, key_m;
  logic [63:0]  key_p;

  logic [N_TREES-1:0]    t_assign_valid, t_assign_ready, t_rsp_valid, t_rsp_ready;
  mem_req_t              t_assign_req;
  logic [ROOT_IDX_W-1:0] t_assign_root;
  ctr_t                  t_assign_root_ctr;
  mem_rsp_t              t_rsp [N_TREES];
  logic [ROOT_IDX_W-1:0] t_rsp_root [N_TREES];
  ctr_t                  t_rsp_root_ctr [N_TREES];

  logic                  bp_req_valid, bp_req_ready, bp_rsp_valid, bp_rsp_ready;
  mem_req_t              bp_req;
  mem_rsp_t              bp_rsp;

  // Backend ports: 0..N_TREES-1 are the Trees, N_TREES is the Frontend bypass.
  logic [N_TREES:0]      be_req_valid, be_req_ready, be_rsp_valid, be_rsp_ready;
  mem_req_t              be_req [N_TREES+1];
  mem_rsp_t              be_rsp;

  mpe_frontend #(.N_TREES (N_TREES), .N_ROOTS (N_ROOTS), .PROT_BASE (PROT_BASE)) u_front (
    .clk, .rst_n,
    .llc_req_valid, .llc_req_ready, .llc_req, .llc_rsp_valid, .llc_rsp_ready, .llc_rsp,
    .key_we, .key_sel, .key_wdata, .key_e, .key_p, .key_m,
    .t_assign_valid, .t_assign_ready, .t_assign_req, .t_assign_root, .t_assign_root_ctr,
    .t_rsp_valid, .t_rsp_ready, .t_rsp, .t_rsp_root, .t_rsp_root_ctr,
    .bp_req_valid, .bp_req_ready, .bp_req, .bp_rsp_valid, .bp_rsp_ready, .bp_rsp,
    .stat_lock_stalls, .stat_tree_stalls, .stat_corrupt
  );

  for (genvar i = 0; i < N_TREES; i++) begin : g_tree
    mpe_tree #(.PROT_BASE (PROT_BASE), .N_ROOTS (N_ROOTS)) u_tree (
      .clk, .rst_n, .key_e, .key_p, .key_m,
      .assign_valid (t_assign_valid[i]), .assign_ready (t_assign_ready[i]),
      .assign_req (t_assign_req), .assign_root (t_assign_root),
      .assign_root_ctr (t_assign_root_ctr),
      .rsp_valid (t_rsp_valid[i]), .rsp_ready (t_rsp_ready[i]), .rsp (t_rsp[i]),
      .rsp_root (t_rsp_root[i]), .rsp_root_ctr (t_rsp_root_ctr[i]),
      .mreq_valid (be_req_valid[i]), .mreq_ready (be_req_ready[i]), .mreq (be_req[i]),
      .mrsp_valid (be_rsp_valid[i]), .mrsp_ready (be_rsp_ready[i]), .mrsp (be_rsp)
    );
    assign tree_busy[i] = !t_assign_ready[i];
  end

  assign be_req_valid[N_TREES] = bp_req_valid;
  assign bp_req_ready          = be_req_ready[N_TREES];
  assign be_req[N_TREES]       = bp_req;
  assign bp_rsp_valid          = be_rsp_valid[N_TREES];
  assign be_rsp_ready[N_TREES] = bp_rsp_ready;
  assign bp_rsp                = be_rsp;

  mpe_backend #(.N (N_TREES + 1)) u_back (
    .clk, .rst_n,
    .req_valid (be_req_valid), .req_ready (be_req_ready), .req (be_req),
    .rsp_valid (be_rsp_valid), .rsp_ready (be_rsp_ready), .rsp (be_rsp),
    .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp_ready, .mrsp
  );
endmodule
