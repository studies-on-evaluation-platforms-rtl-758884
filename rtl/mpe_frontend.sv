// mpe_frontend: the MPE Frontend. It sits between the LLC and the Tree and
// Backend modules, and owns the tree roots and the keys.
//
// A request whose address lies in the protected data region goes to a Tree:
// the Frontend looks up its root (one per 256 KiB), stalls while that root is
// locked, then stalls until some Tree is idle, and hands the (request, root)
// pair to the lowest-numbered idle Tree while locking the root. Any other
// address goes to the Backend unchanged. Responses from the Trees and the
// Backend are returned to the LLC in whatever order they become ready
// (round-robin among ready sources); the LLC reorders them by ID. Returning a
// Tree's response releases the root lock and writes the root counter back.
// The corrupt bit travels with every response.
// Root counters are on-chip registers (the document uses non-volatile
// registers; here they reset to zero). Keys K_E (128 bits), K_P (64 bits) and
// K_M (128 bits) are written 32 bits at a time: key_sel 0-3 K_E, 4-5 K_P,
// 6-9 K_M, word 0 least significant. The lock/assign policy follows the
// document; the key port and the choice of Tree are this design's choices.
//
// Timing: a request is accepted in the clock it can be assigned (no extra
// register stage); responses pass through combinationally.
module mpe_frontend
  import nvmm_pkg::*;
  import mpe_pkg::*;
#(
  parameter int unsigned N_TREES   = 8,
  parameter int unsigned N_ROOTS   = 384,
  parameter addr_t       PROT_BASE = 34'h0_C000_0000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // LLC side
  input  logic                  llc_req_valid,
  output logic                  llc_req_ready,
  input  mem_req_t              llc_req,
  output logic                  llc_rsp_valid,
  input  logic                  llc_rsp_ready,
  output mem_rsp_t              llc_rsp,
  // key configuration
  input  logic                  key_we,
  input  logic [3:0]            key_sel,
  input  logic [31:0]           key_wdata,
  output logic [127:0]          key_e,
  output logic [63:0]           key_p,
  output logic [127:0]          key_m,
  // Trees
  output logic [N_TREES-1:0]    t_assign_valid,
  input  logic [N_TREES-1:0]    t_assign_ready,
  output mem_req_t              t_assign_req,
  output logic [ROOT_IDX_W-1:0] t_assign_root,
  output ctr_t                  t_assign_root_ctr,
  input  logic [N_TREES-1:0]    t_rsp_valid,
  output logic [N_TREES-1:0]    t_rsp_ready,
  input  mem_rsp_t              t_rsp [N_TREES],
  input  logic [ROOT_IDX_W-1:0] t_rsp_root [N_TREES],
  input  ctr_t                  t_rsp_root_ctr [N_TREES],
  // Backend bypass for unprotected addresses
  output logic                  bp_req_valid,
  input  logic                  bp_req_ready,
  output mem_req_t              bp_req,
  input  logic                  bp_rsp_valid,
  output logic                  bp_rsp_ready,
  input  mem_rsp_t              bp_rsp,
  // statistics
  output logic [31:0]           stat_lock_stalls,
  output logic [31:0]           stat_tree_stalls,
  output logic [31:0]           stat_corrupt
);
  localparam addr_t PROT_END = PROT_BASE + addr_t'(N_ROOTS) * addr_t'(CL_PER_ROOT * LINE_BYTES);
  localparam int unsigned NS = N_TREES + 1;   // response sources: Trees, then bypass
  localparam int unsigned SW = $clog2(NS + 1);

  ctr_t             roots_q [N_ROOTS];
  logic [N_ROOTS-1:0] lock_q;

  // ------------------------------------------------------------ request side
  logic                  is_prot, locked, any_free;
  logic [ROOT_IDX_W-1:0] root;
  int unsigned           free_idx;

  assign is_prot = (llc_req.addr >= PROT_BASE) && (llc_req.addr < PROT_END);
  assign root    = ROOT_IDX_W'((llc_req.addr - PROT_BASE) >> 18);
  assign locked  = is_prot && lock_q[root];

  always_comb begin
    any_free = 1'b0;
    free_idx = 0;
    for (int i = N_TREES - 1; i >= 0; i--)
      if (t_assign_ready[i]) begin
        any_free = 1'b1;
        free_idx = i;
      end
  end

  always_comb begin
    t_assign_valid = '0;
    if (llc_req_valid && is_prot && !locked && any_free) t_assign_valid[free_idx] = 1'b1;
  end
  assign t_assign_req      = llc_req;
  assign t_assign_root     = root;
  assign t_assign_root_ctr = roots_q[root];

  assign bp_req_valid  = llc_req_valid && !is_prot;
  assign bp_req        = llc_req;
  assign llc_req_ready = is_prot ? (!locked && any_free) : bp_req_ready;

  // ------------------------------------------------------------ response side
  logic [SW-1:0] last_q, pick;
  logic          have;
  logic [NS-1:0] src_valid;
  assign src_valid = {bp_rsp_valid, t_rsp_valid};

  always_comb begin
    have = 1'b0;
    pick = '0;
    for (int k = 1; k <= int'(NS); k++) begin
      int unsigned i;
      i = (int'(last_q) + k) % NS;
      if (!have && src_valid[i]) begin
        have = 1'b1;
        pick = SW'(i);
      end
    end
  end

  assign llc_rsp_valid = have;
  assign llc_rsp       = (int'(pick) == N_TREES) ? bp_rsp : t_rsp[pick];
  assign bp_rsp_ready  = have && (int'(pick) == N_TREES) && llc_rsp_ready;
  always_comb begin
    t_rsp_ready = '0;
    if (have && int'(pick) < N_TREES) t_rsp_ready[pick] = llc_rsp_ready;
  end

  // ------------------------------------------------------------ state
  logic tree_done;
  assign tree_done = have && int'(pick) < N_TREES && llc_rsp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_ROOTS); r++) roots_q[r] <= '0;
      lock_q  <= '0;
      last_q  <= SW'(NS - 1);
      key_e   <= '0;
      key_p   <= '0;
      key_m   <= '0;
      stat_lock_stalls <= '0;
      stat_tree_stalls <= '0;
      stat_corrupt     <= '0;
    end else begin
      if (|t_assign_valid) lock_q[root] <= 1'b1;
      if (tree_done) begin
        lock_q[t_rsp_root[pick]]  <= 1'b0;
        roots_q[t_rsp_root[pick]] <= t_rsp_root_ctr[pick];
      end
      if (have && llc_rsp_ready) begin
        last_q <= pick;
        if (llc_rsp.corrupt) stat_corrupt <= stat_corrupt + 32'd1;
      end
      if (llc_req_valid && locked)                stat_lock_stalls <= stat_lock_stalls + 32'd1;
      if (llc_req_valid && is_prot && !locked && !any_free)
                                                  stat_tree_stalls <= stat_tree_stalls + 32'd1;
      if (key_we) begin
        case (key_sel)
          4'd0: key_e[31:0]    <= key_wdata;
          4'd1: key_e[63:32]   <= key_wdata;
          4'd2: key_e[95:64]   <= key_wdata;
          4'd3: key_e[127:96]  <= key_wdata;
          4'd4: key_p[31:0]    <= key_wdata;
          4'd5: key_p[63:32]   <= key_wdata;
          4'd6: key_m[31:0]    <= key_wdata;
          4'd7: key_m[63:32]   <= key_wdata;
          4'd8: key_m[95:64]   <= key_wdata;
          4'd9: key_m[127:96]  <= key_wdata;
          default: ;
        endcase
      end
    end
  end

  a_lock_before_assign: assert property (@(posedge clk) disable iff (!rst_n)
    |t_assign_valid |-> !lock_q[root]);
  a_onehot_assign: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(t_assign_valid));
endmodule
