// mpe_tree: one Tree module of the Memory Protection Engine. It serves one
// (memory request, root) pair at a time over a 4-level SGX-style integrity tree.
//
// Verification (every request) loads, one after the other, the L2, L1, L0 and
// Meta nodes on the path of the target cacheline (CL), the CL itself and its
// PD_Tag node. While each line is being loaded, the CWMAC unit computes the MAC
// of the line loaded before it: a node's MAC covers its eight counters, the
// matching counter of its parent (the on-chip root for L2) and its address; a
// CL's MAC covers its ciphertext, its Meta counter and its address. When the
// Meta node arrives, the AES unit speculatively computes the counter-mode pad
// with the current counter (read) or the incremented one (write). After the
// PD_Tag node, all five computed MACs are compared with the stored ones (Comp).
// A read then returns the decrypted CL; any mismatch returns corrupt=1 and
// discards everything speculative.
//
// Update (verified writes only): all path counters and the root are
// incremented at once and the new data are encrypted (Inc and XOR, in the same
// clock as Comp in this design), then CL, PD_Tag, Meta, L0, L1 and L2 are
// stored in that order; while each store runs, CWMAC computes the MAC needed
// by the next one.
//
// Timing with a memory that answers a load in 18 clocks and a store in 12 (as
// in the document's Gantt chart): assign to read response 109 clocks, assign
// to write response 182 clocks. The order of the steps follows the Gantt chart
// (Fig. 4.3); merging Inc into the Comp clock, the node encoding and the MAC
// message format are this design's choices.
//
// Interface: `assign_*` valid/ready hands over the request, its root index and
// the root counter; `rsp_*` valid/ready returns the response with the root
// index and the (possibly incremented) root counter for the Frontend to write
// back; `m*` is the Tree's port to the Backend.
module mpe_tree
  import nvmm_pkg::*;
  import mpe_pkg::*;
#(
  parameter addr_t       PROT_BASE = 34'h0_C000_0000,
  parameter int unsigned N_ROOTS   = 384
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [127:0]          key_e,
  input  logic [63:0]           key_p,
  input  logic [127:0]          key_m,
  input  logic                  assign_valid,
  output logic                  assign_ready,
  input  mem_req_t              assign_req,
  input  logic [ROOT_IDX_W-1:0] assign_root,
  input  ctr_t                  assign_root_ctr,
  output logic                  rsp_valid,
  input  logic                  rsp_ready,
  output mem_rsp_t              rsp,
  output logic [ROOT_IDX_W-1:0] rsp_root,
  output ctr_t                  rsp_root_ctr,
  output logic                  mreq_valid,
  input  logic                  mreq_ready,
  output mem_req_t              mreq,
  input  logic                  mrsp_valid,
  output logic                  mrsp_ready,
  input  mem_rsp_t              mrsp
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMP, S_STORE, S_RESP} state_e;

  state_e                  state_q;
  logic [2:0]              step_q;
  mem_req_t                req_q;
  logic [ROOT_IDX_W-1:0]   root_q;
  ctr_t                    root_ctr_q;
  line_t                   n_q [6];       // indexed by node_kind_e
  mac_t                    mac_calc_q [5];
  logic [2:0]              mac_sel_q;
  logic                    mac_pend_q, mac_upd_q, otp_pend_q;

  // ------------------------------------------------------------ path indices
  cl_idx_t    cl;
  logic [2:0] s2, s1, s0, sm;
  addr_t      line_addr;
  assign line_addr = {req_q.addr[ADDR_W-1:6], 6'b0};
  assign cl = cl_idx_t'((req_q.addr - PROT_BASE) >> 6);
  assign s2 = cl[11:9];
  assign s1 = cl[8:6];
  assign s0 = cl[5:3];
  assign sm = cl[2:0];

  function automatic ctr_t parent_ctr(logic [2:0] k);
    case (k)
      3'd0:    return root_ctr_q;
      3'd1:    return node_ctr(n_q[NK_L2], s2);
      3'd2:    return node_ctr(n_q[NK_L1], s1);
      3'd3:    return node_ctr(n_q[NK_L0], s0);
      default: return node_ctr(n_q[NK_META], sm);
    endcase
  endfunction

  // ------------------------------------------------------------ CWMAC
  logic        mac_busy, mac_done;
  mac_t        mac;
  logic [639:0] mac_msg;
  logic [3:0]  mac_n;
  logic [127:0] mac_tweak;
  addr_t       mac_addr;
  ctr_t        mac_par;

  always_comb begin
    mac_addr = node_addr(PROT_BASE, N_ROOTS, node_kind_e'(mac_sel_q), cl);
    mac_par  = parent_ctr(mac_sel_q);
    mac_msg  = '0;
    if (mac_sel_q == 3'd4) begin
      mac_msg[511:0]   = n_q[NK_CL];
      mac_msg[575:512] = 64'(mac_par);
      mac_msg[639:576] = 64'(mac_addr);
      mac_n     = 4'd10;
      mac_tweak = {64'(mac_addr), mac_par, 8'h02};
    end else begin
      mac_msg[447:0]   = n_q[mac_sel_q][447:0];
      mac_msg[511:448] = 64'(mac_par);
      mac_msg[575:512] = 64'(mac_addr);
      mac_n     = 4'd9;
      mac_tweak = {64'(mac_addr), mac_par, 8'h01};
    end
  end

  cwmac u_cwmac (
    .clk, .rst_n, .start (mac_pend_q), .key_p, .key_m,
    .msg (mac_msg), .nwords (mac_n), .tweak (mac_tweak),
    .busy (mac_busy), .done (mac_done), .mac
  );

  logic mac_free;
  assign mac_free = !mac_pend_q && !mac_busy;

  // ------------------------------------------------------------ AES (OTP)
  logic  otp_busy, otp_done;
  line_t otp;
  ctr_t  otp_ctr;
  assign otp_ctr = node_ctr(n_q[NK_META], sm) + (req_q.we ? ctr_t'(1) : ctr_t'(0));

  aes_otp u_aes (
    .clk, .rst_n, .start (otp_pend_q), .key (key_e), .addr (line_addr),
    .ctr (otp_ctr), .busy (otp_busy), .done (otp_done), .otp
  );

  logic otp_free;
  assign otp_free = !otp_pend_q && !otp_busy;

  // ------------------------------------------------------------ MEM
  node_kind_e kind;
  logic       mem_active, mem_done;
  line_t      mem_rdata;

  function automatic node_kind_e store_kind(logic [2:0] j);
    case (j)
      3'd0:    return NK_CL;
      3'd1:    return NK_TAG;
      3'd2:    return NK_META;
      3'd3:    return NK_L0;
      3'd4:    return NK_L1;
      default: return NK_L2;
    endcase
  endfunction

  assign kind       = (state_q == S_STORE) ? store_kind(step_q) : node_kind_e'(step_q);
  assign mem_active = (state_q == S_LOAD) || (state_q == S_STORE);

  mpe_mem #(.PROT_BASE (PROT_BASE), .N_ROOTS (N_ROOTS)) u_mem (
    .clk, .rst_n, .active (mem_active), .we (state_q == S_STORE), .kind, .cl,
    .wline (n_q[kind]), .done (mem_done), .rdata (mem_rdata),
    .mreq_valid, .mreq_ready, .mreq, .mrsp_valid, .mrsp_ready, .mrsp
  );

  // ------------------------------------------------------------ verification result
  logic ok;
  always_comb begin
    ok = (mac_calc_q[4] == n_q[NK_TAG][MAC_W*sm +: MAC_W]);
    for (int k = 0; k < 4; k++)
      if (mac_calc_q[k] != node_mac(n_q[k])) ok = 1'b0;
  end

  logic comp_ready;
  assign comp_ready = (state_q == S_COMP) && mac_free && otp_free;

  assign assign_ready = (state_q == S_IDLE);
  assign rsp_valid    = (comp_ready && (!req_q.we || !ok)) || (state_q == S_RESP);
  assign rsp.id       = req_q.id;
  assign rsp.we       = req_q.we;
  assign rsp.corrupt  = (state_q == S_COMP) && !ok;
  assign rsp.data     = (state_q == S_COMP && !req_q.we && ok) ? (n_q[NK_CL] ^ otp) : '0;
  assign rsp_root     = root_q;
  assign rsp_root_ctr = root_ctr_q;

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      step_q     <= '0;
      req_q      <= '0;
      root_q     <= '0;
      root_ctr_q <= '0;
      for (int k = 0; k < 6; k++) n_q[k] <= '0;
      for (int k = 0; k < 5; k++) mac_calc_q[k] <= '0;
      mac_sel_q  <= '0;
      mac_pend_q <= 1'b0;
      mac_upd_q  <= 1'b0;
      otp_pend_q <= 1'b0;
    end else begin
      mac_pend_q <= 1'b0;
      otp_pend_q <= 1'b0;

      // MAC results: kept for Comp while verifying, written into the node
      // (or the PD_Tag slot) while updating.
      if (mac_done) begin
        if (!mac_upd_q)              mac_calc_q[mac_sel_q] <= mac;
        else if (mac_sel_q == 3'd4)  n_q[NK_TAG][MAC_W*sm +: MAC_W] <= mac;
        else                         n_q[mac_sel_q] <= set_mac(n_q[mac_sel_q], mac);
      end

      case (state_q)
        S_IDLE: if (assign_valid) begin
          req_q      <= assign_req;
          root_q     <= assign_root;
          root_ctr_q <= assign_root_ctr;
          step_q     <= '0;
          state_q    <= S_LOAD;
        end

        S_LOAD: if (mem_done && mac_free) begin
          n_q[step_q] <= mem_rdata;
          if (step_q <= 3'd4) begin
            mac_pend_q <= 1'b1;
            mac_sel_q  <= step_q;
            mac_upd_q  <= 1'b0;
          end
          if (step_q == 3'd3) otp_pend_q <= 1'b1;
          if (step_q == 3'd5) state_q <= S_COMP;
          else                step_q  <= step_q + 3'd1;
        end

        S_COMP: if (comp_ready) begin
          if (!req_q.we || !ok) begin
            if (rsp_ready) state_q <= S_IDLE;
          end else begin
            // Inc: every counter on the path and the root at once; XOR: encrypt.
            root_ctr_q   <= root_ctr_q + ctr_t'(1);
            n_q[NK_L2]   <= set_ctr(n_q[NK_L2],   s2, node_ctr(n_q[NK_L2], s2) + ctr_t'(1));
            n_q[NK_L1]   <= set_ctr(n_q[NK_L1],   s1, node_ctr(n_q[NK_L1], s1) + ctr_t'(1));
            n_q[NK_L0]   <= set_ctr(n_q[NK_L0],   s0, node_ctr(n_q[NK_L0], s0) + ctr_t'(1));
            n_q[NK_META] <= set_ctr(n_q[NK_META], sm, otp_ctr);
            n_q[NK_CL]   <= req_q.data ^ otp;
            mac_pend_q   <= 1'b1;
            mac_sel_q    <= 3'd4;
            mac_upd_q    <= 1'b1;
            step_q       <= '0;
            state_q      <= S_STORE;
          end
        end

        S_STORE: if (mem_done && mac_free) begin
          if (step_q == 3'd5) state_q <= S_RESP;
          else begin
            step_q <= step_q + 3'd1;
            // MAC needed by the store after the next one
            case (step_q + 3'd1)
              3'd1: begin mac_pend_q <= 1'b1; mac_sel_q <= 3'd3; end
              3'd2: begin mac_pend_q <= 1'b1; mac_sel_q <= 3'd2; end
              3'd3: begin mac_pend_q <= 1'b1; mac_sel_q <= 3'd1; end
              3'd4: begin mac_pend_q <= 1'b1; mac_sel_q <= 3'd0; end
              default: ;
            endcase
          end
        end

        S_RESP: if (rsp_ready) state_q <= S_IDLE;

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Handshake rules
  a_rsp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && !rsp_ready |=> rsp_valid);
endmodule
