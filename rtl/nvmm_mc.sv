// nvmm_mc: memory-controller logic (the part of the MIG controller that
// the NVMM emulation modifies): address decode, bank machines, DDR command
// arbitration and response return, with ACTIVATE and request counters.
// A request is accepted when its bank machine is free and a response slot
// is reserved for it (read and write responses are counted separately, so
// the response FIFOs never overflow). The address is split bank-row-column
// and tagged NVMM if it lies in [nvmm_base, nvmm_limit). Each clock one
// requesting bank is granted a DDR command, round-robin. A write completes
// when its WR is issued; a read's id is queued when its RD is issued and
// paired with the PHY's read data, which returns in issue order
// (ddr_rvalid). Responses leave reads-first; responses may be out of
// request order across banks and carry the request id.
// Interface: valid/ready request and response streams; DDR command port
// ddr_cmd_valid/ddr_cmd (one command per clock, no back-pressure);
// ddr_rvalid/ddr_rdata from the PHY.
// Source: bank machines with fine-grain and extended fine-grain extra
// timing, ACT and request counting. Own: address map, one-entry bank
// slots, arbitration, FIFO depths, bus-level DDR timing (tCCD, tRRD, tFAW,
// tWTR, refresh) left to the PHY model.
module nvmm_mc
  import nvmm_pkg::*;
#(
  parameter int unsigned RSP_DEPTH = 8,
  parameter int unsigned T_RCD = 3,
  parameter int unsigned T_RP  = 3,
  parameter int unsigned T_RAS = 7,
  parameter int unsigned T_RTP = 2,
  parameter int unsigned T_WTP = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  nvmm_cfg_t   cfg,
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output mem_rsp_t    rsp,
  output logic        ddr_cmd_valid,
  output ddr_cmd_t    ddr_cmd,
  input  logic        ddr_rvalid,
  input  line_t       ddr_rdata,
  output logic [31:0] stat_act,
  output logic [31:0] stat_act_nvmm,
  output logic [31:0] stat_rd,
  output logic [31:0] stat_wr,
  output logic [31:0] stat_hit,
  output logic [31:0] stat_tras_hold,
  output logic [31:0] stat_dirty_trp
);
  localparam int unsigned CNT_W = $clog2(RSP_DEPTH + 1);

  logic [BANK_W-1:0] bank;
  logic              nvmm;
  logic [BANKS-1:0]  b_ready, b_cmd_valid, b_grant, b_done, b_done_we;
  logic [BANKS-1:0]  b_act, b_actn, b_hit, b_hold, b_dtrp;
  ddr_cmd_t          b_cmd [BANKS];
  logic [ID_W-1:0]   b_done_id [BANKS];
  logic [BANK_W-1:0] last_q, gsel;
  logic              gany;
  logic [CNT_W-1:0]  rd_out_q, wr_out_q;
  logic              acc, rd_done, wr_done;
  logic [ID_W-1:0]   rd_id, wr_id;

  assign bank = addr_bank(req.addr);
  assign nvmm = req.addr >= cfg.nvmm_base && req.addr < cfg.nvmm_limit;
  assign req_ready = b_ready[bank] &&
                     (req.we ? wr_out_q < CNT_W'(RSP_DEPTH) : rd_out_q < CNT_W'(RSP_DEPTH));
  assign acc = req_valid && req_ready;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    bank_machine #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_RTP(T_RTP), .T_WTP(T_WTP)) u_bm (
      .clk, .rst_n,
      .add_trcd (cfg.add_trcd), .add_trp (cfg.add_trp), .add_tras (cfg.add_tras),
      .req_valid (req_valid && bank == BANK_W'(b) && req_ready),
      .req_ready (b_ready[b]),
      .req_id (req.id), .req_we (req.we), .req_nvmm (nvmm),
      .req_row (addr_row(req.addr)), .req_col (addr_col(req.addr)), .req_data (req.data),
      .cmd_valid (b_cmd_valid[b]), .cmd (b_cmd[b]), .cmd_grant (b_grant[b]),
      .done (b_done[b]), .done_we (b_done_we[b]), .done_id (b_done_id[b]),
      .ev_act (b_act[b]), .ev_act_nvmm (b_actn[b]), .ev_hit (b_hit[b]), .ev_tras_hold (b_hold[b]), .ev_dirty_trp (b_dtrp[b])
    );
  end

  // round-robin command arbiter, starting after the last granted bank
  always_comb begin
    gany = 1'b0; gsel = '0;
    for (int k = 1; k <= BANKS; k++) begin
      logic [BANK_W-1:0] c;
      c = last_q + BANK_W'(k);
      if (!gany && b_cmd_valid[c]) begin gany = 1'b1; gsel = c; end
    end
    b_grant = '0;
    if (gany) b_grant[gsel] = 1'b1;
    ddr_cmd_valid = gany;
    ddr_cmd       = b_cmd[gsel];
    ddr_cmd.bank  = gsel;
    if (!gany) ddr_cmd.op = DDR_NOP;
  end

  // completions of the granted bank (at most one per clock)
  assign rd_done = gany && b_done[gsel] && !b_done_we[gsel];
  assign wr_done = gany && b_done[gsel] &&  b_done_we[gsel];

  typedef struct packed { logic [ID_W-1:0] id; line_t data; } rrsp_t;
  logic  rid_empty, rid_full, rr_empty, rr_full, wr_empty, wr_full;
  rrsp_t rr_head;
  logic  rr_pop, wr_pop;
  logic [$clog2(RSP_DEPTH+1)-1:0] cnt_unused_0, cnt_unused_1, cnt_unused_2;  // occupancy not needed: credits are counted here

  sync_fifo #(.T(logic [ID_W-1:0]), .DEPTH(RSP_DEPTH)) u_rid (
    .clk, .rst_n, .push (rd_done), .din (b_done_id[gsel]), .pop (ddr_rvalid),
    .dout (rd_id), .full (rid_full), .empty (rid_empty), .count (cnt_unused_0));
  sync_fifo #(.T(rrsp_t), .DEPTH(RSP_DEPTH)) u_rrsp (
    .clk, .rst_n, .push (ddr_rvalid), .din ('{id: rd_id, data: ddr_rdata}), .pop (rr_pop),
    .dout (rr_head), .full (rr_full), .empty (rr_empty), .count (cnt_unused_1));
  sync_fifo #(.T(logic [ID_W-1:0]), .DEPTH(RSP_DEPTH)) u_wrsp (
    .clk, .rst_n, .push (wr_done), .din (b_done_id[gsel]), .pop (wr_pop),
    .dout (wr_id), .full (wr_full), .empty (wr_empty), .count (cnt_unused_2));

  assign rsp_valid = !rr_empty || !wr_empty;
  assign rr_pop    = rsp_ready && !rr_empty;
  assign wr_pop    = rsp_ready && rr_empty && !wr_empty;
  assign rsp       = !rr_empty ? '{id: rr_head.id, we: 1'b0, corrupt: 1'b0, data: rr_head.data}
                               : '{id: wr_id, we: 1'b1, corrupt: 1'b0, data: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= '0; rd_out_q <= '0; wr_out_q <= '0;
      stat_act <= '0; stat_act_nvmm <= '0; stat_rd <= '0; stat_wr <= '0;
      stat_hit <= '0; stat_tras_hold <= '0; stat_dirty_trp <= '0;
    end else begin
      if (gany) last_q <= gsel;
      rd_out_q <= rd_out_q + CNT_W'(acc && !req.we) - CNT_W'(rr_pop);
      wr_out_q <= wr_out_q + CNT_W'(acc && req.we) - CNT_W'(wr_pop);
      if (|b_act) stat_act <= stat_act + 1;
      if (|b_actn) stat_act_nvmm <= stat_act_nvmm + 1;
      if (rd_done) stat_rd <= stat_rd + 1;
      if (wr_done) stat_wr <= stat_wr + 1;
      if (|b_hit) stat_hit <= stat_hit + 1;
      stat_tras_hold <= stat_tras_hold + 32'($countones(b_hold));
      if (|b_dtrp) stat_dirty_trp <= stat_dirty_trp + 1;
    end
  end

  a_rid_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_done && rid_full));
  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n) ddr_rvalid |-> !rid_empty);
  a_rrsp_room:       assert property (@(posedge clk) disable iff (!rst_n) !(ddr_rvalid && rr_full));
  a_wrsp_room:       assert property (@(posedge clk) disable iff (!rst_n) !(wr_done && wr_full));
endmodule
