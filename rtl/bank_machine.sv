// bank_machine: one DDR3 bank of the memory controller, with the
// fine-grain and extended fine-grain NVMM latency injection.
// Holds one request. States: CLOSED -> (ACT) -> OPEN -> (RD/WR) ... ->
// (PRE) -> PRECHARGING -> CLOSED. Down-counters enforce
//   tRCD (+add_trcd if the row is in the NVMM region) from ACT to RD/WR,
//   tRAS (+add_tras for NVMM rows) from ACT to PRE,
//   tRTP after RD and tWTP (write recovery) after WR before PRE,
//   tRP (+add_trp if the NVMM row was written, i.e. dirty) from PRE to ACT.
// A row hit (request to the open row) issues RD/WR without ACT. The bank
// precharges when its request misses the open row, or when it holds no
// request, once tRAS, tRTP and tWTP have all run out; so keeping the row
// open for tRAS+add_tras delays the next ACT like a longer tRTP would.
// Interface: req_* accepted when req_ready; cmd_valid/cmd request a DDR
// command, cmd_grant (same clock) means it was issued. done pulses with the
// request's id in the clock its RD/WR is granted. ev_* are one-clock events.
// Source: DDR3 command sequence and timing (spec values are the parameter
// defaults in 5-ns clocks), extra tRCD/tRP, dirty tracking for tRP, extra
// tRAS. Own: one-entry request slot, precharge policy when idle, events.
module bank_machine
  import nvmm_pkg::*;
#(
  parameter int unsigned T_RCD = 3,
  parameter int unsigned T_RP  = 3,
  parameter int unsigned T_RAS = 7,
  parameter int unsigned T_RTP = 2,
  parameter int unsigned T_WTP = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  lat_t             add_trcd,
  input  lat_t             add_trp,
  input  lat_t             add_tras,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [ID_W-1:0]  req_id,
  input  logic             req_we,
  input  logic             req_nvmm,
  input  logic [ROW_W-1:0] req_row,
  input  logic [COL_W-1:0] req_col,
  input  line_t            req_data,
  output logic             cmd_valid,
  output ddr_cmd_t         cmd,
  input  logic             cmd_grant,
  output logic             done,
  output logic             done_we,
  output logic [ID_W-1:0]  done_id,
  output logic             ev_act,
  output logic             ev_act_nvmm,
  output logic             ev_hit,
  output logic             ev_tras_hold,
  output logic             ev_dirty_trp
);
  typedef enum logic [1:0] {B_CLOSED, B_OPEN, B_PRECHARGING} bstate_e;
  localparam int unsigned CW = LAT_W + 1;

  bstate_e          st_q;
  logic             v_q, we_q, nvmm_q, acted_q;
  logic [ID_W-1:0]  id_q;
  logic [ROW_W-1:0] row_q, open_row_q;
  logic [COL_W-1:0] col_q;
  line_t            data_q;
  logic             row_nvmm_q, dirty_q;
  logic [CW-1:0]    rcd_q, ras_q, ras_spec_q, rtp_q, wtp_q, rp_q;

  logic hit, want_pre, can_pre;

  assign req_ready = !v_q;
  assign hit       = v_q && st_q == B_OPEN && row_q == open_row_q;
  assign want_pre  = st_q == B_OPEN && (!v_q || !hit);
  assign can_pre   = ras_q == '0 && rtp_q == '0 && wtp_q == '0;

  always_comb begin
    cmd_valid = 1'b0;
    cmd = '{op: DDR_NOP, bank: '0, row: row_q, col: col_q, wdata: data_q};
    unique case (st_q)
      B_CLOSED: if (v_q && rp_q == '0) begin cmd_valid = 1'b1; cmd.op = DDR_ACT; end
      B_OPEN: begin
        if (hit && rcd_q == '0) begin
          cmd_valid = 1'b1; cmd.op = we_q ? DDR_WR : DDR_RD;
        end else if (want_pre && can_pre) begin
          cmd_valid = 1'b1; cmd.op = DDR_PRE; cmd.row = open_row_q;
        end
      end
      default: ;
    endcase
  end

  assign done         = cmd_valid && cmd_grant && (cmd.op == DDR_RD || cmd.op == DDR_WR);
  assign done_we      = we_q;
  assign done_id      = id_q;
  assign ev_act       = cmd_valid && cmd_grant && cmd.op == DDR_ACT;
  assign ev_act_nvmm  = ev_act && nvmm_q;
  assign ev_hit       = done && !acted_q;
  assign ev_tras_hold = want_pre && ras_spec_q == '0 && ras_q != '0 && rtp_q == '0 && wtp_q == '0;
  assign ev_dirty_trp = cmd_valid && cmd_grant && cmd.op == DDR_PRE && dirty_q && row_nvmm_q
                        && add_trp != '0;

  function automatic logic [CW-1:0] dec(logic [CW-1:0] c);
    return (c == '0) ? '0 : c - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= B_CLOSED; v_q <= 1'b0; we_q <= 1'b0; nvmm_q <= 1'b0; acted_q <= 1'b0;
      id_q <= '0; row_q <= '0; open_row_q <= '0; col_q <= '0; data_q <= '0;
      row_nvmm_q <= 1'b0; dirty_q <= 1'b0;
      rcd_q <= '0; ras_q <= '0; ras_spec_q <= '0; rtp_q <= '0; wtp_q <= '0; rp_q <= '0;
    end else begin
      rcd_q <= dec(rcd_q); ras_q <= dec(ras_q); ras_spec_q <= dec(ras_spec_q);
      rtp_q <= dec(rtp_q); wtp_q <= dec(wtp_q); rp_q <= dec(rp_q);
      if (req_valid && req_ready) begin
        v_q <= 1'b1; id_q <= req_id; we_q <= req_we; nvmm_q <= req_nvmm;
        row_q <= req_row; col_q <= req_col; data_q <= req_data; acted_q <= 1'b0;
      end
      unique case (st_q)
        B_CLOSED: if (cmd_valid && cmd_grant) begin
          st_q <= B_OPEN; open_row_q <= row_q; row_nvmm_q <= nvmm_q; dirty_q <= 1'b0;
          acted_q <= 1'b1;
          rcd_q <= CW'(T_RCD - 1) + (nvmm_q ? CW'(add_trcd) : '0);
          ras_q <= CW'(T_RAS - 1) + (nvmm_q ? CW'(add_tras) : '0);
          ras_spec_q <= CW'(T_RAS - 1);
        end
        B_OPEN: if (cmd_valid && cmd_grant) begin
          if (cmd.op == DDR_PRE) begin
            st_q <= B_PRECHARGING;
            rp_q <= CW'(T_RP - 1) + ((dirty_q && row_nvmm_q) ? CW'(add_trp) : '0);
          end else begin
            v_q <= 1'b0;
            if (we_q) begin dirty_q <= 1'b1; wtp_q <= CW'(T_WTP - 1); end
            else rtp_q <= CW'(T_RTP - 1);
          end
        end
        B_PRECHARGING: st_q <= B_CLOSED;   // rp_q still gates the next ACT
        default: st_q <= B_CLOSED;
      endcase
    end
  end

  a_no_req_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && req_ready |-> !v_q);
endmodule
