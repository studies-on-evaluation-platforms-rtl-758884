// bus_delay_injector: coarse-grain and DCPMM delay injection between the
// MPE and the memory controller.
// A request stream enters; reads and writes go to separate one-entry
// channels ("each bus can keep only one request at a time"). A request to
// the NVMM region [nvmm_base, nvmm_limit) is held in its channel for
//   BUS_COARSE: rd_delay / wr_delay clocks,
//   BUS_DCPMM : the dcpmm_boundary latency (base + 256 B / 4 KiB extra),
// and then offered to the memory controller; DRAM requests and BUS_OFF
// requests are held 0 clocks. While a channel holds a request, the next
// request of that direction waits (back-pressure), which models the
// bandwidth loss of the coarse-grain method.
// Interface: valid/ready on both sides; a request accepted at clock t with
// delay D is offered from clock t+1+D. When both channels are ready, the
// one not granted last goes first.
// Source: the hold-for-N-clocks mechanism, one request per bus, separate
// read/write latencies, DCPMM boundaries. Own: the registered stage (one
// clock even for 0 delay), the alternating read/write merge, counters.
module bus_delay_injector
  import nvmm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  nvmm_cfg_t   cfg,
  input  logic        in_valid,
  output logic        in_ready,
  input  mem_req_t    in_req,
  output logic        out_valid,
  input  logic        out_ready,
  output mem_req_t    out_req,
  output logic [31:0] stat_delayed,    // requests that were given a delay
  output logic [31:0] stat_stall,      // clocks a request waited for a busy channel
  output logic [31:0] stat_cross256,
  output logic [31:0] stat_cross4k
);
  logic      nvmm;
  logic      v_q   [2];     // [0] read channel, [1] write channel
  mem_req_t  req_q [2];
  lat_t      cnt_q [2];
  logic      acc   [2];
  logic      go    [2];
  logic      last_w_q;
  lat_t      dc_delay [2];
  logic      dc_c256 [2], dc_c4k [2];

  assign nvmm = in_req.addr >= cfg.nvmm_base && in_req.addr < cfg.nvmm_limit;

  for (genvar c = 0; c < 2; c++) begin : g_ch
    dcpmm_boundary u_dcpmm (
      .clk, .rst_n,
      .fire   (acc[c] && nvmm && cfg.bus_mode == BUS_DCPMM),
      .addr   (in_req.addr),
      .base   (c == 0 ? cfg.rd_delay  : cfg.wr_delay),
      .add256 (c == 0 ? cfg.rd_add256 : cfg.wr_add256),
      .add4k  (c == 0 ? cfg.rd_add4k  : cfg.wr_add4k),
      .delay  (dc_delay[c]),
      .cross256 (dc_c256[c]),
      .cross4k  (dc_c4k[c])
    );
  end

  always_comb begin
    logic rd_ok, wr_ok;
    in_ready = in_req.we ? !v_q[1] : !v_q[0];
    acc[0] = in_valid && in_ready && !in_req.we;
    acc[1] = in_valid && in_ready &&  in_req.we;
    rd_ok = v_q[0] && cnt_q[0] == '0;
    wr_ok = v_q[1] && cnt_q[1] == '0;
    go[0] = rd_ok && (!wr_ok || last_w_q);
    go[1] = wr_ok && !go[0];
    out_valid = rd_ok || wr_ok;
    out_req   = go[1] ? req_q[1] : req_q[0];
  end

  function automatic lat_t pick_delay(logic w, lat_t dcd);
    if (!nvmm) return '0;
    unique case (cfg.bus_mode)
      BUS_COARSE: return w ? cfg.wr_delay : cfg.rd_delay;
      BUS_DCPMM:  return dcd;
      default:    return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin v_q[c] <= 1'b0; req_q[c] <= '0; cnt_q[c] <= '0; end
      last_w_q <= 1'b0;
      stat_delayed <= '0; stat_stall <= '0; stat_cross256 <= '0; stat_cross4k <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (acc[c]) begin
          v_q[c]   <= 1'b1;
          req_q[c] <= in_req;
          cnt_q[c] <= pick_delay(c == 1, dc_delay[c]);
        end else if (v_q[c]) begin
          if (cnt_q[c] != '0) cnt_q[c] <= cnt_q[c] - 1'b1;
          else if (go[c] && out_ready) v_q[c] <= 1'b0;
        end
      end
      if (out_valid && out_ready) last_w_q <= go[1];
      if ((acc[0] || acc[1]) && nvmm && cfg.bus_mode != BUS_OFF) begin
        stat_delayed <= stat_delayed + 1;
        if (cfg.bus_mode == BUS_DCPMM) begin
          if (in_req.we ? dc_c4k[1] : dc_c4k[0]) stat_cross4k <= stat_cross4k + 1;
          else if (in_req.we ? dc_c256[1] : dc_c256[0]) stat_cross256 <= stat_cross256 + 1;
        end
      end
      if (in_valid && !in_ready) stat_stall <= stat_stall + 1;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);
endmodule
