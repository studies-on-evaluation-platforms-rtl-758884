// mpe_backend: the MPE Backend, an N-to-1 arbiter between the Frontend/Tree
// modules and the memory controller.
//
// Arbitration is round-robin: when the memory port is free, the first
// requester with a pending request at or after the one granted last plus one
// wins. Exactly one request is in flight to the memory controller at a time;
// its response is routed back to the requester that issued it, and only then
// is the next request granted. There is no reordering. This follows the
// document; the valid/ready signalling is this design's choice.
//
// Interface: per requester i, req_valid[i]/req_ready[i]/req[i] and
// rsp_valid[i]/rsp_ready[i] (rsp is shared); m* is the memory port.
// Timing: a request is forwarded in the clock it is granted (combinational
// path from req to mreq); the response is forwarded in the clock it arrives.
module mpe_backend
  import nvmm_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   req_valid,
  output logic [N-1:0]   req_ready,
  input  mem_req_t       req [N],
  output logic [N-1:0]   rsp_valid,
  input  logic [N-1:0]   rsp_ready,
  output mem_rsp_t       rsp,
  output logic           mreq_valid,
  input  logic           mreq_ready,
  output mem_req_t       mreq,
  input  logic           mrsp_valid,
  output logic           mrsp_ready,
  input  mem_rsp_t       mrsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy_q;
  logic [IW-1:0] owner_q, last_q, grant;
  logic          any;

  always_comb begin
    any   = 1'b0;
    grant = '0;
    for (int k = 1; k <= int'(N); k++) begin
      int unsigned i;
      i = (int'(last_q) + k) % N;
      if (!any && req_valid[i]) begin
        any   = 1'b1;
        grant = IW'(i);
      end
    end
  end

  assign mreq_valid = !busy_q && any;
  assign mreq       = req[grant];
  always_comb begin
    req_ready = '0;
    if (!busy_q && any) req_ready[grant] = mreq_ready;
  end

  always_comb begin
    rsp_valid = '0;
    if (busy_q) rsp_valid[owner_q] = mrsp_valid;
  end
  assign rsp        = mrsp;
  assign mrsp_ready = busy_q && rsp_ready[owner_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      last_q  <= IW'(N - 1);
    end else begin
      if (mreq_valid && mreq_ready) begin
        busy_q  <= 1'b1;
        owner_q <= grant;
        last_q  <= grant;
      end else if (mrsp_valid && mrsp_ready) begin
        busy_q  <= 1'b0;
      end
    end
  end

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    busy_q |-> !mreq_valid);
endmodule
