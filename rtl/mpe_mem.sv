// mpe_mem: the MEM submodule of an MPE Tree. It turns "load/store node K of
// the path of cacheline cl" into one memory request on the Tree's port to the
// Backend, and reports when the response arrives.
//
// Node addresses follow the level-by-level metadata layout of mpe_pkg: the
// 96-MiB data region starts at PROT_BASE and the SIT nodes follow it. Only one
// access is outstanding: the request is raised while `active` is high and the
// previous one has completed; `done` pulses with the response (read data on
// `rdata`). A new access may be started in the clock after `done` by keeping
// `active` high with the next kind. Latency is that of the memory path.
module mpe_mem
  import nvmm_pkg::*;
  import mpe_pkg::*;
#(
  parameter addr_t       PROT_BASE = 34'h0_C000_0000,
  parameter int unsigned N_ROOTS   = 384
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       active,
  input  logic       we,
  input  node_kind_e kind,
  input  cl_idx_t    cl,
  input  line_t      wline,
  output logic       done,
  output line_t      rdata,
  output logic       mreq_valid,
  input  logic       mreq_ready,
  output mem_req_t   mreq,
  input  logic       mrsp_valid,
  output logic       mrsp_ready,
  input  mem_rsp_t   mrsp
);
  logic issued_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      issued_q <= 1'b0;
    else if (mreq_valid && mreq_ready) issued_q <= 1'b1;
    else if (mrsp_valid)             issued_q <= 1'b0;
  end

  assign mreq_valid = active && !issued_q;
  assign mreq.id    = '0;
  assign mreq.addr  = node_addr(PROT_BASE, N_ROOTS, kind, cl);
  assign mreq.we    = we;
  assign mreq.data  = wline;
  assign mrsp_ready = 1'b1;
  assign done       = issued_q && mrsp_valid;
  assign rdata      = mrsp.data;
endmodule
