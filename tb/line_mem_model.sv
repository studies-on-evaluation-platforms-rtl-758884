// line_mem_model: behavioural cacheline memory for the MPE testbenches.
// Accepts one request at a time and answers a load RD_LAT clocks and a store
// WR_LAT clocks after it was issued (request clock included). Lines never
// written return the initial image of the protected region (sit_ref_pkg),
// so a fresh integrity tree verifies. `tamper` flips bit 0 of a line.
module line_mem_model
  import nvmm_pkg::*;
  import sit_ref_pkg::*;
#(
  parameter int    RD_LAT    = 18,
  parameter int    WR_LAT    = 12,
  parameter addr_t PROT_BASE = 34'h0_C000_0000,
  parameter int    N_ROOTS   = 384
) (
  input  logic         clk,
  input  logic [127:0] key_e,
  input  logic [63:0]  key_p,
  input  logic [127:0] key_m,
  input  logic         mreq_valid,
  output logic         mreq_ready,
  input  mem_req_t     mreq,
  output logic         mrsp_valid,
  input  logic         mrsp_ready,
  output mem_rsp_t     mrsp
);
  line_t mem [addr_t];
  int cnt = 0; bit busy = 0; mem_req_t q; line_t d;
  int n_reads = 0, n_writes = 0;

  function automatic line_t rd(addr_t a);
    if (!mem.exists(a)) mem[a] = ref_init_line(key_e, key_p, key_m, PROT_BASE, N_ROOTS, a);
    return mem[a];
  endfunction

  function automatic void tamper(addr_t a);
    line_t v = rd(a);
    v[0] = ~v[0];
    mem[a] = v;
  endfunction

  assign mreq_ready = !busy;
  assign mrsp_valid = busy && cnt == 0;
  assign mrsp = '{id: q.id, we: q.we, corrupt: 1'b0, data: d};

  always_ff @(posedge clk) begin
    if (mreq_valid && mreq_ready) begin
      busy <= 1; q <= mreq; cnt <= (mreq.we ? WR_LAT : RD_LAT) - 2;
      if (mreq.we) begin mem[mreq.addr] = mreq.data; n_writes++; end
      else begin d <= rd(mreq.addr); n_reads++; end
    end else if (busy) begin
      if (cnt != 0) cnt <= cnt - 1;
      else if (mrsp_ready) busy <= 0;
    end
  end
endmodule
