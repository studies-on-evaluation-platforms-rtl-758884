// dcpmm_boundary: latency calculator for the DCPMM delay-injection mode.
// Optane DC PM serves requests in 256-byte blocks out of a 4-KiB address
// indirection buffer, so a request that leaves the 256-byte block (or the
// 4-KiB page) of the previous request on the same channel pays more.
// delay = base + (cross 4 KiB ? add4k : cross 256 B ? add256 : 0), where
// "cross" means the request's 4-KiB page / 256-byte block differs from that
// of the previous request accepted on this channel (fire = 1).
// Interface: purely combinational delay for `addr`; the previous address is
// registered on `fire`. After reset the first request counts as crossing
// 4 KiB (the buffers hold nothing yet).
// Source: the 256 B / 4 KiB boundaries and the base + additional latency
// model. Own choices: per-channel previous address, the 4-KiB case replaces
// (not adds to) the 256-byte one, reset behaviour.
module dcpmm_boundary
  import nvmm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fire,
  input  addr_t addr,
  input  lat_t  base,
  input  lat_t  add256,
  input  lat_t  add4k,
  output lat_t  delay,
  output logic  cross256,
  output logic  cross4k
);
  addr_t prev_q;
  logic  first_q;

  assign cross4k  = first_q || (addr[ADDR_W-1:12] != prev_q[ADDR_W-1:12]);
  assign cross256 = !cross4k && (addr[11:8] != prev_q[11:8]);
  assign delay    = base + (cross4k ? add4k : cross256 ? add256 : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q  <= '0;
      first_q <= 1'b1;
    end else if (fire) begin
      prev_q  <= addr;
      first_q <= 1'b0;
    end
  end
endmodule
