// aes128_core: iterative AES-128 block encryption (FIPS-197).
//
// The MPE uses AES-128 in counter mode, so only the forward cipher is needed:
// the same one-time pad decrypts and encrypts. This core computes one round
// per clock and expands the key on the fly, one round key per clock.
//
// Interface: pulse `start` with `key` and `pt`; both are sampled on that clock
// edge. `busy` is high for the ten rounds; `done` pulses for one clock on the
// edge that writes the last round, and `ct` holds the result from then until
// the next start. Latency: start edge to done = 10 clocks.
// The algorithm is the standard; the iterative structure is this design's choice.
module aes128_core
  import mpe_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);
  logic [127:0] state_q, rkey_q;
  logic [3:0]   round_q;
  logic [7:0]   rcon_q;

  logic [127:0] rkey_next;
  assign rkey_next = aes_next_key(rkey_q, rcon_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state_q <= pt ^ key;
        rkey_q  <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= aes_round(state_q, rkey_next, round_q == 4'd10);
        rkey_q  <= rkey_next;
        rcon_q  <= gf8_mul(rcon_q, 8'h02);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = state_q;
endmodule
