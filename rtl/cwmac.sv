// cwmac: Carter-Wegman MAC unit of an MPE Tree.
//
// The document names Carter-Wegman MAC with two on-chip keys, K_P and K_M,
// and tweaks, but does not give its construction. This unit uses the usual
// Carter-Wegman form: a polynomial universal hash keyed by K_P, masked by a
// pseudo-random pad that AES-128 under K_M derives from the tweak:
//   h   = (((m0 * Kp) ^ m1) * Kp ^ ...) * Kp        in GF(2^64)
//   mac = (h ^ AES_Km(tweak)[63:0])[55:0]
// Horner's rule takes one 64-bit message word per clock; the AES pad runs in
// parallel. Up to 10 words are hashed.
//
// Interface: pulse `start` with the keys, `nwords` message words in `msg`
// (word i in bits [64*i +: 64]) and the 128-bit `tweak`. `done` pulses when
// both the hash and the pad are finished: max(nwords, 10) clocks after the
// start edge (10 clocks for every message the Tree hashes). `mac` holds the result until the next start.
module cwmac
  import mpe_pkg::*;
#(
  parameter int unsigned MAX_WORDS = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [63:0]             key_p,
  input  logic [127:0]            key_m,
  input  logic [64*MAX_WORDS-1:0] msg,
  input  logic [3:0]              nwords,
  input  logic [127:0]            tweak,
  output logic                    busy,
  output logic                    done,
  output mac_t                    mac
);
  logic [64*MAX_WORDS-1:0] msg_q;
  logic [63:0] kp_q, h_q;
  logic [3:0]  idx_q, n_q;
  logic        hashing_q, pad_busy, pad_done, pad_ready_q, hash_ready_q;
  logic [127:0] pad;

  aes128_core u_pad (
    .clk, .rst_n, .start, .key (key_m), .pt (tweak),
    .busy (pad_busy), .done (pad_done), .ct (pad)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_q <= '0; kp_q <= '0; h_q <= '0; idx_q <= '0; n_q <= '0;
      hashing_q <= 1'b0; pad_ready_q <= 1'b0; hash_ready_q <= 1'b0;
    end else begin
      if (start) begin
        msg_q        <= msg;
        kp_q         <= key_p;
        n_q          <= nwords;
        idx_q        <= '0;
        h_q          <= '0;
        hashing_q    <= 1'b1;
        pad_ready_q  <= 1'b0;
        hash_ready_q <= 1'b0;
      end else begin
        if (hashing_q) begin
          h_q   <= gf64_mul(h_q ^ msg_q[64*idx_q +: 64], kp_q);
          idx_q <= idx_q + 4'd1;
          if (idx_q + 4'd1 == n_q) begin
            hashing_q    <= 1'b0;
            hash_ready_q <= 1'b1;
          end
        end
        if (pad_done) pad_ready_q <= 1'b1;
        if (done) begin
          pad_ready_q  <= 1'b0;
          hash_ready_q <= 1'b0;
        end
      end
    end
  end

  // Both halves finished (either already or on this clock's edge).
  logic hash_fin, pad_fin;
  assign hash_fin = hash_ready_q;
  assign pad_fin  = pad_ready_q || pad_done;
  assign done     = hash_fin && pad_fin;
  assign busy     = hashing_q || pad_busy || (hash_fin ^ pad_fin);
  assign mac      = h_q[MAC_W-1:0] ^ pad[MAC_W-1:0];
endmodule
