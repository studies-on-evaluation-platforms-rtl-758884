// aes_otp: the AES submodule of an MPE Tree. It computes the AES-128
// counter-mode one-time pad (OTP) for one 64-byte cacheline.
//
// The pad is four AES blocks, computed by four aes128_core lanes in parallel.
// Block j (j = 0..3, covering line bytes 16j..16j+15) encrypts the counter
// block {line address (64 bits), version counter (56 bits), 6'b0, j (2 bits)}
// under key K_E, so both the spatial tweak (address) and the temporal tweak
// (version counter) enter the pad, as the document describes. The exact
// counter-block format is this design's choice. Bytes 16j..16j+15 of the
// line are bits [128j +: 128]. Encryption and decryption are both
// `line ^ otp`.
//
// Interface: pulse `start` with key/addr/ctr; `done` pulses 10 clocks later
// and `otp` holds the pad until the next start.
module aes_otp
  import nvmm_pkg::*;
  import mpe_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  addr_t        addr,
  input  ctr_t         ctr,
  output logic         busy,
  output logic         done,
  output line_t        otp
);
  logic [3:0] lane_busy, lane_done;
  logic [63:0] addr64;
  assign addr64 = 64'(addr);

  for (genvar j = 0; j < 4; j++) begin : g_lane
    aes128_core u_aes (
      .clk, .rst_n, .start, .key,
      .pt   ({addr64, ctr, 6'b0, 2'(j)}),
      .busy (lane_busy[j]),
      .done (lane_done[j]),
      .ct   (otp[128*j +: 128])
    );
  end

  assign busy = |lane_busy;
  assign done = &lane_done;
endmodule
