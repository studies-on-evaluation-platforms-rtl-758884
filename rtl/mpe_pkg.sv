// mpe_pkg: constants, SIT node layout and helper functions of the Memory
// Protection Engine (MPE).
//
// The MPE protects data with a 4-level SGX-style integrity tree (SIT): an
// on-chip root counter dominates one L2 node, each L2/L1/L0/Meta node holds
// eight 56-bit version counters and one 56-bit MAC, and each PD_Tag node holds
// the eight 56-bit MACs of the eight cachelines (CLs) under one Meta node.
// One root therefore covers 8^4 = 4096 CLs (256 KiB), and 384 roots cover
// 96 MiB, as in the document. Counter and MAC widths, the node bit layout, the
// metadata address layout and the AES/GF helpers are this design's choices.
//
// Node layout (one 64-byte line): counter i in bits [56*i +: 56],
// MAC in bits [503:448], bits [511:504] zero. PD_Tag: tag i in [56*i +: 56].
// Metadata is stored level by level after the 96-MiB data region:
// all L2 nodes, then all L1, L0, Meta and PD_Tag nodes.
package mpe_pkg;
  import nvmm_pkg::*;

  localparam int unsigned CTR_W   = 56;
  localparam int unsigned MAC_W   = 56;
  localparam int unsigned ARITY   = 8;
  localparam int unsigned LEVELS  = 4;          // L2, L1, L0, Meta
  localparam int unsigned CL_PER_ROOT = 4096;   // 8^4
  localparam int unsigned CL_IDX_W = 21;        // enough for 384 * 4096 CLs
  localparam int unsigned ROOT_IDX_W = 9;

  typedef logic [CTR_W-1:0]    ctr_t;
  typedef logic [MAC_W-1:0]    mac_t;
  typedef logic [CL_IDX_W-1:0] cl_idx_t;

  // Node kinds handled by the Tree MEM submodule.
  typedef enum logic [2:0] {
    NK_L2   = 3'd0,
    NK_L1   = 3'd1,
    NK_L0   = 3'd2,
    NK_META = 3'd3,
    NK_CL   = 3'd4,
    NK_TAG  = 3'd5
  } node_kind_e;

  // ---------------------------------------------------------------- layout
  function automatic ctr_t node_ctr(line_t n, logic [2:0] i);
    return n[CTR_W*i +: CTR_W];
  endfunction

  function automatic mac_t node_mac(line_t n);
    return n[448 +: MAC_W];
  endfunction

  function automatic line_t set_ctr(line_t n, logic [2:0] i, ctr_t v);
    line_t r = n;
    r[CTR_W*i +: CTR_W] = v;
    return r;
  endfunction

  function automatic line_t set_mac(line_t n, mac_t m);
    line_t r = n;
    r[448 +: MAC_W] = m;
    return r;
  endfunction

  // Byte address of a node or CL, for a tree of nroots roots whose data region
  // starts at prot_base and whose metadata region starts at prot_base + nroots*256 KiB.
  function automatic addr_t node_addr(addr_t prot_base, int unsigned nroots,
                                      node_kind_e k, cl_idx_t cl);
    addr_t meta_base = prot_base + addr_t'(nroots) * addr_t'(CL_PER_ROOT * LINE_BYTES);
    addr_t idx;
    addr_t off;
    case (k)
      NK_L2:   begin off = 0;                      idx = addr_t'(cl >> 12); end
      NK_L1:   begin off = addr_t'(nroots);        idx = addr_t'(cl >> 9);  end
      NK_L0:   begin off = addr_t'(nroots) * 9;    idx = addr_t'(cl >> 6);  end
      NK_META: begin off = addr_t'(nroots) * 73;   idx = addr_t'(cl >> 3);  end
      NK_TAG:  begin off = addr_t'(nroots) * 585;  idx = addr_t'(cl >> 3);  end
      default: begin off = 0;                      idx = addr_t'(cl);       end
    endcase
    if (k == NK_CL) return prot_base + (addr_t'(cl) << 6);
    return meta_base + ((off + idx) << 6);
  endfunction

  // ---------------------------------------------------------------- GF(2^64)
  // Multiplication modulo x^64 + x^4 + x^3 + x + 1 (CWMAC polynomial hash).
  function automatic logic [63:0] gf64_mul(logic [63:0] a, logic [63:0] b);
    logic [63:0] r = '0;
    logic [63:0] x = a;
    for (int i = 0; i < 64; i++) begin
      if (b[i]) r ^= x;
      x = {x[62:0], 1'b0} ^ (x[63] ? 64'h1B : 64'h0);
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- AES helpers
  function automatic logic [7:0] gf8_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = '0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  // S-box computed from its definition: multiplicative inverse in GF(2^8)
  // (a^254) followed by the affine transform with constant 0x63.
  function automatic logic [7:0] aes_sbox(logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128, inv, s;
    a2   = gf8_mul(a, a);
    a4   = gf8_mul(a2, a2);
    a8   = gf8_mul(a4, a4);
    a16  = gf8_mul(a8, a8);
    a32  = gf8_mul(a16, a16);
    a64  = gf8_mul(a32, a32);
    a128 = gf8_mul(a64, a64);
    inv  = gf8_mul(gf8_mul(gf8_mul(a128, a64), gf8_mul(a32, a16)),
                   gf8_mul(gf8_mul(a8, a4), a2));
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // Byte 0 is the most significant byte of the 128-bit block (FIPS-197 order).
  function automatic logic [7:0] blk_byte(logic [127:0] s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] aes_round(logic [127:0] s, logic [127:0] rk, logic last);
    logic [7:0] b [16];
    logic [7:0] t [16];
    logic [127:0] o;
    for (int i = 0; i < 16; i++) b[i] = aes_sbox(blk_byte(s, i));
    // ShiftRows: byte (row r, column c) is index 4c+r.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        t[4*c + r] = b[4*((c + r) % 4) + r];
    if (!last) begin
      for (int c = 0; c < 4; c++) begin
        logic [7:0] a0, a1, a2, a3;
        a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
        t[4*c]   = gf8_mul(a0, 8'h02) ^ gf8_mul(a1, 8'h03) ^ a2 ^ a3;
        t[4*c+1] = a0 ^ gf8_mul(a1, 8'h02) ^ gf8_mul(a2, 8'h03) ^ a3;
        t[4*c+2] = a0 ^ a1 ^ gf8_mul(a2, 8'h02) ^ gf8_mul(a3, 8'h03);
        t[4*c+3] = gf8_mul(a0, 8'h03) ^ a1 ^ a2 ^ gf8_mul(a3, 8'h02);
      end
    end
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = t[i];
    return o ^ rk;
  endfunction

  function automatic logic [127:0] aes_next_key(logic [127:0] k, logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {aes_sbox(w3[23:16]) ^ rcon, aes_sbox(w3[15:8]), aes_sbox(w3[7:0]), aes_sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
