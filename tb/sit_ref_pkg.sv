// sit_ref_pkg: behavioural reference of the MPE's cryptography and of the
// initial image of a protected region, for the testbenches.
//
// The AES reference composes the round helpers of mpe_pkg (which tb_aes128_core
// checks against FIPS-197); the GF(2^64) product is computed here a second way
// (carry-less product, then reduction) so that the CWMAC hash is checked
// independently. The initial image is the state a freshly initialised tree
// would have: every counter and every root is zero and every protected line
// holds the encryption of zeros, with matching MACs. Testbench memories return
// this image for lines that were never written.
package sit_ref_pkg;
  import nvmm_pkg::*;
  import mpe_pkg::*;

  function automatic logic [127:0] ref_aes(logic [127:0] k, logic [127:0] p);
    logic [127:0] s = p ^ k;
    logic [127:0] rk = k;
    logic [7:0] rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      rk = aes_next_key(rk, rc);
      s  = aes_round(s, rk, r == 10);
      rc = gf8_mul(rc, 8'h02);
    end
    return s;
  endfunction

  function automatic logic [63:0] ref_gf64(logic [63:0] a, logic [63:0] b);
    logic [127:0] p = '0;
    for (int i = 0; i < 64; i++) if (b[i]) p ^= (128'(a) << i);
    for (int i = 127; i >= 64; i--)
      if (p[i]) p ^= (128'h1B << (i - 64)) | (128'h1 << i);
    return p[63:0];
  endfunction

  function automatic mac_t ref_cwmac(logic [63:0] kp, logic [127:0] km,
                                     logic [639:0] msg, int n, logic [127:0] tweak);
    logic [63:0] h = '0;
    logic [127:0] pad;
    for (int i = 0; i < n; i++) h = ref_gf64(h ^ msg[64*i +: 64], kp);
    pad = ref_aes(km, tweak);
    return h[55:0] ^ pad[55:0];
  endfunction

  function automatic line_t ref_otp(logic [127:0] ke, addr_t a, ctr_t c);
    line_t o;
    for (int j = 0; j < 4; j++) o[128*j +: 128] = ref_aes(ke, {64'(a), c, 6'b0, 2'(j)});
    return o;
  endfunction

  function automatic mac_t ref_node_mac(logic [63:0] kp, logic [127:0] km,
                                        line_t node, ctr_t parent, addr_t a);
    logic [639:0] m = '0;
    m[447:0]   = node[447:0];
    m[511:448] = 64'(parent);
    m[575:512] = 64'(a);
    return ref_cwmac(kp, km, m, 9, {64'(a), parent, 8'h01});
  endfunction

  function automatic mac_t ref_cl_mac(logic [63:0] kp, logic [127:0] km,
                                      line_t ct, ctr_t c, addr_t a);
    logic [639:0] m;
    m[511:0]   = ct;
    m[575:512] = 64'(c);
    m[639:576] = 64'(a);
    return ref_cwmac(kp, km, m, 10, {64'(a), c, 8'h02});
  endfunction

  // Initial image of any line of the protected data or metadata region.
  function automatic line_t ref_init_line(logic [127:0] ke, logic [63:0] kp, logic [127:0] km,
                                          addr_t prot_base, int unsigned nroots, addr_t a);
    addr_t data_end = prot_base + addr_t'(nroots) * 262144;
    longint unsigned n;
    line_t r = '0;
    if (a >= prot_base && a < data_end) return ref_otp(ke, a, '0);
    n = longint'((a - data_end) >> 6);
    if (n < longint'(nroots) * 585) begin
      // L2, L1, L0 or Meta node: zero counters, MAC over them with parent 0
      return set_mac('0, ref_node_mac(kp, km, '0, '0, a));
    end
    if (n < longint'(nroots) * 1097) begin
      // PD_Tag node: tags of the eight zero-plaintext lines under it
      longint unsigned m = n - longint'(nroots) * 585;
      for (int i = 0; i < 8; i++) begin
        addr_t cla = prot_base + addr_t'((m * 8 + longint'(i)) * 64);
        r[56*i +: 56] = ref_cl_mac(kp, km, ref_otp(ke, cla, '0), '0, cla);
      end
      return r;
    end
    return '0;
  endfunction
endpackage
