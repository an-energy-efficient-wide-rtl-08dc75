// mote_ref_pkg: reference model of the transmitted packet, for testbenches.
//
// Computed bit by bit from the definitions, independently of the RTL:
//   header bit i      : preamble bit i (i < 40), else PLH bit i-40;
//   DBPSK symbol a_i  : XOR of header bits 0..i (bit 0 = +1, 1 = -1);
//   chip n            : a_(n/16) XOR seq[n%16] for n < 1664, else payload
//                       chip n-1664;
//   rep4(cnt)         : counter bit j repeated in PLH bits 4j..4j+3.
package mote_ref_pkg;
  function automatic bit ref_hdr_bit(logic [39:0] pre, logic [63:0] plh, int i);
    return (i < 40) ? pre[i] : plh[i-40];
  endfunction

  function automatic bit ref_enc_bit(logic [39:0] pre, logic [63:0] plh, int i);
    bit a = 0;
    for (int k = 0; k <= i; k++) a = a ^ ref_hdr_bit(pre, plh, k);
    return a;
  endfunction

  function automatic bit ref_chip(logic [39:0] pre, logic [63:0] plh, logic [15:0] seq,
                                  logic [511:0] payload, int n);
    if (n < 104 * 16) return ref_enc_bit(pre, plh, n / 16) ^ seq[n % 16];
    else              return payload[n - 104 * 16];
  endfunction

  function automatic logic [63:0] rep4(logic [15:0] cnt);
    logic [63:0] r;
    for (int j = 0; j < 16; j++) r[4*j +: 4] = {4{cnt[j]}};
    return r;
  endfunction

  // filter coefficient k (1..12) of a {coeff_12..coeff_1} word
  function automatic int coef(logic [95:0] c, int k);
    return int'(signed'(c[(k-1)*8 +: 8]));
  endfunction
endpackage
