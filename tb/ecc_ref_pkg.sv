// ecc_ref_pkg: reference model of the (39,32) SECDED code, written
// independently of the RTL: data bit i goes to the i-th Hamming position
// >= 3 that is not a power of two, and the six check bits are the XOR of
// the position numbers of all set data bits. Bit 38 is overall parity.
package ecc_ref_pkg;
  function automatic int ref_pos(int i);
    int n; n = -1;
    for (int p = 1; p < 64; p++)
      if ((p & (p - 1)) != 0) begin n++; if (n == i) return p; end
    return 0;
  endfunction
  function automatic logic [38:0] ref_encode(logic [31:0] d);
    logic [5:0] c; c = '0;
    for (int i = 0; i < 32; i++) if (d[i]) c ^= 6'(ref_pos(i));
    return {^{c, d}, c, d};
  endfunction
endpackage
