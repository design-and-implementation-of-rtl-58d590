// qam64_ref_pkg: reference models used by the QAM-64 testbenches.
//
// Written from the defining formulas rather than from the RTL:
//  - carrier words: INT[127 * sin/cos(2*pi*i/2^b)] with INT truncating
//    toward zero, stored with a +128 offset;
//  - levels: a 3-bit Gray code g is decoded to its rank k (0..7) and the
//    level is 2k - 7, which walks -7..+7 along the constellation axis;
//  - sum stage: (Q*sin + I*cos) / 8 (toward zero) + 128.
package qam64_ref_pkg;

  function automatic int trunc_real(input real v);
    return (v < 0.0) ? -int'($floor(-v)) : int'($floor(v));
  endfunction

  function automatic int ref_carrier(input int idx, input int aw, input bit cosine);
    real ang;
    ang = 6.283185307179586 * real'(idx) / real'(2 ** aw);
    return trunc_real(127.0 * (cosine ? $cos(ang) : $sin(ang)));
  endfunction

  function automatic int ref_level(input logic [2:0] g);
    logic [2:0] k;
    k = g ^ (g >> 1) ^ (g >> 2);
    return 2 * int'(k) - 7;
  endfunction

  function automatic int ref_add(input int i_lvl, input int q_lvl, input int s, input int c);
    return (q_lvl * s + i_lvl * c) / 8 + 128;   // int division truncates toward zero
  endfunction

endpackage
