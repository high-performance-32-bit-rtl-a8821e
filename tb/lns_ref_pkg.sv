// lns_ref_pkg: double-precision reference model of the LNS word format and
// operations, used by the testbenches to compute expected results
// independently of the RTL. A word is bit 31 sign, bits 30:0 log2|x| in two's
// complement with 23 fraction bits; bits 30:0 = 0x4000_0000 is zero.
package lns_ref_pkg;
  localparam real LSB = 8388608.0;   // 2^23

  function automatic logic ref_is_zero(logic [31:0] w);
    return w[30:0] == 31'h4000_0000;
  endfunction

  function automatic real log_of(logic [31:0] w);
    return real'(signed'(w[30:0])) / LSB;
  endfunction

  // Word with sign s and log value l (rounded to the nearest LSB).
  function automatic logic [31:0] make(logic s, real l);
    longint q;
    q = longint'(l * LSB);
    return {s, 31'(q)};
  endfunction

  // Exact result of a +- b in the log domain.
  // kind: 0 normal (sign s, log l), 1 exact zero.
  function automatic void ref_addsub(logic [31:0] a, logic [31:0] b, logic sub,
                                     output int kind, output logic s, output real l);
    logic bs;
    real  i, j, r;
    bs = b[31] ^ sub;
    kind = 0;
    if (ref_is_zero(a) && ref_is_zero(b)) begin kind = 1; s = 0; l = 0.0; return; end
    if (ref_is_zero(a)) begin s = bs;   l = log_of(b); return; end
    if (ref_is_zero(b)) begin s = a[31]; l = log_of(a); return; end
    i = log_of(a);
    j = log_of(b);
    s = a[31];
    if (j > i) begin r = i; i = j; j = r; s = bs; end
    r = j - i;
    if (a[31] == bs) l = i + $ln(1.0 + $pow(2.0, r)) / $ln(2.0);
    else if (r == 0.0) begin kind = 1; s = 0; l = 0.0; end
    else l = i + $ln(1.0 - $pow(2.0, r)) / $ln(2.0);
  endfunction
endpackage
