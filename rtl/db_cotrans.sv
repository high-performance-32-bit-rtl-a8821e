// db_cotrans: double co-transformation for LNS subtraction with -1 < r < 0.
//
// Near r = 0 the subtraction function db(r) = log2(1 - 2^r) has a
// singularity, so it cannot be interpolated there. For -1 < r < 0 the
// operand difference is moved away from zero with the identity
//   db(r) = db(r1) + db(r3),   r3 = r + db(-r2) - db(r1),
// where r1 = r - r2 lies on a grid of step D1 = 2^(K-23) and 0 < r2 <= D1.
// r3 always lands at or below -1, where the db interpolator works.
// Three tables hold the exact values needed (magnitudes, 27 fraction bits):
//   F1: -db(-m*2^-23), m = 1..2^K      (the low part, -D1 <= r < 0)
//   F2: -db(r1) on the grid, -0.5 < r1 <= -2*D1   (first transformation)
//   F3: -db(r1) on the grid, -1 <= r1 <= -0.5     (second transformation)
// For -D1 <= r < 0 F1 gives db(r) directly (direct = 1). Otherwise
// base = -db(r1) from F2 or F3 and z3 = -r3 = z + F1[r2] - base is handed to
// the db interpolator; the caller forms -db(r) = base + |db(r3)|.
// Input z = -r with 23 fraction bits (0 < z < 1). Combinational.
// The identity (a first-order co-transformation) and the F1/F2/F3 regions
// follow the published architecture; the step D1 (K = 12 low bits), the table layout and
// the rounding of the table values are this implementation's choices.
module db_cotrans
  import lns_pkg::FB;
#(
  parameter int K = 12
) (
  input  logic [22:0] z,
  output logic        direct,
  output logic [31:0] base,
  output logic [31:0] z3
);
  localparam int N1  = 1 << K;          // F1 words
  localparam int NG  = 1 << (22 - K);   // F2 and F3 words each

  typedef logic [31:0] t1_t [N1];
  typedef logic [31:0] tg_t [NG];

  function automatic real mdb(real x);   // -db(-x) for x > 0
    return -$ln(1.0 - $pow(2.0, -x)) / $ln(2.0);
  endfunction

  function automatic logic [31:0] q(real v);
    return 32'(longint'(v * $pow(2.0, FB)));   // cast rounds to nearest
  endfunction

  function automatic t1_t mk_f1();
    t1_t t;
    for (int m = 1; m <= N1; m++) t[m-1] = q(mdb(m / $pow(2.0, 23)));
    return t;
  endfunction

  // Grid point n (r1 = -n*D1): F2 holds n = 1..NG, F3 n = NG+1..2*NG.
  function automatic tg_t mk_fg(int upper);
    tg_t t;
    for (int k = 0; k < NG; k++) begin
      int n;
      n    = k + 1 + ((upper != 0) ? NG : 0);
      t[k] = (n < 2) ? '0 : q(mdb(n * $pow(2.0, K - 23)));
    end
    return t;
  endfunction

  localparam t1_t F1 = mk_f1();
  localparam tg_t F2 = mk_fg(0);
  localparam tg_t F3 = mk_fg(1);

  logic [22-K:0] zq;      // z / D1, integer part
  logic [K-1:0]  zl;      // z mod D1
  logic [K:0]    r2;      // in units of 2^-23, 1..2^K
  logic [23-K:0] n;       // grid index, r1 = -n*D1
  logic [31:0]   f1v, fgv;

  assign zq     = z[22:K];
  assign zl     = z[K-1:0];
  assign direct = (z <= 23'(N1));
  assign r2     = (K+1)'(N1) - (K+1)'(zl);
  assign n      = (24-K)'(zq) + 1'b1;

  // F1 address: -r itself on the direct path, r2 otherwise.
  assign f1v = direct ? F1[K'(z - 23'd1)] : F1[K'(r2 - 1'b1)];
  assign fgv = (n > (24-K)'(NG)) ? F3[(22-K)'(n - (24-K)'(NG) - 1'b1)]
                                 : F2[(22-K)'(n - 1'b1)];

  assign base = direct ? f1v : fgv;
  assign z3   = direct ? '0 : ({5'd0, z, 4'd0} + f1v - fgv);
endmodule
