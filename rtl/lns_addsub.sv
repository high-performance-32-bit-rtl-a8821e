// lns_addsub: LNS addition and subtraction.
//
// For x = +-2^i and y = +-2^j with |x| >= |y| (i >= j), r = j - i <= 0 and
//   |x| + |y| = 2^(i + sb(r)),  sb(r) = log2(1 + 2^r)
//   |x| - |y| = 2^(i + db(r)),  db(r) = log2(1 - 2^r).
// The operands are ordered by their logs; the larger gives i and the sign
// of the result. The effective operation (operand signs and sub) chooses sb
// or db. sb(r) comes from the sb interpolator. db(r) comes from the db
// interpolator for r <= -1 and from the double co-transformation for
// -1 < r < 0, which returns db(r1) and a transformed r3 <= -1 whose db is
// again interpolated; the two parts are added. The function value (27
// fraction bits, 4 guard bits) is added to i with the Ladner-Fisher adder and
// rounded to nearest at 23 fraction bits. |r| >= 32 leaves i unchanged.
// Zero operands pass the other operand through, x - x gives exact zero, and
// results outside the log range saturate (overflow) or flush to zero
// (underflow). Combinational.
// The sb/db formulation and the split between interpolation and
// co-transformation at r = -1 follow the published architecture; the rounding, zero and
// range handling are this implementation's choices.
module lns_addsub
  import lns_pkg::*;
(
  input  logic       sub,
  input  lns_t       a,
  input  lns_t       b,
  output lns_t       y,
  output lns_flags_t flags
);
  logic       za, zb, bsign, swap, eff_sub, beyond, cancel, near, big_sign;
  logic signed [31:0] ia, ib, ibig, ismall;
  logic [31:0] dz;                 // i - j, 23 fraction bits, >= 0
  logic [31:0] zq;                 // i - j with 27 fraction bits (< 32)

  assign za    = is_zero(a);
  assign zb    = is_zero(b);
  assign bsign = b.sign ^ sub;
  assign ia    = 32'(signed'(a.lg));
  assign ib    = 32'(signed'(b.lg));
  assign swap  = ib > ia;
  assign ibig  = swap ? ib : ia;
  assign ismall= swap ? ia : ib;
  assign big_sign = swap ? bsign : a.sign;
  assign eff_sub = a.sign ^ bsign;
  assign dz    = 32'(ibig - ismall);
  assign beyond = dz >= (32'd32 << FRAC);
  assign cancel = eff_sub && (dz == '0);
  assign near   = dz < (32'd1 << FRAC);     // -1 < r <= 0
  assign zq    = {dz[27:0], 4'd0};

  // ---- function evaluation ----
  logic [31:0] g_sb, g_db, ct_base, ct_z3, db_in;
  logic        ct_direct;

  sbdb_interp #(.FUNC(0)) u_sb (
    .z(zq), .beyond(beyond), .g(g_sb)
  );

  db_cotrans u_ct (
    .z(dz[22:0]), .direct(ct_direct), .base(ct_base), .z3(ct_z3)
  );

  assign db_in = near ? ct_z3 : zq;

  sbdb_interp #(.FUNC(1)) u_db (
    .z(db_in), .beyond(beyond), .g(g_db)
  );

  logic [31:0] g;                  // |function value|, 27 fraction bits
  always_comb begin
    if (!eff_sub)       g = g_sb;
    else if (!near)     g = g_db;
    else if (ct_direct) g = ct_base;
    else                g = ct_base + g_db;
  end

  // ---- i +- g with the Ladner-Fisher adder, then rounding ----
  logic [37:0] s;
  logic        cout_unused;
  lf_adder #(.WIDTH(38)) u_fin (
    .a   ({ {2{ibig[31]}}, ibig, 4'd0 }),
    .b   (eff_sub ? ~{6'd0, g} : {6'd0, g}),
    .cin (eff_sub),
    .sum (s),
    .cout(cout_unused)
  );

  always_comb begin
    logic signed [33:0] rnd;
    logic ovf, unf;
    rnd   = 34'((signed'(s) + 38'sd8) >>> GUARD);   // |i +- g| < 2^33
    y     = '0;
    flags = '0;
    y.sign = big_sign;
    y.lg   = clamp_log(rnd, ovf, unf);
    flags.overflow  = ovf;
    flags.underflow = unf;
    if (za && zb) begin
      y     = '0;
      y.lg  = LOG_ZERO;
      flags = '0;
    end else if (za) begin
      y     = lns_t'{bsign, b.lg};
      flags = '0;
    end else if (zb) begin
      y     = a;
      flags = '0;
    end else if (cancel) begin
      y     = '0;
      y.lg  = LOG_ZERO;
      flags = '0;
    end
    if (y.lg == LOG_ZERO) y.sign = 1'b0;
  end
endmodule
