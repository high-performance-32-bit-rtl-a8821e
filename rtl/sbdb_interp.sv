// sbdb_interp: table-and-interpolation evaluator of the LNS addition and
// subtraction functions.
//
// With r = j - i <= 0 the LNS sum and difference need sb(r) = log2(1 + 2^r)
// and db(r) = log2(1 - 2^r). This block takes z = -r (5 integer and 27
// fraction bits, 23 + 4 guard) and returns g = |sb(-z)| (FUNC = 0) or
// g = |db(-z)| (FUNC = 1) with 27 fraction bits.
//
// The range of z is cut by power-of-two partitioning into segments [0,1),
// [1,2), [2,4), [4,8), [8,16) and [16,32) (db starts at [1,2): below z = 1 the
// subtraction goes through co-transformation instead). Every segment holds
// 2^LW equal intervals, so the interval width h grows with z while the
// functions flatten. For the interval starting at x_k the tables give
//   F = g(x_k), D = g'(x_k) * h, E = g(x_k + h) - F - D,
// and with t = (z - x_k) / h in [0,1) the result is the first-order Taylor
// value corrected by the scaled error shape P(t) = t^2:
//   g ~= F + D * t + E * P(t).
// P is a shared table indexed by the top PB bits of t. The two products use
// the Booth/Wallace multiplier. The tables are computed at elaboration from
// the closed forms. Combinational; when beyond is set (z >= 32) the function is
// below half an LSB and g = 0.
// The F/D/E/P scheme (Taylor interpolation with the error correction
// algorithm), the power-of-two partitioning and the 4 guard bits follow the
// design; the segment bounds, the table sizes and P(t) = t^2 are this
// implementation's choices.
module sbdb_interp
  import lns_pkg::FB;
#(
  parameter int FUNC = 0,   // 0: sb, 1: db
  parameter int LW   = 7,   // log2 of words per segment
  parameter int PB   = 12   // index bits of the P table
) (
  input  logic [31:0] z,
  input  logic        beyond,
  output logic [31:0] g
);
  localparam int NSEG = (FUNC == 0) ? 6 : 5;
  localparam int SEG0 = (FUNC == 0) ? 0 : 1; // first segment held
  localparam int NW   = NSEG << LW;
  localparam int DN   = FB - LW + 4;         // bits of the normalised t
  localparam int PQ   = PB + 2;              // fraction bits of P
  localparam int DW   = 30;                  // signed width of D
  localparam int EW   = 24;                  // signed width of E

  typedef logic [31:0] tab_t [NW];
  typedef logic [PQ:0] ptab_t [1 << PB];

  // Function in the magnitude form used here (both are >= 0 for z > 0).
  function automatic real gfun(real x);
    if (FUNC == 0) return $ln(1.0 + $pow(2.0, -x)) / $ln(2.0);
    else           return -$ln(1.0 - $pow(2.0, -x)) / $ln(2.0);
  endfunction

  function automatic real gder(real x);
    if (FUNC == 0) return -$pow(2.0, -x) / (1.0 + $pow(2.0, -x));
    else           return -$pow(2.0, -x) / (1.0 - $pow(2.0, -x));
  endfunction

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  // kind 0: F, 1: D, 2: E
  function automatic tab_t mk_tab(int kind);
    tab_t t;
    for (int w = 0; w < NW; w++) begin
      int  s, e;
      real base, h, x, f, d;
      s    = SEG0 + (w >> LW);
      e    = (s == 0) ? 0 : s - 1;
      base = (s == 0) ? 0.0 : $pow(2.0, s - 1);
      h    = $pow(2.0, e - LW);
      x    = base + h * (w % (1 << LW));
      f    = gfun(x);
      d    = gder(x) * h;
      case (kind)
        0:       t[w] = 32'(rnd(f * $pow(2.0, FB)));
        1:       t[w] = 32'(rnd(d * $pow(2.0, FB)));
        default: t[w] = 32'(rnd((gfun(x + h) - f - d) * $pow(2.0, FB)));
      endcase
    end
    return t;
  endfunction

  function automatic ptab_t mk_p();
    ptab_t t;
    for (int k = 0; k < (1 << PB); k++) begin
      real u;
      u    = (k + 0.5) / $pow(2.0, PB);
      t[k] = (PQ+1)'(rnd(u * u * $pow(2.0, PQ)));
    end
    return t;
  endfunction

  localparam tab_t  F_TAB = mk_tab(0);
  localparam tab_t  D_TAB = mk_tab(1);
  localparam tab_t  E_TAB = mk_tab(2);
  localparam ptab_t P_TAB = mk_p();

  // ---- segment, interval index and position within the interval ----
  logic [4:0]          zi;
  logic [2:0]          seg;        // 0..5
  logic [LW-1:0]       idx;
  logic [DN-1:0]       tn;         // t scaled by 2^DN
  logic [$clog2(NW)-1:0] addr;

  assign zi = z[31:FB];

  always_comb begin
    logic [31:0] off;
    int          e;
    if      (zi[4]) seg = 3'd5;
    else if (zi[3]) seg = 3'd4;
    else if (zi[2]) seg = 3'd3;
    else if (zi[1]) seg = 3'd2;
    else if (zi[0]) seg = 3'd1;
    else            seg = 3'd0;
    if (SEG0 == 1 && seg == 3'd0) seg = 3'd1;   // db: z below 1 is not expected
    e   = (seg == 3'd0) ? 0 : int'(seg) - 1;
    off = (seg == 3'd0) ? z : z & ~(32'd1 << (FB + e));   // z - 2^e
    if (zi == 5'd0 && SEG0 == 1) off = '0;
    idx  = LW'(off >> (FB + e - LW));
    // Low bits of off, left-aligned to DN bits.
    tn   = DN'((off & ((32'd1 << (FB + e - LW)) - 1)) << (4 - e));
    addr = $clog2(NW)'({(int'(seg) - SEG0), idx});
  end

  // ---- table reads ----
  logic signed [DW-1:0] d_k;
  logic signed [EW-1:0] e_k;
  logic        [31:0]   f_k;
  logic        [PQ:0]   p_t;

  assign f_k = F_TAB[addr];
  assign d_k = DW'(signed'(D_TAB[addr]));
  assign e_k = EW'(signed'(E_TAB[addr]));
  assign p_t = P_TAB[tn[DN-1 -: PB]];

  // ---- D * t and E * P(t) ----
  logic signed [DW+DN:0]  dt;
  logic signed [EW+PQ:0]  ep;

  booth_wallace_mult #(.AW(DW), .BW(DN + 1)) u_mul_d (
    .a(d_k), .b({1'b0, tn}), .p(dt)
  );
  booth_wallace_mult #(.AW(EW), .BW(PQ + 1)) u_mul_e (
    .a(e_k), .b(p_t), .p(ep)
  );

  logic signed [33:0] acc;
  always_comb begin
    acc = signed'(34'(f_k))
        + 34'(dt >>> DN)
        + 34'(ep >>> PQ);
    if (beyond)              g = '0;
    else if (acc < 0)     g = '0;
    else                  g = acc[31:0];
  end
endmodule
