// lns_muldiv: LNS multiply, divide, square and square root.
//
// In the logarithmic domain these are fixed-point operations on the log
// fields: x*y -> i+j, x/y -> i-j, x^2 -> 2i, sqrt(x) -> i/2. One 34-bit
// Ladner-Fisher adder does all four: its inputs are the sign-extended logs
// (j inverted with carry in for divide, i twice for square, i plus a carry in
// of one followed by an arithmetic right shift for the square root, which
// rounds the halved log to nearest with ties upward). The sign is the XOR of
// the operand signs for multiply and divide and positive for square and root.
// Zero operands give zero (divide by zero gives the largest magnitude and the
// div_zero flag); results outside the log range saturate (overflow) or flush
// to zero (underflow); the root of a negative number returns the root of its
// magnitude with the invalid flag. Combinational.
// The four log identities follow the published architecture; the exception rules, the zero
// code and the root rounding are this implementation's choices.
module lns_muldiv
  import lns_pkg::*;
(
  input  muldiv_op_e op,
  input  lns_t       a,
  input  lns_t       b,
  output lns_t       y,
  output lns_flags_t flags
);
  logic [33:0] ia, ib, opa, opb, s;
  logic        cin, cout_unused;
  logic        za, zb;

  assign za = is_zero(a);
  assign zb = is_zero(b);
  assign ia = 34'(signed'(a.lg));
  assign ib = 34'(signed'(b.lg));

  always_comb begin
    opa = ia;
    opb = ib;
    cin = 1'b0;
    unique case (op)
      MD_MUL:  begin opb = ib;  cin = 1'b0; end
      MD_DIV:  begin opb = ~ib; cin = 1'b1; end
      MD_SQR:  begin opb = ia;  cin = 1'b0; end
      MD_SQRT: begin opb = '0;  cin = 1'b1; end
      default: ;
    endcase
  end

  lf_adder #(.WIDTH(34)) u_add (
    .a(opa), .b(opb), .cin(cin), .sum(s), .cout(cout_unused)
  );

  always_comb begin
    logic signed [33:0] v;
    logic ovf, unf;
    v = (op == MD_SQRT) ? (signed'(s) >>> 1) : signed'(s);
    y     = '0;
    flags = '0;
    y.lg  = clamp_log(v, ovf, unf);
    flags.overflow  = ovf;
    flags.underflow = unf;
    unique case (op)
      MD_MUL, MD_DIV: y.sign = a.sign ^ b.sign;
      default:        y.sign = 1'b0;
    endcase
    if (op == MD_SQRT && a.sign && !za) flags.invalid = 1'b1;
    // Zero operands.
    if (op == MD_DIV && zb) begin
      flags          = '0;
      flags.div_zero = 1'b1;
      y.lg           = za ? LOG_ZERO : LOG_MAX;
    end else if (za || ((op == MD_MUL) && zb)) begin
      flags = '0;
      y.lg  = LOG_ZERO;
    end
    if (y.lg == LOG_ZERO) y.sign = 1'b0;
  end
endmodule
