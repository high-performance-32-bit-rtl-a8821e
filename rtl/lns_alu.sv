// lns_alu: complete 32-bit logarithmic number system arithmetic unit.
//
// Numbers are kept as a sign and a fixed-point base-2 logarithm (8 integer,
// 23 fraction bits; see lns_pkg), so multiply, divide, square and square root
// reduce to fixed-point addition, subtraction and shifting of the logs
// (lns_muldiv), while addition and subtraction need the non-linear functions
// sb and db, evaluated by table interpolation and, for subtraction of close
// operands, by double co-transformation (lns_addsub).
//
// Interface: when in_valid is high, op (lns_op_e), a and b are taken; both
// units compute combinationally and the selected result is registered, so
// result, flags and out_valid appear one clock later (latency 1, one new
// operation per clock). Operation codes 6 and 7 return zero with the invalid
// flag. rst_n is an asynchronous active-low reset of the output registers.
// The split into a multiply/divide path and an add/subtract path follows the
// design; the single output register and the handshake are this
// implementation's choices.
module lns_alu
  import lns_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  lns_op_e    op,
  input  lns_t       a,
  input  lns_t       b,
  output logic       out_valid,
  output lns_t       result,
  output lns_flags_t flags
);
  lns_t       y_as, y_md, y_nx;
  lns_flags_t f_as, f_md, f_nx;
  muldiv_op_e md_op;

  lns_addsub u_addsub (
    .sub(op == OP_SUB), .a(a), .b(b), .y(y_as), .flags(f_as)
  );

  always_comb begin
    unique case (op)
      OP_DIV:  md_op = MD_DIV;
      OP_SQR:  md_op = MD_SQR;
      OP_SQRT: md_op = MD_SQRT;
      default: md_op = MD_MUL;
    endcase
  end

  lns_muldiv u_muldiv (
    .op(md_op), .a(a), .b(b), .y(y_md), .flags(f_md)
  );

  always_comb begin
    unique case (op)
      OP_ADD, OP_SUB:                  begin y_nx = y_as; f_nx = f_as; end
      OP_MUL, OP_DIV, OP_SQR, OP_SQRT: begin y_nx = y_md; f_nx = f_md; end
      default: begin
        y_nx = lns_t'{1'b0, LOG_ZERO};
        f_nx = '0;
        f_nx.invalid = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= lns_t'{1'b0, LOG_ZERO};
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        result <= y_nx;
        flags  <= f_nx;
      end
    end
  end

  // The output register holds its value while no operation is issued.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) !in_valid |=> $stable(result) && !out_valid;
  endproperty
  a_hold: assert property (p_hold);
endmodule
