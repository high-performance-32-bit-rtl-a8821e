// tb_lns_muldiv: self-checking test of LNS multiply, divide, square and root.
// Expected logs are computed with integer arithmetic on the log fields
// (i+j, i-j, 2i, round(i/2)) and the signs and flags from the operand
// signs; random operands cover the whole range, so overflow and underflow
// occur, and zero operands, division by zero and roots of negative numbers
// are driven explicitly. Every case is counted.
module tb_lns_muldiv;
  import lns_pkg::*;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_dz = 0, n_inv = 0, n_zero = 0;

  muldiv_op_e op;
  lns_t       a, b, y;
  lns_flags_t flags;

  lns_muldiv u_dut (.op(op), .a(a), .b(b), .y(y), .flags(flags));

  task automatic run(muldiv_op_e o, logic [31:0] av, logic [31:0] bv);
    longint i, j, v;
    logic   es, za, zb;
    logic [30:0] el;
    logic [3:0]  ef;   // ovf, unf, inv, dz
    op = o; a = av; b = bv;
    #1;
    za = av[30:0] == 31'h4000_0000;
    zb = bv[30:0] == 31'h4000_0000;
    i  = longint'(signed'(av[30:0]));
    j  = longint'(signed'(bv[30:0]));
    case (o)
      MD_MUL:  begin v = i + j;      es = av[31] ^ bv[31]; end
      MD_DIV:  begin v = i - j;      es = av[31] ^ bv[31]; end
      MD_SQR:  begin v = 2 * i;      es = 1'b0; end
      default: begin v = (i + 1) >>> 1; es = 1'b0; end
    endcase
    ef = '0;
    if (v > 64'sh3FFF_FFFF)       begin el = 31'h3FFF_FFFF; ef[3] = 1'b1; n_ovf++; end
    else if (v < -64'sh3FFF_FFFF) begin el = 31'h4000_0000; ef[2] = 1'b1; n_unf++; end
    else el = 31'(v);
    if (o == MD_SQRT && av[31] && !za) begin ef[1] = 1'b1; n_inv++; end
    if (o == MD_DIV && zb) begin
      ef = 4'b0001; n_dz++;
      el = za ? 31'h4000_0000 : 31'h3FFF_FFFF;
    end else if (za || (o == MD_MUL && zb)) begin
      ef = '0; el = 31'h4000_0000; n_zero++;
    end
    if (el == 31'h4000_0000) es = 1'b0;
    checks++;
    if (y != {es, el} || flags != ef) begin
      failures++;
      if (failures < 10) $display("FAIL op=%0d %h %h -> %h %b want %h %b",
                                   o, av, bv, y, flags, {es, el}, ef);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8000; k++) begin
      logic [31:0] av, bv;
      av = $urandom();
      bv = $urandom();
      if (k % 2) begin   // small logs: no range exceptions
        av[30:0] = 31'(signed'(av[30:0]) >>> 3);
        bv[30:0] = 31'(signed'(bv[30:0]) >>> 3);
      end
      run(muldiv_op_e'(k % 4), av, bv);
    end
    run(MD_MUL, {1'b1, LOG_ZERO}, 32'h8123_4567);
    run(MD_DIV, 32'h8123_4567, {1'b0, LOG_ZERO});
    run(MD_DIV, {1'b0, LOG_ZERO}, {1'b0, LOG_ZERO});
    run(MD_SQRT, 32'h8000_0003, 32'h0);
    run(MD_SQRT, {1'b0, LOG_ZERO}, 32'h0);
    run(MD_SQR, 32'h0000_0001, 32'h0);
    run(MD_SQRT, 32'h7FFF_FFFF, 32'h0);
    $display("cases: ovf=%0d unf=%0d div0=%0d invalid=%0d zero=%0d", n_ovf, n_unf, n_dz, n_inv, n_zero);
    if (n_ovf == 0 || n_unf == 0 || n_dz == 0 || n_inv == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
