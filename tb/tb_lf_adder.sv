// tb_lf_adder: self-checking test of the Ladner-Fisher adder.
// Compares {cout, sum} with the built-in addition for the default 32-bit
// width and for an odd 13-bit width, over carry-chain edge cases and random
// operands with both carry-in values.
module tb_lf_adder;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic        ci, co;
  logic [12:0] a13, b13, s13;
  logic        co13;

  lf_adder u_dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  lf_adder #(.WIDTH(13)) u_dut13 (.a(a13), .b(b13), .cin(ci), .sum(s13), .cout(co13));

  task automatic check(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] e;
    logic [13:0] e13;
    a = x; b = y; ci = c; a13 = x[12:0]; b13 = y[12:0];
    #1;
    e   = {1'b0, x} + {1'b0, y} + 33'(c);
    e13 = {1'b0, x[12:0]} + {1'b0, y[12:0]} + 14'(c);
    checks += 2;
    if ({co, s} != e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %h, want %h", x, y, c, {co, s}, e);
    end
    if ({co13, s13} != e13) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hFFFF_FFFF, 32'h0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0, 32'h0, 1'b0);
    check(32'h7FFF_FFFF, 32'h1, 1'b0);
    for (int k = 0; k < 32; k++) check(32'hFFFF_FFFF >> k, 32'd1, 1'b0);
    for (int k = 0; k < 5000; k++) check($urandom(), $urandom(), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
