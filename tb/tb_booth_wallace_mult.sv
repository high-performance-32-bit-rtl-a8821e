// tb_booth_wallace_mult: self-checking test of the Booth/Wallace multiplier.
// Checks the default signed 32 x 32 instance and a 30 x 27 instance (odd
// multiplier width, as used by the interpolator) against the built-in signed
// product, over the extreme operands and random ones.
module tb_booth_wallace_mult;
  int checks = 0, failures = 0;

  logic signed [31:0] a, b;
  logic signed [63:0] p;
  logic signed [29:0] a2;
  logic signed [26:0] b2;
  logic signed [56:0] p2;

  booth_wallace_mult u_dut (.a(a), .b(b), .p(p));
  booth_wallace_mult #(.AW(30), .BW(27)) u_dut2 (.a(a2), .b(b2), .p(p2));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic signed [63:0] e;
    logic signed [56:0] e2;
    a = x; b = y; a2 = x[29:0]; b2 = y[26:0];
    #1;
    e  = 64'(signed'(x)) * 64'(signed'(y));
    e2 = 57'(signed'(x[29:0])) * 57'(signed'(y[26:0]));
    checks += 2;
    if (p != e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, want %h", x, y, p, e);
    end
    if (p2 != e2) begin
      failures++;
      if (failures < 10) $display("FAIL2 %h * %h = %h, want %h", x[29:0], y[26:0], p2, e2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7FFF_FFFF, 32'h8000_0000);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF);
    check(32'h0, 32'h1234_5678);
    check(32'h2000_0000, 32'h0400_0000);
    for (int k = 0; k < 5000; k++) check($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
