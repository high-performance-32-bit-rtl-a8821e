// tb_db_cotrans: self-checking test of the double co-transformation.
// For z = -r in (0, 1) it recomputes, in double precision, the grid point
// r1, the low part r2 and r3 = r + db(-r2) - db(r1), and checks that
//   - the direct path (z <= 2^-11) returns -db(r) within 1 unit of 2^-27,
//   - otherwise base = -db(r1) and z3 = -r3 within 2 units, z3 >= 1,
//   - base + |db(r3)| reproduces -db(r) within 4 units.
// It counts the three regions (F1 direct, F2 grid, F3 grid) and fails if
// one is never reached.
module tb_db_cotrans;
  localparam int  K  = 12;
  localparam real S  = 134217728.0;   // 2^27
  int checks = 0, failures = 0;
  int n_direct = 0, n_f2 = 0, n_f3 = 0;

  logic [22:0] z;
  logic        direct;
  logic [31:0] base, z3;

  db_cotrans u_dut (.z(z), .direct(direct), .base(base), .z3(z3));

  function automatic real mdb(real x);
    return -$ln(1.0 - $pow(2.0, -x)) / $ln(2.0);
  endfunction

  task automatic fail(string what, real err);
    failures++;
    if (failures < 10) $display("FAIL z=%h %s err=%f", z, what, err);
  endtask

  task automatic check(logic [22:0] zv);
    real x, d1, z1, r2, err;
    z = zv;
    #1;
    x  = real'(zv) / 8388608.0;
    d1 = $pow(2.0, K - 23);
    checks++;
    if (zv <= 23'(1 << K)) begin
      n_direct++;
      if (!direct) fail("direct flag", 0.0);
      err = real'(base) - mdb(x) * S;
      if (err > 1.0 || err < -1.0) fail("F1", err);
    end else begin
      if (direct) fail("direct flag", 0.0);
      z1 = real'((zv >> K) + 1) * d1;
      r2 = z1 - x;
      if (z1 > 0.5) n_f3++; else n_f2++;
      err = real'(base) - mdb(z1) * S;
      if (err > 1.0 || err < -1.0) fail("base", err);
      err = real'(z3) - (x + mdb(r2) - mdb(z1)) * S;
      if (err > 2.0 || err < -2.0) fail("z3", err);
      if (z3 < 32'(1 << 27)) fail("z3 < 1", 0.0);
      err = real'(base) + mdb(real'(z3) / S) * S - mdb(x) * S;
      if (err > 4.0 || err < -4.0) fail("identity", err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(23'd1);
    check(23'(1 << K));
    check(23'((1 << K) + 1));
    check(23'(1 << 22) - 23'd1);
    check(23'(1 << 22));
    check(23'h7F_FFFF);
    for (int k = 0; k < 6000; k++) begin
      logic [22:0] v;
      v = 23'($urandom()) >> $urandom_range(0, 14);
      if (v == 0) v = 1;
      check(v);
    end
    if (n_direct == 0 || n_f2 == 0 || n_f3 == 0) failures++;
    $display("regions: F1 direct=%0d F2=%0d F3=%0d", n_direct, n_f2, n_f3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
