// tb_sbdb_interp: self-checking test of the sb and db interpolators.
//
// Drives random and edge values of z = -r into an sb instance (z in [0,32))
// and a db instance (z in [1,32)), and compares g with log2(1 + 2^-z) and
// -log2(1 - 2^-z) computed in double precision. A result passes when it is
// within TOL units of 2^-27 (TOL = 8, i.e. half a unit of the 23-bit result
// fraction). z >= 32 must return 0. The largest errors seen are printed.
module tb_sbdb_interp;
  localparam int  FB  = 27;
  localparam real TOL = 8.0;

  logic [31:0] z_sb, z_db, g_sb, g_db;
  logic        bey_sb, bey_db;
  int checks = 0, failures = 0;
  real max_sb = 0.0, max_db = 0.0;

  sbdb_interp #(.FUNC(0), .LW(7)) u_sb (.z(z_sb), .beyond(bey_sb), .g(g_sb));
  sbdb_interp #(.FUNC(1), .LW(7)) u_db (.z(z_db), .beyond(bey_db), .g(g_db));

  function automatic real ref_g(int func, real x);
    if (func == 0) return $ln(1.0 + $pow(2.0, -x)) / $ln(2.0);
    else           return -$ln(1.0 - $pow(2.0, -x)) / $ln(2.0);
  endfunction

  task automatic check(int func, logic [31:0] zv);
    real x, err, gv;
    x = real'(zv) / $pow(2.0, FB);
    if (func == 0) begin z_sb = zv; bey_sb = 1'b0; end
    else           begin z_db = zv; bey_db = 1'b0; end
    #1;
    gv  = real'(func == 0 ? g_sb : g_db);
    err = gv - ref_g(func, x) * $pow(2.0, FB);
    if (err < 0) err = -err;
    checks++;
    if (func == 0 && err > max_sb) max_sb = err;
    if (func == 1 && err > max_db) max_db = err;
    if (err > TOL) begin
      failures++;
      if (failures < 10) $display("FAIL func=%0d z=%f err=%f units", func, x, err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bey_sb = 1'b0; bey_db = 1'b0; z_sb = '0; z_db = 32'd1 << FB;
    // Edges of every segment.
    for (int s = 0; s < 5; s++) begin
      check(0, 32'd1 << (FB + s));
      check(0, (32'd1 << (FB + s)) - 1);
      check(1, 32'd1 << (FB + s));
      check(1, (32'd1 << (FB + s)) + 32'd1);
    end
    check(0, 32'd0);
    check(0, 32'd1);
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] v;
      v = $urandom();
      // Spread over the segments: random exponent, random mantissa.
      v = v >> ($urandom_range(0, 8));
      check(0, v);
      if (v >= (32'd1 << FB)) check(1, v);
    end
    // beyond -> 0
    z_sb = 32'hFFFF_FFFF; bey_sb = 1'b1; z_db = 32'hFFFF_FFFF; bey_db = 1'b1; #1;
    checks++; if (g_sb != 0 || g_db != 0) failures++;
    $display("max error sb=%0.2f db=%0.2f (units of 2^-27)", max_sb, max_db);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
