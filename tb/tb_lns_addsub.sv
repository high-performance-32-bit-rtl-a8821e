// tb_lns_addsub: self-checking test of LNS addition and subtraction.
// Random operand pairs are chosen so that r = j - i falls in every region of
// the design: r near 0 (F1 direct path), -0.5 < r (F2), -1 < r <= -0.5 (F3),
// the interpolated range down to -32, and below. Each result is compared with
// the double-precision model: the log must be within 1 LSB (2^-23) and the
// sign must match. Zero operands, exact cancellation, overflow and underflow
// are checked too, and every path is counted.
module tb_lns_addsub;
  import lns_pkg::*;
  import lns_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_add = 0, n_direct = 0, n_f2 = 0, n_f3 = 0, n_interp = 0, n_far = 0;
  int n_ovf = 0, n_unf = 0, n_zero = 0, n_cancel = 0;
  real max_err = 0.0;

  lns_t       a, b, y;
  logic       sub;
  lns_flags_t flags;

  lns_addsub u_dut (.sub(sub), .a(a), .b(b), .y(y), .flags(flags));

  task automatic run(logic [31:0] av, logic [31:0] bv, logic sv);
    int   kind;
    logic es;
    real  el, err, r;
    a = av; b = bv; sub = sv;
    #1;
    ref_addsub(av, bv, sv, kind, es, el);
    checks++;
    if (kind == 1) begin
      n_cancel++;
      if (y.lg != LOG_ZERO) begin
        failures++;
        $display("FAIL zero %h %h %b -> %h", av, bv, sv, y);
      end
      return;
    end
    if (el * LSB > 1073741823.5) begin
      n_ovf++;
      if (!flags.overflow || y.lg != LOG_MAX) failures++;
      return;
    end
    if (el * LSB < -1073741823.5) begin
      n_unf++;
      if (!flags.underflow || y.lg != LOG_ZERO) failures++;
      return;
    end
    err = log_of(y) * LSB - el * LSB;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    if (err > 1.0 || y.sign != es || flags != '0) begin
      failures++;
      if (failures < 10) $display("FAIL %h %h sub=%b -> %h want log %f sign %b (err %f)",
                                   av, bv, sv, y, el, es, err);
    end
  endtask

  // Pair with log difference d (in LSBs) and given effective operation.
  task automatic pair(longint d, logic eff_sub);
    logic [31:0] av, bv;
    longint i;
    logic sa, sb, sv;
    i  = longint'($urandom_range(0, 32'h3000_0000)) - 64'h1800_0000;
    sa = 1'($urandom());
    sv = 1'($urandom());
    sb = sa ^ sv ^ eff_sub;
    av = {sa, 31'(i)};
    bv = {sb, 31'(i - d)};
    if ($urandom() % 2) run(av, bv, sv);
    else                run(bv, av, sv);
    if (!eff_sub) n_add++;
    else if (d <= (1 << 12)) n_direct++;
    else if (d < (1 << 22)) n_f2++;
    else if (d < (1 << 23)) n_f3++;
    else if (d < (32 << 23)) n_interp++;
    else n_far++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      longint d;
      case (k % 6)
        0: d = $urandom_range(1, 1 << 12);
        1: d = $urandom_range((1 << 12) + 1, (1 << 22) - 1);
        2: d = $urandom_range(1 << 22, (1 << 23) - 1);
        3: d = $urandom_range(1 << 23, 32 << 23);
        4: d = $urandom_range(0, 8 << 23);
        default: d = longint'($urandom_range(32 << 23, 200 << 23));
      endcase
      pair(d, 1'b1);
      pair(d, 1'b0);
    end
    // Zero operands and cancellation.
    run({1'b1, LOG_ZERO}, 32'h0123_4567, 1'b1); n_zero++;
    run(32'h8123_4567, {1'b0, LOG_ZERO}, 1'b0); n_zero++;
    run({1'b0, LOG_ZERO}, {1'b0, LOG_ZERO}, 1'b0); n_zero++;
    run(32'h0222_0000, 32'h0222_0000, 1'b1);
    run(32'h0222_0000, 32'h8222_0000, 1'b0);
    // Overflow: largest magnitude plus itself.
    run({1'b0, LOG_MAX}, {1'b0, LOG_MAX}, 1'b0);
    // Underflow: two nearly equal values near the bottom of the range.
    run(32'h4000_0004, 32'h4000_0003, 1'b1);
    $display("paths: add=%0d direct=%0d F2=%0d F3=%0d interp=%0d far=%0d zero=%0d cancel=%0d ovf=%0d unf=%0d",
             n_add, n_direct, n_f2, n_f3, n_interp, n_far, n_zero, n_cancel, n_ovf, n_unf);
    $display("max error %0.3f LSB", max_err);
    if (n_direct == 0 || n_f2 == 0 || n_f3 == 0 || n_interp == 0 || n_far == 0 ||
        n_cancel == 0 || n_ovf == 0 || n_unf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
