// tb_lns_accuracy: worst-case error sweep of LNS addition and subtraction.
//
// Sweeps r = j - i on an even grid with random sub-grid offsets over
//   -1 < r < 0 (subtraction: F1 direct path and the two co-transformations),
//   -32 < r <= -1 (subtraction: db interpolation) and
//   -32 < r <= 0 (addition: sb interpolation),
// with random i, and records the worst error of the result log against the
// double-precision model in each region, in LSBs of the 23-bit fraction.
// Every point must be within 1 LSB; the worst errors are printed.
module tb_lns_accuracy;
  import lns_pkg::*;
  import lns_ref_pkg::*;

  localparam int NPTS = 6000;   // points per region

  lns_t       a, b, y;
  logic       sub;
  lns_flags_t flags;
  int checks = 0, failures = 0;
  real worst [3];

  lns_addsub u_dut (.sub(sub), .a(a), .b(b), .y(y), .flags(flags));

  task automatic point(int region, longint d, logic s);
    longint i;
    int     kind;
    logic   es;
    real    el, err;
    i = longint'($urandom_range(0, 32'h2000_0000)) - 64'h1000_0000;
    a = {1'b0, 31'(i)};
    b = {1'b0, 31'(i - d)};
    sub = s;
    #1;
    ref_addsub(a, b, s, kind, es, el);
    err = log_of(y) * LSB - el * LSB;
    if (err < 0) err = -err;
    if (err > worst[region]) worst[region] = err;
    checks++;
    if (kind != 0 || err > 1.0 || y.sign != es) begin
      failures++;
      if (failures < 10) $display("FAIL region %0d d=%0d err=%f", region, d, err);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint step;
    worst[0] = 0.0; worst[1] = 0.0; worst[2] = 0.0;
    step = (longint'(1) << 23) / NPTS;
    for (int k = 0; k < NPTS; k++)
      point(0, 1 + k * step + $urandom_range(0, 32'(step - 2)), 1'b1);
    // Extra density next to the singularity.
    for (int k = 1; k <= 2000; k++) point(0, k, 1'b1);
    step = (longint'(31) << 23) / NPTS;
    for (int k = 0; k < NPTS; k++)
      point(1, (longint'(1) << 23) + k * step + $urandom_range(0, 32'(step - 1)), 1'b1);
    step = (longint'(32) << 23) / NPTS;
    for (int k = 0; k < NPTS; k++)
      point(2, k * step + $urandom_range(0, 32'(step - 1)), 1'b0);
    $display("worst error (LSB): sub -1<r<0 %0.3f, sub r<=-1 %0.3f, add %0.3f",
             worst[0], worst[1], worst[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
