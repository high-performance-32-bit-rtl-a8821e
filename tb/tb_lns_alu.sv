// tb_lns_alu: end-to-end test of the LNS arithmetic unit at its default
// configuration.
//
// A stream of operations is issued, one per clock with random idle cycles,
// and every result is checked exactly one clock after its issue against a
// double-precision model: add and subtract within 1 LSB of the log,
// multiply, divide, square and root exactly, plus sign and flags. The
// stimulus is steered so that every mechanism of the unit happens: addition,
// subtraction through the F1 direct path, the F2 and F3 co-transformations
// and plain db interpolation, differences too large to matter, exact
// cancellation, the four log-domain operations, overflow, underflow, division
// by zero, roots of negative numbers, an unused op code and idle cycles. A
// mechanism that never happened counts as a failure.
module tb_lns_alu;
  import lns_pkg::*;
  import lns_ref_pkg::*;

  localparam int NOPS = 3000;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  lns_op_e    op;
  lns_t       a, b, result;
  lns_flags_t flags;
  logic       out_valid;

  lns_alu u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {
    M_ADD, M_DIRECT, M_F2, M_F3, M_INTERP, M_FAR, M_CANCEL, M_MUL, M_DIV, M_SQR,
    M_SQRT, M_OVF, M_UNF, M_DIVZ, M_INV, M_BADOP, M_IDLE, M_N
  } mech_e;
  int seen [M_N];

  // Expected result of the operation in flight.
  logic       exp_pending = 1'b0;
  logic [31:0] exp_w;
  real        exp_l;
  logic       exp_s, exp_exact, exp_zero;
  lns_flags_t exp_f;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // Model of one operation; fills the expectation and counts mechanisms.
  task automatic model(lns_op_e o, logic [31:0] av, logic [31:0] bv);
    longint i, j, v;
    int     kind;
    logic   za, zb;
    za = ref_is_zero(av);
    zb = ref_is_zero(bv);
    i  = longint'(signed'(av[30:0]));
    j  = longint'(signed'(bv[30:0]));
    exp_f = '0; exp_exact = 1'b1; exp_zero = 1'b0;
    if (o == OP_ADD || o == OP_SUB) begin
      longint d;
      logic   es;
      es = av[31] ^ bv[31] ^ (o == OP_SUB);
      d  = (i > j) ? i - j : j - i;
      if (!za && !zb) begin
        if (!es) seen[M_ADD]++;
        else if (d == 0) seen[M_CANCEL]++;
        else if (d <= (1 << 12)) seen[M_DIRECT]++;
        else if (d < (1 << 22)) seen[M_F2]++;
        else if (d < (1 << 23)) seen[M_F3]++;
        else if (d < (32 << 23)) seen[M_INTERP]++;
        else seen[M_FAR]++;
      end
      ref_addsub(av, bv, o == OP_SUB, kind, exp_s, exp_l);
      exp_exact = 1'b0;
      if (kind == 1) exp_zero = 1'b1;
      else if (exp_l * LSB > 1073741823.5) begin
        exp_f.overflow = 1'b1; exp_exact = 1'b1; exp_w = {exp_s, LOG_MAX}; seen[M_OVF]++;
      end else if (exp_l * LSB < -1073741823.5) begin
        exp_f.underflow = 1'b1; exp_zero = 1'b1; seen[M_UNF]++;
      end
      return;
    end
    case (o)
      OP_MUL:  begin v = i + j;         exp_s = av[31] ^ bv[31]; seen[M_MUL]++;  end
      OP_DIV:  begin v = i - j;         exp_s = av[31] ^ bv[31]; seen[M_DIV]++;  end
      OP_SQR:  begin v = 2 * i;         exp_s = 1'b0;            seen[M_SQR]++;  end
      OP_SQRT: begin v = (i + 1) >>> 1; exp_s = 1'b0;            seen[M_SQRT]++; end
      default: begin
        seen[M_BADOP]++;
        exp_f.invalid = 1'b1; exp_zero = 1'b1;
        return;
      end
    endcase
    if (v > 64'sh3FFF_FFFF) begin
      exp_f.overflow = 1'b1; v = 64'sh3FFF_FFFF; seen[M_OVF]++;
    end else if (v < -64'sh3FFF_FFFF) begin
      exp_f.underflow = 1'b1; exp_zero = 1'b1; seen[M_UNF]++;
    end
    if (o == OP_SQRT && av[31] && !za) begin exp_f.invalid = 1'b1; seen[M_INV]++; end
    exp_w = {exp_s, 31'(v)};
    if (o == OP_DIV && zb) begin
      exp_f = '0; exp_f.div_zero = 1'b1; seen[M_DIVZ]++;
      exp_zero = za; exp_w = {exp_s, LOG_MAX};
    end else if (za || (o == OP_MUL && zb)) begin
      exp_f = '0; exp_zero = 1'b1;
    end
  endtask

  task automatic compare();
    real err;
    checks++;
    if (!out_valid) begin fail("out_valid missing one clock after issue"); return; end
    if (flags != exp_f) fail($sformatf("flags %b want %b", flags, exp_f));
    if (exp_zero) begin
      if (result != {1'b0, LOG_ZERO}) fail($sformatf("result %h want zero", result));
    end else if (exp_exact) begin
      if (result != exp_w) fail($sformatf("result %h want %h", result, exp_w));
    end else begin
      err = log_of(result) * LSB - exp_l * LSB;
      if (err < 0) err = -err;
      if (err > 1.0 || result.sign != exp_s)
        fail($sformatf("a=%h b=%h op=%s result %h want log %f sign %b", a, b, op.name(),
                       result, exp_l, exp_s));
    end
  endtask

  function automatic logic [31:0] rand_word(int spread);
    logic [31:0] w;
    w = $urandom();
    w[30:0] = 31'(signed'(w[30:0]) >>> spread);
    return w;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; op = OP_ADD;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0 || result != {1'b0, LOG_ZERO}) fail("reset state");
    for (int n = 0; n < NOPS; n++) begin
      logic [31:0] av, bv;
      lns_op_e     o;
      int          sel;
      // Idle cycle now and then: the output must hold and out_valid drop.
      if ($urandom_range(0, 9) == 0) begin
        lns_t held;
        held = result;
        @(negedge clk);
        in_valid = 1'b0;
        a = $urandom(); b = $urandom();
        @(posedge clk); #1;
        checks++; seen[M_IDLE]++;
        if (out_valid || result != held) fail("idle cycle changed the output");
      end
      sel = n % 12;
      av  = rand_word($urandom_range(0, 12));
      case (sel)
        0, 1, 2, 3, 4, 5: begin      // add / subtract with steered difference
          longint d;
          case ($urandom_range(0, 5))
            0: d = $urandom_range(0, 1 << 12);
            1: d = $urandom_range(1 << 12, 1 << 22);
            2: d = $urandom_range(1 << 22, 1 << 23);
            3: d = $urandom_range(1 << 23, 32 << 23);
            4: d = $urandom_range(0, 4 << 23);
            default: d = longint'($urandom_range(32 << 23, 255 << 23));
          endcase
          if ($urandom() % 2) d = -d;
          av[30:0] = 31'(signed'(av[30:0]) >>> 2);
          bv = {1'($urandom()), 31'(longint'(signed'(av[30:0])) - d)};
          o  = ($urandom() % 2) ? OP_SUB : OP_ADD;
        end
        6:  begin o = OP_MUL;  bv = rand_word($urandom_range(0, 3)); end
        7:  begin o = OP_DIV;  bv = rand_word($urandom_range(0, 3)); end
        8:  begin o = OP_SQR;  bv = $urandom(); end
        9:  begin o = OP_SQRT; bv = $urandom(); end
        10: begin              // range extremes and zeros
          case ($urandom_range(0, 5))
            0: begin o = OP_ADD; av = {1'b0, LOG_MAX}; bv = {1'b0, 31'h3FFF_FF00}; end
            1: begin o = OP_SUB; av = 32'h4000_0009; bv = 32'h4000_0008; end
            2: begin o = OP_DIV; bv = {1'($urandom()), LOG_ZERO}; end
            3: begin o = OP_MUL; bv = {1'b0, LOG_ZERO}; end
            4: begin o = OP_SUB; bv = av; end
            default: begin o = OP_ADD; av = {1'b1, LOG_ZERO}; bv = $urandom(); end
          endcase
        end
        default: begin
          o  = ($urandom() % 2) ? lns_op_e'(3'd6) : lns_op_e'(3'd7);
          bv = $urandom();
        end
      endcase
      @(negedge clk);
      in_valid = 1'b1; op = o; a = av; b = bv;
      model(o, av, bv);
      @(posedge clk); #1;
      compare();
      @(negedge clk);
      in_valid = 1'b0;
    end
    for (int m = 0; m < M_N; m++) begin
      if (seen[m] == 0) begin
        failures++;
        $display("mechanism %s never happened", mech_e'(m));
      end
    end
    $display("mechanisms: add=%0d F1=%0d F2=%0d F3=%0d interp=%0d far=%0d cancel=%0d mul=%0d div=%0d sqr=%0d sqrt=%0d ovf=%0d unf=%0d div0=%0d inv=%0d badop=%0d idle=%0d",
             seen[M_ADD], seen[M_DIRECT], seen[M_F2], seen[M_F3], seen[M_INTERP], seen[M_FAR],
             seen[M_CANCEL], seen[M_MUL], seen[M_DIV], seen[M_SQR], seen[M_SQRT], seen[M_OVF],
             seen[M_UNF], seen[M_DIVZ], seen[M_INV], seen[M_BADOP], seen[M_IDLE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
