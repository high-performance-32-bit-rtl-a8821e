// booth_wallace_mult: signed AW x BW multiplier, radix-4 Booth with a Wallace tree.
//
// The multiplier b is recoded in overlapping 3-bit groups into radix-4 digits
// in {-2,-1,0,+1,+2}; each digit selects 0, a or 2a, inverted when negative,
// giving ceil(BW/2) partial products (sign-extended to the product width and
// shifted by two bits per digit). The "+1" of each negation is gathered into
// one extra row. The rows are reduced Wallace-fashion: on every level rows are
// taken in threes through 3:2 carry-save adders (two rows out for three in)
// until two rows remain, which the Ladner-Fisher adder sums. Combinational;
// p = a * b as two's complement numbers. The Booth/Wallace/Ladner-Fisher
// combination follows the published architecture; radix 4, the row-level tree and the
// signed operands are this implementation's choices.
module booth_wallace_mult #(
  parameter int AW = 32,
  parameter int BW = 32
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int PW   = AW + BW;
  localparam int NPP  = (BW + 1) / 2;      // Booth digits
  localparam int NR0  = NPP + 1;           // partial products + negation row

  // Number of rows left after l Wallace levels.
  function automatic int rows_at(int l);
    int n;
    n = NR0;
    for (int i = 0; i < l; i++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int n_levels();
    int l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NLV = n_levels();

  logic [2*NPP:0]  bx;                       // {b sign-extended, 0}
  logic [PW-1:0]   pp [NR0];
  logic [PW-1:0]   negrow;

  assign bx = {{(2*NPP-BW){b[BW-1]}}, b, 1'b0};

  // Booth partial products.
  for (genvar k = 0; k < NPP; k++) begin : g_pp
    logic [2:0]    grp;
    logic [PW-1:0] mag;
    logic          neg;
    assign grp = bx[2*k +: 3];
    always_comb begin
      unique case (grp)
        3'b001, 3'b010: mag = PW'(signed'(a));
        3'b101, 3'b110: mag = PW'(signed'(a));
        3'b011, 3'b100: mag = PW'(signed'(a)) << 1;
        default:        mag = '0;
      endcase
    end
    assign neg = grp[2] & ~(grp[1] & grp[0]);
    assign pp[k] = (neg ? ~mag : mag) << (2 * k);
    assign negrow[2*k] = neg;
    if (2 * k + 1 < PW) begin : g_z
      assign negrow[2*k+1] = 1'b0;
    end
  end
  if (2 * NPP < PW) begin : g_negpad
    assign negrow[PW-1:2*NPP] = '0;
  end
  assign pp[NPP] = negrow;

  // Wallace tree of 3:2 carry-save adders; each level holds its own rows.
  for (genvar l = 0; l < NLV; l++) begin : g_lvl
    localparam int N  = rows_at(l);
    localparam int NG = N / 3;
    logic [PW-1:0] cur [N];
    logic [PW-1:0] nxt [rows_at(l + 1)];
    for (genvar r = 0; r < N; r++) begin : g_in
      if (l == 0) begin : g_first
        assign cur[r] = pp[r];
      end else begin : g_next
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      logic [PW-1:0] x, y, z;
      assign x = cur[3*g];
      assign y = cur[3*g+1];
      assign z = cur[3*g+2];
      assign nxt[2*g]   = x ^ y ^ z;
      assign nxt[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end
    for (genvar r = 0; r < N % 3; r++) begin : g_rest
      assign nxt[2*NG+r] = cur[3*NG+r];
    end
  end

  logic [PW-1:0] fin0, fin1;
  if (NLV == 0) begin : g_notree
    assign fin0 = pp[0];
    assign fin1 = pp[1];
  end else begin : g_tree
    assign fin0 = g_lvl[NLV-1].nxt[0];
    assign fin1 = g_lvl[NLV-1].nxt[1];
  end

  logic cout_unused;
  lf_adder #(.WIDTH(PW)) u_cpa (
    .a   (fin0),
    .b   (fin1),
    .cin (1'b0),
    .sum (p),
    .cout(cout_unused)
  );
endmodule
