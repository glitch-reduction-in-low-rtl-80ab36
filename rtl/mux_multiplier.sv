// N x N unsigned multiplexer-based array multiplier (combinational).
//
// Idea: split each operand at bit j into its top bit and the j bits below it,
// X_(j+1) = x_j 2^j + X_j. Then
//   X_(j+1) Y_(j+1) = X_j Y_j + 2^j Z_j + 2^(2j) x_j y_j,
//   Z_j = x_j Y_j + y_j X_j,
// so the product is the sum over j of 2^(2j) x_j y_j and 2^j Z_j. Z_j needs no
// partial-product array: {x_j, y_j} selects 0, X_j, Y_j or X_j + Y_j, and
// X_j + Y_j grows one bit per row in a ripple adder that runs through the
// Cell II blocks (s_j, c_(j+1)).
//
// Array (diagonal row j = 0 .. N-1):
//   * one Cell II at weight 2j: bit j of S = X + Y, x_j y_j, and the top bit
//     of Z_j (x_j y_j c_j);
//   * j Cell I blocks, i = 0 .. j-1, at weights j + i: bit i of Z_j.
// That is N(N-1)/2 Cell I and N Cell II blocks.
//
// Accumulation: the row with the most cells, j = N-1, starts from zero; each
// further row j adds Z_j to the sums left by row j+1 at weights j+1 .. 2j,
// its carries rippling along the row from Cell I (j,0) to Cell II j. Row j is
// the last to touch weights 2j and 2j+1, so after it they hold two bits each:
//   weight 2j   : s_out of Cell II j and x_j y_j,
//   weight 2j+1 : c_out of Cell II j and the sum of Cell I (j+1, j).
// Weight 0 holds only x_0 y_0 and weight 1 only the sum of Cell I (1,0), so
// p[1:0] come straight out. Weights 2 .. 2N-3 go through a chain of N-2 2-bit
// CLA cells and weight 2N-2 through one full adder whose carry is p[2N-1].
// (Cell II N-1 belongs to the first row, which adds to zero, so its carry out
// is always 0 and weight 2N-1 needs nothing else.) The cell counts, the CLA
// count, the final full adder and the product bits p0, p1 leaving the array
// directly follow the document; the exact routing of sums and carries
// between cells is this implementation's reading of its array drawing.
//
// Interface: x, y (N bits, unsigned), p (2N bits). No clock and no reset:
// p follows x and y after the combinational delay.
// Parameter TG = 1 swaps every full adder for the behavioural
// transmission-gate model (simulation only); the default builds plain logic.
module mux_multiplier #(
  parameter int unsigned N      = 4,     // operand width; the document reports a 4x4 build
  parameter bit          TG     = 1'b0,  // 1: transmission-gate adder models (simulation only)
  parameter int unsigned TAU_PS = 300    // their filter time constant, ps
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  if (N < 2) begin : g_bad_n
    $error("mux_multiplier: N must be at least 2");
  end

  // Ripple chain of S = X + Y through the Cell II blocks.
  logic [N:0]   c_chain;   // c_chain[j] is c_j, the carry into bit j
  logic [N-1:0] s_chain;   // s_chain[j] is s_j
  logic [N-1:0] xy;        // xy[j] = x_j & y_j
  logic [N-1:0] cii_s;     // s_out of Cell II j (weight 2j)
  logic [N-1:0] cii_c;     // c_out of Cell II j (weight 2j+1)

  assign c_chain[0] = 1'b0;

  for (genvar j = 0; j < N; j++) begin : g_row
    // Outputs of the Cell I blocks of row j, indexed by i (weight j + i).
    logic [N-1:0] ci_s;    // sum bits
    logic [N:0]   rc;      // rc[i]: carry into position i of the row
    logic         cii_xi, cii_yi;
    logic         cii_sin;

    assign rc[0] = 1'b0;

    // Sum arriving at weight 2j from row j+1 (its Cell I at i = j-1).
    if (j >= 1 && j + 1 < N) begin : g_cii_sin
      assign cii_sin = g_row[j+1].ci_s[j-1];
    end else begin : g_cii_sin0
      assign cii_sin = 1'b0;
    end

    cell_ii #(.TG(TG), .TAU_PS(TAU_PS)) u_cell_ii (
      .xj    (x[j]),
      .yj    (y[j]),
      .cj    (c_chain[j]),
      .s_in  (cii_sin),
      .c_in  (rc[j]),
      .xi    (cii_xi),
      .yi    (cii_yi),
      .si    (s_chain[j]),
      .cj1   (c_chain[j+1]),
      .xy    (xy[j]),
      .s_out (cii_s[j]),
      .c_out (cii_c[j])
    );

    for (genvar i = 0; i < j; i++) begin : g_cell
      logic s_in;
      logic unused_xj, unused_yj, unused_xi, unused_yi, unused_si, unused_z;

      // Row j+1 left its sum for weight j + i at its position i - 1.
      if (i >= 1 && j + 1 < N) begin : g_sin
        assign s_in = g_row[j+1].ci_s[i-1];
      end else begin : g_sin0
        assign s_in = 1'b0;
      end

      cell_i #(.TG(TG), .TAU_PS(TAU_PS)) u_cell_i (
        .xj    (cii_xi),
        .yj    (cii_yi),
        .xi    (x[i]),
        .yi    (y[i]),
        .si    (s_chain[i]),
        .s_in  (s_in),
        .c_in  (rc[i]),
        .xj_o  (unused_xj),
        .yj_o  (unused_yj),
        .xi_o  (unused_xi),
        .yi_o  (unused_yi),
        .si_o  (unused_si),
        .zi    (unused_z),
        .s_out (ci_s[i]),
        .c_out (rc[i+1])
      );
    end

    // Positions j .. N-1 of the row hold no Cell I.
    for (genvar i = j; i < N; i++) begin : g_fill
      assign ci_s[i] = 1'b0;
      if (i > j) begin : g_rc0
        assign rc[i] = 1'b0;
      end
    end
    assign rc[N] = 1'b0;
  end

  // Two bits per weight for weights 2 .. 2N-2 (bit k is weight k + 2).
  localparam int unsigned FW = 2 * N - 3;
  logic [FW-1:0] fa_a, fa_b;

  for (genvar j = 1; j < N; j++) begin : g_fin
    assign fa_a[2*j-2] = cii_s[j];
    assign fa_b[2*j-2] = xy[j];
    if (j < N - 1) begin : g_odd
      assign fa_a[2*j-1] = g_row[j+1].ci_s[j];
      assign fa_b[2*j-1] = cii_c[j];
    end
  end

  // Weights 0 and 1 need no addition: x_0 y_0, and bit 0 of Z_1.
  assign p[0] = xy[0];
  assign p[1] = g_row[1].ci_s[0];

  final_adder #(.W(FW), .TG(TG), .TAU_PS(TAU_PS)) u_final (
    .a    (fa_a),
    .b    (fa_b),
    .cin  (1'b0),
    .sum  (p[2*N-2:2]),
    .cout (p[2*N-1])
  );

endmodule
