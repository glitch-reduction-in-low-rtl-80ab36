// Cell II of the multiplexer-based multiplier array (one per bit j).
//
// Two jobs, each with one full adder:
//  * one stage of the ripple adder S = X + Y: {c_j+1, s_j} = x_j + y_j + c_j.
//    Chained through c_j over all Cell II blocks this is the carry-propagate
//    adder whose bits s_i feed the multiplexers of later rows.
//  * the top bit of Z_j: when x_j = y_j = 1, Z_j = X_j + Y_j has the carry c_j
//    at position j, i.e. weight 2j. Two AND gates form x_j y_j and
//    x_j y_j c_j; the second full adder adds x_j y_j c_j to the carry-save
//    pair (s_in, c_in) arriving at weight 2j.
// x_j y_j (the X_jY_j 2^2j term) is also brought out for the array to add at
// weight 2j. The cell's contents follow the document; the pass-through ports
// x_i = x_j, y_i = y_j, s_i = s_j are wires that broadcast into the row.
// Combinational, no clock.
// Parameter TG = 1 swaps every full adder for the behavioural
// transmission-gate model (simulation only); the default builds plain logic.
module cell_ii #(
  parameter bit          TG     = 1'b0,  // 1: transmission-gate adder models (simulation only)
  parameter int unsigned TAU_PS = 300    // their filter time constant, ps
) (
  input  logic xj, yj,        // operand bits j
  input  logic cj,            // carry into bit j of S = X + Y
  input  logic s_in, c_in,    // carry-save pair arriving at weight 2j
  output logic xi, yi, si,    // x_j, y_j and s_j broadcast to Cell I blocks
  output logic cj1,           // carry out of bit j of S = X + Y
  output logic xy,            // x_j AND y_j
  output logic s_out, c_out   // carry-save pair leaving weight 2j
);

  logic xyc;

  always_comb begin
    xy  = xj & yj;
    xyc = xy & cj;
  end

  assign xi = xj;
  assign yi = yj;

  fa_cell #(.TG(TG), .TAU_PS(TAU_PS)) u_fa_sum (
    .a    (xj),
    .b    (yj),
    .cin  (cj),
    .s    (si),
    .cout (cj1)
  );

  fa_cell #(.TG(TG), .TAU_PS(TAU_PS)) u_fa_acc (
    .a    (s_in),
    .b    (c_in),
    .cin  (xyc),
    .s    (s_out),
    .cout (c_out)
  );

endmodule
