// Cell I of the multiplexer-based multiplier array.
//
// A cell in diagonal row j, position i (i < j), produces bit i of Z_j and
// adds it into the running carry-save partial product at weight i + j:
//   z_i          = mux4({s_i, y_i, x_i, 0}, sel = {x_j, y_j})
//   {c_out, s_out} = s_in + c_in + z_i
// x_j, y_j arrive from the Cell II of the same row and are passed on along
// the row; x_i, y_i, s_i arrive from the Cell II of column i and are passed
// on to the next row. In silicon these pass-throughs are wires; they are
// brought out as ports so the array wiring reads like the cell drawing.
// The cell structure (one 4-to-1 multiplexer feeding one full adder) is the
// document's. Combinational, no clock.
// Parameter TG = 1 swaps every full adder for the behavioural
// transmission-gate model (simulation only); the default builds plain logic.
module cell_i
  import mux_mult_pkg::*;
#(
  parameter bit          TG     = 1'b0,  // 1: transmission-gate adder models (simulation only)
  parameter int unsigned TAU_PS = 300    // their filter time constant, ps
) (
  input  logic xj, yj,          // row control bits, select of the multiplexer
  input  logic xi, yi, si,      // column data: bit i of X, of Y, of S = X + Y
  input  logic s_in, c_in,      // carry-save pair arriving at this weight
  output logic xj_o, yj_o,      // row control bits passed along the row
  output logic xi_o, yi_o, si_o,// column data passed to the next row
  output logic zi,              // selected bit of Z_j (for observation)
  output logic s_out, c_out     // carry-save pair leaving this weight
);

  zsel_e sel;

  assign sel  = zsel_e'({xj, yj});
  assign xj_o = xj;
  assign yj_o = yj;
  assign xi_o = xi;
  assign yi_o = yi;
  assign si_o = si;

  mux4 u_mux (
    .d   ({si, yi, xi, 1'b0}),
    .sel (sel),
    .z   (zi)
  );

  fa_cell #(.TG(TG), .TAU_PS(TAU_PS)) u_fa (
    .a    (s_in),
    .b    (c_in),
    .cin  (zi),
    .s    (s_out),
    .cout (c_out)
  );

endmodule
