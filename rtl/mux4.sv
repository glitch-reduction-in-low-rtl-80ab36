// 4-to-1 multiplexer used to pick one bit of Z_j.
//
// sel = {x_j, y_j} chooses d[sel]; with the data inputs wired as
// d = {s_i, y_i, x_i, 0} the output is bit i of Z_j, following the truth
// table of the multiplexer-based algorithm (see mux_mult_pkg::zsel_e).
// Combinational, no clock.
module mux4
  import mux_mult_pkg::*;
(
  input  logic [3:0] d,    // d[0]: 0 term, d[1]: x_i, d[2]: y_i, d[3]: s_i
  input  zsel_e      sel,  // {x_j, y_j}
  output logic       z
);

  always_comb begin
    unique case (sel)
      ZSEL_ZERO: z = d[0];
      ZSEL_X:    z = d[1];
      ZSEL_Y:    z = d[2];
      ZSEL_SUM:  z = d[3];
      default:   z = 1'b0;
    endcase
  end

endmodule
