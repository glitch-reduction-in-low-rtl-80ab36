// Final adder of the multiplier: sum = a + b + cin over W bits.
//
// Built as a chain of 2-bit carry-lookahead cells (cla2), each passing its
// carry to the next; when W is odd, the top bit is a single full adder whose
// carry is cout. In the multiplier W = 2N-3, giving the document's N-2 two-bit
// CLA cells followed by one full adder. The carry ripples from cell to cell,
// so the delay grows with W/2 lookahead stages. Combinational, no clock.
// Parameter TG = 1 swaps every full adder for the behavioural
// transmission-gate model (simulation only); the default builds plain logic.
module final_adder #(
  parameter int unsigned W      = 4,     // operand width in bits
  parameter bit          TG     = 1'b0,  // 1: transmission-gate adder model on the odd top bit
  parameter int unsigned TAU_PS = 300    // its filter time constant, ps
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NCLA = W / 2;

  // c[k] is the carry into bit 2k.
  logic [NCLA:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NCLA; k++) begin : g_cla
    cla2 u_cla (
      .a    (a[2*k +: 2]),
      .b    (b[2*k +: 2]),
      .cin  (c[k]),
      .s    (sum[2*k +: 2]),
      .cout (c[k+1])
    );
  end

  if (W % 2 == 1) begin : g_odd
    fa_cell #(.TG(TG), .TAU_PS(TAU_PS)) u_fa (
      .a    (a[W-1]),
      .b    (b[W-1]),
      .cin  (c[NCLA]),
      .s    (sum[W-1]),
      .cout (cout)
    );
  end else begin : g_even
    assign cout = c[NCLA];
  end

endmodule
