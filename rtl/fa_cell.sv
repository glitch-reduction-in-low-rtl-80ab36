// Full-adder slot of the multiplier: picks the adder implementation.
//
// TG = 0 places the plain full_adder (synthesizable logic, zero delay).
// TG = 1 places tg_full_adder, the behavioural model of the
// transmission-gate adder whose RC time constant TAU_PS swallows glitches;
// that choice is for simulation only. Both have the same logic function and
// ports: {cout, s} = a + b + cin.
module fa_cell #(
  parameter bit          TG     = 1'b0,  // 1: transmission-gate adder model
  parameter int unsigned TAU_PS = 300    // its filter time constant, ps
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  if (TG) begin : g_tg
    tg_full_adder #(.TAU_PS(TAU_PS)) u_fa (
      .a(a), .b(b), .cin(cin), .s(s), .cout(cout)
    );
  end else begin : g_logic
    full_adder u_fa (
      .a(a), .b(b), .cin(cin), .s(s), .cout(cout)
    );
  end

endmodule
