// One-bit full adder: {cout, s} = a + b + cin.
//
// The basic adding cell of the multiplier. It sits inside every Cell I, twice
// inside every Cell II, and once at the odd top bit of the final adder. The
// document compares a 28-transistor static CMOS adder with an 18-transistor
// transmission-gate adder; both have this logic function, and only the
// logic is described here. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
