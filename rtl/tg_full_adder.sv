// Behavioural model (not synthesizable) of a transmission-gate full adder.
//
// The low-power variant of the multiplier builds its full adders from
// transmission gates followed by level-restoring static CMOS gates. A
// conducting transmission gate acts as a resistor; with the load of the next
// node it forms an RC low-pass filter, and pulses much shorter than its time
// constant never reach the restoring gate. This model keeps the logic of a
// full adder and adds that effect as an inertial delay on each output:
//   * the ideal outputs a^b^cin and majority(a, b, cin) are computed at once;
//   * an output follows a new ideal value only if that value is still present
//     TAU_PS later; a pulse shorter than TAU_PS is swallowed (the inertial
//     delay of a continuous assignment).
// The default TAU_PS = 300 ps follows from a 15 to 60 kOhm gate driving about
// 10 fF (150 to 600 ps). The filter is a first-order abstraction: a real RC
// node also slows full-length transitions and depends on process and supply.
// Ports match full_adder, so either can sit in the same place.
module tg_full_adder #(
  parameter int unsigned TAU_PS = 300  // filter time constant in picoseconds
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  timeunit 1ns;
  timeprecision 1ps;

  logic s_ideal, c_ideal;

  assign s_ideal = a ^ b ^ cin;
  assign c_ideal = (a & b) | (cin & (a ^ b));

  // A delayed continuous assignment is inertial: an output takes a new value
  // only if the right-hand side has held it for the whole delay, so pulses
  // shorter than TAU_PS are swallowed.
  assign #(TAU_PS * 1ps) s    = s_ideal;
  assign #(TAU_PS * 1ps) cout = c_ideal;

endmodule
