// Checks the transmission-gate full adder model (TAU_PS = 300):
//  * logic: for all 8 input combinations the outputs, once settled, equal
//    a + b + cin;
//  * filtering: an input pulse of 100 ps that would flip the sum must leave
//    both outputs untouched (a swallowed glitch);
//  * delay: a lasting input change must not reach the sum before 300 ps and
//    must have reached it by 400 ps.
// Counts how many glitches were swallowed and fails if none was. Watchdog
// included.
module tb_tg_full_adder;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned TAU_PS = 300;

  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  int s_toggles = 0, c_toggles = 0, swallowed = 0;

  tg_full_adder #(.TAU_PS(TAU_PS)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always @(s)    s_toggles++;
  always @(cout) c_toggles++;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %t", what, got, exp, $realtime);
    end
  endtask

  initial begin : watchdog
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, c0;
    {a, b, cin} = 3'b000;
    #2ns;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1ns;
      expect_eq("sum", s, 1'(a ^ b ^ cin));
      expect_eq("carry", cout, 1'((a & b) | (cin & (a ^ b))));
    end

    // Short pulse on a from 000: the ideal sum rises for 100 ps only.
    {a, b, cin} = 3'b000;
    #2ns;
    s0 = s_toggles;
    c0 = c_toggles;
    a = 1'b1;
    #100ps;
    a = 1'b0;
    #1ns;
    checks++;
    if (s_toggles != s0 || c_toggles != c0) begin
      failures++;
      $display("FAIL 100 ps pulse reached the outputs");
    end else begin
      swallowed++;
    end
    // Same pulse producing a carry glitch: from a=1, b=0, cin=0 pulse b.
    a = 1'b1;
    #2ns;
    s0 = s_toggles;
    c0 = c_toggles;
    b = 1'b1;
    #150ps;
    b = 1'b0;
    #1ns;
    checks++;
    if (s_toggles != s0 || c_toggles != c0) begin
      failures++;
      $display("FAIL 150 ps pulse reached the outputs");
    end else begin
      swallowed++;
    end

    // Lasting change: 000 -> 100, sum must rise between 300 and 400 ps.
    {a, b, cin} = 3'b000;
    #2ns;
    a = 1'b1;
    #250ps;
    expect_eq("sum before TAU", s, 1'b0);
    #150ps;
    expect_eq("sum after TAU", s, 1'b1);

    checks++;
    if (swallowed == 0) begin
      failures++;
      $display("FAIL no glitch swallowed");
    end
    $display("swallowed glitches: %0d", swallowed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
