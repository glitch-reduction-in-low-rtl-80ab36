// Checks final_adder at an even width (exhaustive, W = 4) and an odd width
// (exhaustive, W = 5, which uses the trailing full adder), comparing
// {cout, sum} with the integer a + b + cin. Also counts how often a carry
// crossed from one 2-bit CLA cell into the next, and fails if that never
// happened. Watchdog included.
module tb_final_adder;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       cin, co4, co5;
  int checks = 0, failures = 0, cla_carries = 0;

  final_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  final_adder #(.W(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(co5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a4, b4, cin} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(cin))) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d -> %0d", a4, b4, cin, {co4, s4});
      end
      if ((int'(a4[1:0]) + int'(b4[1:0]) + int'(cin)) > 3) cla_carries++;
    end
    for (int v = 0; v < 2048; v++) begin
      {a5, b5, cin} = 11'(v);
      #1;
      checks++;
      if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(cin))) begin
        failures++;
        $display("FAIL W=5 %0d + %0d + %0d -> %0d", a5, b5, cin, {co5, s5});
      end
    end
    checks++;
    if (cla_carries == 0) begin
      failures++;
      $display("FAIL no carry crossed between CLA cells");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
