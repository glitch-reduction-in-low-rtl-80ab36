// Exhaustive check of cla2: all 32 combinations of two 2-bit operands and a
// carry in against the integer sum. Watchdog included.
module tb_cla2;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla2 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, cin} = 5'(v);
      #1;
      checks++;
      if ({cout, s} != 3'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
