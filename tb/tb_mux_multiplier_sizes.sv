// mux_multiplier at other operand widths: exhaustive for N = 2, 3, 5 and 8
// (N = 5 has an odd-width final adder ending in a full adder), and 20000
// random operand pairs for N = 16. Each product is compared with the integer
// product. Watchdog included.
module tb_mux_multiplier_sizes;
  logic [1:0]  x2, y2;   logic [3:0]  p2;
  logic [2:0]  x3, y3;   logic [5:0]  p3;
  logic [4:0]  x5, y5;   logic [9:0]  p5;
  logic [7:0]  x8, y8;   logic [15:0] p8;
  logic [15:0] x16, y16; logic [31:0] p16;
  int checks = 0, failures = 0;

  mux_multiplier #(.N(2))  dut2  (.x(x2),  .y(y2),  .p(p2));
  mux_multiplier #(.N(3))  dut3  (.x(x3),  .y(y3),  .p(p3));
  mux_multiplier #(.N(5))  dut5  (.x(x5),  .y(y5),  .p(p5));
  mux_multiplier #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  mux_multiplier #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  task automatic check(int unsigned n, longint unsigned a, longint unsigned b,
                       longint unsigned got);
    checks++;
    if (got != a * b) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %0d * %0d = %0d, got %0d", n, a, b, a * b, got);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);  y8 = 8'(b);
        x5 = 5'(a);  y5 = 5'(b);
        x3 = 3'(a);  y3 = 3'(b);
        x2 = 2'(a);  y2 = 2'(b);
        #1;
        check(8, a, b, p8);
        if (a < 32 && b < 32) check(5, a, b, p5);
        if (a < 8 && b < 8)   check(3, a, b, p3);
        if (a < 4 && b < 4)   check(2, a, b, p2);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      if (k == 0) begin x16 = '1; y16 = '1; end
      #1;
      check(16, x16, y16, p16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
