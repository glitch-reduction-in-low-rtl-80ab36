// End-to-end test of mux_multiplier at its default size (N = 4): all 256
// operand pairs, each product compared with the integer product x * y.
//
// It also counts, from the operands alone, how often each mechanism of the
// algorithm was exercised, and fails if one never was:
//   * each of the four multiplexer selections {x_j, y_j} = 00, 01, 10, 11 in
//     a row j >= 1 (Z_j = 0, X_j, Y_j, X_j + Y_j);
//   * the carry c_j of X_j + Y_j reaching the top of Z_j (x_j y_j c_j = 1),
//     the term the second full adder of Cell II adds;
//   * a carry passing between the 2-bit CLA cells of the final adder
//     (observed on the adder's internal carry).
// Watchdog included.
module tb_mux_multiplier;
  localparam int unsigned N = 4;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int sel_count[4] = '{default: 0};
  int top_carry_count = 0;
  int cla_carry_count = 0;

  mux_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned a = 0; a < (1 << N); a++) begin
      for (int unsigned b = 0; b < (1 << N); b++) begin
        x = N'(a);
        y = N'(b);
        #1;
        checks++;
        if (p != (2*N)'(a * b)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, got %0d", a, b, a * b, p);
        end
        for (int j = 1; j < N; j++) begin
          int unsigned lowmask, cj;
          sel_count[{x[j], y[j]}]++;
          lowmask = (1 << j) - 1;
          cj = ((a & lowmask) + (b & lowmask)) >> j;
          if (x[j] && y[j] && cj != 0) top_carry_count++;
        end
        if (dut.u_final.c[1]) cla_carry_count++;
      end
    end

    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_count[s] == 0) begin
        failures++;
        $display("FAIL multiplexer selection %0d never used", s);
      end
    end
    checks++;
    if (top_carry_count == 0) begin
      failures++;
      $display("FAIL x_j y_j c_j never 1");
    end
    checks++;
    if (cla_carry_count == 0) begin
      failures++;
      $display("FAIL no carry between CLA cells");
    end
    $display("mechanisms: sel00=%0d sel01=%0d sel10=%0d sel11=%0d top_carry=%0d cla_carry=%0d",
             sel_count[0], sel_count[1], sel_count[2], sel_count[3],
             top_carry_count, cla_carry_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
