// Exhaustive check of cell_ii over its 5 inputs: {c_(j+1), s_j} must be
// x_j + y_j + c_j, xy must be x_j AND y_j, {c_out, s_out} must be
// s_in + c_in + x_j y_j c_j, and x_i, y_i must repeat x_j, y_j. Watchdog
// included.
module tb_cell_ii;
  logic xj, yj, cj, s_in, c_in;
  logic xi, yi, si, cj1, xy, s_out, c_out;
  int checks = 0, failures = 0;

  cell_ii dut (
    .xj(xj), .yj(yj), .cj(cj), .s_in(s_in), .c_in(c_in),
    .xi(xi), .yi(yi), .si(si), .cj1(cj1), .xy(xy), .s_out(s_out), .c_out(c_out)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {xj, yj, cj, s_in, c_in} = 5'(v);
      #1;
      checks++;
      if ({cj1, si} != 2'(int'(xj) + int'(yj) + int'(cj))) begin
        failures++;
        $display("FAIL ripple stage in=%b", 5'(v));
      end
      checks++;
      if (xy != (xj && yj)) begin
        failures++;
        $display("FAIL xy in=%b", 5'(v));
      end
      checks++;
      if ({c_out, s_out} != 2'(int'(s_in) + int'(c_in) + int'(xj && yj && cj))) begin
        failures++;
        $display("FAIL accumulate in=%b", 5'(v));
      end
      checks++;
      if (xi != xj || yi != yj) begin
        failures++;
        $display("FAIL broadcast in=%b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
