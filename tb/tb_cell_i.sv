// Exhaustive check of cell_i over its 7 inputs. The expected Z bit is worked
// out from the select rule of the algorithm ({x_j,y_j} = 00 -> 0, 01 -> x_i,
// 10 -> y_i, 11 -> s_i), then {c_out, s_out} must equal s_in + c_in + z and
// every pass-through output must equal its input. Watchdog included.
module tb_cell_i;
  logic xj, yj, xi, yi, si, s_in, c_in;
  logic xj_o, yj_o, xi_o, yi_o, si_o, zi, s_out, c_out;
  int checks = 0, failures = 0;

  cell_i dut (
    .xj(xj), .yj(yj), .xi(xi), .yi(yi), .si(si), .s_in(s_in), .c_in(c_in),
    .xj_o(xj_o), .yj_o(yj_o), .xi_o(xi_o), .yi_o(yi_o), .si_o(si_o),
    .zi(zi), .s_out(s_out), .c_out(c_out)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic z_exp;
    for (int v = 0; v < 128; v++) begin
      {xj, yj, xi, yi, si, s_in, c_in} = 7'(v);
      #1;
      if (!xj && !yj)      z_exp = 1'b0;
      else if (!xj && yj)  z_exp = xi;
      else if (xj && !yj)  z_exp = yi;
      else                 z_exp = si;
      checks++;
      if (zi != z_exp || {c_out, s_out} != 2'(int'(s_in) + int'(c_in) + int'(z_exp))) begin
        failures++;
        $display("FAIL in=%b z=%0d s_out=%0d c_out=%0d", 7'(v), zi, s_out, c_out);
      end
      checks++;
      if ({xj_o, yj_o, xi_o, yi_o, si_o} != {xj, yj, xi, yi, si}) begin
        failures++;
        $display("FAIL pass-through in=%b", 7'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
