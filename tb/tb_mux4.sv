// Exhaustive check of mux4: every data pattern with every select code; the
// output must equal the data bit the select names (0 -> d[0], x -> d[1],
// y -> d[2], sum -> d[3]). Watchdog included.
module tb_mux4;
  import mux_mult_pkg::*;
  logic [3:0] d;
  zsel_e      sel;
  logic       z;
  int checks = 0, failures = 0;

  mux4 dut (.d(d), .sel(sel), .z(z));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int s = 0; s < 4; s++) begin
        d   = 4'(v);
        sel = zsel_e'(s);
        #1;
        checks++;
        if (z != ((v >> s) & 1)) begin
          failures++;
          $display("FAIL d=%b sel=%0d z=%0d", d, s, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
