// The 4x4 multiplier built with transmission-gate full adder models
// (TG = 1, TAU_PS = 300), run over all 256 operand pairs one after another,
// next to the same multiplier with zero-delay adders as a reference.
//  * Each product of the TG version, after 20 ns of settling, must equal the
//    integer product and the reference output.
//  * The time from an operand change to the last change of the TG product is
//    measured and must not exceed (N+1) TAU, the operation time of this
//    multiplier in full-adder delays. Every adder in the model delays by TAU
//    and the multiplexers, AND gates and CLA cells by nothing, so this is the
//    adder depth of the slowest path exercised.
//  * Output bit toggles of both versions are counted and printed; the
//    reference toggles each bit once per real change, so any surplus in the
//    TG version is glitching that got through.
// Watchdog included.
module tb_mux_multiplier_tg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N      = 4;
  localparam int unsigned TAU_PS = 300;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_tg, p_ref;
  logic [2*N-1:0] prev_tg = '0, prev_ref = '0;
  int checks = 0, failures = 0;
  int tg_toggles = 0, ref_toggles = 0, settle_ps = 0, worst_ps = 0;
  bit counting = 1'b0;
  realtime t_change = 0.0, t_last = 0.0;

  mux_multiplier #(.N(N), .TG(1'b1), .TAU_PS(TAU_PS)) dut_tg (.x(x), .y(y), .p(p_tg));
  mux_multiplier #(.N(N)) dut_ref (.x(x), .y(y), .p(p_ref));

  always @(p_tg) begin
    if (counting) tg_toggles += $countones(p_tg ^ prev_tg);
    prev_tg = p_tg;
    t_last  = $realtime;
  end

  always @(p_ref) begin
    if (counting) ref_toggles += $countones(p_ref ^ prev_ref);
    prev_ref = p_ref;
  end

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    y = '0;
    #20ns;
    prev_tg  = p_tg;
    prev_ref = p_ref;
    counting = 1'b1;
    for (int unsigned a = 0; a < (1 << N); a++) begin
      for (int unsigned b = 0; b < (1 << N); b++) begin
        x = N'(a);
        y = N'(b);
        t_change = $realtime;
        t_last   = $realtime;
        #20ns;
        checks++;
        if (p_tg != (2*N)'(a * b) || p_ref != (2*N)'(a * b)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, TG got %0d, reference got %0d",
                   a, b, a * b, p_tg, p_ref);
        end
        settle_ps = int'((t_last - t_change) * 1000.0);
        if (settle_ps > worst_ps) worst_ps = settle_ps;
      end
    end
    // The operation time of this multiplier is (N+1) full-adder delays.
    checks++;
    if (worst_ps < TAU_PS || worst_ps > (N + 1) * TAU_PS) begin
      failures++;
      $display("FAIL implausible settling time %0d ps", worst_ps);
    end
    $display("slowest settling: %0d ps = %0.1f TAU; output toggles: TG %0d, zero-delay %0d",
             worst_ps, real'(worst_ps) / real'(TAU_PS), tg_toggles, ref_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
