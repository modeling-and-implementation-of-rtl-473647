// tb_rl_filter: runs the RL filter for 200 steps with sinusoidal inverter
// and grid voltages and compares the currents with a double-precision
// backward-Euler model built from L = 5 mH, R = 0.1 ohm, dt = 10 us; also
// checks the 20-cycle latency and that reset clears the state.
module tb_rl_filter;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t vl [3], vg [3], il [3];
  int checks = 0, failures = 0;

  rl_filter dut (.clk, .rst_n, .in_valid, .vl, .vg, .a1(COEF_DEFAULT.a1_f), .a2(COEF_DEFAULT.a2_f),
                 .out_valid, .il);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real L, R, dt, im [3], a1, a2, w, maxi;
    int lat;
    L = 5e-3; R = 0.1; dt = 10e-6; w = 2.0 * 3.141592653589793 * 50.0;
    a1 = dt / (R * dt + L); a2 = L / (R * dt + L);
    for (int x = 0; x < 3; x++) begin vl[x] = 0; vg[x] = 0; im[x] = 0.0; end
    maxi = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      for (int x = 0; x < 3; x++) begin
        vl[x] = r2f(((k / 10) % 2 == 0) ? 380.0 : 0.0);
        vg[x] = r2f(250.0 * $sin(w * dt * k - 2.0944 * x));
        im[x] = a1 * (f2r(vl[x]) - f2r(vg[x])) + a2 * im[x];
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 20) begin failures++; $display("latency %0d", lat); end
      for (int x = 0; x < 3; x++) begin
        checks++;
        if (rabs(im[x]) > maxi) maxi = rabs(im[x]);
        if (!near(f2r(il[x]), im[x], 1e-4, 1e-4)) begin
          failures++;
          $display("step %0d phase %0d: %f exp %f", k, x, f2r(il[x]), im[x]);
        end
      end
    end
    checks++;
    if (maxi < 1.0) begin failures++; $display("currents never built up"); end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (il[0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
