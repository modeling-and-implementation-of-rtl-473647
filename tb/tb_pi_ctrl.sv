// tb_pi_ctrl: drives the PI controller with the PLL gains (Kp = 2.85,
// Ki = 1268.35, dt = 10 us) and a random error sequence, and compares with
// a double-precision trapezoidal PI, u(k) = u(k-1) + Kp (x(k) - x(k-1))
// + Ki dt/2 (x(k) + x(k-1)); checks the 20-cycle latency.
module tb_pi_ctrl;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t x, u;
  int checks = 0, failures = 0;

  pi_ctrl dut (.clk, .rst_n, .in_valid, .x, .a1(COEF_DEFAULT.pll_a1), .a2(COEF_DEFAULT.pll_a2),
               .a3(COEF_DEFAULT.pll_a3), .out_valid, .u);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kp, ki, dt, xp, um, xr;
    int lat;
    kp = 2.85; ki = 1268.35; dt = 10e-6;
    xp = 0.0; um = 0.0;
    x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      xr = real'(int'($urandom_range(0, 2000))) / 100.0 - 10.0;
      x = r2f(xr);
      xr = f2r(x);
      um = um + kp * (xr - xp) + ki * dt / 2.0 * (xr + xp);
      xp = xr;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      x = r2f(1234.0);   // must not matter after in_valid
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 20) begin failures++; $display("latency %0d", lat); end
      if (!near(f2r(u), um, 1e-4, 1e-3)) begin failures++; $display("step %0d: u %f exp %f", k, f2r(u), um); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
