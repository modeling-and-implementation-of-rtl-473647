// tb_sincos_cordic: sweeps the angle over [0, 2pi) including the quadrant
// boundaries and checks sin/cos to 5e-6 and the 29-cycle latency.
module tb_sincos_cordic;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, done;
  fp32_t theta, sin_t, cos_t;
  int checks = 0, failures = 0;

  sincos_cordic dut (.clk, .rst_n, .start, .theta, .done, .sin_t, .cos_t);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th;
    int lat;
    theta = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      th = (k < 360) ? real'(k) * 6.283185307179586 / 360.0 : real'($urandom_range(0, 62831)) / 10000.0;
      @(negedge clk);
      theta = r2f(th);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 29) begin failures++; $display("latency %0d", lat); end
      if (!near(f2r(sin_t), $sin(f2r(theta)), 0.0, 5e-6)) begin failures++; $display("sin(%f) %f", th, f2r(sin_t)); end
      if (!near(f2r(cos_t), $cos(f2r(theta)), 0.0, 5e-6)) begin failures++; $display("cos(%f) %f", th, f2r(cos_t)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
