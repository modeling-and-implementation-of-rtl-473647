// tb_park: random alpha/beta vectors and angles through park; checks
// d = alpha cos + beta sin, q = beta cos - alpha sin and the 13-cycle latency.
module tb_park;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t alpha, beta, sin_t, cos_t, d, q;
  int checks = 0, failures = 0;

  park dut (.clk, .rst_n, .in_valid, .alpha, .beta, .sin_t, .cos_t, .out_valid, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, th, ed, eq;
    int lat;
    alpha = 0; beta = 0; sin_t = 0; cos_t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk);
      ra = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      rb = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      th = real'(int'($urandom_range(0, 6283))) / 1000.0;
      alpha = r2f(ra); beta = r2f(rb); sin_t = r2f($sin(th)); cos_t = r2f($cos(th));
      ed = ra * $cos(th) + rb * $sin(th);
      eq = rb * $cos(th) - ra * $sin(th);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 13) begin failures++; $display("latency %0d", lat); end
      if (!near(f2r(d), ed, 1e-5, 1e-3)) begin failures++; $display("d %f exp %f", f2r(d), ed); end
      if (!near(f2r(q), eq, 1e-5, 1e-3)) begin failures++; $display("q %f exp %f", f2r(q), eq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
