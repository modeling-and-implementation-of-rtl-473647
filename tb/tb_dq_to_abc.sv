// tb_dq_to_abc: random dq vectors and angles; checks the three phase values
// against V cos(theta + delta - k 2pi/3) written from the polar form of the
// dq vector (independent of the rotation matrices), and the 25-cycle latency.
module tb_dq_to_abc;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t d, q, sin_t, cos_t, a, b, c;
  int checks = 0, failures = 0;

  dq_to_abc dut (.clk, .rst_n, .in_valid, .d, .q, .sin_t, .cos_t, .out_valid, .a, .b, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rd, rq, th, mag, ang, e [3];
    int lat;
    d = 0; q = 0; sin_t = 0; cos_t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk);
      rd = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      rq = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      th = real'(int'($urandom_range(0, 6283))) / 1000.0;
      d = r2f(rd); q = r2f(rq); sin_t = r2f($sin(th)); cos_t = r2f($cos(th));
      mag = $sqrt(rd * rd + rq * rq);
      ang = $atan2(rq, rd);
      for (int k = 0; k < 3; k++) e[k] = mag * $cos(th + ang - 2.0943951023931953 * k);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks += 4;
      if (lat != 25) begin failures++; $display("latency %0d", lat); end
      if (!near(f2r(a), e[0], 1e-5, 1e-3)) begin failures++; $display("a %f exp %f", f2r(a), e[0]); end
      if (!near(f2r(b), e[1], 1e-5, 1e-3)) begin failures++; $display("b %f exp %f", f2r(b), e[1]); end
      if (!near(f2r(c), e[2], 1e-5, 1e-3)) begin failures++; $display("c %f exp %f", f2r(c), e[2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
