// tb_clarke: random three-phase values through clarke; checks
// alpha = (2a - b - c)/3, beta = (b - c)/sqrt(3) and the 20-cycle latency.
module tb_clarke;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t a, b, c, alpha, beta;
  int checks = 0, failures = 0;

  clarke dut (.clk, .rst_n, .in_valid, .a, .b, .c, .out_valid, .alpha, .beta);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, rc, ea, eb;
    int lat;
    a = 0; b = 0; c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      @(negedge clk);
      ra = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      rb = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      rc = real'(int'($urandom_range(0, 6000))) / 10.0 - 300.0;
      a = r2f(ra); b = r2f(rb); c = r2f(rc);
      ea = (2.0 * ra - rb - rc) / 3.0;
      eb = (rb - rc) / $sqrt(3.0);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 20) begin failures++; $display("latency %0d", lat); end
      if (!near(f2r(alpha), ea, 1e-5, 1e-4)) begin failures++; $display("alpha %f exp %f", f2r(alpha), ea); end
      if (!near(f2r(beta), eb, 1e-5, 1e-4)) begin failures++; $display("beta %f exp %f", f2r(beta), eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
