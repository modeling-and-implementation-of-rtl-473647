// tb_fp_mul: checks fp_mul against double-precision arithmetic rounded to
// single precision, for random and corner-case operands
// and checks the 5-cycle latency by streaming one pair per cycle.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        add_sub;
  logic [31:0] a, b, res;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .data_a(a), .data_b(b), .result(res));

  localparam int N = 4000;
  logic [31:0] ea [N+8];
  logic [31:0] ra [N+8];

  function automatic real rnd_val(input int k);
    real v;
    int  ex;
    ex = int'($urandom_range(0, 40)) - 20;
    v  = (real'($urandom_range(1, 32'h7fffffff)) / 2147483648.0) * (2.0 ** ex);
    if ($urandom_range(0, 1) == 1) v = -v;
    if (k % 17 == 0) v = 0.0;
    return v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y;
    a = 0; b = 0; add_sub = 1;
    for (int k = 0; k < N + 8; k++) begin
      @(negedge clk);
      if (k < N) begin
        x = rnd_val(k);
        y = (k % 5 == 0) ? -x * (1.0 + real'($urandom_range(0, 15)) / 8388608.0) : rnd_val(k + 3);
        a = r2f(x);
        b = r2f(y);
        add_sub = k[0];
        ea[k] = r2f(f2r(a) * f2r(b));
        if (ea[k][30:23] == 8'd0) ea[k] = 32'd0;
      end
      if (k >= 5) begin
        ra[k-5] = res;
      end
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      // both zero results compare equal regardless of sign
      if (!(ra[k] == ea[k] || (ra[k][30:0] == 0 && ea[k][30:0] == 0))) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: got %h exp %h", k, ra[k], ea[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
