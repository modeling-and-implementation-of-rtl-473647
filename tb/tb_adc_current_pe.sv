// tb_adc_current_pe: streams random terminal voltages, conductances and
// history currents through adc_current_pe, one set per cycle, and checks
// u = vp - vn and i = g*u + j against double-precision arithmetic, and that
// each result appears exactly 19 cycles after its operands.
module tb_adc_current_pe;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic in_valid = 0, out_valid;
  fp32_t vp, vn, g, j, u, i;
  int checks = 0, failures = 0;

  adc_current_pe dut (.clk, .rst_n, .in_valid, .vp, .vn, .g, .j, .out_valid, .u, .i);

  localparam int N = 300;
  real eu [N], ei [N];
  int  t_in [N];
  int  cyc = 0, nout = 0;

  int nin = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin t_in[nin] = cyc; nin++; end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 3;
    if (nout >= N) failures++;
    else begin
      if (cyc - t_in[nout] != 19) begin failures++; $display("latency %0d", cyc - t_in[nout]); end
      if (!near(f2r(u), eu[nout], 1e-6, 1e-9)) begin failures++; $display("u %0d: %f exp %f", nout, f2r(u), eu[nout]); end
      if (!near(f2r(i), ei[nout], 1e-5, 1e-6)) begin failures++; $display("i %0d: %f exp %f", nout, f2r(i), ei[nout]); end
    end
    nout++;
  end

  initial begin
    real a, b, gg, jj;
    vp = 0; vn = 0; g = 0; j = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      a  = real'($urandom_range(0, 800000)) / 1000.0 - 400.0;
      b  = (k % 3 == 0) ? 0.0 : real'($urandom_range(0, 800000)) / 1000.0 - 400.0;
      gg = real'($urandom_range(1, 100000)) / 10000.0;
      jj = real'($urandom_range(0, 200000)) / 100.0 - 1000.0;
      vp = r2f(a); vn = r2f(b); g = r2f(gg); j = r2f(jj);
      eu[k] = f2r(vp) - f2r(vn);
      ei[k] = eu[k] * f2r(g) + f2r(j);
      in_valid = 1;
      if (k % 4 == 3) begin   // a gap in the stream
        @(negedge clk) in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (nout != N) begin failures++; $display("outputs %0d of %0d", nout, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
