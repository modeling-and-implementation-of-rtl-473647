// tb_device_update: random node voltages and history currents; checks the
// voltage and current of every switch and diode from the inverter topology
// (S1/S3/S5 between v0 and phase a/b/c, S4/S6/S2 between phase a/b/c and
// 0 V, diodes reversed), i = G u + J with G = 5 S, and the 20-cycle latency.
module tb_device_update;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t v [5], j [12], u [12], i [12];
  int checks = 0, failures = 0;

  device_update dut (.clk, .rst_n, .in_valid, .v, .j, .g(COEF_DEFAULT.g), .out_valid, .u, .i);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v0, va, vb, vc, eu [12], ei [12];
    int lat;
    for (int n = 0; n < 5; n++) v[n] = 0;
    for (int k = 0; k < 12; k++) j[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      for (int n = 0; n < 5; n++) v[n] = r2f(real'(int'($urandom_range(0, 4000))) / 10.0);
      for (int k = 0; k < 12; k++) j[k] = r2f(real'(int'($urandom_range(0, 10000))) / 100.0 - 50.0);
      v0 = f2r(v[0]); va = f2r(v[1]); vb = f2r(v[2]); vc = f2r(v[3]);
      // switches S1..S6, collector to emitter
      eu[0] = v0 - va;  eu[3] = va;
      eu[2] = v0 - vb;  eu[5] = vb;
      eu[4] = v0 - vc;  eu[1] = vc;
      for (int p = 0; p < 6; p++) eu[6+p] = -eu[p];
      for (int k = 0; k < 12; k++) ei[k] = 5.0 * eu[k] + f2r(j[k]);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 20) begin failures++; $display("latency %0d", lat); end
      for (int k = 0; k < 12; k++) begin
        checks += 2;
        if (!near(f2r(u[k]), eu[k], 1e-6, 1e-4) || !near(f2r(i[k]), ei[k], 1e-6, 1e-3)) begin
          failures++;
          $display("dev %0d: u %f exp %f, i %f exp %f", k, f2r(u[k]), eu[k], f2r(i[k]), ei[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
