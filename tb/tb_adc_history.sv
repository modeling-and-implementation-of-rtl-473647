// tb_adc_history: random device states, voltages and currents; checks each
// J = A1*u + A2*i with (A1, A2) chosen by the state (ON: dt/2Ls, 1; OFF:
// -2Cs/(2CsRs+dt), (2CsRs-dt)/(2CsRs+dt), written out from Ls, Cs, Rs) and
// that out_valid comes 13 cycles after in_valid.
module tb_adc_history;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  logic [11:0] state;
  fp32_t u_prev [12], i_prev [12], j [12];
  coef_t coef;
  int checks = 0, failures = 0;
  logic [11:0] st_s;
  fp32_t u_s [12], i_s [12];

  assign coef = COEF_DEFAULT;
  adc_history dut (.clk, .rst_n, .in_valid, .state, .u_prev, .i_prev, .coef, .out_valid, .j);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ls, cs, rs, dt, e;
    int lat;
    ls = 1e-6; cs = 100e-6; rs = 0.15; dt = 10e-6;
    state = 0;
    for (int k = 0; k < 12; k++) begin u_prev[k] = 0; i_prev[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      state = 12'($urandom);
      for (int k = 0; k < 12; k++) begin
        u_prev[k] = r2f(real'(int'($urandom_range(0, 8000))) / 10.0 - 400.0);
        i_prev[k] = r2f(real'(int'($urandom_range(0, 4000))) / 10.0 - 200.0);
      end
      st_s = state; u_s = u_prev; i_s = i_prev;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      state = 12'($urandom);   // must not matter any more
      lat = 1;
      while (!out_valid && lat < 50) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 13) begin failures++; $display("latency %0d", lat); end
      for (int k = 0; k < 12; k++) begin
        if (st_s[k]) e = dt / (2.0 * ls) * f2r(u_s[k]) + 1.0 * f2r(i_s[k]);
        else e = -2.0 * cs / (2.0 * cs * rs + dt) * f2r(u_s[k])
                 + (2.0 * cs * rs - dt) / (2.0 * cs * rs + dt) * f2r(i_s[k]);
        checks++;
        if (!near(f2r(j[k]), e, 1e-5, 1e-4)) begin
          failures++;
          $display("J%0d state %0d: %f exp %f", k, st_s[k], f2r(j[k]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
