// tb_node_solver: random history currents, filter currents and DC voltage.
// The expected node vector is found from the nodal equations Geq V = I
// themselves (Gt = G_S + G_D = 10 S): row 5 gives v0 = Vdc, rows 2-4 give
// vLx = (Ix + Gt v0) / (2 Gt), row 1 gives idc = 3 Gt v0 - Gt sum(vLx) - I1.
// Also checks the 48-cycle latency.
module tb_node_solver;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, out_valid;
  fp32_t j [12], il [3], vdc, v [5];
  int checks = 0, failures = 0;

  node_solver dut (.clk, .rst_n, .in_valid, .j, .il, .vdc, .ginv(COEF_DEFAULT.ginv), .out_valid, .v);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // J index: 0..5 = S1..S6, 6..11 = D1..D6
  function automatic real JS(int p); return f2r(j[p-1]); endfunction
  function automatic real JD(int p); return f2r(j[5+p]); endfunction

  initial begin
    real gt, iv [5], ev [5];
    int lat;
    gt = 10.0;
    vdc = 0;
    for (int k = 0; k < 12; k++) j[k] = 0;
    for (int x = 0; x < 3; x++) il[x] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      for (int k = 0; k < 12; k++) j[k] = r2f(real'(int'($urandom_range(0, 10000))) / 100.0 - 50.0);
      for (int x = 0; x < 3; x++) il[x] = r2f(real'(int'($urandom_range(0, 20000))) / 100.0 - 100.0);
      vdc = r2f(300.0 + real'(int'($urandom_range(0, 1000))) / 10.0);
      iv[0] = JD(1) - JS(1) + JD(3) - JS(3) + JD(5) - JS(5);
      iv[1] = JS(1) - JD(1) + JD(4) - JS(4) - f2r(il[0]);
      iv[2] = JS(3) - JD(3) + JD(6) - JS(6) - f2r(il[1]);
      iv[3] = JS(5) - JD(5) + JD(2) - JS(2) - f2r(il[2]);
      iv[4] = f2r(vdc);
      ev[0] = iv[4];
      for (int x = 1; x <= 3; x++) ev[x] = (iv[x] + gt * ev[0]) / (2.0 * gt);
      ev[4] = 3.0 * gt * ev[0] - gt * (ev[1] + ev[2] + ev[3]) - iv[0];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 48) begin failures++; $display("latency %0d", lat); end
      for (int n = 0; n < 5; n++) begin
        checks++;
        if (!near(f2r(v[n]), ev[n], 1e-5, 1e-3)) begin
          failures++;
          $display("v[%0d] = %f exp %f", n, f2r(v[n]), ev[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
