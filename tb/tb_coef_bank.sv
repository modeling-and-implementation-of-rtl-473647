// tb_coef_bank: checks the reset defaults of the coefficient memory against
// the model's values (switch, filter, PLL coefficients and the inverse
// nodal matrix), then host writes to scalar and matrix words, and that a
// write beyond the last word changes nothing.
module tb_coef_bank;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, wr_en = 0;
  logic [5:0] wr_addr = 0;
  fp32_t wr_data = 0;
  coef_t coef, coef_before;
  int checks = 0, failures = 0;

  coef_bank dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .coef);

  task automatic chk(input string what, input real got, input real exp_v);
    checks++;
    if (!near(got, exp_v, 1e-6, 1e-9)) begin
      failures++;
      $display("%s: got %g exp %g", what, got, exp_v);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real gt;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ADC switch: Ls = 1 uH, Cs = 100 uF, Rs = 0.15, dt = 10 us
    chk("a1_on",  f2r(coef.a1_on),  10e-6 / (2.0 * 1e-6));
    chk("a2_on",  f2r(coef.a2_on),  1.0);
    chk("a1_off", f2r(coef.a1_off), -2.0 * 100e-6 / (2.0 * 100e-6 * 0.15 + 10e-6));
    chk("a2_off", f2r(coef.a2_off), (2.0 * 100e-6 * 0.15 - 10e-6) / (2.0 * 100e-6 * 0.15 + 10e-6));
    chk("g", f2r(coef.g), 5.0);
    // RL filter L = 5 mH, R = 0.1
    chk("a1_f", f2r(coef.a1_f), 10e-6 / (0.1 * 10e-6 + 5e-3));
    chk("a2_f", f2r(coef.a2_f), 5e-3 / (0.1 * 10e-6 + 5e-3));
    chk("pll_a1", f2r(coef.pll_a1), 5e-6 * 1268.35 + 2.85);
    chk("pll_a2", f2r(coef.pll_a2), 5e-6 * 1268.35 - 2.85);
    chk("wn", f2r(coef.wn), 628.0);
    chk("dt", f2r(coef.dt), 10e-6);
    chk("kmod", f2r(coef.kmod), 2.0 / 380.0);
    // inverse nodal matrix for Gt = 10 S
    gt = 10.0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        real e;
        e = 0.0;
        if (r == 0 && c == 4) e = 1.0;
        if (r >= 1 && r <= 3 && c == r) e = 1.0 / (2.0 * gt);
        if (r >= 1 && r <= 3 && c == 4) e = 0.5;
        if (r == 4) e = (c == 0) ? -1.0 : (c == 4) ? 1.5 * gt : -0.5;
        chk($sformatf("ginv[%0d][%0d]", r, c), f2r(coef.ginv[r][c]), e);
      end
    // host writes
    wr_en = 1; wr_addr = 6'd18; wr_data = r2f(3.25);
    @(negedge clk);
    wr_addr = 6'(20 + 5*2 + 4); wr_data = r2f(-7.5);
    @(negedge clk);
    wr_en = 0;
    chk("kp_i write", f2r(coef.kp_i), 3.25);
    chk("ginv write", f2r(coef.ginv[2][4]), -7.5);
    chk("ginv neighbour", f2r(coef.ginv[2][3]), 0.0);
    coef_before = coef;
    wr_en = 1; wr_addr = 6'd50; wr_data = r2f(99.0);
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (coef !== coef_before) begin failures++; $display("out-of-range write changed the memory"); end
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    chk("reset restores", f2r(coef.kp_i), 10.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
