// tb_vsi_rts_overrun: runs the simulator with a step period (150 cycles)
// shorter than the work of one step (about 240 cycles) and checks that the
// overrun flag is raised, that steps still complete, and that with the
// default period in a second instance no overrun occurs.
module tb_vsi_rts_overrun;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #10 clk = ~clk;
  logic rst_n = 0;
  fp32_t vg [3], vdc, vdc_ref, q_ref;
  logic step_done_s, overrun_s, step_done_n, overrun_n;
  fp32_t v_node [5], il [3], u_dev [12], i_dev [12], theta, omega, id, iq, q, m [3];
  fp32_t v_node2 [5], il2 [3], u_dev2 [12], i_dev2 [12], theta2, omega2, id2, iq2, q2, m2 [3];
  logic [11:0] dev_state, dev_state2;
  logic [5:0] g1, g2;
  int checks = 0, failures = 0, n_short = 0, n_norm = 0, first_overrun = -1, cyc = 0;

  vsi_rts_top #(.STEP_CYCLES(150), .CARRIER_PERIOD(2000)) dut_short (
    .clk, .rst_n, .vg, .vdc, .vdc_ref, .q_ref, .coef_wr_en(1'b0), .coef_wr_addr(6'd0), .coef_wr_data(32'd0),
    .step_done(step_done_s), .overrun(overrun_s), .v_node, .il, .u_dev, .i_dev, .dev_state, .theta, .omega,
    .id, .iq, .q, .m, .pha(g1[0]), .pla(g1[1]), .phb(g1[2]), .plb(g1[3]), .phc(g1[4]), .plc(g1[5]));
  vsi_rts_top #(.STEP_CYCLES(500), .CARRIER_PERIOD(2000)) dut_norm (
    .clk, .rst_n, .vg, .vdc, .vdc_ref, .q_ref, .coef_wr_en(1'b0), .coef_wr_addr(6'd0), .coef_wr_data(32'd0),
    .step_done(step_done_n), .overrun(overrun_n), .v_node(v_node2), .il(il2), .u_dev(u_dev2), .i_dev(i_dev2),
    .dev_state(dev_state2), .theta(theta2), .omega(omega2), .id(id2), .iq(iq2), .q(q2), .m(m2),
    .pha(g2[0]), .pla(g2[1]), .phb(g2[2]), .plb(g2[3]), .phc(g2[4]), .plc(g2[5]));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) cyc = 0;
    if (step_done_s) n_short++;
    if (step_done_n) n_norm++;
    if (rst_n && overrun_s && first_overrun < 0) first_overrun = cyc;
  end

  initial begin
    vdc = r2f(380.0); vdc_ref = r2f(380.0); q_ref = 0;
    vg[0] = r2f(440.0); vg[1] = r2f(-60.0); vg[2] = r2f(190.0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20000) @(negedge clk);
    checks += 4;
    if (!overrun_s) begin failures++; $display("no overrun with a 150-cycle step"); end
    if (overrun_n) begin failures++; $display("overrun with a 500-cycle step"); end
    if (n_norm < 39 || n_norm > 41) begin failures++; $display("%0d steps of 500 cycles in 20000", n_norm); end
    // with 150-cycle slots a step occupies two slots: 20000 / 300 steps
    if (n_short < 60 || n_short > 70) begin failures++; $display("%0d short steps", n_short); end
    $display("short steps %0d, first overrun at cycle %0d, normal steps %0d", n_short, first_overrun, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
