// tb_vsi_rts_top: end-to-end run of the simulator at its default sizes
// (10 us step = 500 clocks, 2.5 kHz carrier) against a 250 V, 628 rad/s
// grid and a 380 V DC-link set point, for NSTEP steps (50 ms).
//
// The grid neutral is taken at the DC-link midpoint, so the grid voltages
// seen from the negative rail are Vdc/2 + 250 cos(phi - k 2pi/3); the DC
// link is a 2 mF capacitor charged by a 20 A source and discharged by idc.
//
// Each step is checked against a double-precision model of the inverter
// fed with the simulator's own results of the previous step: the device
// states (IGBTs from the gates at the step start, diode on/off rule), the
// history currents, the nodal solution Geq V = I, the device voltages and
// currents and the RL-filter currents.  Also checked: one step every 500
// cycles and no overrun, PLL lock to the grid angle and frequency, and that
// the modulation indices follow the controller's inputs (finite, bounded).
// Mechanisms counted, each of which must occur: IGBT turn-on/off, diode
// turn-on and turn-off, theta wrap-around, a host coefficient write.
module tb_vsi_rts_top;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  localparam int NSTEP = 5000;
  localparam int DISP = 1000;
  localparam real PI2 = 6.283185307179586;
  localparam real C_DC = 2e-3;    // DC-link capacitor
  localparam real I_SRC = 20.0;   // current fed into the DC link

  logic clk = 0;
  always #10 clk = ~clk;   // 50 MHz
  logic rst_n = 0;
  fp32_t vg [3], vdc, vdc_ref, q_ref;
  logic coef_wr_en = 0;
  logic [5:0] coef_wr_addr = 0;
  fp32_t coef_wr_data = 0;
  logic step_done, overrun;
  fp32_t v_node [5], il [3], u_dev [12], i_dev [12], theta, omega, id, iq, q, m [3];
  logic [11:0] dev_state;
  logic pha, pla, phb, plb, phc, plc;

  vsi_rts_top dut (.*);

  int checks = 0, failures = 0;
  int n_igbt_sw = 0, n_d_on = 0, n_d_off = 0, n_wrap = 0, n_host_wr = 0, n_steps = 0;

  initial begin
    #(20 * 500 * (NSTEP + 20));
    failures++;
    $display("watchdog: %0d steps", n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input real got, input real exp_v, input real rel, input real abs_t);
    checks++;
    if (!near(got, exp_v, rel, abs_t)) begin
      failures++;
      if (failures < 20) $display("step %0d %s: %f exp %f", n_steps, what, got, exp_v);
    end
  endtask

  // gates seen by the model at each step start
  logic [5:0] gate_at_step;
  always @(posedge clk) if (dut.step) gate_at_step <= {plb, phc, pla, phb, plc, pha};

  function automatic real wrap_pi(input real a);
    while (a > PI2 / 2.0) a -= PI2;
    while (a < -PI2 / 2.0) a += PI2;
    return a;
  endfunction

  initial begin
    real phi, dt, gs, gt, a1on, a2on, a1off, a2off, a1f, a2f;
    real up [12], ip [12], ilp [3], jm [12], iv [5], ev [5], eu [12], ei [12], vgs [3];
    logic [11:0] st_prev, st_exp;
    real th_prev, vdc_r;
    longint t_prev, t_now, cyc;
    dt = 10e-6; gs = 5.0; gt = 10.0;
    a1on = 5.0; a2on = 1.0; a1off = -5.0; a2off = 0.5;
    a1f = dt / (0.1 * dt + 5e-3); a2f = 5e-3 / (0.1 * dt + 5e-3);
    for (int k = 0; k < 12; k++) begin up[k] = 0.0; ip[k] = 0.0; end
    for (int x = 0; x < 3; x++) ilp[x] = 0.0;
    st_prev = '0; th_prev = 0.0; t_prev = 0; cyc = 0;
    phi = 0.0;
    vdc_r = 380.0; vdc = r2f(vdc_r); vdc_ref = r2f(380.0); q_ref = r2f(0.0);
    for (int x = 0; x < 3; x++) begin vgs[x] = vdc_r / 2.0 + 250.0 * $cos(phi - PI2 / 3.0 * x); vg[x] = r2f(vgs[x]); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_steps < NSTEP) begin
      @(negedge clk);
      cyc++;
      if (n_steps == 100 && cyc % 500 == 300) begin
        // host rewrites the inner-loop gain with its own value
        coef_wr_en = 1; coef_wr_addr = 6'd18; coef_wr_data = r2f(10.0);
        n_host_wr++;
      end else coef_wr_en = 0;
      checks++;
      if (overrun) begin failures++; $display("overrun"); end
      if (!step_done) continue;
      n_steps++;
      t_now = cyc;
      if (n_steps > 1) begin
        checks++;
        if (t_now - t_prev != 500) begin failures++; $display("step period %0d", t_now - t_prev); end
      end
      t_prev = t_now;
      // ---- states
      st_exp[5:0] = gate_at_step;
      for (int k = 0; k < 6; k++)
        st_exp[6+k] = st_prev[6+k] ? (ip[6+k] > 0.0) : (up[6+k] > 0.0);
      checks++;
      if (dev_state != st_exp) begin failures++; $display("step %0d states %b exp %b", n_steps, dev_state, st_exp); end
      for (int k = 0; k < 6; k++) if (dev_state[k] != st_prev[k]) n_igbt_sw++;
      for (int k = 6; k < 12; k++) begin
        if (dev_state[k] && !st_prev[k]) n_d_on++;
        if (!dev_state[k] && st_prev[k]) n_d_off++;
      end
      // ---- history currents, nodal solution, devices, filter
      for (int k = 0; k < 12; k++)
        jm[k] = dev_state[k] ? a1on * up[k] + a2on * ip[k] : a1off * up[k] + a2off * ip[k];
      iv[0] = jm[6] - jm[0] + jm[8] - jm[2] + jm[10] - jm[4];
      iv[1] = jm[0] - jm[6] + jm[9] - jm[3] - ilp[0];
      iv[2] = jm[2] - jm[8] + jm[11] - jm[5] - ilp[1];
      iv[3] = jm[4] - jm[10] + jm[7] - jm[1] - ilp[2];
      iv[4] = f2r(vdc);
      ev[0] = iv[4];
      for (int x = 1; x <= 3; x++) ev[x] = (iv[x] + gt * ev[0]) / (2.0 * gt);
      ev[4] = 3.0 * gt * ev[0] - gt * (ev[1] + ev[2] + ev[3]) - iv[0];
      for (int n = 0; n < 5; n++) chk($sformatf("v[%0d]", n), f2r(v_node[n]), ev[n], 1e-4, 1e-2);
      eu[0] = ev[0] - ev[1]; eu[3] = ev[1];
      eu[2] = ev[0] - ev[2]; eu[5] = ev[2];
      eu[4] = ev[0] - ev[3]; eu[1] = ev[3];
      for (int p = 0; p < 6; p++) eu[6+p] = -eu[p];
      for (int k = 0; k < 12; k++) begin
        ei[k] = gs * eu[k] + jm[k];
        chk($sformatf("u[%0d]", k), f2r(u_dev[k]), eu[k], 1e-4, 1e-2);
        chk($sformatf("i[%0d]", k), f2r(i_dev[k]), ei[k], 1e-4, 5e-2);
      end
      for (int x = 0; x < 3; x++) begin
        real e;
        e = a1f * (ev[1+x] - vgs[x]) + a2f * ilp[x];
        chk($sformatf("iL[%0d]", x), f2r(il[x]), e, 1e-4, 1e-3);
      end
      // ---- carry the simulator's own results into the next step's model
      for (int k = 0; k < 12; k++) begin up[k] = f2r(u_dev[k]); ip[k] = f2r(i_dev[k]); end
      for (int x = 0; x < 3; x++) ilp[x] = f2r(il[x]);
      st_prev = dev_state;
      // ---- PLL and controller
      if (f2r(theta) < th_prev - 3.0) n_wrap++;
      th_prev = f2r(theta);
      if (n_steps > 2000 && n_steps % 500 == 0) begin
        chk("pll phase error", wrap_pi(f2r(theta) - phi), 0.0, 0.0, 0.02);
        chk("pll omega", f2r(omega), 628.0, 2e-3, 0.0);
      end
      // The grid peak (250 V) is above Vdc/2, so the modulator runs saturated
      // (|m| > 1) for long stretches; only check that the loops stay bounded.
      for (int x = 0; x < 3; x++) begin
        checks++;
        if (!(rabs(f2r(m[x])) < 1000.0)) begin failures++; $display("m%0d = %f", x, f2r(m[x])); end
      end
      checks++;
      if (!(vdc_r > 50.0 && vdc_r < 700.0)) begin failures++; $display("vdc out of range %f", vdc_r); end
      if (n_steps % DISP == 0)
        $display("step %0d: Vdc %f theta %f phi %f omega %f vLa %f iLa %f id %f iq %f Q %f ma %f",
                 n_steps, vdc_r, f2r(theta), phi, f2r(omega), f2r(v_node[1]), f2r(il[0]), f2r(id), f2r(iq), f2r(q), f2r(m[0]));
      // ---- DC link: C dVdc/dt = I_SRC - idc
      vdc_r = vdc_r + dt / C_DC * (I_SRC - f2r(v_node[4]));
      vdc = r2f(vdc_r);
      // ---- grid voltage for the next step
      phi = phi + 628.0 * dt;
      if (phi >= PI2) phi -= PI2;
      for (int x = 0; x < 3; x++) begin vgs[x] = vdc_r / 2.0 + 250.0 * $cos(phi - PI2 / 3.0 * x); vg[x] = r2f(vgs[x]); end
      for (int x = 0; x < 3; x++) vgs[x] = f2r(vg[x]);
    end
    $display("mechanisms: igbt switchings %0d, diode on %0d, diode off %0d, theta wraps %0d, host writes %0d",
             n_igbt_sw, n_d_on, n_d_off, n_wrap, n_host_wr);
    checks += 5;
    if (n_igbt_sw == 0) failures++;
    if (n_d_on == 0) failures++;
    if (n_d_off == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_host_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
