// vsi_rts_top: real-time simulator of a grid-connected three-phase
// two-level voltage source inverter, with its PLL and controller.
//
// Every STEP_CYCLES clock cycles (500 = 10 us at 50 MHz) one simulation
// step k runs through these blocks:
//   step start  switch_states latches the IGBT states from the SPWM gates
//               and updates the diode states; grid voltages vg and the DC
//               source voltage vdc are sampled
//   +1          adc_history forms J(k) from u(k-1), i(k-1) and the states;
//               the pll starts on vg in parallel
//   +14         node_solver forms I(k) and V(k) = Geq^-1 I(k)
//   +62         device_update (u, i of the 12 devices -> hist_ram) and
//               rl_filter (iL(k)) run in parallel
//   +82         once the filter and the PLL are both done, dq_controller
//               computes the modulation indices, which spwm loads
// A step takes 240 cycles; if a step is still busy when the next one
// is due, overrun is raised (sticky) and the new step is skipped.
// The SPWM carrier runs continuously at the clock rate; the model sees the
// gate signals as they are at each step start.
//
// Interfaces: vg (grid voltages at the filter terminals) and vdc are
// plain float inputs because the grid and the DC source are outside the
// simulated circuit; coefficients can be rewritten by a host through the
// coef_wr_* port (see coef_bank).  All model quantities are float32.
module vsi_rts_top
  import vsi_pkg::*;
#(
  parameter int STEP_CYCLES    = 500,
  parameter int CARRIER_PERIOD = 20000
) (
  input  logic            clk,
  input  logic            rst_n,
  // external circuit
  input  fp32_t           vg [3],
  input  fp32_t           vdc,
  // controller references
  input  fp32_t           vdc_ref,
  input  fp32_t           q_ref,
  // host coefficient port
  input  logic            coef_wr_en,
  input  logic [5:0]      coef_wr_addr,
  input  fp32_t           coef_wr_data,
  // simulation results
  output logic            step_done,
  output logic            overrun,
  output fp32_t           v_node [NNODE],
  output fp32_t           il [3],
  output fp32_t           u_dev [NDEV],
  output fp32_t           i_dev [NDEV],
  output logic [NDEV-1:0] dev_state,
  output fp32_t           theta,
  output fp32_t           omega,
  output fp32_t           id,
  output fp32_t           iq,
  output fp32_t           q,
  output fp32_t           m [3],
  output logic            pha,
  output logic            pla,
  output logic            phb,
  output logic            plb,
  output logic            phc,
  output logic            plc
);

  coef_t coef;
  coef_bank u_coef (.clk, .rst_n, .wr_en(coef_wr_en), .wr_addr(coef_wr_addr),
                    .wr_data(coef_wr_data), .coef);

  // ---- step timer and sequencing flags
  logic [$clog2(STEP_CYCLES)-1:0] tcnt;
  logic step, busy, hist_go, filt_done, pll_done, ctrl_go;
  fp32_t vg_s [3];
  fp32_t vdc_s;

  assign step = (tcnt == '0) && !busy;

  // ---- switch states
  logic [5:0] gate;
  fp32_t      u_hist [NDEV];
  fp32_t      i_hist [NDEV];
  assign gate = {plb, phc, pla, phb, plc, pha};   // S6 S5 S4 S3 S2 S1
  switch_states u_sw (.clk, .rst_n, .step, .gate, .u_d(u_hist[6:11]), .i_d(i_hist[6:11]),
                      .state(dev_state));

  // ---- ADC inverter model
  fp32_t j [NDEV];
  logic  hist_v, solv_v, dev_v, filt_v;
  adc_history u_hist_upd (.clk, .rst_n, .in_valid(hist_go), .state(dev_state), .u_prev(u_hist),
                          .i_prev(i_hist), .coef, .out_valid(hist_v), .j);
  node_solver u_solver (.clk, .rst_n, .in_valid(hist_v), .j, .il, .vdc(vdc_s), .ginv(coef.ginv),
                        .out_valid(solv_v), .v(v_node));
  device_update u_devupd (.clk, .rst_n, .in_valid(solv_v), .v(v_node), .j, .g(coef.g),
                       .out_valid(dev_v), .u(u_dev), .i(i_dev));
  hist_ram u_ram (.clk, .rst_n, .we(dev_v), .u_in(u_dev), .i_in(i_dev), .u_q(u_hist), .i_q(i_hist));
  rl_filter u_filt (.clk, .rst_n, .in_valid(solv_v), .vl(v_node[1:3]), .vg(vg_s),
                    .a1(coef.a1_f), .a2(coef.a2_f), .out_valid(filt_v), .il);

  // ---- PLL
  fp32_t sin_t, cos_t, ud, uq;
  logic  pll_v;
  pll u_pll (.clk, .rst_n, .in_valid(hist_go), .va(vg_s[0]), .vb(vg_s[1]), .vc(vg_s[2]), .coef,
             .out_valid(pll_v), .theta, .sin_t, .cos_t, .ud, .uq, .omega);

  // ---- controller and modulator
  logic ctrl_v;
  dq_controller u_ctrl (.clk, .rst_n, .in_valid(ctrl_go), .il, .ud, .uq, .sin_t, .cos_t,
                        .vdc(vdc_s), .vdc_ref, .q_ref, .coef, .out_valid(ctrl_v), .m, .id, .iq, .q);
  spwm #(.CARRIER_PERIOD(CARRIER_PERIOD)) u_pwm (.clk, .rst_n, .m_valid(ctrl_v), .m,
                                                 .pha, .pla, .phb, .plb, .phc, .plc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt      <= '0;
      busy      <= 1'b0;
      hist_go   <= 1'b0;
      ctrl_go   <= 1'b0;
      filt_done <= 1'b0;
      pll_done  <= 1'b0;
      step_done <= 1'b0;
      overrun   <= 1'b0;
      vdc_s     <= F_ZERO;
      for (int x = 0; x < 3; x++) vg_s[x] <= F_ZERO;
    end else begin
      tcnt      <= (int'(tcnt) == STEP_CYCLES - 1) ? '0 : tcnt + 1'b1;
      hist_go   <= step;
      ctrl_go   <= 1'b0;
      step_done <= 1'b0;
      if (tcnt == '0 && busy) overrun <= 1'b1;
      if (step) begin
        busy      <= 1'b1;
        filt_done <= 1'b0;
        pll_done  <= 1'b0;
        vg_s      <= vg;
        vdc_s     <= vdc;
      end
      if (filt_v) filt_done <= 1'b1;
      if (pll_v)  pll_done  <= 1'b1;
      if ((filt_done || filt_v) && (pll_done || pll_v) && busy && !ctrl_go
          && !(filt_done && pll_done)) ctrl_go <= 1'b1;
      if (ctrl_v) begin
        busy      <= 1'b0;
        step_done <= 1'b1;
      end
    end
  end

endmodule
