// switch_states: ON/OFF state of the twelve ADC devices for the next step.
//
// On the step strobe the IGBT states S1..S6 are taken from the SPWM gate
// signals and each diode's state is updated from its voltage and current of
// the previous step: an OFF diode turns ON when its anode-cathode voltage
// is positive, an ON diode stays ON while its forward current is positive.
// (The diode rule is this design's choice.)  state[0..5] = S1..S6,
// state[6..11] = D1..D6.  Reset puts every device OFF.
// Timing: state is registered and valid the cycle after step.
module switch_states
  import vsi_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step,
  input  logic [5:0]      gate,
  input  fp32_t           u_d [6],
  input  fp32_t           i_d [6],
  output logic [NDEV-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
    end else if (step) begin
      state[5:0] <= gate;
      for (int k = 0; k < 6; k++)
        state[6+k] <= state[6+k] ? fp_is_pos(i_d[k]) : fp_is_pos(u_d[k]);
    end
  end

endmodule
