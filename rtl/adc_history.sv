// adc_history: refresh of the ADC history current sources.
//
// For each of the twelve devices, J(k) = A1 * u(k-1) + A2 * i(k-1), where
// (A1, A2) = (A1ON, A2ON) if the device is ON and (A1OFF, A2OFF) if it is
// OFF.  This is the trapezoidal discretisation of the switch: ON is an
// inductor Ls, OFF a series Rs-Cs branch; A1OFF is stored with its minus sign.
// Twelve lanes run in parallel, each with two FLOAT_MULT and one FLOAT_ADD.
//
// Timing: inputs sampled on in_valid; j is registered and held, and
// out_valid pulses LAT = 5 + 7 + 1 = 13 cycles after in_valid.
module adc_history
  import vsi_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [NDEV-1:0] state,
  input  fp32_t           u_prev [NDEV],
  input  fp32_t           i_prev [NDEV],
  input  coef_t           coef,
  output logic            out_valid,
  output fp32_t           j [NDEV]
);

  fp32_t pu [NDEV];
  fp32_t pi_ [NDEV];
  fp32_t js [NDEV];
  logic  v_pipe;

  for (genvar k = 0; k < NDEV; k++) begin : g_lane
    fp32_t a1, a2;
    assign a1 = state[k] ? coef.a1_on : coef.a1_off;
    assign a2 = state[k] ? coef.a2_on : coef.a2_off;
    fp_mul #(.LAT(5)) u_mu (.clk, .data_a(u_prev[k]), .data_b(a1), .result(pu[k]));
    fp_mul #(.LAT(5)) u_mi (.clk, .data_a(i_prev[k]), .data_b(a2), .result(pi_[k]));
    fp_add #(.LAT(7)) u_ad (.clk, .add_sub(1'b1), .data_a(pu[k]), .data_b(pi_[k]), .result(js[k]));
  end

  delay_line #(.W(1), .N(12)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < NDEV; k++) j[k] <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (v_pipe) j <= js;
    end
  end

endmodule
