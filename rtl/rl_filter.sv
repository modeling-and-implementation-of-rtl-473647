// rl_filter: three-phase series RL filter between inverter and grid.
//
// Backward-Euler discretisation of L di/dt = vL - vg - R i:
//   iL(k) = a1 * (vL(k) - vg(k)) + a2 * iL(k-1),
//   a1 = dt / (R dt + L),  a2 = L / (R dt + L)   (host-precomputed).
// Per phase: FLOAT_ADD for the voltage difference, FLOAT_MULT for each
// product and a FLOAT_ADD for the sum; a2*iL(k-1) is formed in parallel.
// The currents are the filter state: registered, held, cleared by reset.
//
// Timing: inputs sampled on in_valid; il updates and out_valid pulses
// LAT = 7 + 5 + 7 + 1 = 20 cycles after in_valid.
module rl_filter
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t vl [3],
  input  fp32_t vg [3],
  input  fp32_t a1,
  input  fp32_t a2,
  output logic  out_valid,
  output fp32_t il [3]
);

  fp32_t inew [3];
  logic  v_pipe;

  for (genvar x = 0; x < 3; x++) begin : g_ph
    fp32_t dv, hist, hist_d, a1_d, p1;
    fp_add #(.LAT(7)) u_dv (.clk, .add_sub(1'b0), .data_a(vl[x]), .data_b(vg[x]), .result(dv));
    fp_mul #(.LAT(5)) u_h  (.clk, .data_a(il[x]), .data_b(a2), .result(hist));
    delay_line #(.W(32), .N(7)) u_hd (.clk, .rst_n, .d(hist), .q(hist_d));
    delay_line #(.W(32), .N(7)) u_ad (.clk, .rst_n, .d(a1), .q(a1_d));
    fp_mul #(.LAT(5)) u_p  (.clk, .data_a(dv), .data_b(a1_d), .result(p1));
    fp_add #(.LAT(7)) u_s  (.clk, .add_sub(1'b1), .data_a(p1), .data_b(hist_d), .result(inew[x]));
  end

  delay_line #(.W(1), .N(19)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int x = 0; x < 3; x++) il[x] <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (v_pipe) il <= inew;
    end
  end

endmodule
