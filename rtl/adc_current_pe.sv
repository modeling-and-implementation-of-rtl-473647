// adc_current_pe: branch-current pipeline of one ADC switch or diode.
//
// Computes the device voltage u = vp - vn with a FLOAT_ADD, then the device
// current i = u * g + j with a FLOAT_MULT and a second FLOAT_ADD, the chain
// add -> multiply -> add of the reference current-calculation datapath.
// g is the ADC conductance (dt/2Ls when ON, 2Cs/(2CsRs+dt) when OFF; the two
// are made equal so that the nodal matrix stays constant) and j the history
// current source of the present step.
//
// Timing: fully pipelined, one operand set per cycle; u and i appear
// LAT = 7 + 5 + 7 = 19 cycles after in_valid, together with out_valid.
// They are pipeline outputs and are only meaningful while out_valid is high.
module adc_current_pe
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t vp,
  input  fp32_t vn,
  input  fp32_t g,
  input  fp32_t j,
  output logic  out_valid,
  output fp32_t u,
  output fp32_t i
);

  fp32_t u_s1, g_d, j_d, prod;

  fp_add #(.LAT(7)) u_sub (.clk, .add_sub(1'b0), .data_a(vp), .data_b(vn), .result(u_s1));
  delay_line #(.W(32), .N(7))  u_gd (.clk, .rst_n, .d(g), .q(g_d));
  delay_line #(.W(32), .N(12)) u_jd (.clk, .rst_n, .d(j), .q(j_d));
  fp_mul #(.LAT(5)) u_mul (.clk, .data_a(u_s1), .data_b(g_d), .result(prod));
  delay_line #(.W(32), .N(12)) u_ud (.clk, .rst_n, .d(u_s1), .q(u));
  fp_add #(.LAT(7)) u_acc (.clk, .add_sub(1'b1), .data_a(prod), .data_b(j_d), .result(i));
  delay_line #(.W(1), .N(19)) u_vd (.clk, .rst_n, .d(in_valid), .q(out_valid));

endmodule
