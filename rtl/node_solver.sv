// node_solver: nodal solution V = Geq^-1 I of the two-level inverter.
//
// Node vector V = [v0, vLa, vLb, vLc, idc]; v0 is the positive DC rail, the
// negative rail is the 0 V reference and idc the current drawn from the DC
// source.  The source vector is built from the history currents J
// (index 0..5 = S1..S6, 6..11 = D1..D6), the filter currents and Vdc:
//   I1 = (JD1-JS1) + (JD3-JS3) + (JD5-JS5)
//   I2 = (JS1-JD1) + (JD4-JS4) - iLa
//   I3 = (JS3-JD3) + (JD6-JS6) - iLb
//   I4 = (JS5-JD5) + (JD2-JS2) - iLc
//   I5 = Vdc
// and multiplied by the host-precomputed inverse matrix ginv.  Because the
// ADC parameters keep Geq constant whatever the switch states, no matrix is
// inverted at run time.  The filter currents used are those of the previous
// step (the filter needs this step's voltages to give its new currents).
//
// Datapath: three FLOAT_ADD stages form I, 25 FLOAT_MULT form the products,
// and a three-level FLOAT_ADD tree sums each row.
// Timing: inputs sampled on in_valid; v is registered and held, out_valid
// pulses LAT = 7*3 + 5 + 7*3 + 1 = 48 cycles after in_valid.
module node_solver
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t j [NDEV],
  input  fp32_t il [3],
  input  fp32_t vdc,
  input  fp32_t [NNODE-1:0][NNODE-1:0] ginv,
  output logic  out_valid,
  output fp32_t v [NNODE]
);

  // ---- stage 1: JD - JS for each switch position (index p = S(p+1))
  fp32_t dpos [6];
  for (genvar p = 0; p < 6; p++) begin : g_d
    fp_add #(.LAT(7)) u_a (.clk, .add_sub(1'b0), .data_a(j[6+p]), .data_b(j[p]), .result(dpos[p]));
  end
  fp32_t il_d7 [3];
  fp32_t il_d14 [3];
  fp32_t vdc_d;   // Vdc aligned with I1..I4 (21 cycles)
  for (genvar x = 0; x < 3; x++) begin : g_il
    delay_line #(.W(32), .N(7)) u_d1 (.clk, .rst_n, .d(il[x]), .q(il_d7[x]));
    delay_line #(.W(32), .N(7)) u_d2 (.clk, .rst_n, .d(il_d7[x]), .q(il_d14[x]));
  end
  delay_line #(.W(32), .N(21)) u_vdc (.clk, .rst_n, .d(vdc), .q(vdc_d));

  // ---- stage 2
  // I1a = d1 + d3 ; I2a = d4 - d1 ; I3a = d6 - d3 ; I4a = d2 - d5
  fp32_t s2 [4];
  fp32_t d5_d;
  fp_add #(.LAT(7)) u_s21 (.clk, .add_sub(1'b1), .data_a(dpos[0]), .data_b(dpos[2]), .result(s2[0]));
  fp_add #(.LAT(7)) u_s22 (.clk, .add_sub(1'b0), .data_a(dpos[3]), .data_b(dpos[0]), .result(s2[1]));
  fp_add #(.LAT(7)) u_s23 (.clk, .add_sub(1'b0), .data_a(dpos[5]), .data_b(dpos[2]), .result(s2[2]));
  fp_add #(.LAT(7)) u_s24 (.clk, .add_sub(1'b0), .data_a(dpos[1]), .data_b(dpos[4]), .result(s2[3]));
  delay_line #(.W(32), .N(7)) u_d5 (.clk, .rst_n, .d(dpos[4]), .q(d5_d));

  // ---- stage 3: I1 = I1a + d5 ; Ix = Ixa - iLx
  fp32_t ivec [NNODE];
  fp_add #(.LAT(7)) u_s31 (.clk, .add_sub(1'b1), .data_a(s2[0]), .data_b(d5_d), .result(ivec[0]));
  for (genvar x = 0; x < 3; x++) begin : g_s3
    fp_add #(.LAT(7)) u_a (.clk, .add_sub(1'b0), .data_a(s2[1+x]), .data_b(il_d14[x]), .result(ivec[1+x]));
  end
  assign ivec[4] = vdc_d;

  // ---- products and row sums
  fp32_t vs [NNODE];
  for (genvar r = 0; r < NNODE; r++) begin : g_row
    fp32_t prod [NNODE];
    fp32_t s01, s23, p4_d, s0123, p4_dd;
    for (genvar c = 0; c < NNODE; c++) begin : g_col
      fp_mul #(.LAT(5)) u_m (.clk, .data_a(ginv[r][c]), .data_b(ivec[c]), .result(prod[c]));
    end
    fp_add #(.LAT(7)) u_t01 (.clk, .add_sub(1'b1), .data_a(prod[0]), .data_b(prod[1]), .result(s01));
    fp_add #(.LAT(7)) u_t23 (.clk, .add_sub(1'b1), .data_a(prod[2]), .data_b(prod[3]), .result(s23));
    delay_line #(.W(32), .N(7)) u_p4 (.clk, .rst_n, .d(prod[4]), .q(p4_d));
    fp_add #(.LAT(7)) u_t03 (.clk, .add_sub(1'b1), .data_a(s01), .data_b(s23), .result(s0123));
    delay_line #(.W(32), .N(7)) u_p4b (.clk, .rst_n, .d(p4_d), .q(p4_dd));
    fp_add #(.LAT(7)) u_t04 (.clk, .add_sub(1'b1), .data_a(s0123), .data_b(p4_dd), .result(vs[r]));
  end

  logic v_pipe;
  delay_line #(.W(1), .N(47)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < NNODE; r++) v[r] <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (v_pipe) v <= vs;
    end
  end

endmodule
