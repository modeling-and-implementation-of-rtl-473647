// clarke: abc -> alpha/beta transform (amplitude invariant) in float.
//   alpha = 2/3 a - 1/3 (b + c),  beta = (b - c) / sqrt(3)
// Datapath FLOAT_ADD -> FLOAT_MULT -> FLOAT_ADD.  Inputs sampled on
// in_valid; outputs registered and held, out_valid pulses LAT = 20 cycles
// later.  The amplitude-invariant scaling is this design's choice.
module clarke
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t c,
  output logic  out_valid,
  output fp32_t alpha,
  output fp32_t beta
);

  fp32_t sbc, dbc, a_d, m_a, m_s, m_b, m_b_d, al;
  logic  v_pipe;

  fp_add #(.LAT(7)) u_s  (.clk, .add_sub(1'b1), .data_a(b), .data_b(c), .result(sbc));
  fp_add #(.LAT(7)) u_d  (.clk, .add_sub(1'b0), .data_a(b), .data_b(c), .result(dbc));
  delay_line #(.W(32), .N(7)) u_ad (.clk, .rst_n, .d(a), .q(a_d));
  fp_mul #(.LAT(5)) u_ma (.clk, .data_a(a_d), .data_b(F_2_3), .result(m_a));
  fp_mul #(.LAT(5)) u_ms (.clk, .data_a(sbc), .data_b(F_1_3), .result(m_s));
  fp_mul #(.LAT(5)) u_mb (.clk, .data_a(dbc), .data_b(F_INV_SQ3), .result(m_b));
  fp_add #(.LAT(7)) u_al (.clk, .add_sub(1'b0), .data_a(m_a), .data_b(m_s), .result(al));
  delay_line #(.W(32), .N(7)) u_bd (.clk, .rst_n, .d(m_b), .q(m_b_d));
  delay_line #(.W(1), .N(19)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      alpha <= F_ZERO;
      beta  <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (v_pipe) begin
        alpha <= al;
        beta  <= m_b_d;
      end
    end
  end

endmodule
