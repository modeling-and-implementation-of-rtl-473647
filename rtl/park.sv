// park: alpha/beta -> dq rotation by the angle theta, given as sin/cos.
//   d =  alpha cos + beta sin,   q = -alpha sin + beta cos
// With alpha = V cos(phi), beta = V sin(phi): d = V cos(phi - theta),
// q = V sin(phi - theta), so the d axis follows the voltage vector (this
// sign convention is this design's choice).
// Four FLOAT_MULT and two FLOAT_ADD.  Inputs sampled on in_valid; outputs
// registered and held, out_valid pulses LAT = 5 + 7 + 1 = 13 cycles later.
module park
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t alpha,
  input  fp32_t beta,
  input  fp32_t sin_t,
  input  fp32_t cos_t,
  output logic  out_valid,
  output fp32_t d,
  output fp32_t q
);

  fp32_t ac, bs, as_, bc, dn, qn;
  logic  v_pipe;

  fp_mul #(.LAT(5)) u_ac (.clk, .data_a(alpha), .data_b(cos_t), .result(ac));
  fp_mul #(.LAT(5)) u_bs (.clk, .data_a(beta),  .data_b(sin_t), .result(bs));
  fp_mul #(.LAT(5)) u_as (.clk, .data_a(alpha), .data_b(sin_t), .result(as_));
  fp_mul #(.LAT(5)) u_bc (.clk, .data_a(beta),  .data_b(cos_t), .result(bc));
  fp_add #(.LAT(7)) u_d  (.clk, .add_sub(1'b1), .data_a(ac), .data_b(bs), .result(dn));
  fp_add #(.LAT(7)) u_q  (.clk, .add_sub(1'b0), .data_a(bc), .data_b(as_), .result(qn));
  delay_line #(.W(1), .N(12)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d <= F_ZERO;
      q <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (v_pipe) begin
        d <= dn;
        q <= qn;
      end
    end
  end

endmodule
