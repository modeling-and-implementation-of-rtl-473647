// dq_to_abc: inverse Park and inverse Clarke transform, the inverse of
// park and clarke:
//   alpha = d cos - q sin,  beta = d sin + q cos
//   a = alpha,  b = -alpha/2 + sqrt(3)/2 beta,  c = -alpha/2 - sqrt(3)/2 beta
// Datapath: FLOAT_MULT, FLOAT_ADD (rotation), FLOAT_MULT, FLOAT_ADD.
// Inputs sampled on in_valid; outputs registered and held, out_valid
// pulses LAT = 12 + 12 + 1 = 25 cycles later.
module dq_to_abc
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t d,
  input  fp32_t q,
  input  fp32_t sin_t,
  input  fp32_t cos_t,
  output logic  out_valid,
  output fp32_t a,
  output fp32_t b,
  output fp32_t c
);

  fp32_t dc, qs, ds, qc, al, be, h, r, al_d, bn, cn;
  logic  v_pipe;

  fp_mul #(.LAT(5)) u_dc (.clk, .data_a(d), .data_b(cos_t), .result(dc));
  fp_mul #(.LAT(5)) u_qs (.clk, .data_a(q), .data_b(sin_t), .result(qs));
  fp_mul #(.LAT(5)) u_ds (.clk, .data_a(d), .data_b(sin_t), .result(ds));
  fp_mul #(.LAT(5)) u_qc (.clk, .data_a(q), .data_b(cos_t), .result(qc));
  fp_add #(.LAT(7)) u_al (.clk, .add_sub(1'b0), .data_a(dc), .data_b(qs), .result(al));
  fp_add #(.LAT(7)) u_be (.clk, .add_sub(1'b1), .data_a(ds), .data_b(qc), .result(be));
  fp_mul #(.LAT(5)) u_h  (.clk, .data_a(al), .data_b(F_HALF), .result(h));
  fp_mul #(.LAT(5)) u_r  (.clk, .data_a(be), .data_b(F_SQ3_2), .result(r));
  fp_add #(.LAT(7)) u_b  (.clk, .add_sub(1'b0), .data_a(r), .data_b(h), .result(bn));
  fp_add #(.LAT(7)) u_c  (.clk, .add_sub(1'b0), .data_a(fp_neg(h)), .data_b(r), .result(cn));
  delay_line #(.W(32), .N(12)) u_ald (.clk, .rst_n, .d(al), .q(al_d));
  delay_line #(.W(1), .N(24)) u_vd (.clk, .rst_n, .d(in_valid), .q(v_pipe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      a <= F_ZERO;
      b <= F_ZERO;
      c <= F_ZERO;
    end else begin
      out_valid <= v_pipe;
      if (v_pipe) begin
        a <= al_d;
        b <= bn;
        c <= cn;
      end
    end
  end

endmodule
