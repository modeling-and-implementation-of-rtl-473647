// fp_mul: IEEE-754 single-precision multiplier (FLOAT_MULT).
//
// result = data_a * data_b, available LAT clock cycles after the operands
// are presented (the FLOAT_MULT core of the reference design has a latency
// of 5).  A new operand pair is accepted every cycle; there is no valid
// signal.  The 24x24-bit mantissa product is normalised and rounded to
// nearest-even; subnormals are flushed to zero, exponent overflow returns
// infinity, NaN is not handled (this design's choice).  One combinational
// stage is followed by LAT registers.
module fp_mul #(
  parameter int LAT = 5
) (
  input  logic        clk,
  input  logic [31:0] data_a,
  input  logic [31:0] data_b,
  output logic [31:0] result
);

  function automatic logic [31:0] mul_core(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [47:0] p;
    logic [23:0] mant;
    logic        grd, st, rnd;
    logic [24:0] mr;
    int          e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) begin
      mant = p[47:24];
      grd    = p[23];
      st   = |p[22:0];
      e    = e + 1;
    end else begin
      mant = p[46:23];
      grd    = p[22];
      st   = |p[21:0];
    end
    rnd = grd & (st | mant[0]);
    mr  = {1'b0, mant} + {24'd0, rnd};
    if (mr[24]) begin
      mr = mr >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hff, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  logic [31:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= mul_core(data_a, data_b);
    for (int k = 1; k < LAT; k++) pipe[k] <= pipe[k-1];
  end

  assign result = pipe[LAT-1];

endmodule
