// fp_add: IEEE-754 single-precision adder/subtractor (FLOAT_ADD).
//
// result = data_a + data_b when add_sub = 1, data_a - data_b when add_sub = 0,
// available LAT clock cycles after the operands are presented (the FLOAT_ADD
// core of the reference design has a latency of 7).  The unit accepts a new
// operand pair every cycle and carries no valid signal: callers track
// validity with their own delay lines.
//
// Arithmetic: operands are aligned with guard, round and sticky bits, added
// or subtracted, normalised and rounded to nearest-even.  Subnormal operands
// and results are flushed to zero and an exponent overflow returns infinity;
// NaN is neither produced nor propagated.  These rounding and special-value
// rules are this design's choice.  The arithmetic is one combinational stage
// followed by LAT registers, so that synthesis may retime it.
module fp_add #(
  parameter int LAT = 7
) (
  input  logic        clk,
  input  logic        add_sub,
  input  logic [31:0] data_a,
  input  logic [31:0] data_b,
  output logic [31:0] result
);

  function automatic logic [31:0] add_core(input logic [31:0] a, input logic [31:0] b_in, input logic add);
    logic [31:0] b, hi_op, lo_op;
    logic [7:0]  eb, es;
    logic [26:0] mb, ms, ms_sh;   // 1.23 mantissa + 3 guard/round/sticky bits
    logic [27:0] sum;
    logic        sticky;
    logic [8:0]  d;
    int          e;
    int          lz;
    logic [23:0] mant;
    logic        rnd;
    logic [24:0] mr;
    b = add ? b_in : {~b_in[31], b_in[30:0]};
    // flush subnormals to signed zero
    if (a[30:23] == 8'd0) a = {a[31], 31'd0};
    if (b[30:23] == 8'd0) b = {b[31], 31'd0};
    if (a[30:0] >= b[30:0]) begin hi_op = a; lo_op = b; end
    else begin hi_op = b; lo_op = a; end
    if (lo_op[30:0] == 31'd0) return (hi_op[30:0] == 31'd0) ? {hi_op[31] & lo_op[31], 31'd0} : hi_op;
    eb = hi_op[30:23];
    es = lo_op[30:23];
    mb = {1'b1, hi_op[22:0], 3'b000};
    ms = {1'b1, lo_op[22:0], 3'b000};
    d  = {1'b0, eb} - {1'b0, es};
    if (d >= 9'd27) begin
      ms_sh = 27'd1;            // everything shifted into the sticky bit
    end else begin
      ms_sh  = ms >> d;
      sticky = |(ms & ((27'd1 << d) - 27'd1));
      ms_sh[0] = ms_sh[0] | sticky;
    end
    e = int'(eb);
    if (hi_op[31] == lo_op[31]) begin
      sum = {1'b0, mb} + {1'b0, ms_sh};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e = e + 1;
      end
    end else begin
      sum = {1'b0, mb} - {1'b0, ms_sh};
      if (sum == 28'd0) return 32'd0;
      lz = 0;
      for (int k = 26; k >= 0; k--) begin
        if (sum[k]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - lz;
    end
    // sum[26] is the leading one, sum[2] guard, sum[1:0] round/sticky
    mant = sum[26:3];
    rnd  = sum[2] & ((|sum[1:0]) | sum[3]);
    mr   = {1'b0, mant} + {24'd0, rnd};
    if (mr[24]) begin
      mr = mr >> 1;
      e = e + 1;
    end
    if (e >= 255) return {hi_op[31], 8'hff, 23'd0};
    if (e <= 0) return {hi_op[31], 31'd0};
    return {hi_op[31], 8'(e), mr[22:0]};
  endfunction

  logic [31:0] pipe [LAT];

  always_ff @(posedge clk) begin
    pipe[0] <= add_core(data_a, data_b, add_sub);
    for (int k = 1; k < LAT; k++) pipe[k] <= pipe[k-1];
  end

  assign result = pipe[LAT-1];

endmodule
