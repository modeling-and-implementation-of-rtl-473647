// spwm: three-phase sinusoidal PWM with complementary outputs.
//
// A symmetric triangular carrier of CARRIER_PERIOD clock cycles, spanning
// -1 .. +1, is compared with the three modulation indices m (float,
// nominally within -1 .. +1).  The high-side gate PHx is on while m_x is
// above the carrier, the low-side gate PLx is its complement, giving the
// three complementary pairs PHA/PLA, PHB/PLB, PHC/PLC.  The indices are
// converted to signed Q1.15 (saturating) when m_valid loads them and are
// held until the next load.  No dead time is inserted.  The carrier
// frequency is this design's choice: 20000 cycles = 2.5 kHz at 50 MHz.
//
// Timing: gates are registered, one cycle after the comparison.
module spwm
  import vsi_pkg::*;
#(
  parameter int CARRIER_PERIOD = 20000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  m_valid,
  input  fp32_t m [3],
  output logic  pha,
  output logic  pla,
  output logic  phb,
  output logic  plb,
  output logic  phc,
  output logic  plc
);

  localparam int HALF = CARRIER_PERIOD / 2;

  logic signed [15:0] mq [3];
  logic [31:0]        cnt;
  logic               down;
  logic signed [17:0] tri_v;

  // carrier: cnt runs 0 .. HALF and back; tri_v = cnt * 2^16 / HALF - 2^15
  assign tri_v = 18'(signed'(33'((64'(cnt) << 16) / 64'(HALF)))) - 18'sd32768;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      down <= 1'b0;
      for (int x = 0; x < 3; x++) mq[x] <= '0;
      {pha, pla, phb, plb, phc, plc} <= 6'b010101;
    end else begin
      if (!down) begin
        if (cnt == 32'(HALF - 1)) down <= 1'b1;
        cnt <= cnt + 32'd1;
      end else begin
        if (cnt == 32'd1) down <= 1'b0;
        cnt <= cnt - 32'd1;
      end
      if (m_valid)
        for (int x = 0; x < 3; x++) mq[x] <= 16'(fp_to_fix(m[x], 15, 16));
      pha <= 18'(mq[0]) > tri_v;
      pla <= !(18'(mq[0]) > tri_v);
      phb <= 18'(mq[1]) > tri_v;
      plb <= !(18'(mq[1]) > tri_v);
      phc <= 18'(mq[2]) > tri_v;
      plc <= !(18'(mq[2]) > tri_v);
    end
  end

endmodule
