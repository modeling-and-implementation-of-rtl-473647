// device_update: voltages and currents of the twelve ADC devices.
//
// From the node solution v = [v0, vLa, vLb, vLc, idc] each device gets its
// voltage and current, i = G * u + J, through one adc_current_pe lane.
// Upper switches S1 (phase a), S3 (b), S5 (c) sit between v0 and the phase
// node, lower switches S4 (a), S6 (b), S2 (c) between the phase node and
// the 0 V rail; u of a switch is taken collector to emitter and u of its
// anti-parallel diode anode to cathode (the negative).  The results are
// written to the history memory for the next step.
//
// Timing: inputs sampled on in_valid; u and i are registered and held,
// out_valid pulses LAT = 19 + 1 = 20 cycles after in_valid.
module device_update
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t v [NNODE],
  input  fp32_t j [NDEV],
  input  fp32_t g,
  output logic  out_valid,
  output fp32_t u [NDEV],
  output fp32_t i [NDEV]
);

  // phase node of switch position S1..S6 and whether it is an upper device
  localparam int PH_NODE [6] = '{1, 3, 2, 1, 3, 2};
  localparam bit UPPER   [6] = '{1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0};

  fp32_t us [NDEV];
  fp32_t is [NDEV];
  logic  vv [NDEV];

  for (genvar k = 0; k < NDEV; k++) begin : g_dev
    localparam int  P   = k % 6;
    localparam bit  DIO = (k >= 6);
    fp32_t hi, lo, vp, vn;
    // collector / emitter of the switch position
    assign hi = UPPER[P] ? v[0] : v[PH_NODE[P]];
    assign lo = UPPER[P] ? v[PH_NODE[P]] : F_ZERO;
    assign vp = DIO ? lo : hi;
    assign vn = DIO ? hi : lo;
    adc_current_pe u_pe (.clk, .rst_n, .in_valid, .vp, .vn, .g, .j(j[k]),
                         .out_valid(vv[k]), .u(us[k]), .i(is[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < NDEV; k++) begin
        u[k] <= F_ZERO;
        i[k] <= F_ZERO;
      end
    end else begin
      out_valid <= vv[0];
      if (vv[0]) begin
        u <= us;
        i <= is;
      end
    end
  end

endmodule
