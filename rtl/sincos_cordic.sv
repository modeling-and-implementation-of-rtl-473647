// sincos_cordic: sine and cosine of an angle given as a float in [0, 2pi).
//
// The angle is scaled to a 24-bit phase (2^24 per turn) with one FLOAT_MULT
// and a float-to-integer conversion, folded into [-pi/2, pi/2] (angles in
// the second and third quadrant are rotated by pi and the results negated)
// and rotated by a 22-iteration CORDIC in 28-bit fixed point, scale 2^22,
// starting from x = K * 2^22 (K = prod 1/sqrt(1 + 2^-2i) = 0.607253).
// The results are converted back to float.  Accuracy is better than 5e-6.
// The CORDIC method is this design's choice.
//
// Timing: theta sampled on start; sin_t/cos_t registered and held; done
// pulses 5 + 1 + 22 + 1 = 29 cycles after start.  start must not repeat
// before done.
module sincos_cordic
  import vsi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t theta,
  output logic  done,
  output fp32_t sin_t,
  output fp32_t cos_t
);

  localparam int NIT = 22;
  // ATAN[i] = round(atan(2^-i) / (2 pi) * 2^24)
  localparam int ATAN [NIT] = '{2097152, 1238021, 654136, 332050, 166669, 83416,
                                41718, 20860, 10430, 5215, 2608, 1304, 652, 326,
                                163, 81, 41, 20, 10, 5, 3, 1};
  localparam logic signed [27:0] K_INIT = 28'sd2547003;

  fp32_t ph_f;
  logic  ph_v;
  fp_mul #(.LAT(5)) u_ph (.clk, .data_a(theta), .data_b(F_PH24), .result(ph_f));
  delay_line #(.W(1), .N(5)) u_vd (.clk, .rst_n, .d(start), .q(ph_v));

  typedef enum logic [1:0] {IDLE, ROT, OUT} st_t;
  st_t st;
  logic signed [27:0] x, y, z;
  logic               neg;
  logic [4:0]         it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= IDLE;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      neg   <= 1'b0;
      it    <= '0;
      done  <= 1'b0;
      sin_t <= F_ZERO;
      cos_t <= F_ONE;
    end else begin
      done <= 1'b0;
      case (st)
        IDLE: if (ph_v) begin
          logic [23:0] ph;
          ph = 24'(fp_to_fix(ph_f, 0, 26));
          // quadrants 1 and 2 (90..270 degrees): rotate by pi
          neg <= (ph[23:22] == 2'b01) || (ph[23:22] == 2'b10);
          if ((ph[23:22] == 2'b01) || (ph[23:22] == 2'b10))
            z <= 28'(signed'(ph - 24'h80_0000));
          else
            z <= 28'(signed'(ph));
          x  <= K_INIT;
          y  <= '0;
          it <= '0;
          st <= ROT;
        end
        ROT: begin
          if (!z[27]) begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - 28'(ATAN[it]);
          end else begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + 28'(ATAN[it]);
          end
          if (int'(it) == NIT - 1) st <= OUT;
          it <= it + 5'd1;
        end
        OUT: begin
          cos_t <= fix_to_fp(neg ? 32'(-x) : 32'(x), 22);
          sin_t <= fix_to_fp(neg ? 32'(-y) : 32'(y), 22);
          done  <= 1'b1;
          st    <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
