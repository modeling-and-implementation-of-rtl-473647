// coef_bank: host-written coefficient memory of the simulator.
//
// The host computer precomputes every constant of the model (ADC switch
// coefficients A1/A2 for ON and OFF, the device conductance, the RL filter
// a1/a2, the constant inverse nodal matrix, the PI coefficients, the step
// size and the PLL centre frequency) and writes them here as float32 words.
// Reset loads the defaults of vsi_pkg::COEF_DEFAULT, so the simulator runs
// without a host.  All words are read in parallel as one coef_t record.
//
// Word map (wr_addr): 0 a1_on, 1 a2_on, 2 a1_off, 3 a2_off, 4 g, 5 a1_f,
// 6 a2_f, 7 dt, 8 wn, 9-11 pll_a1..a3, 12-14 vdc_a1..a3, 15-17 q_a1..a3,
// 18 kp_i, 19 kmod, 20 + 5*row + col ginv[row][col].
// Timing: a write takes effect on the next clock edge.  Words should only be
// changed between simulation runs; a write during a step is not guarded.
module coef_bank
  import vsi_pkg::*;
#(
  parameter int NWORDS = NCOEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [5:0] wr_addr,
  input  fp32_t      wr_data,
  output coef_t      coef
);

  localparam int NS = 20;  // scalar words before the matrix

  function automatic fp32_t default_word(input int k);
    fp32_t w [NS];
    w = '{COEF_DEFAULT.a1_on, COEF_DEFAULT.a2_on, COEF_DEFAULT.a1_off, COEF_DEFAULT.a2_off,
          COEF_DEFAULT.g, COEF_DEFAULT.a1_f, COEF_DEFAULT.a2_f, COEF_DEFAULT.dt, COEF_DEFAULT.wn,
          COEF_DEFAULT.pll_a1, COEF_DEFAULT.pll_a2, COEF_DEFAULT.pll_a3,
          COEF_DEFAULT.vdc_a1, COEF_DEFAULT.vdc_a2, COEF_DEFAULT.vdc_a3,
          COEF_DEFAULT.q_a1, COEF_DEFAULT.q_a2, COEF_DEFAULT.q_a3,
          COEF_DEFAULT.kp_i, COEF_DEFAULT.kmod};
    if (k < NS) return w[k];
    return COEF_DEFAULT.ginv[(k-NS)/NNODE][(k-NS)%NNODE];
  endfunction

  fp32_t mem [NWORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NWORDS; k++) mem[k] <= default_word(k);
    end else if (wr_en && int'(wr_addr) < NWORDS) begin
      mem[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    coef.a1_on  = mem[0];
    coef.a2_on  = mem[1];
    coef.a1_off = mem[2];
    coef.a2_off = mem[3];
    coef.g      = mem[4];
    coef.a1_f   = mem[5];
    coef.a2_f   = mem[6];
    coef.dt     = mem[7];
    coef.wn     = mem[8];
    coef.pll_a1 = mem[9];
    coef.pll_a2 = mem[10];
    coef.pll_a3 = mem[11];
    coef.vdc_a1 = mem[12];
    coef.vdc_a2 = mem[13];
    coef.vdc_a3 = mem[14];
    coef.q_a1   = mem[15];
    coef.q_a2   = mem[16];
    coef.q_a3   = mem[17];
    coef.kp_i   = mem[18];
    coef.kmod   = mem[19];
    for (int r = 0; r < NNODE; r++)
      for (int c = 0; c < NNODE; c++)
        coef.ginv[r][c] = mem[NS + NNODE*r + c];
  end

endmodule
