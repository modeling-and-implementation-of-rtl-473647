// tb_spwm: with a 400-cycle carrier, loads several sets of modulation
// indices (including over-modulation beyond +-1) and checks over whole
// carrier periods that each high-side duty cycle is (1 + m)/2 within one
// carrier step, that PHx and PLx are always complementary, and that each
// high-side gate switches twice per period when |m| < 1.
module tb_spwm;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  localparam int CP = 400;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, m_valid = 0;
  fp32_t m [3];
  logic pha, pla, phb, plb, phc, plc;
  int checks = 0, failures = 0;

  spwm #(.CARRIER_PERIOD(CP)) dut (.clk, .rst_n, .m_valid, .m, .pha, .pla, .phb, .plb, .phc, .plc);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mr [3], duty;
    int on [3], edges [3];
    logic [2:0] prev;
    for (int x = 0; x < 3; x++) m[x] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      for (int x = 0; x < 3; x++) begin
        mr[x] = (r == 11) ? ((x == 0) ? 1.3 : (x == 1) ? -1.3 : 0.0)
                          : real'(int'($urandom_range(0, 1800))) / 1000.0 - 0.9;
        m[x] = r2f(mr[x]);
      end
      @(negedge clk);
      m_valid = 1;
      @(negedge clk);
      m_valid = 0;
      repeat (CP) @(negedge clk);   // settle one period
      for (int x = 0; x < 3; x++) begin on[x] = 0; edges[x] = 0; end
      prev = {phc, phb, pha};
      for (int t = 0; t < CP; t++) begin
        @(negedge clk);
        checks++;
        if (pha == pla || phb == plb || phc == plc) failures++;
        on[0] += pha; on[1] += phb; on[2] += phc;
        for (int x = 0; x < 3; x++) if ({phc, phb, pha}[x] != prev[x]) edges[x]++;
        prev = {phc, phb, pha};
      end
      for (int x = 0; x < 3; x++) begin
        real e;
        e = (mr[x] > 1.0) ? 1.0 : (mr[x] < -1.0) ? 0.0 : (1.0 + mr[x]) / 2.0;
        duty = real'(on[x]) / real'(CP);
        checks += 2;
        if (rabs(duty - e) > 2.0 / CP + 1e-9) begin failures++; $display("set %0d phase %0d duty %f exp %f", r, x, duty, e); end
        if (rabs(mr[x]) < 0.98 && edges[x] != 2) begin failures++; $display("set %0d phase %0d: %0d edges", r, x, edges[x]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
