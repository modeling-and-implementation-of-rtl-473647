// tb_switch_states: random gate patterns and diode voltages/currents over
// many steps; checks the IGBT states follow the gates and the diode states
// follow the turn-on (positive voltage) / stay-on (positive current) rule,
// and that nothing changes without the step strobe.
module tb_switch_states;
  import tb_fp_pkg::*;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, step = 0;
  logic [5:0] gate = 0;
  fp32_t u_d [6], i_d [6];
  logic [11:0] state, model;
  int checks = 0, failures = 0, turn_on = 0, turn_off = 0;

  switch_states dut (.clk, .rst_n, .step, .gate, .u_d, .i_d, .state);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++) begin u_d[k] = 0; i_d[k] = 0; end
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      gate = 6'($urandom);
      for (int k = 0; k < 6; k++) begin
        real uu, ii;
        uu = real'(int'($urandom_range(0, 200))) - 100.0;
        ii = real'(int'($urandom_range(0, 200))) - 100.0;
        if ($urandom_range(0, 7) == 0) uu = 0.0;
        u_d[k] = r2f(uu); i_d[k] = r2f(ii);
      end
      step = (r % 5 != 4);
      if (step) begin
        model[5:0] = gate;
        for (int k = 0; k < 6; k++) begin
          logic nxt;
          nxt = model[6+k] ? (f2r(i_d[k]) > 0.0) : (f2r(u_d[k]) > 0.0);
          if (nxt && !model[6+k]) turn_on++;
          if (!nxt && model[6+k]) turn_off++;
          model[6+k] = nxt;
        end
      end
      @(negedge clk);
      checks++;
      if (state != model) begin failures++; $display("round %0d: %b exp %b", r, state, model); end
    end
    checks++;
    if (turn_on == 0 || turn_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
