// tb_hist_ram: writes random device voltages/currents into hist_ram, checks
// they are read back, that they hold while we is low, and that reset clears.
module tb_hist_ram;
  import vsi_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, we = 0;
  fp32_t u_in [12], i_in [12], u_q [12], i_q [12];
  fp32_t eu [12], ei [12];
  int checks = 0, failures = 0;

  hist_ram dut (.clk, .rst_n, .we, .u_in, .i_in, .u_q, .i_q);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 12; k++) begin u_in[k] = 0; i_in[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < 12; k++) begin
        u_in[k] = $urandom; i_in[k] = $urandom;
      end
      we = (r % 3 != 2);
      if (we) begin eu = u_in; ei = i_in; end
      @(negedge clk);
      for (int k = 0; k < 12; k++) begin
        checks += 2;
        if (u_q[k] != eu[k] || i_q[k] != ei[k]) begin failures++; $display("entry %0d round %0d", k, r); end
      end
    end
    rst_n = 0;
    @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (u_q[k] != 0 || i_q[k] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
