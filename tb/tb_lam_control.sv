// tb_lam_control: random set/clear requests and L patterns against a model
// of the two flip-flops; checks that L is gated by L enable, that the
// prompt L drive equals the polled L bit and that set wins over clear.
module tb_lam_control;
  import scc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic set_le = 0, clr_le = 0, set_i = 0, clr_i = 0;
  logic [22:0] l_lines = '0;
  logic d_state, l_any, l_bus_drive, inhibit;
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  lam_control dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; finish_tb(); end

  logic le_m, i_m;
  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0; le_m = 0; i_m = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      set_le = ($urandom % 8) == 0; clr_le = ($urandom % 8) == 0;
      set_i  = ($urandom % 8) == 0; clr_i  = ($urandom % 8) == 0;
      l_lines = ($urandom % 2) ? '0 : (23'(1) << ($urandom % 23));
      @(posedge clk); #1;
      if (set_le) le_m = 1; else if (clr_le) le_m = 0;
      if (set_i) i_m = 1; else if (clr_i) i_m = 0;
      check(d_state == le_m, "L enable");
      check(inhibit == i_m, "inhibit");
      check(l_any == (le_m && l_lines != 0), "gated L");
      check(l_bus_drive == l_any, "prompt L");
    end
    finish_tb();
  end
endmodule
