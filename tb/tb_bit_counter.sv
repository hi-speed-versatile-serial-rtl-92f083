// tb_bit_counter: random clear and increment requests against a counting
// model in the testbench; also checks that the count stops at 63 and that
// clear wins over increment.
module tb_bit_counter;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, inc = 1'b0;
  logic [5:0] count;
  logic full;
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

  bit_counter dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; finish_tb(); end

  int model;
  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0; model = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clr = ($urandom % 100) < 2;
      inc = ($urandom % 100) < 80;
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (inc && model < 63) model++;
      check(count == 6'(model), "count");
      check(full == (model == 63), "full");
    end
    finish_tb();
  end
endmodule
