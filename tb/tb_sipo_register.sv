// tb_sipo_register: shifts random bit strings into a 24-bit and an 18-bit
// register, with gaps where shift is low, and compares the parallel output
// with the last WIDTH bits sent, first bit at the top.
module tb_sipo_register;
  logic clk = 1'b0, rst = 1'b1, shift = 1'b0, din = 1'b0;
  logic [23:0] q24;
  logic [17:0] q18;
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

  sipo_register #(.WIDTH(24)) dut24 (.clk, .rst, .shift, .din, .q(q24));
  sipo_register #(.WIDTH(18)) dut18 (.clk, .rst, .shift, .din, .q(q18));
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; finish_tb(); end

  logic [63:0] hist;
  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0; hist = '0;
    @(posedge clk); #1;
    check(q24 == '0 && q18 == '0, "reset");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift = $urandom % 2;
      din   = $urandom % 2;
      @(posedge clk); #1;
      if (shift) hist = {hist[62:0], din};
      check(q24 == hist[23:0], "24-bit contents");
      check(q18 == hist[17:0], "18-bit contents");
    end
    finish_tb();
  end
endmodule
