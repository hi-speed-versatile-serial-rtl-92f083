// tb_piso_register: loads random words and shifts them out, checking the
// top bit in the order a 24-bit and a 16-bit word are sent, and that load
// wins over shift.
module tb_piso_register;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, shift = 1'b0;
  logic [23:0] d = '0, q;
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

  piso_register #(.WIDTH(24)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; finish_tb(); end

  logic [23:0] w;
  int n;
  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 100; k++) begin
      w = 24'($urandom);
      @(negedge clk); d = w; load = 1'b1; shift = (k % 3 == 0);
      @(negedge clk); load = 1'b0; shift = 1'b0;
      check(q == w, "parallel load");
      n = (k % 2) ? 24 : 16;
      for (int b = n - 1; b >= 0; b--) begin
        check(((n == 24) ? q[23] : q[15]) == w[b], $sformatf("bit %0d of %0d", b, n));
        shift = 1'b1; @(negedge clk); shift = 1'b0;
      end
    end
    finish_tb();
  end
endmodule
