// tb_special_decoder: all 32768 values of F, N and A, each compared with
// the special command table written out independently in the testbench.
module tb_special_decoder;
  import scc_pkg::*;
  fna_t fna;
  special_op_t op;
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

  special_decoder dut (.*);
  initial begin #1_000_000; failures++; finish_tb(); end

  special_op_t e;
  int f, n, a;
  initial begin
    for (int i = 0; i < 32768; i++) begin
      f = i / 1024; n = (i / 32) % 32; a = i % 16;
      if (i % 32 >= 16) continue;
      fna.f = 5'(f); fna.n = 5'(n); fna.a = 4'(a);
      #1;
      e = SP_NONE;
      if (n == 28) e = SP_UNKNOWN;
      if (n == 30) e = SP_UNKNOWN;
      if (n == 28 && a == 8 && f == 26) e = SP_Z;
      if (n == 28 && a == 9 && f == 26) e = SP_C;
      if (n == 30 && a == 9 && f == 26) e = SP_SET_I;
      if (n == 30 && a == 9 && f == 24) e = SP_CLR_I;
      if (n == 30 && a == 9 && f == 27) e = SP_TEST_I;
      if (n == 30 && a == 10 && f == 26) e = SP_SET_LE;
      if (n == 30 && a == 10 && f == 24) e = SP_CLR_LE;
      if (n == 30 && a == 10 && f == 27) e = SP_TEST_LE;
      if (n == 30 && a == 0 && f == 0) e = SP_READ_L;
      check(op == e, $sformatf("F%0d N%0d A%0d", f, n, a));
    end
    finish_tb();
  end
endmodule
