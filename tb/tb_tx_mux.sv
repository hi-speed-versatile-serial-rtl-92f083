// tb_tx_mux: for random responses and data words, walks the bit count
// through a whole response and compares the chosen bit with the response
// layout written out in the testbench (A, B, C, D, L, Q, X, then the data
// word most significant bit first).
module tb_tx_mux;
  import scc_pkg::*;
  logic [5:0] count;
  resp_t resp;
  logic [23:0] read_q, lreg_q;
  logic bit_out;
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

  tx_mux dut (.*);
  initial begin #1_000_000; failures++; finish_tb(); end

  logic [30:0] expect_bits;
  int n;
  initial begin
    for (int k = 0; k < 200; k++) begin
      resp = resp_t'($urandom);
      n = resp.c ? 24 : 16;
      expect_bits = '0;
      expect_bits[30:24] = {1'b1, resp.b, resp.c, resp.d, resp.l, resp.q, resp.x};
      lreg_q = 24'($urandom);
      read_q = 24'($urandom);
      if (resp.c) expect_bits[23:0] = resp.sel_l ? lreg_q : read_q;
      else        expect_bits[23:8] = resp.sel_l ? lreg_q[15:0] : read_q[15:0];
      // data bits: the register shifts one place per bit sent
      for (int i = 0; i < 7 + n; i++) begin
        count = 6'(i);
        #1;
        check(bit_out == expect_bits[30 - i], $sformatf("bit %0d", i));
        if (i >= 7) begin
          lreg_q = lreg_q << 1;
          read_q = read_q << 1;
        end
      end
    end
    finish_tb();
  end
endmodule
