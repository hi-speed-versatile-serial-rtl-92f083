// tb_camac_cycle: runs read, write, Z and C cycles against a small dataway
// model and checks the strobe timing clock by clock (B for the whole cycle,
// S1 at clocks 16-23, S2 at 32-39, done at 40, i.e. 400/800 ns and a 1 us
// cycle at 40 MHz), the one-hot station line, A, F and W held through the
// cycle, and the Q and X latched from the dataway.
module tb_camac_cycle;
  import scc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, write = 1'b0;
  cycle_kind_t kind = CYC_NAF;
  fna_t fna = '0;
  logic [23:0] wdata = '0, dw_w;
  logic [22:0] dw_n;
  logic [3:0] dw_a;
  logic [4:0] dw_f;
  logic dw_b, dw_s1, dw_s2, dw_z, dw_c, dw_q, dw_x;
  logic r_strobe, q, x, busy, done;
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

  camac_cycle dut (.*);
  always #5 clk = ~clk;
  initial begin #2_000_000; failures++; finish_tb(); end

  // dataway model: Q from A0 of the addressed station, X for stations 1..20
  assign dw_q = (dw_n != '0) && dw_a[0];
  assign dw_x = (dw_n != '0) && (dw_n < (23'(1) << 20));

  int t, nstrobe, ndone;
  int nn;
  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      kind = (k % 10 == 8) ? CYC_Z : (k % 10 == 9) ? CYC_C : CYC_NAF;
      fna.n = 5'($urandom % 32); fna.a = 4'($urandom); fna.f = 5'($urandom);
      write = $urandom % 2; wdata = 24'($urandom);
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      nn = fna.n;
      nstrobe = 0; ndone = 0;
      for (t = 1; t <= 41; t++) begin
        check(dw_b == (t <= 40), "B");
        check(dw_s1 == (kind == CYC_NAF && t >= 16 && t < 24), "S1");
        check(dw_s2 == (t >= 32 && t < 40), "S2");
        check(dw_z == (kind == CYC_Z && t <= 40), "Z");
        check(dw_c == (kind == CYC_C && t <= 40), "C");
        if (t <= 40 && kind == CYC_NAF) begin
          check(dw_n == ((nn >= 1 && nn <= 23) ? (23'(1) << (nn - 1)) : '0), "N line");
          check(dw_a == fna.a && dw_f == fna.f, "A and F");
          check(dw_w == (write ? wdata : '0), "W");
        end
        if (t <= 40 && kind != CYC_NAF) check(dw_n == '0, "no station in Z or C");
        if (r_strobe) nstrobe++;
        if (done) begin ndone++; check(t == 41, "done one clock after the cycle"); end
        @(negedge clk);
      end
      check(ndone == 1, "one done");
      check(nstrobe == (kind == CYC_NAF), "read strobe");
      if (kind == CYC_NAF) begin
        check(q == (nn >= 1 && nn <= 23 && fna.a[0]), "Q");
        check(x == (nn >= 1 && nn <= 20), "X");
      end else check(q && x, "Q and X for Z, C");
    end
    finish_tb();
  end
endmodule
