// tb_tx_control: starts short, 16-bit and 24-bit responses and records, at
// every half-bit enable, what the transmit control hands the encoder. The
// record must be: 2 idle half-bits (turnaround), 4 sync half-bits, two
// half-bits per bit (boundary first) for 7 + 0/16/24 bits, 4 terminator
// half-bits, then done. It also checks the half-bit enable period (4
// clocks, 10 MHz at 40 MHz), the bit counter steps, the data register
// shifts and the total time on the line.
module tb_tx_control;
  import scc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  resp_t resp = '0;
  logic [5:0] count;
  logic cnt_clr, cnt_inc, half_tick, boundary, shift_data, busy, done, full;
  tx_mode_t mode;
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

  tx_control dut (.*);
  bit_counter u_cnt (.clk, .rst, .clr(cnt_clr), .inc(cnt_inc), .count, .full);
  always #5 clk = ~clk;
  initial begin #2_000_000; failures++; finish_tb(); end

  // recorder
  tx_mode_t rec_mode [$];
  logic     rec_bnd  [$];
  int nshift, ninc, nclr, last_tick, bad_period, t_start, t_done;
  int cyc;
  always @(posedge clk) begin
    cyc++;
    if (!rst && busy && half_tick) begin
      rec_mode.push_back(mode);
      rec_bnd.push_back(boundary);
      if (last_tick != 0 && cyc - last_tick != 4) begin bad_period++; $display("period %0d at %0d", cyc - last_tick, cyc); end
    end
    if (half_tick && busy) last_tick = cyc;
    if (start) last_tick = 0;
    if (shift_data) nshift++;
    if (cnt_inc) ninc++;
    if (cnt_clr) nclr++;
    if (done) t_done = cyc;
  end

  int nbits, ndata, i;
  initial begin
    cyc = 0; last_tick = 0; bad_period = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 12; k++) begin
      resp = resp_t'($urandom);
      ndata = resp.b ? (resp.c ? 24 : 16) : 0;
      nbits = 7 + ndata;
      rec_mode.delete(); rec_bnd.delete();
      nshift = 0; ninc = 0; nclr = 0; t_done = 0;
      repeat ($urandom % 5) @(negedge clk);
      start = 1'b1; @(negedge clk); start = 1'b0; t_start = cyc;
      wait (done); @(negedge clk);
      check(rec_mode.size() == 2 + 4 + 2 * nbits + 4, $sformatf("half-bits %0d", rec_mode.size()));
      i = 0;
      for (int h = 0; h < 2; h++, i++) check(rec_mode[i] == TX_IDLE, "turnaround");
      for (int h = 0; h < 4; h++, i++) check(rec_mode[i] == TX_SYNC, "sync");
      for (int h = 0; h < 2 * nbits; h++, i++)
        check(rec_mode[i] == TX_DATA && rec_bnd[i] == (h % 2 == 0), "data half-bit");
      for (int h = 0; h < 4; h++, i++) check(rec_mode[i] == TX_TERM, "terminator");
      check(ninc == nbits, "bit counter steps");
      check(nclr == 1, "bit counter cleared once");
      check(nshift == ndata, "data register shifts");
      check(t_done - t_start <= 4 * (2 + 4 + 2 * nbits + 4) + 4, "response time");
      check(!busy, "idle after done");
    end
    check(bad_period == 0, "10 MHz half-bit enable");
    finish_tb();
  end
endmodule
