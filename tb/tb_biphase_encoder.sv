// tb_biphase_encoder: drives the encoder the way the transmit control does
// (idle, sync, a random bit string, terminator) and checks the line in every
// half-bit against the biphase-M rules: the driver is off when idle, the
// sync is two bit times high, every bit starts with a transition, a one has
// a second transition in its middle and a zero has none, and the
// terminator holds the level for two bit times.
module tb_biphase_encoder;
  import scc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic half_tick = 1'b0, boundary = 1'b0, data = 1'b0;
  tx_mode_t mode = TX_IDLE;
  logic line_tx, line_oe;
  int checks = 0, failures = 0;

  biphase_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one half-bit: present the inputs, give the half_tick, sample the level
  task automatic half(input tx_mode_t m, input logic bnd, input logic d,
                      output logic lvl, output logic oe);
    mode = m; boundary = bnd; data = d;
    repeat (3) @(posedge clk);
    half_tick = 1'b1;
    @(posedge clk);
    half_tick = 1'b0;
    #1;
    lvl = line_tx;
    oe  = line_oe;
  endtask

  logic lvl, oe, prev, first;
  logic [39:0] bits;

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 4; rep++) begin
      bits = {$urandom, $urandom};
      if (rep == 0) bits = '0;
      if (rep == 1) bits = '1;
      half(TX_IDLE, 0, 0, lvl, oe);
      check(!oe && !lvl, "idle: driver off, line low");
      for (int h = 0; h < 4; h++) begin
        half(TX_SYNC, 0, 0, lvl, oe);
        check(oe && lvl, "sync high");
      end
      prev = 1'b1;
      for (int b = 0; b < 40; b++) begin
        half(TX_DATA, 1, bits[b], lvl, oe);
        check(oe && lvl != prev, "transition at bit boundary");
        first = lvl;
        half(TX_DATA, 0, bits[b], lvl, oe);
        check(oe && ((lvl != first) == bits[b]), "mid-bit transition only for a one");
        prev = lvl;
      end
      for (int h = 0; h < 4; h++) begin
        half(TX_TERM, 0, 0, lvl, oe);
        check(oe && lvl == prev, "terminator holds the level");
      end
      half(TX_IDLE, 0, 0, lvl, oe);
      check(!oe, "driver released after terminator");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
