// tb_biphase_decoder: a behavioural transmitter in the testbench sends
// messages in polar biphase-M (idle low, 400 ns sync high, random bits,
// terminator of two bit times without a transition, idle) with each edge
// moved by up to +-1 clock of jitter. The checks: exactly one high-level gap
// per message, seen during the sync; every bit decoded with its value and
// in order; one gap after the last bit (the terminator); no gap and no
// extra bit inside the message.
module tb_biphase_decoder;
  import scc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic line_rx = 1'b0;
  logic bit_strobe, bit_data, gap_strobe, gap_level;
  int checks = 0, failures = 0;

  biphase_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
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

  // hold the line for n clocks
  task automatic hold(input int n);
    repeat (n) @(negedge clk);
  endtask

  // collect what the decoder reports
  logic [63:0] got;
  int nbits, ngap_hi, ngap, phase;
  logic sync_ok;   // phase 0 idle, 1 in message, 2 after
  always @(posedge clk) if (!rst) begin
    if (bit_strobe && phase == 1) begin
      if (nbits == 0) sync_ok = (ngap == 1 && ngap_hi == 1);
      got[nbits] = bit_data;
      nbits++;
    end
    if (gap_strobe) begin
      ngap++;
      if (gap_level) ngap_hi++;
    end
  end

  int j0, j1;
  logic [63:0] bits;
  int len;

  initial begin
    hold(4);
    rst = 1'b0;
    hold(40);
    for (int m = 0; m < 60; m++) begin
      len  = 1 + ($urandom % 40);
      bits = {$urandom, $urandom};
      if (m == 0) bits = '0;
      if (m == 1) bits = '1;
      ngap = 0; ngap_hi = 0; nbits = 0;
      phase = 0;
      // sync
      line_rx = 1'b1;
      hold(SAMPLES_PER_BIT * 2);
      // decoder has a 3-clock input delay: bits strobed after this point
      phase = 1;
      for (int b = 0; b < len; b++) begin
        j0 = int'($urandom % 3) - 1;       // mid-bit edge jitter
        j1 = int'($urandom % 3) - 1;       // next boundary jitter
        line_rx = ~line_rx;
        hold(HALF_BIT + j0);
        if (bits[b]) line_rx = ~line_rx;
        hold(HALF_BIT - j0 + j1);
      end
      // terminator: no transition for two bits, then idle low
      hold(SAMPLES_PER_BIT * 2);
      line_rx = 1'b0;
      hold(2);
      phase = 2;
      hold(SAMPLES_PER_BIT * 3);
      check(sync_ok, "sync seen as one high gap before the first bit");
      check(nbits == len, $sformatf("bit count %0d expected %0d", nbits, len));
      for (int b = 0; b < len; b++)
        check(got[b] == bits[b], $sformatf("bit %0d", b));
      check(ngap_hi >= 1 && ngap >= 2, "terminator seen as a gap");
      check(ngap <= 3, "no gap inside the message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
