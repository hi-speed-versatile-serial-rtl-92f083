// tb_party_line16: sixteen crate controllers, the most one line serves, on
// one party line with one behavioural driver. Every crate is addressed in
// turn with a 16-bit read and a 16-bit write and read-back; only the
// addressed crate may answer, its data must come from its own crate, and
// two drivers must never be on the line together. The testbench also
// measures the mean time of a 16-bit read transaction (target: about
// 10 us) and the rate of a single-address 16-bit block read, and checks
// that a block read word is cheaper than a full read.
module tb_party_line16;
  import scc_pkg::*;

  localparam int NCR = 16;
  localparam real NS_PER_CLK = 25.0;

  logic clk = 1'b0, rst = 1'b1;
  logic drv_tx = 1'b0, drv_oe = 1'b0;
  logic line;
  logic [NCR-1:0] tx, oe, lbus, sel;
  logic [22:0] dw_n [NCR];
  logic [3:0]  dw_a [NCR];
  logic [4:0]  dw_f [NCR];
  logic [23:0] dw_w [NCR], dw_r [NCR];
  logic [NCR-1:0] dw_b, dw_s1, dw_s2, dw_z, dw_c, dw_i, dw_q, dw_x;
  logic [22:0] dw_l [NCR];
  logic [22:0] l_none = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign line = (drv_oe & drv_tx) | (|(oe & tx));

  for (genvar g = 0; g < NCR; g++) begin : g_crate
    scc_top u_scc (
      .clk, .rst, .my_crate(4'(g)),
      .line_rx(line), .line_tx(tx[g]), .line_oe(oe[g]),
      .l_bus_drive(lbus[g]),
      .dw_n(dw_n[g]), .dw_a(dw_a[g]), .dw_f(dw_f[g]), .dw_w(dw_w[g]),
      .dw_r(dw_r[g]), .dw_b(dw_b[g]), .dw_s1(dw_s1[g]), .dw_s2(dw_s2[g]),
      .dw_z(dw_z[g]), .dw_c(dw_c[g]), .dw_i(dw_i[g]),
      .dw_q(dw_q[g]), .dw_x(dw_x[g]), .dw_l(dw_l[g]),
      .selected(sel[g])
    );
    camac_dataway_model u_crate (
      .clk, .dw_n(dw_n[g]), .dw_a(dw_a[g]), .dw_f(dw_f[g]), .dw_w(dw_w[g]),
      .dw_r(dw_r[g]), .dw_b(dw_b[g]), .dw_s1(dw_s1[g]), .dw_s2(dw_s2[g]),
      .dw_z(dw_z[g]), .dw_c(dw_c[g]), .dw_q(dw_q[g]), .dw_x(dw_x[g]),
      .dw_l(dw_l[g]), .l_set(l_none)
    );
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog");
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

  // ---- collisions on the line ------------------------------------------
  int collisions;
  always @(posedge clk) if (!rst && ($countones({drv_oe, oe}) > 1)) collisions++;

  // ---- driver: transmit ------------------------------------------------
  int cyc;
  always @(posedge clk) cyc++;

  task automatic hold(input int n);
    repeat (n) @(negedge clk);
  endtask

  // bits[len-1] is sent first
  task automatic send(input logic [63:0] bits, input int len);
    drv_oe = 1'b1; drv_tx = 1'b1;             // sync
    hold(2 * SAMPLES_PER_BIT);
    for (int i = len - 1; i >= 0; i--) begin
      drv_tx = ~drv_tx;
      hold(HALF_BIT);
      if (bits[i]) drv_tx = ~drv_tx;
      hold(HALF_BIT);
    end
    hold(2 * SAMPLES_PER_BIT);                // terminator
    drv_oe = 1'b0; drv_tx = 1'b0;
  endtask

  // ---- driver: receive -------------------------------------------------
  logic [63:0] rx_bits;
  int rx_len;
  int t_resp_end;
  // waits up to `timeout` clocks for a response; rx_len = -1 if none
  task automatic receive(input int timeout);
    int waited;
    logic s_prev, s1, s2;
    rx_len = -1; rx_bits = '0; waited = 0;
    hold(1);
    while (line == 1'b0 && waited < timeout) begin hold(1); waited++; end
    if (line == 1'b0) return;
    // sync: must stay high for about two bit times
    waited = 0;
    while (line == 1'b1 && waited < 40) begin hold(1); waited++; end
    check(waited >= 2 * SAMPLES_PER_BIT - 2 && waited <= 2 * SAMPLES_PER_BIT + 2, "sync width");
    // now just after the first bit boundary
    s_prev = 1'b1;
    rx_len = 0;
    hold(1);
    forever begin
      s1 = line; hold(HALF_BIT);
      s2 = line; hold(HALF_BIT);
      if (s1 == s_prev) break;              // no boundary transition: terminator
      rx_bits = {rx_bits[62:0], s1 != s2};
      rx_len++;
      s_prev = s2;
      if (rx_len > 40) break;
    end
    // terminator then release
    waited = 0;
    while (oe != '0 && waited < 40) begin hold(1); waited++; end
    t_resp_end = cyc;
    check(oe == '0, "driver released after the terminator");
  endtask

  function automatic logic [63:0] cmd(input int crate, input int f, input int n,
                                      input int a, input logic c);
    return {43'b0, 1'b0, 1'b0, c, 4'(crate), 5'(f), 5'(n), 4'(a)};
  endfunction


  // which controllers drove the line during the last response
  logic [NCR-1:0] talked;
  always @(posedge clk) talked <= talked | oe;

  int t0, t_read_sum, n_reads, t_blk0, t_blk;
  logic [15:0] w;
  logic [15:0] wr [NCR];
  initial begin
    talked = '0; t_read_sum = 0; n_reads = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    hold(50);
    // a 16-bit read from every crate: station c+1, subaddress c
    for (int c = 0; c < NCR; c++) begin
      talked = '0;
      t0 = cyc;
      send(cmd(c, 0, c + 1, c, 0), 21);
      receive(200);
      t_read_sum += t_resp_end - t0; n_reads++;
      check(rx_len == 23, $sformatf("crate %0d answered", c));
      check(talked == (NCR'(1) << c), $sformatf("only crate %0d drove the line", c));
      check(sel == (NCR'(1) << c), $sformatf("only crate %0d selected", c));
      check(rx_bits[15:0] == 16'(((c + 1) << 16) | (c << 8) | 8'h5A), $sformatf("crate %0d data %h", c, rx_bits[15:0]));
      check(rx_bits[17:16] == 2'b11, "Q and X");
      hold(16);
    end
    // a 16-bit write to every crate, then read every crate back
    for (int c = 0; c < NCR; c++) begin
      wr[c] = 16'($urandom);
      send(cmd(c, 16, 3, 7, 0), 21);
      receive(150);
      check(rx_len == -1, "write command unanswered");
      send({40'b0, 3'b010, wr[c]}, 19);
      receive(200);
      check(rx_len == 7 && rx_bits[1:0] == 2'b11, $sformatf("crate %0d write acknowledged", c));
      hold(16);
    end
    for (int c = NCR - 1; c >= 0; c--) begin
      talked = '0;
      send(cmd(c, 0, 3, 7, 0), 21);
      receive(200);
      check(rx_len == 23 && rx_bits[15:0] == wr[c], $sformatf("crate %0d read back", c));
      check(talked == (NCR'(1) << c), "only the addressed crate answered");
      hold(16);
    end
    // single-address block read of 16 words from crate 9
    send(cmd(9, 0, 3, 7, 0), 21);
    receive(200);
    hold(16);
    t_blk0 = cyc;
    for (int k = 0; k < 16; k++) begin
      send(64'b010, 3);
      receive(200);
      check(rx_len == 23 && rx_bits[15:0] == wr[9], "block read word");
      hold(16);
    end
    t_blk = cyc - t_blk0;
    hold(50);
    check(collisions == 0, "never two drivers on the line");
    $display("16-bit read transaction, mean over %0d crates: %0.2f us",
             n_reads, t_read_sum * NS_PER_CLK / 1000.0 / n_reads);
    $display("16-bit block read: %0.2f us per word, %0.1f kwords/s",
             t_blk * NS_PER_CLK / 1000.0 / 16, 16.0e6 / (t_blk * NS_PER_CLK));
    check(t_read_sum * NS_PER_CLK / n_reads <= 12_500.0, "16-bit read in about 10 us");
    check(t_blk / 16 < t_read_sum / n_reads, "block read word faster than a full read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
