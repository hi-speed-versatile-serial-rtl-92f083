// tb_scc_top: end-to-end test of the crate controller on a party line.
//
// Two controllers (crates 3 and 12) share one line with a behavioural
// driver written in this testbench, and each has a behavioural CAMAC crate
// behind it. The driver encodes its messages in biphase-M itself (sync 2
// bit times high, 8 clocks per bit, terminator of 2 bit times, then
// release), and decodes the responses by sampling the line at a quarter and
// three quarters of each bit, independently of the RTL decoder. Every
// transaction is checked for the response (or its absence), its control
// bits, its status bits and its data, and the crate contents afterwards.
// The line is modelled as a wired bus; two drivers on at once is a failure.
// The transaction time of a 16-bit read is measured and compared with the
// target of about 10 us. Each mechanism is counted and must occur.
module tb_scc_top;
  import scc_pkg::*;

  localparam int NCR = 2;
  localparam logic [3:0] CRATE [NCR] = '{4'd3, 4'd12};
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
  logic [22:0] l_set [NCR];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // party line: idle low, any enabled driver pulls it to its level
  assign line = (drv_oe & drv_tx) | (|(oe & tx));

  for (genvar g = 0; g < NCR; g++) begin : g_crate
    scc_top u_scc (
      .clk, .rst, .my_crate(CRATE[g]),
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
      .dw_l(dw_l[g]), .l_set(l_set[g])
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

  // mechanism counters
  int n_read16, n_read24, n_write16, n_write24, n_ctrl, n_blkread, n_blkwrite;
  int n_noresp_write, n_deselect, n_special, n_readl, n_prompt_l, n_polled_l;
  int n_z, n_c, n_inhibit, n_noX;

  // one command with its response; checks the response header
  task automatic transact(input logic [63:0] bits, input int len,
                          input int want_len, input logic want_b, input logic want_c);
    send(bits, len);
    receive(200);
    check(rx_len == want_len, $sformatf("response length %0d, expected %0d", rx_len, want_len));
    if (want_len > 0 && rx_len == want_len) begin
      check(rx_bits[want_len-1] == 1'b1, "A = 1 in a response");
      check(rx_bits[want_len-2] == want_b, "B of the response");
      check(rx_bits[want_len-3] == want_c, "C of the response");
    end
    hold(2 * SAMPLES_PER_BIT);
  endtask

  // status fields of the last response of length len
  function automatic logic [3:0] stat(input int len);   // {D, L, Q, X}
    return 4'(rx_bits >> (len - 7));
  endfunction
  function automatic logic [23:0] word(input int len);
    return 24'(rx_bits);
  endfunction

  int t0, tr;
  logic [23:0] w;
  initial begin
    l_set[0] = '0; l_set[1] = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    hold(50);

    // ---- 16-bit read, crate 3, N5 A2: timed ----
    t0 = cyc;
    transact(cmd(3, 0, 5, 2, 0), 21, 23, RESP_DATA, 1'b0);
    tr = t_resp_end - t0;
    $display("16-bit read transaction: %0d clocks = %0.2f us", tr, tr * NS_PER_CLK / 1000.0);
    check(tr * NS_PER_CLK <= 12_500.0, "16-bit read in about 10 us");
    check(word(23)[15:0] == 16'h025A, "16-bit read data");
    check(stat(23) == 4'b0011, "read Q X, no L");
    n_read16++;

    // ---- 24-bit read, crate 12, N7 A15 ----
    transact(cmd(12, 0, 7, 15, 1), 21, 31, RESP_DATA, 1'b1);
    check(word(31) == 24'h070F5A, "24-bit read data");
    n_read24++;
    // the other crate must have been deselected
    check(!g_crate[0].u_scc.selected && g_crate[1].u_scc.selected, "selection moves");
    n_deselect++;

    // ---- block read: short command repeats N7 A15 in crate 12 ----
    for (int k = 0; k < 3; k++) begin
      t0 = cyc;
      transact(64'b011, 3, 31, RESP_DATA, 1'b1);
      check(word(31) == 24'h070F5A, "block read data");
      n_blkread++;
    end
    $display("block read repetition: %0d clocks = %0.2f us", t_resp_end - t0,
             (t_resp_end - t0) * NS_PER_CLK / 1000.0);

    // ---- 24-bit write, crate 3, F16 N9 A4: command unanswered, then data ----
    send(cmd(3, 16, 9, 4, 1), 21);
    receive(150);
    check(rx_len == -1, "no response to a write command");
    n_noresp_write++;
    w = 24'hC0FFEE;
    transact({37'b0, 3'b011, w}, 27, 7, RESP_SHORT, 1'b1);
    check(stat(7) == 4'b0011, "write Q X");
    check(g_crate[0].u_crate.mem[9][4] == w, "24-bit word written");
    n_write24++;
    // block write: three more words to the same address
    for (int k = 0; k < 3; k++) begin
      w = 24'($urandom);
      transact({37'b0, 3'b011, w}, 27, 7, RESP_SHORT, 1'b1);
      check(g_crate[0].u_crate.mem[9][4] == w, "block write word");
      n_blkwrite++;
    end
    // 16-bit write
    send(cmd(3, 16, 9, 5, 0), 21);
    receive(150);
    check(rx_len == -1, "no response to a write command");
    transact({40'b0, 3'b010, 16'h1234}, 19, 7, RESP_SHORT, 1'b0);
    check(g_crate[0].u_crate.mem[9][5] == 24'h001234, "16-bit word written");
    n_write16++;
    // read it back
    transact(cmd(3, 0, 9, 4, 1), 21, 31, RESP_DATA, 1'b1);
    check(word(31) == g_crate[0].u_crate.mem[9][4], "read back");

    // ---- control F8 (test L) on N4 with L4 set, L enable still off ----
    l_set[0] = 23'h000008;
    transact(cmd(3, 8, 4, 0, 0), 21, 7, RESP_SHORT, 1'b0);
    check(stat(7) == 4'b0011, "test L: Q from the module, polled L off while disabled");
    check(lbus == '0, "prompt L off while L enable is clear");
    n_ctrl++;
    // absent station: X = 0
    transact(cmd(3, 0, 22, 0, 0), 21, 23, RESP_DATA, 1'b0);
    check(stat(23) == 4'b0000, "absent station: no Q, no X");
    n_noX++;

    // ---- special commands ----
    transact(cmd(3, 26, 30, 10, 0), 21, 7, RESP_SHORT, 1'b0);     // set L enable
    check(stat(7) == 4'b1111, "D and polled L after set L enable");
    check(lbus == 2'b01, "prompt L from crate 3");
    n_special++; n_prompt_l++; n_polled_l++;
    transact(cmd(3, 27, 30, 10, 0), 21, 7, RESP_SHORT, 1'b0);     // test L enable
    check(stat(7)[1], "test L enable Q");
    transact(cmd(3, 0, 30, 0, 0), 21, 31, RESP_DATA, 1'b1);       // read L lines
    check(word(31) == 24'h000008, "read 23 L lines");
    n_readl++;
    transact(cmd(3, 24, 30, 10, 0), 21, 7, RESP_SHORT, 1'b0);     // clear L enable
    check(stat(7)[3:2] == 2'b00 && lbus == '0, "L enable cleared");
    transact(cmd(3, 26, 30, 9, 0), 21, 7, RESP_SHORT, 1'b0);      // set inhibit
    check(dw_i == 2'b01, "inhibit on the dataway");
    transact(cmd(3, 27, 30, 9, 0), 21, 7, RESP_SHORT, 1'b0);      // test inhibit
    check(stat(7)[1], "test inhibit Q");
    transact(cmd(3, 24, 30, 9, 0), 21, 7, RESP_SHORT, 1'b0);      // clear inhibit
    check(dw_i == 2'b00, "inhibit cleared");
    n_inhibit++;
    transact(cmd(12, 26, 28, 9, 0), 21, 7, RESP_SHORT, 1'b0);     // C in crate 12
    check(g_crate[1].u_crate.n_c == 1, "C cycle");
    n_c++;
    transact(cmd(12, 26, 28, 8, 0), 21, 7, RESP_SHORT, 1'b0);     // Z in crate 12
    check(g_crate[1].u_crate.n_z == 1 && g_crate[1].u_crate.mem[7][15] == 0, "Z cycle");
    check(g_crate[0].u_crate.mem[9][5] == 24'h001234, "Z only in crate 12");
    n_z++;
    // command for a crate that is not on the line: no response
    send(cmd(9, 0, 1, 0, 0), 21);
    receive(150);
    check(rx_len == -1 && sel == '0, "absent crate: no response, none selected");

    hold(100);
    check(collisions == 0, "never two drivers on the line");
    $display("mechanisms: read16=%0d read24=%0d write16=%0d write24=%0d control=%0d",
             n_read16, n_read24, n_write16, n_write24, n_ctrl);
    $display("  block read=%0d block write=%0d unanswered write command=%0d deselect=%0d",
             n_blkread, n_blkwrite, n_noresp_write, n_deselect);
    $display("  special=%0d read L=%0d prompt L=%0d polled L=%0d Z=%0d C=%0d inhibit=%0d no X=%0d",
             n_special, n_readl, n_prompt_l, n_polled_l, n_z, n_c, n_inhibit, n_noX);
    check(n_read16 > 0 && n_read24 > 0 && n_write16 > 0 && n_write24 > 0 && n_ctrl > 0,
          "every transfer kind ran");
    check(n_blkread > 0 && n_blkwrite > 0 && n_noresp_write > 0 && n_deselect > 0,
          "block transfers and addressing ran");
    check(n_special > 0 && n_readl > 0 && n_prompt_l > 0 && n_polled_l > 0 && n_z > 0
          && n_c > 0 && n_inhibit > 0 && n_noX > 0, "every special mechanism ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
