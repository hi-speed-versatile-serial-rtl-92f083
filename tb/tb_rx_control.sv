// tb_rx_control: the receive control with the real bit counter, receive
// registers, special command decoder and L logic around it. The testbench
// plays the decoder (sync gap, bit strobes, terminator gap), the dataway
// cycle (done 40 clocks after start, with a chosen Q and X) and the
// transmitter (done 100 clocks after start). Each message is checked for
// what must follow: a dataway cycle or not, with which F, N, A and write
// word, and a response or not, with which type, word length and status.
// Covered: read, control and write commands, the write-data message,
// single-address block read and block write, commands for another crate,
// responses from other crates, messages of a wrong length, and the special
// commands.
module tb_rx_control;
  import scc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] my_crate = 4'd5;
  logic bit_strobe = 0, bit_data = 0, gap_strobe = 0, gap_level = 0;
  logic [5:0] count;
  logic cnt_full, cnt_clr, cnt_inc;
  logic din, shift_hdr, shift_crate, shift_fna, shift_w;
  logic [2:0] hdr_q;
  logic [3:0] crate_q;
  logic [13:0] fna_bits;
  fna_t fna_q;
  logic [23:0] w_q;
  special_op_t sp_op;
  logic d_state, l_any, inhibit, set_le, clr_le, set_i, clr_i, load_l, l_bus_drive;
  logic [22:0] l_lines = 23'h000100;
  logic cyc_start, cyc_write, cyc_done = 0, cyc_q = 0, cyc_x = 0;
  cycle_kind_t cyc_kind;
  logic [23:0] cyc_wdata;
  logic tx_start, tx_done = 0, selected;
  resp_t resp;
  int checks = 0, failures = 0;

  assign fna_q = fna_t'(fna_bits);
  assign din   = bit_data;

  rx_control dut (.*);
  bit_counter u_cnt (.clk, .rst, .clr(cnt_clr), .inc(cnt_inc), .count, .full(cnt_full));
  sipo_register #(.WIDTH(3))  u_h (.clk, .rst, .shift(shift_hdr),   .din, .q(hdr_q));
  sipo_register #(.WIDTH(4))  u_c (.clk, .rst, .shift(shift_crate), .din, .q(crate_q));
  sipo_register #(.WIDTH(14)) u_f (.clk, .rst, .shift(shift_fna),   .din, .q(fna_bits));
  sipo_register #(.WIDTH(24)) u_w (.clk, .rst, .shift(shift_w),     .din, .q(w_q));
  special_decoder u_sp (.fna(fna_q), .op(sp_op));
  lam_control u_lam (.clk, .rst, .set_le, .clr_le, .set_i, .clr_i, .l_lines,
                     .d_state, .l_any, .l_bus_drive, .inhibit);

  always #5 clk = ~clk;
  initial begin #20_000_000; failures++; finish_tb(); end

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

  // ---- models of the dataway cycle and the transmitter ----------------
  logic model_q = 1, model_x = 1;
  int ncyc, ntx;
  cycle_kind_t last_kind;
  fna_t last_fna;
  logic last_write;
  logic [23:0] last_w;
  resp_t last_resp;
  always @(posedge clk) begin
    if (cyc_start) begin
      ncyc++;
      last_kind = cyc_kind; last_fna = fna_q;
      last_write = cyc_write; last_w = cyc_wdata;
      fork begin
        repeat (40) @(posedge clk);
        cyc_q <= model_q; cyc_x <= model_x; cyc_done <= 1'b1;
        @(posedge clk); cyc_done <= 1'b0;
      end join_none
    end
    if (tx_start) begin
      ntx++;
      fork begin
        repeat (100) @(posedge clk);
        last_resp = resp;
        tx_done <= 1'b1;
        @(posedge clk); tx_done <= 1'b0;
      end join_none
    end
  end

  // ---- the decoder side ---------------------------------------------
  task automatic strobe_gap(input logic lvl);
    @(negedge clk); gap_strobe = 1; gap_level = lvl;
    @(negedge clk); gap_strobe = 0;
  endtask
  task automatic send(input logic [63:0] bits, input int len);
    strobe_gap(1'b1);
    repeat (5) @(negedge clk);
    for (int i = len - 1; i >= 0; i--) begin
      bit_strobe = 1; bit_data = bits[i];
      @(negedge clk); bit_strobe = 0;
      repeat (7) @(negedge clk);
    end
    strobe_gap(bits[0]);
    repeat (300) @(negedge clk);          // let the action and response finish
  endtask

  function automatic logic [63:0] cmd(input int crate, input int f, input int n,
                                      input int a, input logic c);
    return {43'b0, 1'b0, 1'b0, c, 4'(crate), 5'(f), 5'(n), 4'(a)};
  endfunction

  // send one message and check the outcome
  task automatic expect_msg(input logic [63:0] bits, input int len, input string what,
                            input int want_cyc, input int want_tx);
    ncyc = 0; ntx = 0;
    send(bits, len);
    check(ncyc == want_cyc, {what, ": dataway cycles"});
    check(ntx == want_tx, {what, ": responses"});
  endtask

  logic [23:0] wd;
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);

    // read F0 N7 A3, 24-bit
    model_q = 1; model_x = 1;
    expect_msg(cmd(5, 0, 7, 3, 1), 21, "read", 1, 1);
    check(last_kind == CYC_NAF && last_fna.f == 0 && last_fna.n == 7 && last_fna.a == 3, "read FNA");
    check(last_resp.b == RESP_DATA && last_resp.c == 1 && !last_resp.sel_l, "read response type");
    check(last_resp.q && last_resp.x, "read Q X");
    check(selected, "selected");
    // block read: short command repeats it
    model_q = 0; model_x = 1;
    expect_msg(64'b010, 3, "block read", 1, 1);
    check(last_fna.f == 0 && last_fna.n == 7 && last_resp.b == RESP_DATA, "block read repeats");
    check(!last_resp.q && last_resp.x, "block read Q X");
    // control F8 (test L) at N2, 16-bit mode
    expect_msg(cmd(5, 8, 2, 0, 0), 21, "control", 1, 1);
    check(last_resp.b == RESP_SHORT && last_resp.c == 0, "control short response");
    // command for another crate: nothing, and deselected
    expect_msg(cmd(6, 0, 7, 3, 1), 21, "other crate", 0, 0);
    check(!selected, "deselected");
    expect_msg(64'b010, 3, "short command while deselected", 0, 0);
    // write F16 N4 A1: no response to the command
    expect_msg(cmd(5, 16, 4, 1, 0), 21, "write command", 0, 0);
    check(selected, "selected by write command");
    // 16-bit write data
    wd = 24'h00BEEF;
    expect_msg({40'b0, 3'b010, 16'hBEEF}, 19, "write data 16", 1, 1);
    check(last_write && last_w == wd && last_fna.f == 16 && last_fna.n == 4, "write word and FNA");
    check(last_resp.b == RESP_SHORT, "write short response");
    // block write, 24-bit data with the same address
    expect_msg({37'b0, 3'b011, 24'hA5C3F0}, 27, "write data 24", 1, 1);
    check(last_w == 24'hA5C3F0 && last_fna.n == 4, "block write word");
    // wrong length: 20 bits of 16-bit data
    expect_msg({37'b0, 3'b010, 20'hFFFFF}, 23, "write data wrong length", 0, 0);
    // short command after a write function: ignored
    expect_msg(64'b010, 3, "short command after write", 0, 0);
    // response of another crate (A = 1): ignored
    expect_msg({37'b0, 3'b111, 7'b0, 16'h1234}, 26, "response from another crate", 0, 0);
    // malformed command: deselects
    expect_msg(cmd(5, 0, 7, 3, 1) >> 1, 20, "short CAMAC command", 0, 0);
    check(!selected, "malformed command deselects");
    // special commands
    expect_msg(cmd(5, 26, 30, 10, 0), 21, "set L enable", 0, 1);
    check(d_state && last_resp.d && last_resp.l, "L enable set, D and L reported");
    expect_msg(cmd(5, 27, 30, 10, 0), 21, "test L enable", 0, 1);
    check(last_resp.q, "test L enable gives Q");
    expect_msg(cmd(5, 0, 30, 0, 0), 21, "read L", 0, 1);
    check(last_resp.b == RESP_DATA && last_resp.c && last_resp.sel_l, "read L response");
    expect_msg(cmd(5, 24, 30, 10, 0), 21, "clear L enable", 0, 1);
    check(!d_state && !last_resp.d && !last_resp.l, "L enable cleared");
    expect_msg(cmd(5, 26, 30, 9, 0), 21, "set inhibit", 0, 1);
    check(inhibit, "inhibit set");
    expect_msg(cmd(5, 27, 30, 9, 0), 21, "test inhibit", 0, 1);
    check(last_resp.q, "test inhibit Q");
    expect_msg(cmd(5, 24, 30, 9, 0), 21, "clear inhibit", 0, 1);
    check(!inhibit, "inhibit cleared");
    expect_msg(cmd(5, 26, 28, 8, 0), 21, "Z", 1, 1);
    check(last_kind == CYC_Z, "Z cycle");
    expect_msg(cmd(5, 26, 28, 9, 0), 21, "C", 1, 1);
    check(last_kind == CYC_C, "C cycle");
    expect_msg(cmd(5, 1, 30, 15, 0), 21, "unknown special", 0, 1);
    check(!last_resp.x && !last_resp.q, "unknown special gives no X");
    finish_tb();
  end
endmodule
