// scc_top: serial crate controller (SCC) for a CAMAC crate on a party line.
//
// Up to 16 crate controllers share one twisted pair with a single driver,
// which is the only master. The driver sends a message (sync, three control
// bits, a command or a data word, terminator) in polar biphase-M at
// 5 Mbit/s; the addressed controller carries out one CAMAC dataway cycle and
// answers on the same pair with Q, X, the polled L and the L enable state,
// and the read word for a read. A second pair carries the prompt L signal.
//
// Data path, as in the block diagram of the original unit:
//   line_rx -> biphase_decoder -> control-bit, crate-address, command and
//              write shift registers (sipo_register)
//   dataway R -> read register, L lines -> L register (piso_register)
//              -> tx_mux -> biphase_encoder -> line_tx / line_oe
// Control: rx_control and tx_control both step by the common bit counter;
// special_decoder decodes the commands for the controller itself;
// camac_cycle makes the dataway cycle; lam_control holds L enable and
// inhibit and drives the prompt L pair.
//
// The line receiver and driver (RS-422A) and the 10 MHz crystal are outside
// this RTL: line_rx, line_tx and line_oe are single-ended logic signals and
// clk is a 40 MHz clock from which the 10 MHz transmit enable is divided.
// Synchronous active-high reset. A 16-bit read takes about 11.5 us from the
// driver's sync to the end of the response, with the default 1 us dataway
// cycle.
module scc_top
  import scc_pkg::*;
(
  input  logic               clk,          // 40 MHz
  input  logic               rst,
  input  logic [CRATE_W-1:0] my_crate,     // crate address switch
  // party line (after the RS-422A receiver / before the driver)
  input  logic               line_rx,
  output logic               line_tx,
  output logic               line_oe,
  // prompt L pair
  output logic               l_bus_drive,
  // CAMAC dataway
  output logic [NUM_L-1:0]   dw_n,
  output logic [SA_W-1:0]    dw_a,
  output logic [F_W-1:0]     dw_f,
  output logic [DATA_W-1:0]  dw_w,
  input  logic [DATA_W-1:0]  dw_r,
  output logic               dw_b,
  output logic               dw_s1,
  output logic               dw_s2,
  output logic               dw_z,
  output logic               dw_c,
  output logic               dw_i,
  input  logic               dw_q,
  input  logic               dw_x,
  input  logic [NUM_L-1:0]   dw_l,
  // status
  output logic               selected
);

  // decoder
  logic bit_strobe, bit_data, gap_strobe, gap_level;
  // counter
  logic [CNT_W-1:0] count;
  logic cnt_full, rx_clr, rx_inc, tx_clr, tx_inc;
  // receive registers
  logic shift_hdr, shift_crate, shift_fna, shift_w;
  logic [HDR_LEN-1:0] hdr_q;
  logic [CRATE_W-1:0] crate_q;
  logic [FNA_W-1:0]   fna_bits;
  fna_t               fna_q;
  logic [DATA_W-1:0]  w_q;
  special_op_t        sp_op;
  // L side
  logic d_state, l_any, set_le, clr_le, set_i, clr_i, load_l;
  // dataway cycle
  logic cyc_start, cyc_write, cyc_done, cyc_q, cyc_x, cyc_busy, r_strobe;
  cycle_kind_t cyc_kind;
  logic [DATA_W-1:0] cyc_wdata;
  // transmit
  logic tx_start, tx_done, tx_busy, half_tick, boundary, shift_data, tx_bit;
  tx_mode_t tx_mode;
  resp_t resp;
  logic [DATA_W-1:0] read_q, lreg_q;

  assign fna_q = fna_t'(fna_bits);

  biphase_decoder u_dec (
    .clk, .rst, .line_rx,
    .bit_strobe, .bit_data, .gap_strobe, .gap_level
  );

  bit_counter u_cnt (
    .clk, .rst,
    .clr(rx_clr | tx_clr), .inc(rx_inc | tx_inc),
    .count, .full(cnt_full)
  );

  sipo_register #(.WIDTH(HDR_LEN)) u_hdr_reg (
    .clk, .rst, .shift(shift_hdr), .din(bit_data), .q(hdr_q));
  sipo_register #(.WIDTH(CRATE_W)) u_crate_reg (
    .clk, .rst, .shift(shift_crate), .din(bit_data), .q(crate_q));
  sipo_register #(.WIDTH(FNA_W)) u_cmd_reg (
    .clk, .rst, .shift(shift_fna), .din(bit_data), .q(fna_bits));
  sipo_register #(.WIDTH(DATA_W)) u_write_reg (
    .clk, .rst, .shift(shift_w), .din(bit_data), .q(w_q));

  special_decoder u_special (.fna(fna_q), .op(sp_op));

  lam_control u_lam (
    .clk, .rst, .set_le, .clr_le, .set_i, .clr_i,
    .l_lines(dw_l), .d_state, .l_any, .l_bus_drive, .inhibit(dw_i)
  );

  rx_control u_rx (
    .clk, .rst, .my_crate,
    .bit_strobe, .gap_strobe, .gap_level,
    .count, .cnt_full, .cnt_clr(rx_clr), .cnt_inc(rx_inc),
    .shift_hdr, .shift_crate, .shift_fna, .shift_w,
    .hdr_q, .crate_q, .fna_q, .w_q, .sp_op,
    .d_state, .l_any, .inhibit(dw_i),
    .set_le, .clr_le, .set_i, .clr_i, .load_l,
    .cyc_start, .cyc_kind, .cyc_write, .cyc_wdata, .cyc_done, .cyc_q, .cyc_x,
    .tx_start, .resp, .tx_done, .selected
  );

  camac_cycle u_cyc (
    .clk, .rst, .start(cyc_start), .kind(cyc_kind), .fna(fna_q),
    .write(cyc_write), .wdata(cyc_wdata),
    .dw_n, .dw_a, .dw_f, .dw_w, .dw_b, .dw_s1, .dw_s2, .dw_z, .dw_c,
    .dw_q, .dw_x,
    .r_strobe, .q(cyc_q), .x(cyc_x), .busy(cyc_busy), .done(cyc_done)
  );

  piso_register #(.WIDTH(DATA_W)) u_read_reg (
    .clk, .rst, .load(r_strobe), .d(dw_r),
    .shift(shift_data & ~resp.sel_l), .q(read_q));
  piso_register #(.WIDTH(DATA_W)) u_l_reg (
    .clk, .rst, .load(load_l), .d({{(DATA_W-NUM_L){1'b0}}, dw_l}),
    .shift(shift_data & resp.sel_l), .q(lreg_q));

  tx_control u_txc (
    .clk, .rst, .start(tx_start), .resp,
    .count, .cnt_clr(tx_clr), .cnt_inc(tx_inc),
    .half_tick, .mode(tx_mode), .boundary,
    .shift_data, .busy(tx_busy), .done(tx_done)
  );

  tx_mux u_mux (.count, .resp, .read_q, .lreg_q, .bit_out(tx_bit));

  biphase_encoder u_enc (
    .clk, .rst, .half_tick, .mode(tx_mode), .boundary, .data(tx_bit),
    .line_tx, .line_oe
  );

  // only one of the two controls may use the common counter at a time
  a_counter_owner: assert property (@(posedge clk) disable iff (rst)
    !((rx_clr | rx_inc) && (tx_clr | tx_inc)));
  // the transmitter only runs while the receive side waits for it
  a_tx_after_cycle: assert property (@(posedge clk) disable iff (rst)
    !(tx_busy && cyc_busy));

endmodule
