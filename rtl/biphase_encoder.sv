// biphase_encoder: polar biphase-M line encoder with sync and terminator.
//
// The transmit control steps through half-bits on a 10 MHz enable
// (half_tick) and presents, for each half-bit, the line mode, whether the
// half-bit is the first (boundary) half of a bit, and the data bit. On each
// half_tick this block computes the line level for that half-bit:
//   TX_DATA : toggle at every bit boundary, and toggle in the middle of the
//             bit when the bit is a one (the J-K toggle of the encoder, fed
//             with "data or divide-by-2 phase");
//   TX_SYNC : force the line high (two bit times give the 400 ns sync);
//   TX_TERM : hold the level, so no transition occurs for the terminator;
//   TX_IDLE : line low and the driver disabled.
// line_oe is the message gate of the line driver. Outputs are registered and
// change one clock after half_tick. The biphase-M rule, the 10 MHz toggle
// clock and the message gate follow the original design; the sync and terminator
// generation, which it does not show, are this design's own.
module biphase_encoder
  import scc_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     half_tick,   // 10 MHz enable, one per half-bit
  input  tx_mode_t mode,        // what the current half-bit is
  input  logic     boundary,    // current half-bit is the first half of a bit
  input  logic     data,        // bit being sent
  output logic     line_tx,     // line level to the driver
  output logic     line_oe      // driver enable (message gate)
);

  always_ff @(posedge clk) begin
    if (rst) begin
      line_tx <= 1'b0;
      line_oe <= 1'b0;
    end else if (half_tick) begin
      unique case (mode)
        TX_IDLE: begin line_tx <= 1'b0;                 line_oe <= 1'b0; end
        TX_SYNC: begin line_tx <= 1'b1;                 line_oe <= 1'b1; end
        TX_TERM: begin line_tx <= line_tx;              line_oe <= 1'b1; end
        TX_DATA: begin
          if (boundary || data) line_tx <= ~line_tx;
          line_oe <= 1'b1;
        end
        default: begin line_tx <= 1'b0;                 line_oe <= 1'b0; end
      endcase
    end
  end

endmodule
