// tx_control: the transmit control of the crate controller.
//
// Timing comes from a half-bit enable, half_tick, made by dividing the
// system clock by HALF_BIT (10 MHz from 40 MHz: the crystal clock of the
// transmitter). On start it sends one response:
//   turnaround  TURN half-bits with the driver off, so that the driver at
//               the other end has released the line
//   sync        4 half-bits high (the 400 ns sync pulse)
//   bits        3 control bits, 4 status bits and, for a data response,
//               16 or 24 data bits; the common bit counter numbers them and
//               the multiplexer picks each bit by that number
//   terminator  4 half-bits with no transition
// then it pulses done. For every half-bit it presents the encoder with the
// mode, whether this is the first (boundary) half of a bit and the bit; the
// encoder takes them on the next half_tick. After each data bit it shifts
// the register the data come from. A 16-bit data response is 27 bit times
// on the line (5.4 us), a short response 11 (2.2 us). The sync, the control
// bits, the 16/24-bit words and the 10 MHz transmit clock follow the
// original design; the turnaround, the terminator shape and the bit counts of the
// status field are this design's choices.
module tx_control
  import scc_pkg::*;
#(
  parameter int unsigned HALF = scc_pkg::HALF_BIT,  // clocks per half-bit
  parameter int unsigned TURN = 2                   // turnaround half-bits
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  resp_t            resp,
  // common bit counter
  input  logic [CNT_W-1:0] count,
  output logic             cnt_clr,
  output logic             cnt_inc,
  // encoder
  output logic             half_tick,
  output tx_mode_t         mode,
  output logic             boundary,
  // data registers
  output logic             shift_data,
  output logic             busy,
  output logic             done
);

  typedef enum logic [2:0] { T_IDLE, T_TURN, T_SYNC, T_BITS, T_TERM } tstate_t;

  localparam int unsigned DW = (HALF > 1) ? $clog2(HALF) : 1;

  tstate_t          st;
  logic [DW-1:0]    div;
  logic [2:0]       hcnt;       // half-bits spent in the current phase
  logic [CNT_W-1:0] last_bit;

  always_comb begin
    unique case ({resp.b, resp.c})
      2'b10:   last_bit = CNT_W'(HDR_LEN + STAT_LEN + SHORT_W - 1);
      2'b11:   last_bit = CNT_W'(HDR_LEN + STAT_LEN + DATA_W - 1);
      default: last_bit = CNT_W'(HDR_LEN + STAT_LEN - 1);
    endcase
  end

  // half-bit enable
  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else     div <= (div == DW'(HALF - 1)) ? '0 : div + 1'b1;
  end
  assign half_tick = (div == DW'(HALF - 1));

  always_comb begin
    unique case (st)
      T_SYNC:  mode = TX_SYNC;
      T_BITS:  mode = TX_DATA;
      T_TERM:  mode = TX_TERM;
      default: mode = TX_IDLE;
    endcase
    boundary   = (st == T_BITS) && hcnt[0] == 1'b0;
    cnt_clr    = half_tick && st == T_SYNC && hcnt == 3'd3;
    cnt_inc    = half_tick && st == T_BITS && hcnt[0] == 1'b1;
    shift_data = cnt_inc && count >= CNT_W'(HDR_LEN + STAT_LEN);
    busy       = (st != T_IDLE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= T_IDLE;
      hcnt <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == T_IDLE) begin
        if (start) begin
          st   <= T_TURN;
          hcnt <= '0;
        end
      end else if (half_tick) begin
        hcnt <= hcnt + 1'b1;
        unique case (st)
          T_TURN: if (hcnt == 3'(TURN - 1)) begin st <= T_SYNC; hcnt <= '0; end
          T_SYNC: if (hcnt == 3'd3)         begin st <= T_BITS; hcnt <= '0; end
          T_BITS: begin
            hcnt <= {2'b00, ~hcnt[0]};
            if (hcnt[0] && count == last_bit) begin st <= T_TERM; hcnt <= '0; end
          end
          T_TERM: if (hcnt == 3'd3)         begin st <= T_IDLE; done <= 1'b1; end
          default: st <= T_IDLE;
        endcase
      end
    end
  end

endmodule
