// tx_mux: chooses the bit the encoder sends, from the bit count held in the
// common counter. A response is sent as
//   bit 0   A = 1 (SCC to driver)
//   bit 1   B (0 short response, 1 with data)
//   bit 2   C (0 = 16-bit, 1 = 24-bit word)
//   bit 3   D (state of the L enable flip-flop)
//   bit 4   L (any L line, gated by L enable)
//   bit 5   Q
//   bit 6   X
//   bit 7.. data, most significant bit first, from the top of the read
//           register or the L register (bit 23 for 24 bits, bit 15 for 16)
// Purely combinational. The A, B, C, D and L fields follow the original design's
// response format; the position of Q and X after them and the bit order of
// the data are this design's choices.
module tx_mux
  import scc_pkg::*;
(
  input  logic [CNT_W-1:0]  count,
  input  resp_t             resp,
  input  logic [DATA_W-1:0] read_q,
  input  logic [DATA_W-1:0] lreg_q,
  output logic              bit_out
);

  logic [DATA_W-1:0] src;

  always_comb begin
    src = resp.sel_l ? lreg_q : read_q;
    unique case (count)
      CNT_W'(0): bit_out = DIR_TO_DRV;
      CNT_W'(1): bit_out = resp.b;
      CNT_W'(2): bit_out = resp.c;
      CNT_W'(3): bit_out = resp.d;
      CNT_W'(4): bit_out = resp.l;
      CNT_W'(5): bit_out = resp.q;
      CNT_W'(6): bit_out = resp.x;
      default:   bit_out = resp.c ? src[DATA_W-1] : src[SHORT_W-1];
    endcase
  end

endmodule
