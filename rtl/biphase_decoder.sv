// biphase_decoder: clock recovery, NRZ data and sync detection from the
// biphase-M line (the Data Decoder, Clock Recovery and Sync Detector).
//
// The line is synchronised to the system clock and every change of level is
// an edge pulse. The decoder is a clocked version of the one-shot circuit:
//  * A non-retriggerable window of NONRETRIG cycles (150 ns) is started by an
//    edge when the window is idle; that edge is a bit boundary. An edge that
//    falls inside the window is a mid-bit transition and marks a one. When
//    the window ends the decoder emits bit_strobe with bit_data.
//  * A retriggerable timer restarted by every edge fires gap_strobe once when
//    the line has been still for SYNC_GAP cycles (350 ns). gap_level is the
//    line level at that moment: high while idle means a sync pulse; inside a
//    message the gap is the terminator.
// Each output is a one-cycle pulse; bit_strobe comes NONRETRIG+2 cycles after
// the boundary edge on line_rx. The window lengths are the original design's
// 150 ns and 350 ns; sampling them with a clock is this design's choice.
module biphase_decoder
  import scc_pkg::*;
#(
  parameter int unsigned NONRETRIG = scc_pkg::NONRETRIG_CYC,
  parameter int unsigned SYNC_GAP  = scc_pkg::SYNC_GAP_CYC
)(
  input  logic clk,
  input  logic rst,
  input  logic line_rx,       // asynchronous line from the receiver
  output logic bit_strobe,    // a bit has been decoded
  output logic bit_data,      // its value
  output logic gap_strobe,    // line still for SYNC_GAP cycles
  output logic gap_level      // line level during that gap
);

  localparam int unsigned NR_W  = $clog2(NONRETRIG + 1);
  localparam int unsigned GAP_W = $clog2(SYNC_GAP + 1);

  logic [1:0]       sync_q;
  logic             prev;
  logic             edge_p;
  logic [NR_W-1:0]  nr_cnt;     // remaining cycles of the 150 ns window
  logic             mid_seen;
  logic [GAP_W-1:0] gap_cnt;

  assign edge_p = sync_q[1] ^ prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q     <= '0;
      prev       <= 1'b0;
      nr_cnt     <= '0;
      mid_seen   <= 1'b0;
      gap_cnt    <= '0;
      bit_strobe <= 1'b0;
      bit_data   <= 1'b0;
      gap_strobe <= 1'b0;
      gap_level  <= 1'b0;
    end else begin
      sync_q     <= {sync_q[0], line_rx};
      prev       <= sync_q[1];
      bit_strobe <= 1'b0;
      gap_strobe <= 1'b0;

      // clock recovery and data: the non-retriggerable window
      if (nr_cnt == '0) begin
        if (edge_p) begin
          nr_cnt   <= NR_W'(NONRETRIG);
          mid_seen <= 1'b0;
        end
      end else begin
        if (edge_p) mid_seen <= 1'b1;
        nr_cnt <= nr_cnt - 1'b1;
        if (nr_cnt == NR_W'(1)) begin
          bit_strobe <= 1'b1;
          bit_data   <= mid_seen | edge_p;
        end
      end

      // sync / terminator: the retriggerable timer
      if (edge_p) begin
        gap_cnt <= '0;
      end else if (gap_cnt != GAP_W'(SYNC_GAP)) begin
        gap_cnt <= gap_cnt + 1'b1;
        if (gap_cnt == GAP_W'(SYNC_GAP - 1)) begin
          gap_strobe <= 1'b1;
          gap_level  <= sync_q[1];
        end
      end
    end
  end

endmodule
