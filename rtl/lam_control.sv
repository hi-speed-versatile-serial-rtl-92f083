// lam_control: the L (look-at-me) side of the crate controller.
// It holds the L enable flip-flop and the inhibit flip-flop, both set and
// cleared by special commands, and forms
//   l_any  = L enable and any of the 23 L lines,
// which is both the L bit of every response (polled L) and the drive for
// the separate prompt L pair (l_bus_drive). d_state is the L enable state
// reported as the D bit. The flip-flops are registered; the outputs follow
// the L lines combinationally. Set wins over clear. Reset clears L enable
// and inhibit. The L enable gating, the prompt L pair and the D bit follow
// the original design; the inhibit flip-flop and the reset values are this
// design's.
module lam_control
  import scc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             set_le,
  input  logic             clr_le,
  input  logic             set_i,
  input  logic             clr_i,
  input  logic [NUM_L-1:0] l_lines,    // L1..L23 from the dataway
  output logic             d_state,    // L enable flip-flop
  output logic             l_any,      // polled L status
  output logic             l_bus_drive,// prompt L line driver input
  output logic             inhibit     // dataway I
);

  always_ff @(posedge clk) begin
    if (rst) begin
      d_state <= 1'b0;
      inhibit <= 1'b0;
    end else begin
      if (set_le)      d_state <= 1'b1;
      else if (clr_le) d_state <= 1'b0;
      if (set_i)       inhibit <= 1'b1;
      else if (clr_i)  inhibit <= 1'b0;
    end
  end

  assign l_any       = d_state & (|l_lines);
  assign l_bus_drive = l_any;

endmodule
