// bit_counter: the common 64-state bit counter shared by the receive and the
// transmit control. Both controls read its state to decide what each bit
// is. clr forces zero, inc advances by one; clr wins. The counter saturates
// at 63 so that an over-long message cannot wrap round and look short. The
// 64 states follow the original design; saturation is this design's choice.
module bit_counter
  import scc_pkg::*;
#(
  parameter int unsigned WIDTH = scc_pkg::CNT_W
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             full     // count is at its last state
);

  assign full = &count;

  always_ff @(posedge clk) begin
    if (rst || clr)      count <= '0;
    else if (inc && !full) count <= count + 1'b1;
  end

endmodule
