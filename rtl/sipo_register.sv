// sipo_register: serial-in, parallel-out shift register, used for the
// crate-address and mode register, the command (F, N, A) register and the
// write register. A bit enters at the least significant end on each cycle
// with shift high, so a field sent most significant bit first ends up in
// its natural order. Bits pushed past the top are lost. The registers
// follow the original design's block diagram; the bit order is this design's own.
module sipo_register #(
  parameter int unsigned WIDTH = 24
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             shift,
  input  logic             din,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= {q[WIDTH-2:0], din};
  end

endmodule
