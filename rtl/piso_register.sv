// piso_register: parallel-load, serial-out shift register, used for the
// read register (loaded from the dataway R lines) and the L register
// (loaded from the 23 L lines). load copies d; shift moves every bit one
// place towards the top, filling with zero. The bit being sent is taken
// from the top by the multiplexer: bit WIDTH-1 for a 24-bit word, bit 15
// for a 16-bit word. load wins over shift. The registers follow the
// original block diagram; the bit order is this design's own.
module piso_register #(
  parameter int unsigned WIDTH = 24
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  input  logic             shift,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {q[WIDTH-2:0], 1'b0};
  end

endmodule
