// special_decoder: decodes the special commands addressed to the crate
// controller itself (station numbers 28 and 30), the job of the
// programmable logic array in the original unit. Combinational.
//   N28 A8  F26  Z, dataway initialise      N30 A10 F26  set L enable
//   N28 A9  F26  C, dataway clear           N30 A10 F24  clear L enable
//   N30 A9  F26  set inhibit                N30 A10 F27  test L enable
//   N30 A9  F24  clear inhibit              N30 A0  F0   read all 23 L lines
//   N30 A9  F27  test inhibit
// Any other code at N28 or N30 is SP_UNKNOWN; every other station is
// SP_NONE, an ordinary dataway cycle. That special commands exist, that they
// read all 23 L lines with one command and that they read the L enable
// state follows the original design; the codes are this design's, chosen after the
// usual CAMAC crate-controller conventions the original controller keeps to.
module special_decoder
  import scc_pkg::*;
(
  input  fna_t        fna,
  output special_op_t op
);

  always_comb begin
    op = SP_NONE;
    if (fna.n == N_CC_28) begin
      op = SP_UNKNOWN;
      if (fna.f == 5'd26 && fna.a == 4'd8) op = SP_Z;
      if (fna.f == 5'd26 && fna.a == 4'd9) op = SP_C;
    end else if (fna.n == N_CC_30) begin
      op = SP_UNKNOWN;
      if (fna.a == 4'd9) begin
        if (fna.f == 5'd26) op = SP_SET_I;
        if (fna.f == 5'd24) op = SP_CLR_I;
        if (fna.f == 5'd27) op = SP_TEST_I;
      end
      if (fna.a == 4'd10) begin
        if (fna.f == 5'd26) op = SP_SET_LE;
        if (fna.f == 5'd24) op = SP_CLR_LE;
        if (fna.f == 5'd27) op = SP_TEST_LE;
      end
      if (fna.a == 4'd0 && fna.f == 5'd0) op = SP_READ_L;
    end
  end

endmodule
