// camac_cycle: generates one CAMAC dataway cycle.
// A start pulse begins a cycle of kind CYC_NAF (station line N(n), A, F
// and, for a write, W driven), CYC_Z or CYC_C (no station, Z or C held).
// Busy B is held for the whole cycle. Strobe S1 is high from T_S1_ON to
// T_S1_OFF clock cycles after start and S2 from T_S2_ON to T_S2_OFF; the
// cycle ends T_END cycles after start with a one-cycle done pulse. Q and X
// are latched at the end of S1, where r_strobe also tells the read register
// to take the R lines. N, A, F and W are registered and held stable from
// one clock after start to the end of the cycle. The defaults give the
// usual 1 us CAMAC cycle at 40 MHz (S1 at 400-600 ns, S2 at 800-1000 ns).
// The original design only says the receive control generates the CAMAC cycle;
// the timing comes from the CAMAC dataway standard, not from the original design.
module camac_cycle
  import scc_pkg::*;
#(
  parameter int unsigned T_S1_ON  = 16,
  parameter int unsigned T_S1_OFF = 24,
  parameter int unsigned T_S2_ON  = 32,
  parameter int unsigned T_S2_OFF = 40,
  parameter int unsigned T_END    = 40
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  cycle_kind_t       kind,
  input  fna_t              fna,
  input  logic              write,     // drive W during the cycle
  input  logic [DATA_W-1:0] wdata,
  // dataway
  output logic [NUM_L-1:0]  dw_n,      // N1..N23 station lines
  output logic [SA_W-1:0]   dw_a,
  output logic [F_W-1:0]    dw_f,
  output logic [DATA_W-1:0] dw_w,
  output logic              dw_b,
  output logic              dw_s1,
  output logic              dw_s2,
  output logic              dw_z,
  output logic              dw_c,
  input  logic              dw_q,
  input  logic              dw_x,
  // results
  output logic              r_strobe,  // take R now
  output logic              q,
  output logic              x,
  output logic              busy,
  output logic              done
);

  localparam int unsigned TW = $clog2(T_END + 1);

  logic [TW-1:0] t;
  cycle_kind_t   kind_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      t        <= '0;
      kind_q   <= CYC_NAF;
      dw_n     <= '0;
      dw_a     <= '0;
      dw_f     <= '0;
      dw_w     <= '0;
      q        <= 1'b0;
      x        <= 1'b0;
      done     <= 1'b0;
      r_strobe <= 1'b0;
    end else begin
      done     <= 1'b0;
      r_strobe <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          t      <= TW'(1);
          kind_q <= kind;
          dw_n   <= '0;
          if (kind == CYC_NAF && fna.n >= N_W'(1) && fna.n <= N_W'(NUM_L))
            dw_n[fna.n - 1'b1] <= 1'b1;
          dw_a   <= (kind == CYC_NAF) ? fna.a : '0;
          dw_f   <= (kind == CYC_NAF) ? fna.f : '0;
          dw_w   <= (kind == CYC_NAF && write) ? wdata : '0;
        end
      end else begin
        t <= t + 1'b1;
        if (t == TW'(T_S1_OFF)) begin
          q        <= (kind_q == CYC_NAF) ? dw_q : 1'b1;
          x        <= (kind_q == CYC_NAF) ? dw_x : 1'b1;
          r_strobe <= (kind_q == CYC_NAF);
        end
        if (t == TW'(T_END)) begin
          busy <= 1'b0;
          done <= 1'b1;
          dw_n <= '0;
          dw_a <= '0;
          dw_f <= '0;
          dw_w <= '0;
        end
      end
    end
  end

  assign dw_b  = busy;
  assign dw_s1 = busy && kind_q == CYC_NAF && t >= TW'(T_S1_ON) && t < TW'(T_S1_OFF);
  assign dw_s2 = busy && t >= TW'(T_S2_ON) && t < TW'(T_S2_OFF);
  assign dw_z  = busy && kind_q == CYC_Z;
  assign dw_c  = busy && kind_q == CYC_C;

endmodule
