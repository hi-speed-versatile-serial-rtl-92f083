// camac_dataway_model: behavioural CAMAC crate for testbenches. Stations
// 1..NPRESENT answer with X = 1. Each station has 16 subaddresses of 24-bit
// storage: a read function (F0-F7) puts the stored word on R, a write
// function (F16-F23) stores W at the leading edge of S1, both with Q = 1.
// F8 (test L) answers Q with the station's L line; other control
// functions answer Q = 1. Z clears the storage. Nothing is acted on in the first clocks, before the
// controller's reset has taken effect. The L lines are driven by
// the testbench through l_set. Only a testbench uses this model.
module camac_dataway_model #(
  parameter int NPRESENT = 20
)(
  input  logic        clk,
  input  logic [22:0] dw_n,
  input  logic [3:0]  dw_a,
  input  logic [4:0]  dw_f,
  input  logic [23:0] dw_w,
  output logic [23:0] dw_r,
  input  logic        dw_b,
  input  logic        dw_s1,
  input  logic        dw_s2,
  input  logic        dw_z,
  input  logic        dw_c,
  output logic        dw_q,
  output logic        dw_x,
  output logic [22:0] dw_l,
  input  logic [22:0] l_set
);
  logic [23:0] mem [1:23][0:15];
  int station;
  logic s1_q;
  int n_writes, n_reads, n_z, n_c;

  initial begin
    for (int n = 1; n <= 23; n++)
      for (int a = 0; a < 16; a++) mem[n][a] = 24'((n << 16) | (a << 8) | 8'h5A);
    n_writes = 0; n_reads = 0; n_z = 0; n_c = 0;
  end

  always_comb begin
    station = 0;
    for (int k = 0; k < 23; k++) if (dw_n[k]) station = k + 1;
  end

  assign dw_l = l_set;
  assign dw_x = station != 0 && station <= NPRESENT;
  always_comb begin
    dw_r = '0;
    dw_q = 1'b0;
    if (station != 0 && station <= NPRESENT) begin
      if (dw_f[4:3] == 2'b00) dw_r = mem[station][dw_a];
      dw_q = (dw_f == 5'd8) ? l_set[station - 1] : 1'b1;
    end
  end

  always @(posedge clk) begin
    s1_q <= dw_s1;
    if (age > 3 && dw_s1 && !s1_q && station != 0 && station <= NPRESENT) begin
      if (dw_f[4:3] == 2'b10) begin mem[station][dw_a] <= dw_w; n_writes++; end
      if (dw_f[4:3] == 2'b00) n_reads++;
    end
  end

  // the controller's outputs are only meaningful once its reset has been
  // clocked in: ignore the first clocks
  int age = 0;
  always @(posedge clk) age <= age + 1;

  logic s2_q;
  always @(posedge clk) begin
    s2_q <= dw_s2;
    if (age > 3 && dw_s2 && !s2_q && dw_z) begin
      n_z++;
      for (int n = 1; n <= 23; n++)
        for (int a = 0; a < 16; a++) mem[n][a] <= '0;
    end
    if (age > 3 && dw_s2 && !s2_q && dw_c) n_c++;
  end
endmodule
