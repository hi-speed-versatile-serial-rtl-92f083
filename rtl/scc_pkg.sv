// scc_pkg: constants and types shared by the serial crate controller (SCC).
//
// The line runs at 5 Mbit/s, a 200 ns bit, with a transition at every bit
// boundary and a further one in the middle of a "one" (polar biphase-M). A
// message on the party line is
//     SYNC | A | B | C | message | T
// where SYNC is a 400 ns positive pulse, A is the direction (0 = driver to
// SCC, 1 = SCC to driver), B the type and C the word length (0 = 16 bits,
// 1 = 24 bits). The bit rate, the sync width, the three control bits, the
// 16/24-bit word lengths, the 23 L lines and the 16 crates per line follow
// the original design. The system clock of 40 MHz (8 samples per bit), the field
// order inside a message, the 4-bit crate field, the order of the status bits
// in a response and the special command codes are this design's choices.
package scc_pkg;

  // ---- timing, in system clock cycles -----------------------------------
  // One bit is SAMPLES_PER_BIT clock cycles; the transmitter steps on a
  // half-bit enable, which at 40 MHz is the original design's 10 MHz.
  localparam int unsigned SAMPLES_PER_BIT = 8;            // 200 ns at 40 MHz
  localparam int unsigned HALF_BIT        = SAMPLES_PER_BIT / 2;
  // Decoder windows, as fractions of a bit: 150 ns and 350 ns (Fig. 6).
  localparam int unsigned NONRETRIG_CYC   = (SAMPLES_PER_BIT * 3) / 4;
  localparam int unsigned SYNC_GAP_CYC    = (SAMPLES_PER_BIT * 7) / 4;

  // ---- message fields ----------------------------------------------------
  localparam int unsigned CRATE_W  = 4;   // 16 crates on one line
  localparam int unsigned F_W      = 5;   // CAMAC function F1..F16
  localparam int unsigned N_W      = 5;   // CAMAC station number
  localparam int unsigned SA_W     = 4;   // CAMAC subaddress A1..A8
  localparam int unsigned FNA_W    = F_W + N_W + SA_W;
  localparam int unsigned CMD_LEN  = CRATE_W + FNA_W;     // 18 message bits
  localparam int unsigned DATA_W   = 24;  // full CAMAC word
  localparam int unsigned SHORT_W  = 16;  // optimised 16-bit transfer
  localparam int unsigned NUM_L    = 23;  // L lines in a crate
  localparam int unsigned HDR_LEN  = 3;   // A, B, C
  localparam int unsigned STAT_LEN = 4;   // D, L, Q, X
  localparam int unsigned CNT_W    = 6;   // common 64-state bit counter

  // Control bit A
  localparam logic DIR_TO_SCC   = 1'b0;
  localparam logic DIR_TO_DRV   = 1'b1;
  // Control bit B in a command: CAMAC command, or data / short command
  localparam logic TYPE_CAMAC   = 1'b0;
  localparam logic TYPE_DATA    = 1'b1;
  // Control bit B in a response: short (status only) or with read data
  localparam logic RESP_SHORT   = 1'b0;
  localparam logic RESP_DATA    = 1'b1;

  // CAMAC function classes (standard CAMAC numbering)
  function automatic logic f_is_read(input logic [F_W-1:0] f);
    return f[4:3] == 2'b00;              // F0..F7
  endfunction
  function automatic logic f_is_write(input logic [F_W-1:0] f);
    return f[4:3] == 2'b10;              // F16..F23
  endfunction

  typedef struct packed {
    logic [F_W-1:0]  f;
    logic [N_W-1:0]  n;
    logic [SA_W-1:0] a;
  } fna_t;

  // Station numbers that address the crate controller itself.
  localparam logic [N_W-1:0] N_CC_28 = 5'd28;
  localparam logic [N_W-1:0] N_CC_30 = 5'd30;

  typedef enum logic [3:0] {
    SP_NONE,      // not a special command: ordinary dataway cycle
    SP_Z,         // N28 A8 F26: dataway initialise Z
    SP_C,         // N28 A9 F26: dataway clear C
    SP_SET_I,     // N30 A9 F26: set inhibit
    SP_CLR_I,     // N30 A9 F24: clear inhibit
    SP_TEST_I,    // N30 A9 F27: Q = inhibit
    SP_SET_LE,    // N30 A10 F26: set L enable
    SP_CLR_LE,    // N30 A10 F24: clear L enable
    SP_TEST_LE,   // N30 A10 F27: Q = L enable
    SP_READ_L,    // N30 A0 F0 : read the 23 L lines, 24-bit response
    SP_UNKNOWN    // other N28/N30 code: no action, X = 0
  } special_op_t;

  typedef enum logic [1:0] {
    TX_IDLE,      // driver off
    TX_SYNC,      // 400 ns positive sync pulse
    TX_DATA,      // biphase-M bits
    TX_TERM       // terminator: 400 ns without a transition
  } tx_mode_t;

  // Kind of dataway cycle
  typedef enum logic [1:0] {
    CYC_NAF,      // addressed cycle with N, A, F
    CYC_Z,        // unaddressed cycle with Z
    CYC_C         // unaddressed cycle with C
  } cycle_kind_t;

  // What the transmitter is asked to send
  typedef struct packed {
    logic       b;        // RESP_SHORT or RESP_DATA
    logic       c;        // word length of the data
    logic       sel_l;    // data come from the L register
    logic       d;        // state of the L enable flip-flop
    logic       l;        // any L, gated by L enable
    logic       q;
    logic       x;
  } resp_t;

endpackage
