// rx_control: the receive control of the crate controller.
//
// It waits for a sync (a 350 ns gap while the line is high), clears the
// common bit counter and then, for every decoded bit, uses the bit count to
// steer the bit: bits 0-2 into the control-bit register (A, B, C), later
// bits of a CAMAC command (B = 0) into the crate-address register and the
// command register, later bits of a data message (B = 1) into the write
// register. The next 350 ns gap is the terminator. The message is then
// judged by its control bits and its length:
//   A = 1                        a response from a crate: ignored
//   B = 0, 18 bits               CAMAC command: the crate is selected when
//                                its address matches, else deselected.
//                                A write function waits for its data; any
//                                other function is carried out at once
//   B = 1, no bits               short command: repeat the stored command
//                                (single-address block read or control)
//   B = 1, 16 or 24 bits (by C)  write data for the stored write function
//                                (single-address block write)
// Anything else is dropped without a response; a malformed CAMAC command
// also deselects the crate. A command is carried out either as a special
// command (station 28 or 30) or as a dataway cycle, and then a response is
// handed to the transmit control: data (Q, X, L, D and the word) after a
// read, status only after a write or control. No response follows the
// CAMAC command of a write. After its own response the control ignores the
// line for SYNC_GAP cycles so that the tail of its own terminator is not
// taken for a sync. One command is handled at a time.
// The message layout, the block-transfer rules and the rule that a write
// command is not answered follow the original protocol description; the
// length checks, the deselection rules and the hold-off are this design's.
module rx_control
  import scc_pkg::*;
#(
  parameter int unsigned SYNC_GAP = scc_pkg::SYNC_GAP_CYC
)(
  input  logic               clk,
  input  logic               rst,
  input  logic [CRATE_W-1:0] my_crate,   // crate address switch
  // decoder
  input  logic               bit_strobe,
  input  logic               gap_strobe,
  input  logic               gap_level,
  // common bit counter
  input  logic [CNT_W-1:0]   count,
  input  logic               cnt_full,
  output logic               cnt_clr,
  output logic               cnt_inc,
  // receive registers (their data input is the decoded bit)
  output logic               shift_hdr,
  output logic               shift_crate,
  output logic               shift_fna,
  output logic               shift_w,
  input  logic [HDR_LEN-1:0] hdr_q,      // {A, B, C}
  input  logic [CRATE_W-1:0] crate_q,
  input  fna_t               fna_q,
  input  logic [DATA_W-1:0]  w_q,
  // special command decode of fna_q
  input  special_op_t        sp_op,
  // L side
  input  logic               d_state,
  input  logic               l_any,
  input  logic               inhibit,
  output logic               set_le,
  output logic               clr_le,
  output logic               set_i,
  output logic               clr_i,
  output logic               load_l,
  // dataway cycle
  output logic               cyc_start,
  output cycle_kind_t        cyc_kind,
  output logic               cyc_write,
  output logic [DATA_W-1:0]  cyc_wdata,
  input  logic               cyc_done,
  input  logic               cyc_q,
  input  logic               cyc_x,
  // transmit control
  output logic               tx_start,
  output resp_t              resp,
  input  logic               tx_done,
  // status
  output logic               selected
);

  typedef enum logic [2:0] {
    R_IDLE, R_RECV, R_JUDGE, R_CYCLE, R_TX, R_HOLD
  } rstate_t;

  localparam int unsigned HW = $clog2(SYNC_GAP + 1);

  rstate_t             st;
  logic                mode_c;     // word length of the selected command
  logic                data_c;     // word length of the last write data
  logic [HW-1:0]       hold;
  logic [CNT_W-1:0]    len;
  logic                hA, hB, hC;
  logic                wlen_ok;
  logic                acted;      // action of R_CYCLE started
  logic                tx_start_q;

  assign {hA, hB, hC} = hdr_q;
  assign len          = count - CNT_W'(HDR_LEN);
  assign wlen_ok      = hC ? (len == CNT_W'(DATA_W)) : (len == CNT_W'(SHORT_W));

  // bit steering
  always_comb begin
    cnt_inc     = (st == R_RECV) && bit_strobe;
    shift_hdr   = cnt_inc && count < CNT_W'(HDR_LEN);
    shift_crate = cnt_inc && count >= CNT_W'(HDR_LEN) && !hB
                  && count < CNT_W'(HDR_LEN + CRATE_W);
    shift_fna   = cnt_inc && count >= CNT_W'(HDR_LEN + CRATE_W) && !hB
                  && count < CNT_W'(HDR_LEN + CMD_LEN);
    shift_w     = cnt_inc && count >= CNT_W'(HDR_LEN) && hB;
    cnt_clr     = (st == R_IDLE) && gap_strobe && gap_level;
    cyc_wdata   = data_c ? w_q : {{(DATA_W-SHORT_W){1'b0}}, w_q[SHORT_W-1:0]};
    cyc_write   = f_is_write(fna_q.f);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= R_IDLE;
      selected  <= 1'b0;
      mode_c    <= 1'b0;
      data_c    <= 1'b0;
      hold      <= '0;
      cyc_start <= 1'b0;
      cyc_kind  <= CYC_NAF;
      tx_start  <= 1'b0;
      resp      <= '0;
      acted     <= 1'b0;
      tx_start_q <= 1'b0;
      set_le    <= 1'b0;
      clr_le    <= 1'b0;
      set_i     <= 1'b0;
      clr_i     <= 1'b0;
      load_l    <= 1'b0;
    end else begin
      cyc_start <= 1'b0;
      tx_start  <= 1'b0;
      set_le    <= 1'b0;
      clr_le    <= 1'b0;
      set_i     <= 1'b0;
      clr_i     <= 1'b0;
      load_l    <= 1'b0;
      unique case (st)
        R_IDLE:
          if (gap_strobe && gap_level) st <= R_RECV;

        R_RECV:
          // the terminator; a second gap cannot come before it
          if (gap_strobe) st <= R_JUDGE;

        R_JUDGE: begin
          st <= R_IDLE;
          if (count >= CNT_W'(HDR_LEN) && !cnt_full && hA == DIR_TO_SCC) begin
            if (hB == TYPE_CAMAC) begin
              if (len == CNT_W'(CMD_LEN) && crate_q == my_crate) begin
                selected <= 1'b1;
                mode_c   <= hC;
                if (sp_op != SP_NONE || !f_is_write(fna_q.f))
                  st <= R_CYCLE;           // carry out now
              end else begin
                selected <= 1'b0;
              end
            end else if (len == '0) begin
              if (selected && !f_is_write(fna_q.f)) st <= R_CYCLE;
            end else if (wlen_ok) begin
              data_c <= hC;
              if (selected && f_is_write(fna_q.f) && sp_op == SP_NONE)
                st <= R_CYCLE;
            end
          end
          acted <= 1'b0;
        end

        R_CYCLE: begin
          // first cycle in this state: start the action
          if (!acted) begin
            acted      <= 1'b1;
            resp.b     <= RESP_SHORT;
            resp.c     <= mode_c;
            resp.sel_l <= 1'b0;
            resp.q     <= 1'b1;
            resp.x     <= 1'b1;
            unique case (sp_op)
              SP_NONE:    begin cyc_start <= 1'b1; cyc_kind <= CYC_NAF;
                                resp.b <= f_is_read(fna_q.f) ? RESP_DATA : RESP_SHORT; end
              SP_Z:       begin cyc_start <= 1'b1; cyc_kind <= CYC_Z; end
              SP_C:       begin cyc_start <= 1'b1; cyc_kind <= CYC_C; end
              SP_SET_I:   set_i  <= 1'b1;
              SP_CLR_I:   clr_i  <= 1'b1;
              SP_TEST_I:  resp.q <= inhibit;
              SP_SET_LE:  set_le <= 1'b1;
              SP_CLR_LE:  clr_le <= 1'b1;
              SP_TEST_LE: resp.q <= d_state;
              SP_READ_L:  begin load_l <= 1'b1; resp.b <= RESP_DATA;
                                resp.c <= 1'b1; resp.sel_l <= 1'b1; end
              default:    begin resp.q <= 1'b0; resp.x <= 1'b0; end
            endcase
            if (sp_op != SP_NONE && sp_op != SP_Z && sp_op != SP_C) begin
              st <= R_TX;
              tx_start <= 1'b1;
            end
          end else if (cyc_done) begin
            if (sp_op == SP_NONE) begin
              resp.q <= cyc_q;
              resp.x <= cyc_x;
            end
            st       <= R_TX;
            tx_start <= 1'b1;
          end
        end

        R_TX:
          if (tx_done) begin
            st   <= R_HOLD;
            hold <= '0;
          end

        R_HOLD: begin
          hold <= hold + 1'b1;
          if (hold == HW'(SYNC_GAP)) st <= R_IDLE;
        end

        default: st <= R_IDLE;
      endcase
      // L and D are taken as the response starts, after any change of the
      // L enable flip-flop made by the command itself
      tx_start_q <= tx_start;
      if (tx_start_q) begin
        resp.d <= d_state;
        resp.l <= l_any;
      end
    end
  end

endmodule
