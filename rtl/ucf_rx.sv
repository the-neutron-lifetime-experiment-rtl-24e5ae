// ucf_rx: receive side of one UCF link end.
//
// Initialization (one decoded word per clock when `rx_valid`):
//   LOCK     - counts consecutive words whose two low bytes are the K
//              characters DC, BC. After LOCK_WORDS of them the receiver is
//              locked; after LOCK_TIMEOUT words without lock it pulses
//              `xcvr_reset` (reset of clock recovery in a transceiver).
//   POLARITY - expects x"4567BCDC". A word whose K bytes are right but whose
//              data bytes are wrong or undecodable means swapped polarity: the
//              receiver toggles `rx_polarity` and restarts the whole link
//              (`restart`), as it also does when the far side is already idle
//              or keeps sending alignment words for LOCK_TIMEOUT words.
//              POL_WORDS clean polarity words set `pol_ok`.
//   CONST    - after x"DCDCBCDC" the next word is the far side's constant.
//   UP       - `link_up`; frames are decoded. An alignment word here means the
//              far side restarted: the receiver restarts too.
// Frames: TCS start x"A6DCA6DC", USP start {id,5C,BC,DC}, end x"A3DCBCDC"
// (closes the TCS frame if one is open, otherwise the highest open USP
// frame), veto words {16 bits,5C,DC} four per veto frame (bits 63:48 first).
// Idle, filler and clock-correction words are ignored. Bytes that arrive as
// the fill character come out with keep low and data zero.
// Each stream (TCS, USP) holds its newest data word back until the next word
// or the end of frame arrives, so `last` is set on the final data word.
// Outputs are registered; `usp_o[c].valid` is a one-clock pulse per word.
module ucf_rx
  import ucf_pkg::*;
#(
  parameter int N_USP        = 2,
  parameter int LOCK_WORDS   = 4,
  parameter int POL_WORDS    = 4,
  parameter int LOCK_TIMEOUT = 200
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               reinit,       // user request: repeat initialization
  input  logic               rx_valid,
  input  lword_t             rx_word,
  input  logic [3:0]         rx_err,
  output logic               rx_polarity,
  output logic               xcvr_reset,
  output logic               restart,      // restart both state machines of this end
  output logic               locked,
  output logic               pol_ok,
  output logic               link_up,
  output logic [31:0]        constant_o,
  output axis_t              tcs_o,
  output axis_t              usp_o [N_USP],
  output logic [VETO_BITS-1:0] veto_remote,
  output logic [15:0]        err_count
);

  typedef enum logic [2:0] {R_LOCK, R_POLARITY, R_CONST, R_UP} rx_state_e;
  rx_state_e   st_q;
  int unsigned cnt_q, tmo_q;

  logic        tcs_active_q;
  logic [N_USP-1:0] open_q;
  axis_t       tcs_hold_q, usp_hold_q;
  int          usp_hold_ch_q;
  logic [1:0]  veto_grp_q;
  logic [VETO_BITS-1:16] veto_acc_q;

  logic any_open;
  int   cur;
  always_comb begin
    any_open = |open_q;
    cur = 0;
    for (int c = 0; c < N_USP; c++) if (open_q[c]) cur = c;
  end

  // Word classification.
  logic is_low_ok, is_fill_data, is_data, has_err;
  always_comb begin
    has_err   = |rx_err;
    is_low_ok = (rx_word.data[15:0] == 16'hBCDC) && (rx_word.k[1:0] == 2'b11) && !rx_err[0] && !rx_err[1];
    is_fill_data = 1'b1;
    for (int i = 0; i < 4; i++)
      if (rx_word.k[i] && rx_word.data[8*i +: 8] != K_FILL) is_fill_data = 1'b0;
    is_data = !has_err && is_fill_data;
  end

  function automatic axis_t to_beat(input lword_t w);
    axis_t b;
    b.valid = 1'b1;
    b.last  = 1'b0;
    for (int i = 0; i < 4; i++) begin
      b.keep[i] = ~w.k[i];
      b.data[8*i +: 8] = w.k[i] ? 8'h00 : w.data[8*i +: 8];
    end
    return b;
  endfunction

  always_ff @(posedge clk) begin
    // defaults: single-cycle pulses
    tcs_o      <= AXIS_IDLE;
    for (int c = 0; c < N_USP; c++) usp_o[c] <= AXIS_IDLE;
    xcvr_reset <= 1'b0;
    restart    <= 1'b0;
    if (rst || reinit || restart) begin
      st_q         <= R_LOCK;
      cnt_q        <= 0;
      tmo_q        <= 0;
      locked       <= 1'b0;
      pol_ok       <= 1'b0;
      link_up      <= 1'b0;
      tcs_active_q <= 1'b0;
      open_q       <= '0;
      tcs_hold_q   <= AXIS_IDLE;
      usp_hold_q   <= AXIS_IDLE;
      usp_hold_ch_q <= 0;
      veto_grp_q   <= '0;
      veto_acc_q   <= '0;
      if (rst) begin
        rx_polarity <= 1'b0;
        constant_o  <= '0;
        veto_remote <= '0;
        err_count   <= '0;
      end
      if (reinit) restart <= 1'b1;
    end else if (rx_valid) begin
      unique case (st_q)
        R_LOCK: begin
          tmo_q <= tmo_q + 1;
          if (tmo_q + 1 >= LOCK_TIMEOUT) begin
            tmo_q <= 0; xcvr_reset <= 1'b1;
          end
          if (is_low_ok) begin
            cnt_q <= cnt_q + 1;
            if (cnt_q + 1 >= LOCK_WORDS) begin
              st_q <= R_POLARITY; locked <= 1'b1; cnt_q <= 0; tmo_q <= 0;
            end
          end else cnt_q <= 0;
        end
        R_POLARITY: begin
          if (lw_eq(rx_word, W_POLARITY) && !has_err) begin
            cnt_q <= cnt_q + 1;
            if (cnt_q + 1 >= POL_WORDS) pol_ok <= 1'b1;
          end else if (lw_eq(rx_word, W_CONSTHDR) && !has_err) begin
            if (pol_ok) st_q <= R_CONST;
            else restart <= 1'b1;           // missed the polarity phase
          end else if (lw_eq(rx_word, W_ALIGN) && !has_err) begin
            // far side still aligning; if it stays so for LOCK_TIMEOUT words
            // it restarted after our polarity check and waits for us
            tmo_q <= tmo_q + 1;
            if (tmo_q + 1 >= LOCK_TIMEOUT) restart <= 1'b1;
          end else if (lw_eq(rx_word, W_IDLE) && !has_err) begin
            restart <= 1'b1;                // far side already running
          end else if (is_low_ok) begin
            rx_polarity <= ~rx_polarity;    // non-comma bytes corrupted
            restart <= 1'b1;
          end else begin
            restart <= 1'b1;                // lost alignment
          end
        end
        R_CONST: begin
          constant_o <= rx_word.data;
          link_up <= 1'b1;
          st_q <= R_UP;
        end
        default: begin // R_UP
          if (has_err) begin
            err_count <= err_count + 16'd1;
          end else if (is_data) begin
            if (tcs_active_q) begin
              if (tcs_hold_q.valid) tcs_o <= tcs_hold_q;
              tcs_hold_q <= to_beat(rx_word);
            end else if (any_open) begin
              if (usp_hold_q.valid) usp_o[usp_hold_ch_q] <= usp_hold_q;
              usp_hold_q <= to_beat(rx_word);
              usp_hold_ch_q <= cur;
            end
          end else if (lw_eq(rx_word, W_TCS_SOF)) begin
            tcs_active_q <= 1'b1;
          end else if (lw_eq(rx_word, W_EOF)) begin
            if (tcs_active_q) begin
              tcs_active_q <= 1'b0;
              if (tcs_hold_q.valid) begin
                axis_t b;
                b = tcs_hold_q;
                b.last = 1'b1;
                tcs_o <= b;
              end
              tcs_hold_q <= AXIS_IDLE;
            end else if (any_open) begin
              open_q[cur] <= 1'b0;
              if (usp_hold_q.valid && usp_hold_ch_q == cur) begin
                axis_t b;
                b = usp_hold_q;
                b.last = 1'b1;
                usp_o[cur] <= b;
                usp_hold_q <= AXIS_IDLE;
              end
            end
          end else if (rx_word.k == 4'b0111 && rx_word.data[23:0] == USP_SOF_LOW) begin
            if (int'(rx_word.data[31:24]) < N_USP) begin
              for (int c = 0; c < N_USP; c++)
                if (int'(rx_word.data[31:24]) == c) open_q[c] <= 1'b1;
              // a nested frame: the held word of the interrupted frame is not its last
              if (usp_hold_q.valid) begin
                usp_o[usp_hold_ch_q] <= usp_hold_q;
                usp_hold_q <= AXIS_IDLE;
              end
            end
          end else if (rx_word.k == 4'b0011 && rx_word.data[15:0] == VETO_LOW) begin
            veto_grp_q <= veto_grp_q + 2'd1;
            if (veto_grp_q == 2'd3) veto_remote <= {veto_acc_q[VETO_BITS-1:16], rx_word.data[31:16]};
            else veto_acc_q[VETO_BITS-1-16*veto_grp_q -: 16] <= rx_word.data[31:16];
          end else if (lw_eq(rx_word, W_ALIGN)) begin
            restart <= 1'b1;                // far side restarted
          end
        end
      endcase
    end
  end

endmodule
