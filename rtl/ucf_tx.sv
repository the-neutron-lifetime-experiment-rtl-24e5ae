// ucf_tx: transmit side of one UCF link end.
//
// Initialization: after reset, after `restart` or after link loss the
// transmitter sends the alignment word until its own receiver has locked,
// then the polarity word until its receiver has seen a clean polarity pattern
// (each for at least CYCLES_MIN words), then the constant header x"DCDCBCDC",
// the user constant, and enters normal operation.
//
// Normal operation sends one 32-bit word per clock, chosen in this order:
//   1. TCS (trigger/timing protocol): start of frame x"A6DCA6DC", data words,
//      end of frame x"A3DCBCDC". A TCS frame may start in any word slot, so
//      its latency from tvalid to start of frame is always one clock.
//   2. Veto frame: four words {veto[63:48],5C,DC} .. {veto[15:0],5C,DC}, sent
//      whenever `veto_local` changes.
//   3. End of a finished USP frame.
//   4. Clock correction word x"FCFCBCDC" every CC_INTERVAL words (slave only,
//      since only the master receiver has an elastic buffer).
//   5. Start of a USP frame {id,5C,BC,DC}: a channel may open a frame when its
//      index is above every open channel, so frames nest by priority.
//   6. A data word of the highest open USP channel.
//   7. The activation pattern x"01FCBCDC" (idle, and as filler inside a frame
//      whose source has no data ready).
// Bytes of a data word without keep are sent as the K28.0 fill character.
// A USP channel vetoed by the far side (`veto_remote`) is neither started nor
// served until the veto is released; frames stay open meanwhile.
//
// Interface: TCS and USP inputs are valid/ready/data/keep/last; data is taken
// when valid and ready are both high. `tx_word` is registered, one clock
// after the decision. `tx_state` reports the kind of word being sent, named
// after the transmit state diagram of the UCF.
module ucf_tx
  import ucf_pkg::*;
#(
  parameter int N_USP       = 2,
  parameter int CYCLES_MIN  = 10,
  parameter int CC_INTERVAL = 1000,
  parameter bit IS_MASTER   = 1'b0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               restart,      // restart initialization (from receiver or user)
  input  logic               rx_locked,    // local receiver locked on alignment
  input  logic               rx_pol_ok,    // local receiver saw clean polarity words
  input  logic [31:0]        constant_i,
  output logic               init_done,
  // TCS input
  input  axis_t              tcs_i,
  output logic               tcs_ready,
  // USP inputs
  input  axis_t              usp_i [N_USP],
  output logic [N_USP-1:0]   usp_ready,
  // Veto
  input  logic [VETO_BITS-1:0] veto_local,  // our receiver's veto request to the far side
  input  logic [VETO_BITS-1:0] veto_remote, // veto received from the far side
  // Link word
  output lword_t             tx_word,
  output logic [3:0]         tx_state
);

  typedef enum logic [3:0] {
    ST_ALIGN, ST_POLARITY, ST_CONSTHDR, ST_CONSTANT,
    ST_IDLE, ST_SENDTCS, ST_SENDTCSDATA, ST_TCSENDOFFRAME,
    ST_SENDVETO, ST_SENDUSP, ST_SENDUSPDATA, ST_USPENDOFFRAME, ST_SENDCCP
  } tx_state_e;

  tx_state_e  phase_q;              // initialization phase, ST_IDLE once running
  int unsigned cnt_q;
  logic       tcs_active_q, tcs_eof_q;
  logic [N_USP-1:0] open_q;
  logic       usp_eof_q;
  logic [2:0] veto_cnt_q;
  logic [VETO_BITS-1:0] veto_sent_q, veto_shadow_q;
  int unsigned cc_cnt_q;

  // Highest open channel.
  logic       any_open;
  int         cur;
  always_comb begin
    any_open = |open_q;
    cur = 0;
    for (int c = 0; c < N_USP; c++) if (open_q[c]) cur = c;
  end

  function automatic lword_t data_word(input logic [31:0] d, input logic [3:0] keep);
    lword_t w;
    for (int i = 0; i < 4; i++) begin
      w.data[8*i +: 8] = keep[i] ? d[8*i +: 8] : K_FILL;
      w.k[i] = ~keep[i];
    end
    return w;
  endfunction

  // Decision for this clock.
  lword_t     word_d;
  tx_state_e  kind_d;
  logic       tcs_active_d, tcs_eof_d, usp_eof_d;
  logic [N_USP-1:0] open_d;
  logic [2:0] veto_cnt_d;
  logic [VETO_BITS-1:0] veto_sent_d, veto_shadow_d;
  logic       cc_clear;
  logic       cc_due;

  assign cc_due = !IS_MASTER && (cc_cnt_q >= CC_INTERVAL);

  always_comb begin
    int start_ch;
    logic [1:0] grp;
    word_d        = W_IDLE;
    kind_d        = ST_IDLE;
    tcs_active_d  = tcs_active_q;
    tcs_eof_d     = tcs_eof_q;
    usp_eof_d     = usp_eof_q;
    open_d        = open_q;
    veto_cnt_d    = veto_cnt_q;
    veto_sent_d   = veto_sent_q;
    veto_shadow_d = veto_shadow_q;
    cc_clear      = 1'b0;
    tcs_ready     = 1'b0;
    usp_ready     = '0;
    start_ch      = -1;
    grp           = 2'd0;
    for (int c = 0; c < N_USP; c++)
      if (usp_i[c].valid && !open_q[c] && !veto_remote[c] && (!any_open || c > cur)) start_ch = c;

    unique case (phase_q)
      ST_ALIGN:    begin word_d = W_ALIGN;    kind_d = ST_ALIGN;    end
      ST_POLARITY: begin word_d = W_POLARITY; kind_d = ST_POLARITY; end
      ST_CONSTHDR: begin word_d = W_CONSTHDR; kind_d = ST_CONSTHDR; end
      ST_CONSTANT: begin word_d = '{data: constant_i, k: 4'b0000}; kind_d = ST_CONSTANT; end
      default: begin
        if (tcs_eof_q) begin
          word_d = W_EOF; kind_d = ST_TCSENDOFFRAME; tcs_eof_d = 1'b0;
        end else if (tcs_active_q) begin
          kind_d = ST_SENDTCSDATA;
          if (tcs_i.valid) begin
            tcs_ready = 1'b1;
            word_d = data_word(tcs_i.data, tcs_i.keep);
            if (tcs_i.last) begin
              tcs_active_d = 1'b0;
              tcs_eof_d = 1'b1;
            end
          end
        end else if (tcs_i.valid) begin
          word_d = W_TCS_SOF; kind_d = ST_SENDTCS; tcs_active_d = 1'b1;
        end else if (veto_cnt_q != 0) begin
          grp = 2'(4 - veto_cnt_q);
          word_d = veto_word(veto_shadow_q[VETO_BITS-1-16*grp -: 16]);
          kind_d = ST_SENDVETO;
          veto_cnt_d = veto_cnt_q - 3'd1;
        end else if (veto_local != veto_sent_q) begin
          veto_shadow_d = veto_local;
          veto_sent_d = veto_local;
          word_d = veto_word(veto_local[VETO_BITS-1 -: 16]);
          kind_d = ST_SENDVETO;
          veto_cnt_d = 3'd3;
        end else if (usp_eof_q) begin
          word_d = W_EOF; kind_d = ST_USPENDOFFRAME;
          usp_eof_d = 1'b0;
          open_d[cur] = 1'b0;
        end else if (cc_due) begin
          word_d = W_CCP; kind_d = ST_SENDCCP; cc_clear = 1'b1;
        end else if (start_ch >= 0) begin
          word_d = usp_sof(8'(start_ch)); kind_d = ST_SENDUSP;
          open_d[start_ch] = 1'b1;
        end else if (any_open) begin
          kind_d = ST_SENDUSPDATA;
          if (usp_i[cur].valid && !veto_remote[cur]) begin
            usp_ready[cur] = 1'b1;
            word_d = data_word(usp_i[cur].data, usp_i[cur].keep);
            if (usp_i[cur].last) usp_eof_d = 1'b1;
          end
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      phase_q       <= ST_ALIGN;
      cnt_q         <= 0;
      tcs_active_q  <= 1'b0;
      tcs_eof_q     <= 1'b0;
      usp_eof_q     <= 1'b0;
      open_q        <= '0;
      veto_cnt_q    <= '0;
      veto_sent_q   <= '0;
      veto_shadow_q <= '0;
      cc_cnt_q      <= 0;
      tx_word       <= W_ALIGN;
      tx_state      <= 4'(ST_ALIGN);
    end else begin
      tx_word  <= word_d;
      tx_state <= 4'(kind_d);
      cnt_q    <= cnt_q + 1;
      unique case (phase_q)
        ST_ALIGN:    if (cnt_q + 1 >= CYCLES_MIN && rx_locked) begin phase_q <= ST_POLARITY; cnt_q <= 0; end
        ST_POLARITY: if (cnt_q + 1 >= CYCLES_MIN && rx_pol_ok) begin phase_q <= ST_CONSTHDR; cnt_q <= 0; end
        ST_CONSTHDR: phase_q <= ST_CONSTANT;
        ST_CONSTANT: phase_q <= ST_IDLE;
        default: begin
          cnt_q         <= 0;
          tcs_active_q  <= tcs_active_d;
          tcs_eof_q     <= tcs_eof_d;
          usp_eof_q     <= usp_eof_d;
          open_q        <= open_d;
          veto_cnt_q    <= veto_cnt_d;
          veto_sent_q   <= veto_sent_d;
          veto_shadow_q <= veto_shadow_d;
          cc_cnt_q      <= cc_clear ? 0 : cc_cnt_q + 1;
        end
      endcase
    end
  end

  assign init_done = (phase_q == ST_IDLE);

endmodule
