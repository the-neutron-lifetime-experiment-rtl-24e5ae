// frame_gen: packs the samples of each triggered event into per-channel
// FIFOs of a processing unit and keeps a descriptor per finished frame.
//
// For every sample inside an event window (from signal_detect) the delayed,
// pedestal-subtracted 16-bit sample is packed two per 32-bit word, the first
// sample in the low half; an odd last sample is padded with zero. At the
// trigger the time stamp is captured and the frame is accepted only if the
// channel is not vetoed (`veto[c]` or `veto_card`) and its FIFO has room for
// the whole frame; otherwise the event is counted as vetoed or dropped and
// nothing is written. At the end of the window a descriptor {time stamp,
// number of sample words} is queued. A channel FIFO holds 2**FIFO_LOG2 words
// and up to 4 descriptors.
//
// Read port (to the channel multiplexer), show-ahead: `frame_avail[c]` says
// a finished frame is waiting; for channel `rd_ch`, `rd_ts`/`rd_nwords` give
// its descriptor and `rd_data` its oldest sample word. `rd_word` removes one
// word, `rd_done` the descriptor. The header words are added by the reader.
module frame_gen #(
  parameter int NCH       = 8,
  parameter int FIFO_LOG2 = 6
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [31:0]            timestamp,
  input  logic [NCH-1:0]         veto,
  input  logic                   veto_card,
  input  logic [7:0]             nmb_samples_fr,
  input  logic                   in_valid,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic signed [15:0]     in_dly,
  input  logic                   trigger,
  input  logic                   in_event,
  input  logic                   ev_last,
  output logic [NCH-1:0]         frame_avail,
  input  logic [$clog2(NCH)-1:0] rd_ch,
  output logic [31:0]            rd_data,
  output logic [31:0]            rd_ts,
  output logic [15:0]            rd_nwords,
  input  logic                   rd_word,
  input  logic                   rd_done,
  output logic [31:0]            n_frames,
  output logic [31:0]            n_vetoed,
  output logic [31:0]            n_dropped
);

  localparam int D = 2 ** FIFO_LOG2;
  typedef logic [FIFO_LOG2:0] ptr_t;

  logic [31:0] mem [NCH][D];
  logic [NCH-1:0][FIFO_LOG2:0] wp, rp;
  logic [NCH-1:0]              active, half;
  logic [NCH-1:0][15:0]        stash;
  logic [NCH-1:0][15:0]        nw;
  logic [NCH-1:0][31:0]        ts;
  // descriptor FIFO, 4 entries per channel
  logic [31:0] dts [NCH][4];
  logic [15:0] dnw [NCH][4];
  logic [NCH-1:0][2:0] dwp, drp;

  ptr_t used;
  logic [FIFO_LOG2:0] need;
  assign need = ptr_t'((int'(nmb_samples_fr) + 1) / 2);

  always_comb begin
    for (int c = 0; c < NCH; c++) frame_avail[c] = (dwp[c] != drp[c]);
    rd_data   = mem[rd_ch][rp[rd_ch][FIFO_LOG2-1:0]];
    rd_ts     = dts[rd_ch][drp[rd_ch][1:0]];
    rd_nwords = dnw[rd_ch][drp[rd_ch][1:0]];
    used      = wp[in_ch] - rp[in_ch];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; active <= '0; half <= '0; stash <= '0; nw <= '0; ts <= '0;
      dwp <= '0; drp <= '0; n_frames <= '0; n_vetoed <= '0; n_dropped <= '0;
    end else begin
      // ---- reader
      if (rd_word) rp[rd_ch] <= rp[rd_ch] + 1'b1;
      if (rd_done) drp[rd_ch] <= drp[rd_ch] + 3'd1;
      // ---- writer
      if (in_valid && in_event) begin
        logic act;
        act = active[in_ch];
        if (trigger) begin
          act = 1'b0;
          if (veto[in_ch] || veto_card) n_vetoed <= n_vetoed + 1;
          else if (ptr_t'(D) - used < need || (dwp[in_ch] - drp[in_ch]) == 3'd4) n_dropped <= n_dropped + 1;
          else begin
            act = 1'b1;
            ts[in_ch] <= timestamp;
          end
          half[in_ch] <= 1'b0;
          nw[in_ch]   <= '0;
        end
        active[in_ch] <= act && !ev_last;
        if (act) begin
          logic h;
          logic [15:0] n;
          h = trigger ? 1'b0 : half[in_ch];
          n = trigger ? 16'd0 : nw[in_ch];
          if (!h && !ev_last) begin
            stash[in_ch] <= in_dly;
            half[in_ch]  <= 1'b1;
          end else begin
            mem[in_ch][wp[in_ch][FIFO_LOG2-1:0]] <= h ? {in_dly, stash[in_ch]} : {16'h0, in_dly};
            wp[in_ch]   <= wp[in_ch] + 1'b1;
            half[in_ch] <= 1'b0;
            n = n + 16'd1;
          end
          nw[in_ch] <= n;
          if (ev_last) begin
            dts[in_ch][dwp[in_ch][1:0]] <= trigger ? timestamp : ts[in_ch];
            dnw[in_ch][dwp[in_ch][1:0]] <= n;
            dwp[in_ch] <= dwp[in_ch] + 3'd1;
            n_frames <= n_frames + 1;
          end
        end
      end
    end
  end

endmodule
