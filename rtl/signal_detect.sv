// signal_detect: per-channel event trigger of a processing unit.
//
// A sample of channel c is above threshold when its pedestal-subtracted
// value exceeds factor * sigma2 (integer multiple of the mean quadratic
// deviation). When nmb_samples consecutive samples of the channel are above
// threshold and the channel is not already in an event, `trigger` is set on
// that sample and the event window opens: it covers nmb_samples_fr samples of
// the channel, starting with the trigger sample (`in_event`, `ev_last` on the
// final one). Channels whose pedestal is not ready never trigger.
// `pause[c]` is high while channel c is inside an event; it freezes the
// pedestal calculation of that channel.
//
// The delayed sample `diff_dly` is passed along aligned with the flags for
// the frame generator. Timing: one clock, registered.
module signal_detect #(
  parameter int NCH = 8,
  parameter int SW  = 24
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [3:0]             factor,
  input  logic [3:0]             nmb_samples,
  input  logic [7:0]             nmb_samples_fr,
  input  logic                   in_valid,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic signed [15:0]     diff,
  input  logic signed [15:0]     diff_dly,
  input  logic [SW-1:0]          sigma2,
  input  logic                   ped_ready,
  output logic                   out_valid,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic signed [15:0]     out_dly,
  output logic                   trigger,
  output logic                   in_event,
  output logic                   ev_last,
  output logic [NCH-1:0]         pause
);

  logic [NCH-1:0][3:0] above_cnt;
  logic [NCH-1:0][7:0] ev_left;

  always_ff @(posedge clk) begin
    if (rst) begin
      above_cnt <= '0; ev_left <= '0;
      out_valid <= 1'b0; out_ch <= '0; out_dly <= '0;
      trigger <= 1'b0; in_event <= 1'b0; ev_last <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_ch    <= in_ch;
      out_dly   <= diff_dly;
      trigger   <= 1'b0;
      in_event  <= 1'b0;
      ev_last   <= 1'b0;
      if (in_valid) begin
        logic        above;
        logic [3:0]  na;
        logic [SW+3:0] thr;
        thr   = (SW+4)'(factor) * (SW+4)'(sigma2);
        above = ped_ready && (diff > 0) && ((SW+4)'(unsigned'(diff)) > thr);
        na    = above ? ((above_cnt[in_ch] == 4'hF) ? 4'hF : above_cnt[in_ch] + 4'd1) : 4'd0;
        above_cnt[in_ch] <= na;
        if (ev_left[in_ch] != 0) begin
          in_event <= 1'b1;
          ev_last  <= (ev_left[in_ch] == 8'd1);
          ev_left[in_ch] <= ev_left[in_ch] - 8'd1;
        end else if (above && na >= nmb_samples && nmb_samples_fr != 0) begin
          trigger  <= 1'b1;
          in_event <= 1'b1;
          ev_last  <= (nmb_samples_fr == 8'd1);
          ev_left[in_ch] <= nmb_samples_fr - 8'd1;
        end
      end
    end
  end

  always_comb
    for (int c = 0; c < NCH; c++) pause[c] = (ev_left[c] != 0);

endmodule
