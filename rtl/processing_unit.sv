// processing_unit: signal detection and frame generation for NCH channels
// that share one set of logic, one sample per clock ("multi-threading").
//
// Front end: the PU owns NCH/2 decouple FIFOs (one per dual-channel ADC, an
// entry holds {channel 2 sample, channel 1 sample}). It visits non-empty
// FIFOs round-robin and feeds the two samples of an entry on two clocks,
// as local channels 2k and 2k+1.
// Pipeline, one record per clock:
//   stage 1  pedestal_calc (pedestal, sigma2 of the channel) and delay_fifo
//            (the same channel's sample from cfg.delay samples ago)
//   stage 2  pedestal_sub on the direct and the delayed sample
//   stage 3  signal_detect on the direct difference
//   stage 4  frame_gen packs the delayed differences of each event
// Events pause the channel's pedestal calculation. The read port of
// frame_gen is exported for the channel multiplexer.
module processing_unit
  import ucf_pkg::*;
#(
  parameter int NCH       = 8,
  parameter int FIFO_LOG2 = 6
) (
  input  logic                   clk,
  input  logic                   rst,
  input  pu_cfg_t                cfg,
  input  logic [31:0]            timestamp,
  input  logic [NCH-1:0]         veto,
  input  logic                   veto_card,
  // decouple FIFOs
  input  logic [NCH/2-1:0]       fifo_empty,
  input  logic [NCH/2-1:0][23:0] fifo_dout,
  output logic [NCH/2-1:0]       fifo_rd,
  // frame read port
  output logic [NCH-1:0]         frame_avail,
  input  logic [$clog2(NCH)-1:0] rd_ch,
  output logic [31:0]            rd_data,
  output logic [31:0]            rd_ts,
  output logic [15:0]            rd_nwords,
  input  logic                   rd_word,
  input  logic                   rd_done,
  // statistics
  output logic [31:0]            n_triggers,
  output logic [31:0]            n_frames,
  output logic [31:0]            n_vetoed,
  output logic [31:0]            n_dropped
);

  localparam int NA = NCH / 2;
  localparam int CB = $clog2(NCH);

  // ---------------- front end: round-robin over the decouple FIFOs
  logic [$clog2(NA > 1 ? NA : 2)-1:0] rr, cur;
  logic phase_b;
  logic s0_valid;
  logic [CB-1:0] s0_ch;
  logic [11:0] s0_sample;

  always_comb begin
    fifo_rd   = '0;
    s0_valid  = 1'b0;
    s0_ch     = '0;
    s0_sample = '0;
    if (phase_b) begin
      s0_valid  = 1'b1;
      s0_ch     = CB'(2 * int'(cur) + 1);
      s0_sample = fifo_dout[cur][23:12];
      fifo_rd[cur] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr <= '0; cur <= '0; phase_b <= 1'b0;
    end else if (phase_b) begin
      phase_b <= 1'b0;
    end else begin
      for (int i = NA - 1; i >= 0; i--) begin
        int k;
        k = (int'(rr) + i) % NA;
        if (!fifo_empty[k]) begin
          cur <= ($bits(cur))'(k);
          rr  <= ($bits(rr))'((k + 1) % NA);
          phase_b <= 1'b1;
        end
      end
    end
  end

  // channel A sample is issued in the clock the FIFO is chosen
  logic a_valid;
  logic [CB-1:0] a_ch;
  logic [11:0] a_sample;
  always_comb begin
    a_valid = 1'b0; a_ch = '0; a_sample = '0;
    if (!phase_b) begin
      for (int i = NA - 1; i >= 0; i--) begin
        if (!fifo_empty[(int'(rr) + i) % NA]) begin
          a_valid  = 1'b1;
          a_ch     = CB'(2 * ((int'(rr) + i) % NA));
          a_sample = fifo_dout[(int'(rr) + i) % NA][11:0];
        end
      end
    end
  end

  logic          in_valid;
  logic [CB-1:0] in_ch;
  logic [11:0]   in_sample;
  assign in_valid  = s0_valid | a_valid;
  assign in_ch     = s0_valid ? s0_ch : a_ch;
  assign in_sample = s0_valid ? s0_sample : a_sample;

  // ---------------- stage 1
  logic          p_valid, p_ready;
  logic [CB-1:0] p_ch;
  logic [11:0]   p_sample, p_ped, d_sample;
  logic [23:0]   p_sigma2;
  logic [NCH-1:0] pause;

  pedestal_calc #(.NCH(NCH), .W(12), .AVG_POW_MAX(12)) u_ped (
    .clk, .rst, .avg_pow(cfg.avg_pow), .factor(cfg.factor), .in_valid, .in_ch, .in_sample, .pause,
    .out_valid(p_valid), .out_ch(p_ch), .out_sample(p_sample), .ped(p_ped),
    .sigma2(p_sigma2), .ped_ready(p_ready));

  delay_fifo #(.NCH(NCH), .W(12), .MAX_DELAY(32)) u_dly (
    .clk, .rst, .delay(cfg.delay), .in_valid, .in_ch, .in_sample, .out_sample(d_sample));

  // ---------------- stage 2
  logic          s_valid, s_ready;
  logic [CB-1:0] s_ch;
  logic signed [15:0] s_diff, s_diff_dly;
  logic [23:0]   s_sigma2;

  pedestal_sub #(.W(12), .NCH(NCH)) u_sub (
    .clk, .rst, .in_valid(p_valid), .in_ch(p_ch), .sample(p_sample), .sample_dly(d_sample),
    .ped(p_ped), .sigma2_in(p_sigma2), .ready_in(p_ready),
    .out_valid(s_valid), .out_ch(s_ch), .diff(s_diff), .diff_dly(s_diff_dly),
    .sigma2(s_sigma2), .ped_ready(s_ready));

  // ---------------- stage 3
  logic          t_valid, t_trig, t_event, t_last;
  logic [CB-1:0] t_ch;
  logic signed [15:0] t_dly;

  signal_detect #(.NCH(NCH), .SW(24)) u_det (
    .clk, .rst, .factor(cfg.factor), .nmb_samples(cfg.nmb_samples), .nmb_samples_fr(cfg.nmb_samples_fr),
    .in_valid(s_valid), .in_ch(s_ch), .diff(s_diff), .diff_dly(s_diff_dly), .sigma2(s_sigma2),
    .ped_ready(s_ready), .out_valid(t_valid), .out_ch(t_ch), .out_dly(t_dly),
    .trigger(t_trig), .in_event(t_event), .ev_last(t_last), .pause);

  // ---------------- stage 4
  frame_gen #(.NCH(NCH), .FIFO_LOG2(FIFO_LOG2)) u_fg (
    .clk, .rst, .timestamp, .veto, .veto_card, .nmb_samples_fr(cfg.nmb_samples_fr),
    .in_valid(t_valid), .in_ch(t_ch), .in_dly(t_dly), .trigger(t_trig), .in_event(t_event),
    .ev_last(t_last), .frame_avail, .rd_ch, .rd_data, .rd_ts, .rd_nwords, .rd_word, .rd_done,
    .n_frames, .n_vetoed, .n_dropped);

  always_ff @(posedge clk) begin
    if (rst) n_triggers <= '0;
    else if (t_valid && t_trig) n_triggers <= n_triggers + 1;
  end

endmodule
