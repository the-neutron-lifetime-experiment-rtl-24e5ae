// sdu: firmware of one Sampling ADC Digitizer Unit (SDU) card.
//
// Data path, in the system clock `clk_sys` (100 MHz in the design):
//   LTC1407 readout (NADC dual-channel ADCs, 2*NADC channels, one shared
//   SCLK/CS, one data line per ADC) -> one decoupling FIFO per ADC ->
//   NPU processing units of 2*NADC/NPU channels each (pedestal, signal
//   detection, frame generation) -> channel multiplexer -> UCF FIFO.
// The UCF FIFO crosses into the link clock `clk_ucf` (62.5 MHz) and feeds USP
// channel 0 of a UCF slave end. USP channel 1 (higher priority) carries slow
// control in both directions; the TCS channel is passed through unchanged.
// A 32-bit time stamp counts `clk_sys` clocks from reset and is stored with
// each triggered event.
//
// Instead of the ADCs, the built-in ADC emulator can drive the data lines
// (`use_emulator`), which gives a test source with random pulses.
//
// Interface: ADC pins, processing configuration (`cfg`, shared by all units),
// per-channel veto and card veto (events of vetoed channels are not sent),
// parallel link symbols of the transceiver and user ports of the UCF slave.
// Status counters are sums over all processing units.
module sdu
  import ucf_pkg::*;
#(
  parameter int NADC        = 48,
  parameter int NPU         = 12,
  parameter int PU_FIFO_LOG2 = 6,
  parameter int UCF_FIFO_LOG2 = 9,
  parameter int CC_INTERVAL = 1000
) (
  input  logic                   clk_sys,
  input  logic                   rst_sys,
  input  logic                   clk_ucf,
  input  logic                   rst_ucf,
  input  logic                   ucf_reinit,
  // ADC pins
  output logic                   adc_sclk,
  output logic                   adc_cs,
  input  logic [NADC-1:0]        adc_miso,
  input  logic                   use_emulator,
  input  logic [4:0]             emu_rate_log2,
  // processing configuration
  input  pu_cfg_t                cfg,
  input  logic [2*NADC-1:0]      veto_ch,
  input  logic                   veto_card,
  // link
  output logic [39:0]            tx_code,
  input  logic [39:0]            rx_code,
  input  logic [31:0]            constant_i,
  output logic [31:0]            constant_o,
  output logic                   link_up,
  output logic                   xcvr_reset,
  // user side of the link (clk_ucf)
  input  axis_t                  tcs_i,
  output logic                   tcs_ready,
  output axis_t                  tcs_o,
  input  axis_t                  ctrl_i,
  output logic                   ctrl_ready,
  output axis_t                  ctrl_o,
  input  logic [VETO_BITS-1:0]   link_veto_i,
  output logic [VETO_BITS-1:0]   link_veto_o,
  output logic [2:0]             link_bufstatus,
  output logic [15:0]            link_err_count,
  output logic [3:0]             link_tx_state,
  // status (clk_sys)
  output logic [31:0]            n_triggers,
  output logic [31:0]            n_frames,
  output logic [31:0]            n_vetoed,
  output logic [31:0]            n_dropped,
  output logic [31:0]            n_sent,
  output logic [31:0]            emu_pulses
);

  localparam int NCH = 2 * NADC / NPU;   // channels per processing unit
  localparam int NA  = NCH / 2;          // ADCs per processing unit
  localparam int N_USP_SDU = 2;          // USP 0: event data, USP 1: slow control

  // ---------------- time stamp
  logic [31:0] timestamp;
  always_ff @(posedge clk_sys) begin
    if (rst_sys) timestamp <= '0;
    else         timestamp <= timestamp + 32'd1;
  end

  // ---------------- ADC readout
  logic [NADC-1:0] emu_miso, miso;
  logic            ro_valid;
  logic [NADC-1:0][11:0] smp_a, smp_b;

  adc_emulator #(.NADC(NADC)) u_emu (
    .clk(clk_sys), .rst(rst_sys), .rate_log2(emu_rate_log2), .adc_sclk, .adc_cs,
    .adc_miso(emu_miso), .pulses(emu_pulses));

  assign miso = use_emulator ? emu_miso : adc_miso;

  ltc1407_readout #(.NADC(NADC)) u_ro (
    .clk(clk_sys), .rst(rst_sys), .enable(1'b1), .adc_sclk, .adc_cs, .adc_miso(miso),
    .valid(ro_valid), .sample_a(smp_a), .sample_b(smp_b));

  // ---------------- decoupling FIFOs and processing units
  logic [NADC-1:0]        dfifo_full, dfifo_empty, dfifo_rd;
  logic [NADC-1:0][23:0]  dfifo_dout;

  for (genvar a = 0; a < NADC; a++) begin : g_dfifo
    fifo_async #(.WIDTH(24), .DEPTH_LOG2(4)) u_fifo (
      .wclk(clk_sys), .wrst(rst_sys), .wr_en(ro_valid && !dfifo_full[a]),
      .din({smp_b[a], smp_a[a]}), .full(dfifo_full[a]),
      .rclk(clk_sys), .rrst(rst_sys), .rd_en(dfifo_rd[a]), .dout(dfifo_dout[a]),
      .empty(dfifo_empty[a]));
  end

  logic [NPU-1:0][NCH-1:0] frame_avail;
  logic [NPU-1:0][31:0]    rd_data, rd_ts, pu_trig, pu_frames, pu_vetoed, pu_dropped;
  logic [NPU-1:0][15:0]    rd_nwords;
  logic [$clog2(NCH)-1:0]  rd_ch;
  logic [NPU-1:0]          rd_word, rd_done;

  for (genvar p = 0; p < NPU; p++) begin : g_pu
    processing_unit #(.NCH(NCH), .FIFO_LOG2(PU_FIFO_LOG2)) u_pu (
      .clk(clk_sys), .rst(rst_sys), .cfg, .timestamp,
      .veto(veto_ch[p*NCH +: NCH]), .veto_card,
      .fifo_empty(dfifo_empty[p*NA +: NA]), .fifo_dout(dfifo_dout[p*NA +: NA]),
      .fifo_rd(dfifo_rd[p*NA +: NA]),
      .frame_avail(frame_avail[p]), .rd_ch, .rd_data(rd_data[p]), .rd_ts(rd_ts[p]),
      .rd_nwords(rd_nwords[p]), .rd_word(rd_word[p]), .rd_done(rd_done[p]),
      .n_triggers(pu_trig[p]), .n_frames(pu_frames[p]), .n_vetoed(pu_vetoed[p]),
      .n_dropped(pu_dropped[p]));
  end

  always_comb begin
    n_triggers = '0; n_frames = '0; n_vetoed = '0; n_dropped = '0;
    for (int p = 0; p < NPU; p++) begin
      n_triggers += pu_trig[p];
      n_frames   += pu_frames[p];
      n_vetoed   += pu_vetoed[p];
      n_dropped  += pu_dropped[p];
    end
  end

  // ---------------- channel multiplexer and UCF FIFO
  logic        mux_valid, mux_last, ufifo_full, ufifo_empty, ufifo_rd;
  logic [31:0] mux_data;
  logic [32:0] ufifo_dout;
  logic [N_USP_SDU-1:0] usp_ready;
  axis_t       usp_i [N_USP_SDU];
  axis_t       usp_o [N_USP_SDU];

  channel_mux #(.NPU(NPU), .NCH(NCH)) u_mux (
    .clk(clk_sys), .rst(rst_sys), .frame_avail, .rd_data, .rd_ts, .rd_nwords, .rd_ch,
    .rd_word, .rd_done, .out_valid(mux_valid), .out_data(mux_data), .out_last(mux_last),
    .out_full(ufifo_full), .n_frames(n_sent));

  fifo_async #(.WIDTH(33), .DEPTH_LOG2(UCF_FIFO_LOG2)) u_ufifo (
    .wclk(clk_sys), .wrst(rst_sys), .wr_en(mux_valid), .din({mux_last, mux_data}),
    .full(ufifo_full), .rclk(clk_ucf), .rrst(rst_ucf), .rd_en(ufifo_rd),
    .dout(ufifo_dout), .empty(ufifo_empty));

  assign usp_i[0] = '{valid: !ufifo_empty, data: ufifo_dout[31:0], keep: 4'hF, last: ufifo_dout[32]};
  assign usp_i[1] = ctrl_i;
  assign ufifo_rd   = usp_ready[0] && !ufifo_empty;
  assign ctrl_ready = usp_ready[1];
  assign ctrl_o     = usp_o[1];

  // ---------------- UCF slave end
  ucf_core #(.N_USP(N_USP_SDU), .IS_MASTER(1'b0), .CC_INTERVAL(CC_INTERVAL)) u_ucf (
    .clk(clk_ucf), .rst(rst_ucf), .reinit(ucf_reinit), .rx_clk(clk_ucf),
    .tx_code, .rx_code, .constant_i, .constant_o, .link_up, .xcvr_reset,
    .bufstatus(link_bufstatus), .rx_err_count(link_err_count), .tx_state(link_tx_state),
    .tcs_i, .tcs_ready, .tcs_o, .usp_i, .usp_ready, .usp_o,
    .veto_i(link_veto_i), .veto_o(link_veto_o));

endmodule
