// ifdaq_top: one SDU card connected over a UCF link to its data
// concentrator (the UCF master end of the NAC, the network attached
// concentrator card).
//
// Contents:
//   - sdu: ADC readout, processing units, channel multiplexer, UCF FIFO and
//     the UCF slave end (event data on USP 0, slow control on USP 1, TCS);
//   - ref_clock_change: reference clock selection of the SDU transceiver; a
//     change of the selected clock re-initializes the SDU link end;
//   - ucf_core (master): the concentrator end, with elastic buffer.
// The serial lane is modelled by the 40-bit parallel symbol words; the pins
// `invert_m2s` / `invert_s2m` invert every bit of one direction and so model
// a differential pair laid out with swapped polarity, which the link finds
// and corrects during initialization.
//
// Clocks: `clk_sys` for the SDU processing, `clk_ucf` for the link. The
// slave receiver runs on the clock recovered from the master's data, and the
// master receives in the slave's transmit clock; both are the one link clock
// here, so the master's elastic buffer runs with equal clocks.
//
// The concentrator sends nothing on USP 0 (event data flows only from the
// SDU), so its USP 0 input is idle and the matching ready bit is unused.
module ifdaq_top
  import ucf_pkg::*;
#(
  parameter int NADC        = 48,
  parameter int NPU         = 12,
  parameter int CC_INTERVAL = 1000
) (
  input  logic                   clk_sys,
  input  logic                   rst_sys,
  input  logic                   clk_ucf,
  input  logic                   rst_ucf,
  // SDU ADC pins
  output logic                   adc_sclk,
  output logic                   adc_cs,
  input  logic [NADC-1:0]        adc_miso,
  input  logic                   use_emulator,
  input  logic [4:0]             emu_rate_log2,
  // SDU configuration
  input  pu_cfg_t                cfg,
  input  logic [2*NADC-1:0]      veto_ch,
  input  logic                   veto_card,
  // reference clock of the SDU transceiver
  input  logic [3:0]             generate_id,
  input  logic                   use_gen_clock,
  input  logic                   gen_clock_lock,
  output logic [2:0]             ref_clk_sel,
  // lane polarity (board model)
  input  logic                   invert_m2s,
  input  logic                   invert_s2m,
  // concentrator side (clk_ucf)
  input  logic                   nac_reinit,
  output logic                   nac_link_up,
  output logic                   sdu_link_up,
  output logic [31:0]            nac_constant,   // constant received from the SDU
  output logic [31:0]            sdu_constant,   // constant received from the NAC
  output logic [2:0]             nac_bufstatus,
  output logic [15:0]            nac_err_count,
  output logic [3:0]             nac_tx_state,
  output logic [3:0]             sdu_tx_state,
  output axis_t                  nac_data_o,     // event frames from the SDU
  input  axis_t                  nac_ctrl_i,     // slow control to the SDU
  output logic                   nac_ctrl_ready,
  output axis_t                  nac_ctrl_o,     // slow control replies
  input  axis_t                  nac_tcs_i,      // trigger/timing to the SDU
  output logic                   nac_tcs_ready,
  output axis_t                  sdu_tcs_o,
  input  axis_t                  sdu_tcs_i,      // timing replies from the SDU
  output logic                   sdu_tcs_ready,
  output axis_t                  nac_tcs_o,
  input  axis_t                  sdu_ctrl_i,     // SDU-side reply source
  output logic                   sdu_ctrl_ready,
  output axis_t                  sdu_ctrl_o,
  input  logic [VETO_BITS-1:0]   nac_veto,       // back pressure from the NAC
  output logic [VETO_BITS-1:0]   sdu_veto_seen,
  output logic [VETO_BITS-1:0]   nac_veto_seen,  // always zero: the SDU sets no veto
  output logic                   nac_xcvr_reset,
  output logic                   sdu_xcvr_reset,
  output logic                   using_gen_clock,
  output logic [2:0]             sdu_bufstatus,
  output logic [15:0]            sdu_err_count,
  // SDU status (clk_sys)
  output logic [31:0]            n_triggers,
  output logic [31:0]            n_frames,
  output logic [31:0]            n_vetoed,
  output logic [31:0]            n_dropped,
  output logic [31:0]            n_sent,
  output logic [31:0]            emu_pulses
);

  localparam logic [31:0] SDU_CONST = 32'h5D0_0001;
  localparam logic [31:0] NAC_CONST = 32'hAC0_0001;

  logic [39:0] m2s_code, s2m_code;
  logic        rc_rst;

  ref_clock_change u_refclk (
    .clk(clk_ucf), .rst(rst_ucf), .generate_id, .use_gen_clock, .gen_clock_lock,
    .ref_clk_sel, .using_gen(using_gen_clock), .rst_out(rc_rst));

  logic [39:0] sdu_tx_code;
  logic [VETO_BITS-1:0] sdu_link_veto_o;

  sdu #(.NADC(NADC), .NPU(NPU), .CC_INTERVAL(CC_INTERVAL)) u_sdu (
    .clk_sys, .rst_sys, .clk_ucf, .rst_ucf, .ucf_reinit(rc_rst),
    .adc_sclk, .adc_cs, .adc_miso, .use_emulator, .emu_rate_log2,
    .cfg, .veto_ch, .veto_card,
    .tx_code(sdu_tx_code), .rx_code(m2s_code), .constant_i(SDU_CONST),
    .constant_o(sdu_constant), .link_up(sdu_link_up), .xcvr_reset(sdu_xcvr_reset),
    .tcs_i(sdu_tcs_i), .tcs_ready(sdu_tcs_ready), .tcs_o(sdu_tcs_o),
    .ctrl_i(sdu_ctrl_i), .ctrl_ready(sdu_ctrl_ready), .ctrl_o(sdu_ctrl_o),
    .link_veto_i('0), .link_veto_o(sdu_link_veto_o),
    .link_bufstatus(sdu_bufstatus), .link_err_count(sdu_err_count),
    .link_tx_state(sdu_tx_state),
    .n_triggers, .n_frames, .n_vetoed, .n_dropped, .n_sent, .emu_pulses);

  assign sdu_veto_seen = sdu_link_veto_o;
  assign s2m_code = invert_s2m ? ~sdu_tx_code : sdu_tx_code;

  logic [39:0] nac_tx_code;
  axis_t       nac_usp_i [2];
  axis_t       nac_usp_o [2];
  logic [1:0]  nac_usp_ready;

  assign nac_usp_i[0]   = AXIS_IDLE;
  assign nac_usp_i[1]   = nac_ctrl_i;
  assign nac_ctrl_ready = nac_usp_ready[1];
  assign nac_data_o     = nac_usp_o[0];
  assign nac_ctrl_o     = nac_usp_o[1];

  ucf_core #(.N_USP(2), .IS_MASTER(1'b1), .CC_INTERVAL(CC_INTERVAL)) u_nac (
    .clk(clk_ucf), .rst(rst_ucf), .reinit(nac_reinit), .rx_clk(clk_ucf),
    .tx_code(nac_tx_code), .rx_code(s2m_code), .constant_i(NAC_CONST),
    .constant_o(nac_constant), .link_up(nac_link_up), .xcvr_reset(nac_xcvr_reset),
    .bufstatus(nac_bufstatus), .rx_err_count(nac_err_count), .tx_state(nac_tx_state),
    .tcs_i(nac_tcs_i), .tcs_ready(nac_tcs_ready), .tcs_o(nac_tcs_o),
    .usp_i(nac_usp_i), .usp_ready(nac_usp_ready), .usp_o(nac_usp_o),
    .veto_i(nac_veto), .veto_o(nac_veto_seen));

  assign m2s_code = invert_m2s ? ~nac_tx_code : nac_tx_code;

endmodule
