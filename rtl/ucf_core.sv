// ucf_core: one end of a UCF (Unified Communication Framework) link.
//
// Bundles the transmit state machine, the 8b/10b encoder, the receive
// polarity inversion, the 8b/10b decoder and the receive state machine. The
// link carries one TCS protocol (fixed latency, may interrupt anything),
// N_USP prioritised USP protocols and veto frames for back pressure over one
// lane. The serializer, PLL and clock recovery of a real transceiver are not
// part of this module: `tx_code`/`rx_code` are the 40-bit parallel symbol
// words (four 10b symbols, byte 0 first) on each side of them.
//
// Master (IS_MASTER=1): received words cross from the recovered clock
// `rx_clk` into `clk` through an elastic buffer with clock correction.
// Slave (IS_MASTER=0): the receiver is phase aligned to the link, so `rx_clk`
// is not used and `rx_code` is taken in `clk`; the slave transmitter inserts
// clock-correction words for the master's buffer.
//
// Resets: `rst` resets everything; `reinit` repeats only the initialization.
// `link_up` is high when both directions have finished initialization.
// Latency: TCS word in -> TCS word out of the far end is fixed (encoder,
// decoder and one register each in tx/rx plus the one-word hold of the
// receiver) on the master-to-slave direction.
module ucf_core
  import ucf_pkg::*;
#(
  parameter int N_USP       = 2,
  parameter bit IS_MASTER   = 1'b0,
  parameter int CYCLES_MIN  = 10,
  parameter int CC_INTERVAL = 1000,
  parameter int EB_DEPTH_LOG2 = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               reinit,
  input  logic               rx_clk,
  // parallel symbols
  output logic [39:0]        tx_code,
  input  logic [39:0]        rx_code,
  // constants exchanged during initialization
  input  logic [31:0]        constant_i,
  output logic [31:0]        constant_o,
  output logic               link_up,
  output logic               xcvr_reset,
  output logic [2:0]         bufstatus,
  output logic [15:0]        rx_err_count,
  output logic [3:0]         tx_state,
  // user side
  input  axis_t              tcs_i,
  output logic               tcs_ready,
  output axis_t              tcs_o,
  input  axis_t              usp_i [N_USP],
  output logic [N_USP-1:0]   usp_ready,
  output axis_t              usp_o [N_USP],
  input  logic [VETO_BITS-1:0] veto_i,    // veto for what we receive (to far side)
  output logic [VETO_BITS-1:0] veto_o     // veto the far side set on what we send
);

  lword_t tx_word;
  logic   rx_locked, rx_pol_ok, rx_up, tx_done, restart, rx_polarity;

  ucf_tx #(.N_USP(N_USP), .CYCLES_MIN(CYCLES_MIN), .CC_INTERVAL(CC_INTERVAL), .IS_MASTER(IS_MASTER)) u_tx (
    .clk, .rst, .restart(restart || reinit), .rx_locked, .rx_pol_ok, .constant_i,
    .init_done(tx_done), .tcs_i, .tcs_ready, .usp_i, .usp_ready,
    .veto_local(veto_i), .veto_remote(veto_o), .tx_word, .tx_state);

  enc8b10b #(.BYTES(4)) u_enc (
    .clk, .rst, .en(1'b1), .data(tx_word.data), .charisk(tx_word.k), .code(tx_code));

  lword_t     rx_word;
  logic [3:0] rx_err;
  logic       rx_valid;

  generate
    if (IS_MASTER) begin : g_master
      logic       pol_s1, pol_s2, rst_r1, rst_r2;
      lword_t     dec_word;
      logic [3:0] dec_err;
      always_ff @(posedge rx_clk) begin
        pol_s1 <= rx_polarity; pol_s2 <= pol_s1;
        rst_r1 <= rst;         rst_r2 <= rst_r1;
      end
      dec8b10b #(.BYTES(4)) u_dec (
        .clk(rx_clk), .rst(rst_r2), .code(pol_s2 ? ~rx_code : rx_code),
        .data(dec_word.data), .charisk(dec_word.k), .code_err(dec_err));
      elastic_buffer #(.DEPTH_LOG2(EB_DEPTH_LOG2)) u_eb (
        .wr_clk(rx_clk), .wr_rst(rst_r2), .din(dec_word), .din_err(dec_err),
        .rd_clk(clk), .rd_rst(rst), .dout(rx_word), .dout_err(rx_err),
        .dout_valid(rx_valid), .bufstatus);
    end else begin : g_slave
      dec8b10b #(.BYTES(4)) u_dec (
        .clk, .rst, .code(rx_polarity ? ~rx_code : rx_code),
        .data(rx_word.data), .charisk(rx_word.k), .code_err(rx_err));
      assign rx_valid  = 1'b1;
      assign bufstatus = 3'b000;
    end
  endgenerate

  ucf_rx #(.N_USP(N_USP)) u_rx (
    .clk, .rst, .reinit, .rx_valid, .rx_word, .rx_err, .rx_polarity, .xcvr_reset,
    .restart, .locked(rx_locked), .pol_ok(rx_pol_ok), .link_up(rx_up), .constant_o,
    .tcs_o, .usp_o, .veto_remote(veto_o), .err_count(rx_err_count));

  assign link_up = rx_up && tx_done;

endmodule
