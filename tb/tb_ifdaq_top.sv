// tb_ifdaq_top: end-to-end test of one SDU linked to its concentrator, at
// full size (48 ADCs, 96 channels, 12 processing units, default parameters).
//
// The built-in ADC emulator produces random pulses. The test starts with
// both lane directions inverted, so both receivers must find and correct the
// polarity. Then it runs event data and checks every frame that arrives at
// the concentrator (header word 0 is zero, channel below 96, the length word
// matches the received length, time stamps rise per channel, no frame from a
// vetoed channel). Meanwhile it sends TCS frames and slow-control frames in
// both directions, sets a back-pressure veto on the data channel, sets the
// card veto, and switches the SDU reference clock, which re-initializes the
// link. At the end the number of frames received must equal the number the
// SDU sent.
// Each mechanism is counted (polarity correction, triggers, frames, channel
// veto, card veto, back-pressure veto, TCS, control both ways, control frame
// nested in a data frame, clock correction, reference clock switch and
// link re-initialization); one that never happened counts as a failure.
// The processing configuration uses 2^6 samples for the pedestal so the run
// stays short; this is an input value, not a parameter.
`timescale 1ns/1ps
module tb_ifdaq_top;
  import ucf_pkg::*;

  logic clk_sys = 0, clk_ucf = 0, rst_sys = 1, rst_ucf = 1;
  always #5 clk_sys = ~clk_sys;
  always #8 clk_ucf = ~clk_ucf;

  logic        adc_sclk, adc_cs;
  logic [47:0] adc_miso = '0;
  pu_cfg_t     cfg;
  logic [95:0] veto_ch = '0;
  logic        veto_card = 0;
  logic [3:0]  generate_id = 4'd4;
  logic        use_gen_clock = 1, gen_clock_lock = 0;
  logic [2:0]  ref_clk_sel;
  logic        invert_m2s = 1, invert_s2m = 1, nac_reinit = 0;
  logic        nac_up, sdu_up;
  logic [31:0] nac_const, sdu_const;
  logic [2:0]  nac_bufst, sdu_bufst;
  logic [15:0] nac_err, sdu_err;
  logic [3:0]  nac_st, sdu_st;
  axis_t       nac_data_o, nac_ctrl_i = AXIS_IDLE, nac_ctrl_o, nac_tcs_i = AXIS_IDLE, sdu_tcs_o;
  axis_t       sdu_tcs_i = AXIS_IDLE, nac_tcs_o, sdu_ctrl_i = AXIS_IDLE, sdu_ctrl_o;
  logic        nac_ctrl_ready, nac_tcs_ready, sdu_tcs_ready, sdu_ctrl_ready;
  logic [63:0] nac_veto = '0, sdu_veto_seen, nac_veto_seen;
  logic        nac_xr, sdu_xr, using_gen;
  logic [31:0] n_triggers, n_frames, n_vetoed, n_dropped, n_sent, emu_pulses;

  ifdaq_top u_top (
    .clk_sys, .rst_sys, .clk_ucf, .rst_ucf, .adc_sclk, .adc_cs, .adc_miso,
    .use_emulator(1'b1), .emu_rate_log2(5'd8), .cfg, .veto_ch, .veto_card,
    .generate_id, .use_gen_clock, .gen_clock_lock, .ref_clk_sel,
    .invert_m2s, .invert_s2m, .nac_reinit, .nac_link_up(nac_up), .sdu_link_up(sdu_up),
    .nac_constant(nac_const), .sdu_constant(sdu_const), .nac_bufstatus(nac_bufst),
    .nac_err_count(nac_err), .nac_tx_state(nac_st), .sdu_tx_state(sdu_st),
    .nac_data_o, .nac_ctrl_i, .nac_ctrl_ready, .nac_ctrl_o, .nac_tcs_i, .nac_tcs_ready,
    .sdu_tcs_o, .sdu_tcs_i, .sdu_tcs_ready, .nac_tcs_o, .sdu_ctrl_i, .sdu_ctrl_ready, .sdu_ctrl_o,
    .nac_veto, .sdu_veto_seen, .nac_veto_seen, .nac_xcvr_reset(nac_xr), .sdu_xcvr_reset(sdu_xr),
    .using_gen_clock(using_gen), .sdu_bufstatus(sdu_bufst), .sdu_err_count(sdu_err),
    .n_triggers, .n_frames, .n_vetoed, .n_dropped, .n_sent, .emu_pulses);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #40_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // ---------------- mechanism counters
  int m_pol_sdu = 0, m_pol_nac = 0, m_tcs = 0, m_ctrl_down = 0, m_ctrl_up = 0;
  int m_nested = 0, m_ccp = 0, m_bp_veto = 0, m_refclk = 0, m_reinit = 0, m_card = 0;
  int frames_rx = 0, bad_frames = 0, words_during_bp = 0;
  logic in_frame = 0, bp_active = 0;
  logic [31:0] fw [$];
  logic [31:0] last_ts [96];
  logic up_q = 0;

  always @(posedge clk_ucf) if (!rst_ucf) begin
    up_q <= nac_up;
    if (up_q && !nac_up) m_reinit++;
    if (sdu_st == 4'd12) m_ccp++;
    if (sdu_tcs_o.valid && sdu_tcs_o.last) m_tcs++;
    if (sdu_ctrl_o.valid && sdu_ctrl_o.last) m_ctrl_down++;
    if (nac_ctrl_o.valid) begin
      if (in_frame) m_nested++;
      if (nac_ctrl_o.last) m_ctrl_up++;
    end
    if (nac_data_o.valid) begin
      if (bp_active) words_during_bp++;
      fw.push_back(nac_data_o.data);
      in_frame <= !nac_data_o.last;
      if (nac_data_o.last) begin
        int ch;
        frames_rx++;
        ch = int'(fw[1][31:24]);
        if (fw.size() < 3 || fw[0] != 0 || ch >= 96 || int'(fw[1][15:0]) != fw.size() ||
            veto_ch[ch] || (last_ts[ch] != 0 && fw[2] <= last_ts[ch])) begin
          bad_frames++;
          if (bad_frames < 5) $display("bad frame: size %0d w0 %h w1 %h w2 %h", fw.size(), fw[0], fw[1], fw[2]);
        end else last_ts[ch] = fw[2];
        fw.delete();
      end
    end
  end

  always @(posedge clk_ucf) begin
    if (u_top.u_sdu.u_ucf.rx_polarity === 1'b1 && m_pol_sdu == 0) m_pol_sdu = 1;
    if (u_top.u_nac.rx_polarity === 1'b1 && m_pol_nac == 0) m_pol_nac = 1;
  end

  // ---------------- stimulus helpers
  task automatic send_tcs(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk_ucf);
      nac_tcs_i = '{valid: 1'b1, data: 32'h7C50_0000 + i, keep: 4'hF, last: (i == n - 1)};
      @(posedge clk_ucf); while (!nac_tcs_ready) @(posedge clk_ucf);
    end
    @(negedge clk_ucf); nac_tcs_i = AXIS_IDLE;
  endtask
  task automatic send_ctrl_down(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk_ucf);
      nac_ctrl_i = '{valid: 1'b1, data: 32'hC0DE_0000 + i, keep: 4'hF, last: (i == n - 1)};
      @(posedge clk_ucf); while (!nac_ctrl_ready) @(posedge clk_ucf);
    end
    @(negedge clk_ucf); nac_ctrl_i = AXIS_IDLE;
  endtask
  task automatic send_ctrl_up(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk_ucf);
      sdu_ctrl_i = '{valid: 1'b1, data: 32'h5EC0_0000 + i, keep: 4'hF, last: (i == n - 1)};
      @(posedge clk_ucf); while (!sdu_ctrl_ready) @(posedge clk_ucf);
    end
    @(negedge clk_ucf); sdu_ctrl_i = AXIS_IDLE;
  endtask
  task automatic wait_sys(input int n);
    repeat (n) @(posedge clk_sys);
  endtask
  task automatic wait_up();
    int t = 0;
    while (!(nac_up && sdu_up) && t < 20000) begin @(posedge clk_ucf); t++; end
    check(nac_up && sdu_up, "link up");
  endtask

  int vetoed_before, sent_before;

  initial begin
    for (int c = 0; c < 96; c++) last_ts[c] = 0;
    cfg = '{delay: 5'd5, factor: 4'd5, nmb_samples: 4'd3, nmb_samples_fr: 8'd30, avg_pow: 4'd6};
    veto_ch[5] = 1'b1;                       // channel 5 stays vetoed
    repeat (10) @(posedge clk_ucf);
    rst_sys = 0; rst_ucf = 0;
    wait_up();
    check(nac_const == 32'h5D0_0001 && sdu_const == 32'hAC0_0001, "constants exchanged");
    check(ref_clk_sel == 3'b101, "default reference clock of transceiver 4");

    // event data with control and timing traffic
    wait_sys(30_000);
    for (int k = 0; k < 6; k++) begin
      fork
        send_tcs(3);
        send_ctrl_down(4);
      join
      wait (in_frame == 1'b1);
      send_ctrl_up(3);
      wait_sys(2_000);
    end

    // back pressure: veto the data channel at the concentrator
    nac_veto[0] = 1'b1;
    repeat (200) @(posedge clk_ucf);
    check(sdu_veto_seen[0] == 1'b1, "veto reaches the SDU");
    bp_active = 1'b1;
    repeat (2_000) @(posedge clk_ucf);
    bp_active = 1'b0;
    if (words_during_bp == 0) m_bp_veto++;
    nac_veto[0] = 1'b0;
    wait_sys(10_000);

    // card veto: no new frames, then drain
    vetoed_before = n_vetoed;
    veto_card = 1'b1;
    wait_sys(30_000);
    m_card = (n_vetoed > vetoed_before) ? 1 : 0;
    check(frames_rx == n_sent, "all sent frames received before clock switch");
    sent_before = n_sent;

    // reference clock switch: the generated clock locks
    gen_clock_lock = 1'b1;
    repeat (20) @(posedge clk_ucf);
    if (ref_clk_sel == 3'b000 && using_gen) m_refclk++;
    repeat (50) @(posedge clk_ucf);
    wait_up();
    check(n_sent == sent_before, "no frames while the card is vetoed");
    veto_card = 1'b0;
    wait_sys(40_000);
    veto_card = 1'b1;
    wait_sys(30_000);

    check(nac_bufst == 3'b000, "elastic buffer never under- or overflowed");
    check(nac_err == 0 && sdu_err == 0, "no code errors while the link was up");
    check(frames_rx == n_sent, $sformatf("frames received %0d = sent %0d", frames_rx, n_sent));
    check(bad_frames == 0, $sformatf("%0d malformed frames", bad_frames));
    check(n_frames >= n_sent, "frames made >= frames sent");
    check(emu_pulses > 0, "emulator produced pulses");
    check(n_triggers > 0, "mechanism: trigger");
    check(frames_rx > 50, $sformatf("mechanism: frames (%0d)", frames_rx));
    check(n_vetoed > 0, "mechanism: channel veto");
    check(m_card > 0, "mechanism: card veto");
    check(m_pol_sdu > 0, "mechanism: polarity correction at SDU");
    check(m_pol_nac > 0, "mechanism: polarity correction at concentrator");
    check(m_tcs == 6, $sformatf("mechanism: TCS frames %0d", m_tcs));
    check(m_ctrl_down == 6, $sformatf("mechanism: control down %0d", m_ctrl_down));
    check(m_ctrl_up == 6, $sformatf("mechanism: control up %0d", m_ctrl_up));
    check(m_nested > 0, "mechanism: control frame nested in data frame");
    check(m_ccp > 0, "mechanism: clock correction");
    check(m_bp_veto > 0, "mechanism: back-pressure veto stalls data");
    check(m_refclk > 0, "mechanism: reference clock switch");
    check(m_reinit > 0, "mechanism: link re-initialization");
    $display("frames=%0d triggers=%0d made=%0d vetoed=%0d dropped=%0d ccp=%0d nested=%0d",
             frames_rx, n_triggers, n_frames, n_vetoed, n_dropped, m_ccp, m_nested);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
