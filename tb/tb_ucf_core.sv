// tb_ucf_core: a UCF master and a UCF slave connected back to back.
//
// Checks: link initialization and exchange of the constants; the TCS frame
// of the user-interface example (01020304, 05060708, 0910xxxx with keep 1100)
// from master to slave; a long USP frame on channel 0 from slave to master
// interrupted by a USP frame on channel 1 and by a TCS frame; the TCS
// start-of-frame latency of one clock; a veto set at the master stopping
// channel 0 of the slave and its release; clock-correction words being sent by
// the slave; and initialization with a swapped pair (polarity inversion)
// on the master-to-slave direction.
`timescale 1ns/1ps
module tb_ucf_core;
  import ucf_pkg::*;

  localparam int N_USP = 2;
  logic clk = 0, rst = 1;
  always #8 clk = ~clk;

  logic [39:0] m_tx, s_tx, m2s, s2m;
  logic invert_m2s = 0;
  assign m2s = invert_m2s ? ~m_tx : m_tx;
  assign s2m = s_tx;

  axis_t m_tcs_i = AXIS_IDLE, s_tcs_i = AXIS_IDLE, m_tcs_o, s_tcs_o;
  axis_t m_usp_i [N_USP], s_usp_i [N_USP], m_usp_o [N_USP], s_usp_o [N_USP];
  logic m_tcs_rdy, s_tcs_rdy;
  logic [N_USP-1:0] m_usp_rdy, s_usp_rdy;
  logic [63:0] m_veto_i = '0, s_veto_i = '0, m_veto_o, s_veto_o;
  logic [31:0] m_const_o, s_const_o;
  logic m_up, s_up, m_reinit = 0, s_reinit = 0;
  logic [3:0] m_state, s_state;
  logic [2:0] m_bufst, s_bufst;
  logic [15:0] m_err, s_err;
  logic m_xr, s_xr;

  ucf_core #(.N_USP(N_USP), .IS_MASTER(1'b1), .CC_INTERVAL(50)) u_m (
    .clk, .rst, .reinit(m_reinit), .rx_clk(clk), .tx_code(m_tx), .rx_code(s2m),
    .constant_i(32'hCAFE_0001), .constant_o(m_const_o), .link_up(m_up), .xcvr_reset(m_xr),
    .bufstatus(m_bufst), .rx_err_count(m_err), .tx_state(m_state),
    .tcs_i(m_tcs_i), .tcs_ready(m_tcs_rdy), .tcs_o(m_tcs_o), .usp_i(m_usp_i), .usp_ready(m_usp_rdy),
    .usp_o(m_usp_o), .veto_i(m_veto_i), .veto_o(m_veto_o));

  ucf_core #(.N_USP(N_USP), .IS_MASTER(1'b0), .CC_INTERVAL(50)) u_s (
    .clk, .rst, .reinit(s_reinit), .rx_clk(clk), .tx_code(s_tx), .rx_code(m2s),
    .constant_i(32'h0000_0005), .constant_o(s_const_o), .link_up(s_up), .xcvr_reset(s_xr),
    .bufstatus(s_bufst), .rx_err_count(s_err), .tx_state(s_state),
    .tcs_i(s_tcs_i), .tcs_ready(s_tcs_rdy), .tcs_o(s_tcs_o), .usp_i(s_usp_i), .usp_ready(s_usp_rdy),
    .usp_o(s_usp_o), .veto_i(s_veto_i), .veto_o(s_veto_o));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- sinks
  logic [31:0] m_rx0 [$], m_rx1 [$], m_rxt [$], s_rxt [$];
  logic [3:0]  s_rxt_keep [$];
  int m_last0 = 0, m_last1 = 0, m_lastt = 0, s_lastt = 0;
  always @(posedge clk) if (!rst) begin
    if (m_usp_o[0].valid) begin m_rx0.push_back(m_usp_o[0].data); if (m_usp_o[0].last) m_last0++; end
    if (m_usp_o[1].valid) begin m_rx1.push_back(m_usp_o[1].data); if (m_usp_o[1].last) m_last1++; end
    if (m_tcs_o.valid)    begin m_rxt.push_back(m_tcs_o.data); if (m_tcs_o.last) m_lastt++; end
    if (s_tcs_o.valid)    begin s_rxt.push_back(s_tcs_o.data); s_rxt_keep.push_back(s_tcs_o.keep); if (s_tcs_o.last) s_lastt++; end
  end

  // ---------------- sources: slave USP channels and slave TCS
  // Sources are queues with a read index advanced with nonblocking
  // assignments, so every process sees the values from before the clock edge.
  logic [31:0] src0 [$], src1 [$], srct [$];
  int i0 = 0, i1 = 0, it = 0;
  always_comb begin
    s_usp_i[0] = AXIS_IDLE; s_usp_i[1] = AXIS_IDLE; s_tcs_i = AXIS_IDLE;
    if (src0.size() > i0) s_usp_i[0] = '{valid: 1'b1, data: src0[i0], keep: 4'hF, last: src0.size() == i0 + 1};
    if (src1.size() > i1) s_usp_i[1] = '{valid: 1'b1, data: src1[i1], keep: 4'hF, last: src1.size() == i1 + 1};
    if (srct.size() > it) s_tcs_i    = '{valid: 1'b1, data: srct[it], keep: 4'hF, last: srct.size() == it + 1};
    m_usp_i[0] = AXIS_IDLE; m_usp_i[1] = AXIS_IDLE;
  end
  always @(posedge clk) begin
    if (s_usp_rdy[0] && s_usp_i[0].valid) i0 <= i0 + 1;
    if (s_usp_rdy[1] && s_usp_i[1].valid) i1 <= i1 + 1;
    if (s_tcs_rdy && s_tcs_i.valid)       it <= it + 1;
  end

  // state counters of the slave transmitter
  int n_ccp = 0, n_nest = 0, n_tcs_in_usp = 0;
  logic s_usp_open;
  always @(posedge clk) begin
    if (s_state == 4'd12) n_ccp++;                       // SENDCCP
    if (s_state == 4'd9 && u_s.u_tx.open_q[0] && u_s.u_tx.open_q[1]) n_nest++;  // nested SOF sent
    if (s_state == 4'd5 && u_s.u_tx.open_q != 0) n_tcs_in_usp++;               // TCS SOF inside USP
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    logic [31:0] exp0 [$];
    logic [31:0] exp1 [$];
    repeat (5) @(posedge clk);
    rst = 0;
    // ---------- initialization
    fork
      begin : wait_up
        wait (m_up && s_up);
      end
      begin
        repeat (2000) @(posedge clk);
      end
    join_any
    disable fork;
    check(m_up && s_up, "link came up");
    check(m_const_o == 32'h0000_0005, "master received slave constant");
    check(s_const_o == 32'hCAFE_0001, "slave received master constant");
    repeat (10) @(posedge clk);

    // ---------- TCS frame master -> slave, example of the user interface
    @(negedge clk);
    m_tcs_i = '{valid: 1'b1, data: 32'h0102_0304, keep: 4'hF, last: 1'b0};
    t0 = 0; lat = -1;
    // start-of-frame latency: tx_state shows SENDTCS one clock after valid
    @(posedge clk); #1;
    check(m_state == 4'd5, "TCS start of frame sent one clock after tvalid");
    @(posedge clk); while (!m_tcs_rdy) @(posedge clk);
    @(negedge clk); m_tcs_i = '{valid: 1'b1, data: 32'h0506_0708, keep: 4'hF, last: 1'b0};
    @(posedge clk); while (!m_tcs_rdy) @(posedge clk);
    @(negedge clk); m_tcs_i = '{valid: 1'b1, data: 32'h0910_1112, keep: 4'b1100, last: 1'b1};
    @(posedge clk); while (!m_tcs_rdy) @(posedge clk);
    @(negedge clk); m_tcs_i = AXIS_IDLE;
    repeat (30) @(posedge clk);
    check(s_rxt.size() == 3, $sformatf("slave received 3 TCS words (%0d)", s_rxt.size()));
    if (s_rxt.size() == 3) begin
      check(s_rxt[0] == 32'h0102_0304 && s_rxt[1] == 32'h0506_0708, "TCS words 0,1");
      check(s_rxt[2] == 32'h0910_0000, "TCS fill bytes appear as zero");
      check(s_rxt_keep[2] == 4'b1100, "TCS keep of last word");
    end
    check(s_lastt == 1, "TCS last flag");

    // ---------- USP ch0 long frame, interrupted by ch1 and by a TCS
    for (int i = 0; i < 40; i++) exp0.push_back(32'h1000_0000 + i);
    for (int i = 0; i < 5; i++)  exp1.push_back(32'h2000_0000 + i);
    @(negedge clk);
    foreach (exp0[i]) src0.push_back(exp0[i]);
    repeat (10) @(posedge clk);
    @(negedge clk);
    foreach (exp1[i]) src1.push_back(exp1[i]);
    repeat (3) @(posedge clk);
    @(negedge clk);
    srct.push_back(32'hAAAA_0001); srct.push_back(32'hAAAA_0002);
    repeat (200) @(posedge clk);
    check(m_rx0.size() == 40, $sformatf("master got 40 words on ch0 (%0d)", m_rx0.size()));
    check(m_rx1.size() == 5, $sformatf("master got 5 words on ch1 (%0d)", m_rx1.size()));
    for (int i = 0; i < 40 && i < m_rx0.size(); i++) check(m_rx0[i] == exp0[i], $sformatf("ch0 word %0d", i));
    for (int i = 0; i < 5 && i < m_rx1.size(); i++) check(m_rx1[i] == exp1[i], $sformatf("ch1 word %0d", i));
    check(m_last0 == 1 && m_last1 == 1, "one last per USP frame");
    check(m_rxt.size() == 2 && m_lastt == 1, $sformatf("TCS from slave received (%0d %0d)", m_rxt.size(), m_lastt));
    check(n_nest > 0, "nested USP frame happened");
    check(n_tcs_in_usp > 0, "TCS inside USP frame happened");
    check(n_ccp > 0, "slave sent clock correction words");
    check(m_bufst == 3'b000, "elastic buffer status nominal");

    // ---------- veto: master vetoes channel 0 of the slave
    @(negedge clk); m_veto_i[0] = 1'b1;
    repeat (20) @(posedge clk);
    check(s_veto_o[0] == 1'b1, "veto arrived at slave");
    m_rx0.delete(); src0.delete(); i0 = 0;
    @(negedge clk);
    for (int i = 0; i < 10; i++) src0.push_back(32'h3000_0000 + i);
    repeat (50) @(posedge clk);
    check(m_rx0.size() == 0, "vetoed channel sends nothing");
    check(src0.size() - i0 == 10, "vetoed channel not read");
    @(negedge clk); m_veto_i[0] = 1'b0;
    repeat (60) @(posedge clk);
    check(s_veto_o[0] == 1'b0, "veto released at slave");
    check(m_rx0.size() == 10, $sformatf("data flows after veto release (%0d)", m_rx0.size()));

    // ---------- polarity: swap the master->slave pair and re-initialize
    @(negedge clk); invert_m2s = 1; m_reinit = 1; s_reinit = 1;
    @(negedge clk); m_reinit = 0; s_reinit = 0;
    repeat (5) @(posedge clk);
    fork
      begin wait (m_up && s_up); end
      begin repeat (4000) @(posedge clk); end
    join_any
    disable fork;
    check(m_up && s_up, "link up again with swapped pair");
    check(u_s.u_rx.rx_polarity == 1'b1, "slave receiver inverted its polarity");
    check(u_m.u_rx.rx_polarity == 1'b0, "master receiver polarity unchanged");
    s_rxt.delete(); s_lastt = 0;
    @(negedge clk); m_tcs_i = '{valid: 1'b1, data: 32'h1234_5678, keep: 4'hF, last: 1'b1};
    @(posedge clk); while (!m_tcs_rdy) @(posedge clk);
    @(negedge clk); m_tcs_i = AXIS_IDLE;
    repeat (20) @(posedge clk);
    check(s_rxt.size() == 1 && s_rxt[0] == 32'h1234_5678 && s_lastt == 1, "TCS over swapped pair");
    check(s_err == 0, "no decode errors at slave once up");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
