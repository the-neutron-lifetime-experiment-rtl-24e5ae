// tb_signal_detect: the per-channel trigger against a reference model.
//
// Eight channels in random order get pedestal-subtracted values: mostly
// noise around zero, with bursts of large values of random length. Each
// channel has its own sigma2. The model: a sample is above threshold when
// diff > factor * sigma2; `nmb_samples` consecutive samples above threshold
// start an event (trigger on that sample) of `nmb_samples_fr` samples
// during which no new trigger happens; `pause` is high while an event is
// open. The outputs one clock after each sample must match the model. The
// test also checks that a channel whose pedestal is not ready never
// triggers, and that triggers and whole events did occur.
`timescale 1ns/1ps
module tb_signal_detect;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] factor = 4'd5, nmb_samples = 4'd3;
  logic [7:0] nmb_samples_fr = 8'd10;
  logic in_valid = 0, ped_ready = 0;
  logic [2:0] in_ch = '0;
  logic signed [15:0] diff = '0, diff_dly = '0;
  logic [23:0] sigma2 = '0;
  logic out_valid, trigger, in_event, ev_last;
  logic [2:0] out_ch;
  logic signed [15:0] out_dly;
  logic [7:0] pause;

  signal_detect #(.NCH(8), .SW(24)) dut (
    .clk, .rst, .factor, .nmb_samples, .nmb_samples_fr, .in_valid, .in_ch, .diff, .diff_dly,
    .sigma2, .ped_ready, .out_valid, .out_ch, .out_dly, .trigger, .in_event, .ev_last, .pause);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #2_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  int m_above [8], m_left [8], burst [8];
  logic [23:0] s2 [8];
  int n_trig = 0, n_last = 0;

  initial begin
    for (int c = 0; c < 8; c++) begin m_above[c] = 0; m_left[c] = 0; burst[c] = 0; s2[c] = 24'(10 + $urandom % 30); end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 8000; i++) begin
      int c; bit above, e_trig, e_ev, e_last;
      @(negedge clk);
      c = $urandom % 8;
      in_valid = ($urandom % 5) != 0;
      ped_ready = (i >= 200) || (c != 0);
      in_ch = 3'(c);
      sigma2 = s2[c];
      if (burst[c] == 0 && $urandom % 40 == 0) burst[c] = 1 + $urandom % 6;
      if (burst[c] > 0) diff = 16'(int'(factor) * int'(s2[c]) + 1 + $urandom % 300);
      else diff = 16'(int'($urandom % 41) - 20);
      diff_dly = 16'($urandom);
      // reference model
      e_trig = 0; e_ev = 0; e_last = 0;
      if (in_valid) begin
        if (burst[c] > 0) burst[c]--;
        above = ped_ready && diff > 0 && int'(diff) > int'(factor) * int'(s2[c]);
        m_above[c] = above ? m_above[c] + 1 : 0;
        if (m_left[c] != 0) begin
          e_ev = 1; e_last = (m_left[c] == 1); m_left[c]--;
        end else if (above && m_above[c] >= int'(nmb_samples)) begin
          e_trig = 1; e_ev = 1; m_left[c] = int'(nmb_samples_fr) - 1;
        end
      end
      @(posedge clk); #1;
      check(out_valid == in_valid, "valid");
      if (in_valid) begin
        check(out_ch == 3'(c) && out_dly == diff_dly, "channel and delayed sample");
        check(trigger == e_trig && in_event == e_ev && ev_last == e_last,
              $sformatf("ch %0d trig %b/%b ev %b/%b last %b/%b", c, trigger, e_trig, in_event, e_ev, ev_last, e_last));
        if (trigger) n_trig++;
        if (ev_last) n_last++;
        if (trigger && c == 0) check(i >= 200, "no trigger before pedestal ready");
      end
      for (int k = 0; k < 8; k++) check(pause[k] == (m_left[k] != 0), "pause");
    end
    check(n_trig > 50 && n_last > 50, $sformatf("events happened (%0d, %0d)", n_trig, n_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
