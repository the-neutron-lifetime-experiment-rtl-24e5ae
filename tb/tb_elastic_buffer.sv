// tb_elastic_buffer: two elastic buffers, one read 1 % slower than it is
// written and one read 1 % faster. The writer sends numbered data words and
// a clock-correction word every 20 words. The data words must come out
// complete and in order (clock-correction words may be dropped or repeated),
// the buffer status must stay 000, the slow reader must see fewer and the
// fast reader more clock-correction words than were sent. A third run stops
// the writer's clock-correction words, so the slow reader's buffer must
// overflow (status 110).
`timescale 1ns/1ps
module tb_elastic_buffer;
  import ucf_pkg::*;
  logic wclk = 0, rclk_s = 0, rclk_f = 0, rst = 1;
  always #8.0 wclk = ~wclk;
  always #8.08 rclk_s = ~rclk_s;
  always #7.92 rclk_f = ~rclk_f;

  lword_t din = W_IDLE, dout_s, dout_f;
  logic [3:0] err_s, err_f;
  logic v_s, v_f;
  logic [2:0] st_s, st_f;
  logic cc_on = 1;

  elastic_buffer #(.DEPTH_LOG2(4)) u_s (.wr_clk(wclk), .wr_rst(rst), .din, .din_err(4'h0),
    .rd_clk(rclk_s), .rd_rst(rst), .dout(dout_s), .dout_err(err_s), .dout_valid(v_s), .bufstatus(st_s));
  elastic_buffer #(.DEPTH_LOG2(4)) u_f (.wr_clk(wclk), .wr_rst(rst), .din, .din_err(4'h0),
    .rd_clk(rclk_f), .rd_rst(rst), .dout(dout_f), .dout_err(err_f), .dout_valid(v_f), .bufstatus(st_f));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #3_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  int seq = 0, k = 0, cc_sent = 0;
  always @(posedge wclk) if (!rst) begin
    k <= (k == 20) ? 0 : k + 1;
    if (k == 20 && cc_on) begin din <= W_CCP; cc_sent <= cc_sent + 1; end
    else begin din <= '{data: 32'(seq), k: 4'h0}; seq <= seq + 1; end
  end

  int exp_s = 0, exp_f = 0, cc_s = 0, cc_f = 0, bad_s = 0, bad_f = 0;
  always @(negedge rclk_s) if (v_s) begin
    if (lw_eq(dout_s, W_CCP)) cc_s++;
    else if (lw_eq(dout_s, W_IDLE)) ;
    else begin if (dout_s.data != 32'(exp_s) || dout_s.k != 0) begin bad_s++; if (bad_s < 4) $display("got %h %b exp %0d", dout_s.data, dout_s.k, exp_s); end exp_s++; end
  end
  always @(negedge rclk_f) if (v_f) begin
    if (lw_eq(dout_f, W_CCP)) cc_f++;
    else if (lw_eq(dout_f, W_IDLE)) ;
    else begin if (dout_f.data != 32'(exp_f) || dout_f.k != 0) bad_f++; exp_f++; end
  end

  initial begin
    repeat (4) @(posedge wclk);
    @(negedge wclk); rst = 0;
    repeat (20_000) @(posedge wclk);
    check(bad_s == 0 && bad_f == 0, $sformatf("data in order (%0d, %0d bad)", bad_s, bad_f));
    check(exp_s > 19_000 && exp_f > 19_000, "data flowing on both");
    check(st_s == 3'b000 && st_f == 3'b000, "no under- or overflow");
    check(cc_s < cc_sent - 50, $sformatf("slow reader drops CC words (%0d of %0d)", cc_s, cc_sent));
    check(cc_f > cc_sent + 50, $sformatf("fast reader repeats CC words (%0d of %0d)", cc_f, cc_sent));
    cc_on = 0;
    repeat (3_000) @(posedge wclk);
    check(st_s == 3'b110, "overflow reported without CC words");
    check(st_f == 3'b101, "underflow reported without CC words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
