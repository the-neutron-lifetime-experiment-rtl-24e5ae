// tb_delay_fifo: eight interleaved channels in random order; for each
// sample of a channel the output must be the sample of the same channel
// `delay` samples earlier (zero before that many samples). The delay is 5
// (typical setting) and then 17.
`timescale 1ns/1ps
module tb_delay_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [4:0] delay = 5'd5;
  logic in_valid = 0;
  logic [2:0] in_ch = '0;
  logic [11:0] in_sample = '0, out_sample;

  delay_fifo #(.NCH(8), .W(12), .MAX_DELAY(32)) dut (.clk, .rst, .delay, .in_valid, .in_ch, .in_sample, .out_sample);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  logic [11:0] hist [8][2048];
  int          hn [8];
  initial begin
    for (int c = 0; c < 8; c++) hn[c] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 1500; i++) begin
        logic [11:0] expv;
        int c, sz;
        @(negedge clk);
        c = $urandom % 8;
        in_valid = 1; in_ch = 3'(c); in_sample = 12'($urandom);
        sz = hn[c];
        expv = 12'h0;
        if (sz >= int'(delay)) expv = hist[c][sz - int'(delay)];
        hist[c][sz] = in_sample; hn[c] = sz + 1;
        @(posedge clk); #1;
        check(out_sample == expv, $sformatf("ch %0d delay %0d", c, delay));
        @(negedge clk); in_valid = 0;
      end
      // new delay: restart so the history is consistent
      @(negedge clk); rst = 1; delay = 5'd17;
      for (int c = 0; c < 8; c++) hn[c] = 0;
      @(negedge clk); rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
