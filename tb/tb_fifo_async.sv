// tb_fifo_async: dual-clock FIFO with unrelated write (10 ns) and read
// (7 ns) clocks. Random write and read enables; every word read must be the
// next word written, `full` must stop writes without loss, and at the end
// all words must have come out.
`timescale 1ns/1ps
module tb_fifo_async;
  logic wclk = 0, rclk = 0, rst = 1;
  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] din = '0, dout;

  fifo_async #(.WIDTH(32), .DEPTH_LOG2(4)) dut (
    .wclk, .wrst(rst), .wr_en, .din, .full, .rclk, .rrst(rst), .rd_en, .dout, .empty);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #2_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  int n_wr = 0, n_rd = 0, saw_full = 0;
  localparam int N = 3000;
  always @(posedge wclk) if (!rst) begin
    if (wr_en && !full) n_wr <= n_wr + 1;
    if (full) saw_full <= 1;
  end
  always @(negedge wclk) begin
    wr_en <= (n_wr < N) && ($urandom % 4 != 0);
    din   <= 32'(n_wr) ^ 32'hA5A5_0000;
  end
  // reader: slow at first so the FIFO fills up
  always @(posedge rclk) if (!rst) begin
    if (rd_en && !empty) begin
      check(dout == (32'(n_rd) ^ 32'hA5A5_0000), $sformatf("word %0d", n_rd));
      n_rd <= n_rd + 1;
    end
  end
  always @(negedge rclk) rd_en <= ($time < 20_000) ? ($urandom % 8 == 0) : ($urandom % 2 == 0);

  initial begin
    repeat (4) @(posedge wclk);
    rst = 0;
    wait (n_rd == N);
    check(saw_full == 1, "FIFO became full");
    repeat (10) @(posedge rclk);
    check(empty == 1, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
