// tb_ltc1407_readout: the read-out against a behavioural model of 48
// LTC1407 converters written from the serial timing alone: a rising serial
// clock with the conversion signal high starts a frame at position 0; the
// model changes its data line on each falling serial clock to the bit of
// the next position (channel 1 MSB first in positions 3..14, channel 2 in
// 19..30). Every converter gets new random values each frame. Checks every
// sample of every frame, the frame period of 68 system clocks (34 serial
// clocks of two system clocks) and that the conversion pulse is one serial
// clock long.
`timescale 1ns/1ps
module tb_ltc1407_readout;
  localparam int NADC = 48;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic adc_sclk, adc_cs, valid;
  logic [NADC-1:0] adc_miso = '0;
  logic [NADC-1:0][11:0] sample_a, sample_b;

  ltc1407_readout #(.NADC(NADC), .FRAME_SCLK(34)) dut (
    .clk, .rst, .enable(1'b1), .adc_sclk, .adc_cs, .adc_miso, .valid, .sample_a, .sample_b);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #2_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  // converter model
  logic [11:0] va [NADC], vb [NADC];
  logic [11:0] qa [$][NADC];
  int pos = 40, cs_len = 0;
  always @(posedge adc_sclk) begin
    if (adc_cs) begin
      pos = 0; cs_len++;
      for (int i = 0; i < NADC; i++) begin va[i] = 12'($urandom); vb[i] = 12'($urandom); end
    end else pos++;
  end
  always @(negedge adc_sclk) begin
    int p;
    p = pos + 1;
    for (int i = 0; i < NADC; i++)
      adc_miso[i] <= (p >= 3 && p <= 14) ? va[i][14 - p] : (p >= 19 && p <= 30) ? vb[i][30 - p] : 1'b0;
  end

  int frames = 0, last_t = -1, period_bad = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (!rst && valid) begin
    bit ok;
    ok = 1;
    for (int i = 0; i < NADC; i++) if (sample_a[i] != va[i] || sample_b[i] != vb[i]) ok = 0;
    if (frames > 0) check(ok, $sformatf("frame %0d samples", frames));
    if (last_t >= 0 && cyc - last_t != 68) period_bad++;
    last_t = cyc;
    frames++;
  end
  int cs_high = 0, cs_bad = 0;
  always @(posedge clk) if (!rst) begin
    if (adc_cs) cs_high++;
    else begin if (cs_high != 0 && cs_high != 2) cs_bad++; cs_high = 0; end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (frames == 60);
    check(period_bad == 0, "frame period 68 clocks");
    check(cs_bad == 0, "conversion pulse one serial clock long");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
