// ltc1407_readout: parallel read-out of NADC dual-channel 12-bit SAR ADCs
// (LTC1407) over their three-wire serial interface.
//
// All ADCs share one serial clock and one conversion signal; each has its own
// data line. The serial clock is the system clock divided by two (100 MHz ->
// 50 MHz). A frame lasts FRAME_SCLK serial clocks: in serial clock 0 the
// conversion signal is high for one cycle, then the ADC streams the 12-bit
// word of its first channel followed by that of its second channel, MSB
// first. Bit positions inside the frame (this implementation's reading of
// the converter's timing): two idle clocks after the conversion pulse,
// channel 1 in serial clocks 3..14, four idle clocks, channel 2 in 19..30,
// idle to the end. Data is sampled at the system clock edge on which the
// serial clock rises; the ADC changes its output on the falling edge.
//
// At the end of each frame `valid` pulses for one clock with `sample_a`
// (first channel) and `sample_b` (second channel) of every ADC. With the
// defaults a frame is 68 system clocks, i.e. 1.47 MSPS per channel.
module ltc1407_readout #(
  parameter int NADC       = 48,
  parameter int FRAME_SCLK = 34
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   enable,
  output logic                   adc_sclk,
  output logic                   adc_cs,
  input  logic [NADC-1:0]        adc_miso,
  output logic                   valid,
  output logic [NADC-1:0][11:0]  sample_a,
  output logic [NADC-1:0][11:0]  sample_b
);

  localparam int A_FIRST = 3, B_FIRST = 19;
  logic [$clog2(FRAME_SCLK)-1:0] bitpos;
  logic [NADC-1:0][11:0] sh_a, sh_b;
  logic rising;

  // rising: the serial clock goes high at this system clock edge
  assign rising = !adc_sclk;

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      adc_sclk <= 1'b0;
      adc_cs   <= 1'b0;
      bitpos   <= '0;
      sh_a     <= '0;
      sh_b     <= '0;
      sample_a <= '0;
      sample_b <= '0;
    end else begin
      adc_sclk <= ~adc_sclk;
      if (rising) begin
        // the conversion pulse covers serial clock 0 of the next frame
        if (!enable) begin
          adc_cs <= 1'b0;
          bitpos <= '0;
        end else begin
          adc_cs <= (bitpos == '0);
          if (int'(bitpos) >= A_FIRST && int'(bitpos) < A_FIRST + 12)
            for (int i = 0; i < NADC; i++) sh_a[i] <= {sh_a[i][10:0], adc_miso[i]};
          if (int'(bitpos) >= B_FIRST && int'(bitpos) < B_FIRST + 12)
            for (int i = 0; i < NADC; i++) sh_b[i] <= {sh_b[i][10:0], adc_miso[i]};
          if (int'(bitpos) == FRAME_SCLK - 1) begin
            bitpos <= '0;
            valid  <= 1'b1;
            sample_a <= sh_a;
            sample_b <= sh_b;
          end else begin
            bitpos <= bitpos + 1'b1;
          end
        end
      end
    end
  end

endmodule
