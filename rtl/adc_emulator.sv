// adc_emulator: stand-in for the detector ADCs, used to test the signal
// detection unit without analog electronics.
//
// Every channel produces a baseline with pseudo-random noise from a 16-bit
// linear feedback shift register, and at pseudo-random distances a proton
// pulse is added: the amplitude jumps to PULSE_PEAK and decays by 1/8 per
// sample, a simple stand-in for the CR/RC shaper output. A pulse starts in a
// sample when the low `rate_log2` bits of the channel's LFSR are all zero, so
// the mean distance between pulses is about 2**rate_log2 samples. Channel
// values are 12 bit.
//
// The emulator answers the three-wire interface of ltc1407_readout: at each
// conversion pulse it computes new samples for both channels of each ADC and
// shifts them out, MSB first, channel 1 in serial clocks 3..14 and channel 2
// in 19..30, changing its data lines when the serial clock falls. It runs on
// the same system clock as the read-out and watches `adc_sclk`.
module adc_emulator #(
  parameter int NADC       = 48,
  parameter int BASELINE   = 400,
  parameter int PULSE_PEAK = 1500
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0]      rate_log2,
  input  logic            adc_sclk,
  input  logic            adc_cs,
  output logic [NADC-1:0] adc_miso,
  output logic [31:0]     pulses        // number of pulses generated
);

  localparam int NCH = 2 * NADC;
  logic [NCH-1:0][15:0] lfsr;
  logic [NCH-1:0][11:0] amp;
  logic [NADC-1:0][11:0] va, vb;
  logic [5:0] ecnt;

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    // x^16 + x^14 + x^13 + x^11 + 1, Fibonacci form
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  function automatic logic [11:0] mix(input logic [11:0] a, input logic [3:0] r);
    // baseline + noise in [-8, +7] + pulse amplitude
    return 12'(BASELINE) + 12'(a) + {{8{r[3]}}, r[3:0]};
  endfunction

  function automatic logic out_bit(input int pos, input logic [11:0] a, input logic [11:0] b);
    if (pos >= 3 && pos <= 14)  return a[14 - pos];
    if (pos >= 19 && pos <= 30) return b[30 - pos];
    return 1'b0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NCH; c++) begin
        lfsr[c] <= 16'hACE1 ^ 16'(c * 16'h3B5);
        amp[c]  <= '0;
      end
      va <= '0; vb <= '0; ecnt <= '0; adc_miso <= '0; pulses <= '0;
    end else if (!adc_sclk) begin
      // serial clock rises at this edge
      if (adc_cs) begin
        logic [31:0] np;
        np = pulses;
        ecnt <= 6'd1;
        for (int c = 0; c < NCH; c++) begin
          logic [15:0] r;
          logic [11:0] a;
          logic [15:0] mask;
          r = lfsr_next(lfsr[c]);
          lfsr[c] <= r;
          mask = (16'h1 << rate_log2) - 16'h1;
          a = amp[c] - (amp[c] >> 3);
          if ((r & mask) == 16'h0 && amp[c] < 12'(PULSE_PEAK / 8)) begin
            a = 12'(PULSE_PEAK);
            np = np + 1;
          end
          amp[c] <= a;
          if (c % 2 == 0) va[c/2] <= mix(a, 4'(lfsr_next(r)));
          else            vb[c/2] <= mix(a, 4'(lfsr_next(r)));
        end
        pulses <= np;
      end else if (ecnt != 6'd63) begin
        ecnt <= ecnt + 6'd1;
      end
    end else begin
      // serial clock falls at this edge: present the bit of the next serial clock
      for (int i = 0; i < NADC; i++) adc_miso[i] <= out_bit(int'(ecnt) + 1, va[i], vb[i]);
    end
  end

endmodule
