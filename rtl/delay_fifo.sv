// delay_fifo: per-channel delay of the sample stream by `delay` samples of
// the same channel, shared by the NCH channels of a processing unit.
//
// Each channel owns a ring of MAX_DELAY entries in one memory with its own
// write index. For a sample of channel c the module outputs the sample of
// channel c written `delay` samples earlier (0 < delay < MAX_DELAY), and
// stores the new one. Until a channel has seen `delay` samples the output is
// the reset content, zero. Timing: one clock, registered.
module delay_fifo #(
  parameter int NCH       = 8,
  parameter int W         = 12,
  parameter int MAX_DELAY = 32
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [$clog2(MAX_DELAY)-1:0] delay,
  input  logic                         in_valid,
  input  logic [$clog2(NCH)-1:0]       in_ch,
  input  logic [W-1:0]                 in_sample,
  output logic [W-1:0]                 out_sample
);

  localparam int AW = $clog2(MAX_DELAY);
  logic [W-1:0]  ring [NCH][MAX_DELAY];
  logic [NCH-1:0][AW-1:0] widx;

  always_ff @(posedge clk) begin
    if (rst) begin
      widx <= '0;
      out_sample <= '0;
      for (int c = 0; c < NCH; c++)
        for (int i = 0; i < MAX_DELAY; i++) ring[c][i] <= '0;
    end else if (in_valid) begin
      out_sample <= ring[in_ch][AW'(widx[in_ch] - delay)];
      ring[in_ch][widx[in_ch]] <= in_sample;
      widx[in_ch] <= widx[in_ch] + 1'b1;
    end
  end

endmodule
