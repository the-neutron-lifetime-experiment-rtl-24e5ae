// pedestal_sub: removes the baseline from the direct and the delayed sample
// stream of a processing unit.
//
// diff = sample - ped and diff_dly = sample_dly - ped as 16-bit signed
// numbers (the direct one feeds the signal detection, the delayed one the
// frame generator). Channel, pedestal-ready flag and sigma2 are passed along
// so the next stage sees one aligned record. Timing: one clock, registered.
module pedestal_sub #(
  parameter int W   = 12,
  parameter int NCH = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic [W-1:0]           sample,
  input  logic [W-1:0]           sample_dly,
  input  logic [W-1:0]           ped,
  input  logic [2*W-1:0]         sigma2_in,
  input  logic                   ready_in,
  output logic                   out_valid,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic signed [15:0]     diff,
  output logic signed [15:0]     diff_dly,
  output logic [2*W-1:0]         sigma2,
  output logic                   ped_ready
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_ch <= '0; diff <= '0; diff_dly <= '0; sigma2 <= '0; ped_ready <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_ch    <= in_ch;
      diff      <= 16'($signed({1'b0, sample}) - $signed({1'b0, ped}));
      diff_dly  <= 16'($signed({1'b0, sample_dly}) - $signed({1'b0, ped}));
      sigma2    <= sigma2_in;
      ped_ready <= ready_in;
    end
  end

endmodule
