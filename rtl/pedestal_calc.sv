// pedestal_calc: running pedestal and mean quadratic deviation per channel,
// shared by the NCH channels of a processing unit (one sample per clock, of
// any channel).
//
// With N = 2**avg_pow samples and per channel the sums Psum and Ssum:
//   Psum <= Psum - P + S          P     <= Psum / N
//   Ssum <= Ssum - sigma2 + (S-P)^2   sigma2 <= Ssum / N
// (running sums over N samples). After reset a channel first sums N samples
// to get its pedestal, then N samples of (S-P)^2 to get sigma2; from then on
// `ped_ready` is high and both values float with the baseline. While `pause`
// is set for a channel (it is inside an event) its values are frozen.
// Design choice beyond the thesis text: a sample that is itself above the
// trigger threshold (S-P > factor*sigma2) is also left out. Otherwise the
// first samples of a pulse, which arrive before the trigger can pause the
// calculation, inflate sigma2 so much that the threshold jumps above the
// pulse and the event is never triggered.
//
// Timing: outputs are registered, one clock after the sample, and carry the
// pedestal and sigma2 that were valid before this sample was added.
module pedestal_calc #(
  parameter int NCH         = 8,
  parameter int W           = 12,
  parameter int AVG_POW_MAX = 12
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [3:0]             avg_pow,
  input  logic [3:0]             factor,
  input  logic                   in_valid,
  input  logic [$clog2(NCH)-1:0] in_ch,
  input  logic [W-1:0]           in_sample,
  input  logic [NCH-1:0]         pause,
  output logic                   out_valid,
  output logic [$clog2(NCH)-1:0] out_ch,
  output logic [W-1:0]           out_sample,
  output logic [W-1:0]           ped,
  output logic [2*W-1:0]         sigma2,
  output logic                   ped_ready
);

  localparam int PSW = W + AVG_POW_MAX;       // pedestal sum width
  localparam int SSW = 2 * W + AVG_POW_MAX;   // deviation sum width
  localparam int CW  = AVG_POW_MAX + 2;       // initial phase counter
  localparam int W2  = 2 * W;

  logic [NCH-1:0][PSW-1:0] psum;
  logic [NCH-1:0][SSW-1:0] ssum;
  logic [NCH-1:0][W-1:0]   p;
  logic [NCH-1:0][2*W-1:0] s2;
  logic [NCH-1:0][CW-1:0]  cnt;
  logic [NCH-1:0]          rdy;

  logic [CW-1:0] n;
  assign n = CW'(1) << avg_pow;

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (rst) begin
      psum <= '0; ssum <= '0; p <= '0; s2 <= '0; cnt <= '0; rdy <= '0;
      out_ch <= '0; out_sample <= '0; ped <= '0; sigma2 <= '0; ped_ready <= 1'b0;
    end else if (in_valid) begin
      logic signed [W:0]    d;
      logic signed [W2-1:0] de;
      logic [W2-1:0]        dsq;
      logic [PSW-1:0]     ps;
      logic [SSW-1:0]     ss;
      d   = $signed({1'b0, in_sample}) - $signed({1'b0, p[in_ch]});
      de  = W2'(d);
      dsq = de * de;
      out_valid  <= 1'b1;
      out_ch     <= in_ch;
      out_sample <= in_sample;
      ped        <= p[in_ch];
      sigma2     <= s2[in_ch];
      ped_ready  <= rdy[in_ch];
      if (!rdy[in_ch]) begin
        if (cnt[in_ch] < n) begin
          // phase 1: pedestal
          ps = psum[in_ch] + PSW'(in_sample);
          psum[in_ch] <= ps;
          if (cnt[in_ch] == n - 1) p[in_ch] <= W'(ps >> avg_pow);
        end else begin
          // phase 2: deviation with the pedestal of phase 1
          ss = ssum[in_ch] + SSW'(dsq);
          ssum[in_ch] <= ss;
          if (cnt[in_ch] == 2*n - 1) begin
            s2[in_ch]  <= W2'(ss >> avg_pow);
            rdy[in_ch] <= 1'b1;
          end
        end
        cnt[in_ch] <= cnt[in_ch] + 1'b1;
      end else if (!pause[in_ch] &&
                   !(d > 0 && (W2+4)'(unsigned'(d)) > (W2+4)'(factor) * (W2+4)'(s2[in_ch]))) begin
        ps = psum[in_ch] - PSW'(p[in_ch]) + PSW'(in_sample);
        ss = ssum[in_ch] - SSW'(s2[in_ch]) + SSW'(dsq);
        psum[in_ch] <= ps;
        ssum[in_ch] <= ss;
        p[in_ch]    <= W'(ps >> avg_pow);
        s2[in_ch]   <= W2'(ss >> avg_pow);
      end
    end
  end

endmodule
