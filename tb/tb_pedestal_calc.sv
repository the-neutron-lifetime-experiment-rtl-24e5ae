// tb_pedestal_calc: running pedestal and mean quadratic deviation against a
// reference model, for eight channels in random order with N = 2^4 and
// then N = 2^6 samples.
//
// Model per channel: first N samples summed, P = sum / N; next N samples
// sum (S-P)^2, sigma2 = sum / N, then ready. After that, for each sample
// not paused and not above threshold (S-P > factor * sigma2):
// Psum += S - P, P = Psum / N, Ssum += (S-P)^2 - sigma2, sigma2 = Ssum / N.
// Samples are a per-channel baseline with noise, a slow drift and some
// large spikes; `pause` is set on random channels for stretches. The
// outputs (values before the sample is added) are compared every sample,
// and the final pedestal must follow the drifted baseline.
`timescale 1ns/1ps
module tb_pedestal_calc;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] avg_pow = 4'd4, factor = 4'd5;
  logic in_valid = 0;
  logic [2:0] in_ch = '0;
  logic [11:0] in_sample = '0;
  logic [7:0] pause = '0;
  logic out_valid, ped_ready;
  logic [2:0] out_ch;
  logic [11:0] out_sample, ped;
  logic [23:0] sigma2;

  pedestal_calc #(.NCH(8), .W(12), .AVG_POW_MAX(12)) dut (
    .clk, .rst, .avg_pow, .factor, .in_valid, .in_ch, .in_sample, .pause,
    .out_valid, .out_ch, .out_sample, .ped, .sigma2, .ped_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #5_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  longint psum [8], ssum [8];
  int p [8], s2 [8], cnt [8], base [8];
  bit rdy [8];

  task automatic run(input int n_samples);
    int n;
    n = 1 << avg_pow;
    for (int c = 0; c < 8; c++) begin psum[c] = 0; ssum[c] = 0; p[c] = 0; s2[c] = 0; cnt[c] = 0; rdy[c] = 0; base[c] = 500 + 300 * c; end
    @(negedge clk); rst = 1; in_valid = 0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < n_samples; i++) begin
      int c, s, d;
      @(negedge clk);
      c = $urandom % 8;
      if (i % 64 == 0) base[c] = base[c] + 1;             // slow drift
      s = base[c] + int'($urandom % 17) - 8;
      if (rdy[c] && $urandom % 50 == 0) s = s + 800;       // spike, once ready
      if (i % 200 == 0) pause = 8'($urandom) & 8'($urandom);
      in_valid = 1; in_ch = 3'(c); in_sample = 12'(s);
      // expected outputs: values before this sample
      @(posedge clk); #1;
      check(out_valid && out_ch == 3'(c) && out_sample == 12'(s), "pass-through");
      check(ped == 12'(p[c]) && sigma2 == 24'(s2[c]) && ped_ready == rdy[c],
            $sformatf("ch %0d ped %0d/%0d sigma2 %0d/%0d ready %b/%b", c, ped, p[c], sigma2, s2[c], ped_ready, rdy[c]));
      // model update
      d = s - p[c];
      if (!rdy[c]) begin
        if (cnt[c] < n) begin
          psum[c] += s;
          if (cnt[c] == n - 1) p[c] = int'(psum[c] >> avg_pow);
        end else begin
          ssum[c] += longint'(d) * d;
          if (cnt[c] == 2 * n - 1) begin s2[c] = int'(ssum[c] >> avg_pow); rdy[c] = 1; end
        end
        cnt[c]++;
      end else if (!pause[c] && !(d > 0 && d > int'(factor) * s2[c])) begin
        psum[c] = psum[c] - p[c] + s;
        ssum[c] = ssum[c] - s2[c] + longint'(d) * d;
        p[c] = int'(psum[c] >> avg_pow);
        s2[c] = int'(ssum[c] >> avg_pow);
      end
      @(negedge clk); in_valid = 0;
    end
    for (int c = 0; c < 8; c++)
      check(rdy[c] && p[c] > base[c] - 12 && p[c] < base[c] + 12, $sformatf("ch %0d pedestal %0d follows baseline %0d", c, p[c], base[c]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(3000);
    avg_pow = 4'd6;
    run(8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
