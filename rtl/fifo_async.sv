// fifo_async: dual-clock FIFO with Gray-coded pointers.
//
// Used in the signal detection unit as the decouple FIFO behind each ADC and
// as the UCF FIFO that carries finished frames from the 100 MHz processing
// domain to the 62.5 MHz link domain. Pointers cross the clock boundary in
// Gray code through two flip-flops, so `full` and `empty` are conservative
// for two clocks of the other side. Show-ahead read: `dout` is the oldest
// entry whenever `empty` is low; `rd_en` removes it. Depth 2**DEPTH_LOG2.
module fifo_async #(
  parameter int WIDTH      = 32,
  parameter int DEPTH_LOG2 = 4
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);

  typedef logic [DEPTH_LOG2:0] ptr_t;
  logic [WIDTH-1:0] mem [2**DEPTH_LOG2];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // full: write pointer one lap ahead of the synchronised read pointer
  assign full  = (wgray == {~rgray_w2[DEPTH_LOG2:DEPTH_LOG2-1], rgray_w2[DEPTH_LOG2-2:0]});
  assign empty = (rgray == wgray_r2);
  assign dout  = mem[rbin[DEPTH_LOG2-1:0]];

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        mem[wbin[DEPTH_LOG2-1:0]] <= din;
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
