// elastic_buffer: receive elastic buffer with clock correction for the UCF
// master.
//
// The master receives words in the clock recovered from the slave and reads
// them in its own user clock. The buffer is a dual-clock FIFO with Gray-coded
// pointers synchronised through two flip-flops. It keeps its fill level near
// DEPTH/2 using the clock-correction word that the slave inserts now and
// then: on the write side a clock-correction word is dropped when the buffer
// is above half full; on the read side a clock-correction word at the head is
// repeated instead of read when the buffer is below half full minus one.
// Clock-correction words carry no data, so the receiver is unaffected.
// `bufstatus` follows the transceiver RXBUFSTATUS codes: 3'b101 underflow,
// 3'b110 overflow (sticky until reset), 3'b000 otherwise.
//
// Interface: din (wr_clk) every clock; dout/dout_valid (rd_clk). The read side
// starts once the buffer has filled to half. Latency: about DEPTH/2 words plus
// two clocks of pointer synchronisation.
module elastic_buffer
  import ucf_pkg::*;
#(
  parameter int DEPTH_LOG2 = 4
) (
  input  logic   wr_clk,
  input  logic   wr_rst,
  input  lword_t din,
  input  logic [3:0] din_err,
  input  logic   rd_clk,
  input  logic   rd_rst,
  output lword_t dout,
  output logic [3:0] dout_err,
  output logic   dout_valid,
  output logic [2:0] bufstatus
);

  localparam int DEPTH = 1 << DEPTH_LOG2;
  localparam int HALF  = DEPTH / 2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  typedef struct packed {
    lword_t     w;
    logic [3:0] err;
  } entry_t;

  entry_t mem [DEPTH];

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[DEPTH_LOG2] = g[DEPTH_LOG2];
    for (int i = DEPTH_LOG2 - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  ptr_t rbin, rgray, wgray_r1, wgray_r2;

  // ---------------- write side
  ptr_t wbin, wgray, rgray_w1, rgray_w2;
  ptr_t wlevel;
  logic is_cc_w, do_write, overflow_w;
  assign wlevel   = wbin - gray2bin(rgray_w2);
  assign is_cc_w  = lw_eq(din, W_CCP) && din_err == 4'b0;
  assign do_write = !(is_cc_w && wlevel > ptr_t'(HALF)) && (wlevel < ptr_t'(DEPTH));

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow_w <= 1'b0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (do_write) begin
        mem[wbin[DEPTH_LOG2-1:0]] <= '{w: din, err: din_err};
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end else if (!(is_cc_w && wlevel > ptr_t'(HALF))) begin
        overflow_w <= 1'b1;
      end
    end
  end

  // ---------------- read side
  ptr_t rlevel;
  logic started, underflow_r, ovf_r1, ovf_r2;
  entry_t head;
  assign rlevel = gray2bin(wgray_r2) - rbin;
  assign head   = mem[rbin[DEPTH_LOG2-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      started <= 1'b0; underflow_r <= 1'b0; ovf_r1 <= 1'b0; ovf_r2 <= 1'b0;
      dout <= W_IDLE; dout_err <= '0; dout_valid <= 1'b0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      ovf_r1 <= overflow_w; ovf_r2 <= ovf_r1;
      dout_valid <= 1'b0;
      if (!started) begin
        if (rlevel >= ptr_t'(HALF)) started <= 1'b1;
      end else if (rlevel == '0) begin
        underflow_r <= 1'b1;
      end else begin
        dout <= head.w;
        dout_err <= head.err;
        dout_valid <= 1'b1;
        // repeat a clock-correction word while running low
        if (!(lw_eq(head.w, W_CCP) && rlevel < ptr_t'(HALF - 1))) begin
          rbin  <= rbin + 1'b1;
          rgray <= bin2gray(rbin + 1'b1);
        end
      end
    end
  end

  always_comb begin
    if (underflow_r)  bufstatus = 3'b101;
    else if (ovf_r2)  bufstatus = 3'b110;
    else              bufstatus = 3'b000;
  end

endmodule
