// channel_mux: collects finished frames from the channel FIFOs of all
// processing units, round-robin, and writes them one after another into the
// UCF FIFO.
//
// A pointer walks over all NPU*NCH channels; the first channel at or after
// it with a finished frame is served, then the pointer moves past it. For
// each frame the multiplexer writes the header and then the sample words:
//   word 0  32'h0000_0000
//   word 1  {channel number [7:0], 8'h00, number of words in the frame [15:0]}
//   word 2  time stamp of the trigger
//   word 3.. samples, two 16-bit signed values per word, first in the low half
// with `out_last` on the final word. A word is written only while the FIFO
// is not full, one per clock.
module channel_mux #(
  parameter int NPU = 12,
  parameter int NCH = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NPU-1:0][NCH-1:0]       frame_avail,
  input  logic [NPU-1:0][31:0]          rd_data,
  input  logic [NPU-1:0][31:0]          rd_ts,
  input  logic [NPU-1:0][15:0]          rd_nwords,
  output logic [$clog2(NCH)-1:0]        rd_ch,
  output logic [NPU-1:0]                rd_word,
  output logic [NPU-1:0]                rd_done,
  output logic                          out_valid,
  output logic [31:0]                   out_data,
  output logic                          out_last,
  input  logic                          out_full,
  output logic [31:0]                   n_frames
);

  localparam int NT = NPU * NCH;
  localparam int PB = $clog2(NT);
  typedef enum logic [2:0] {M_SCAN, M_H0, M_H1, M_H2, M_DATA} mstate_e;

  mstate_e st;
  logic [PB-1:0] ptr, sel;
  logic [15:0]   left;
  int            pu;

  // next channel with a finished frame, searching from ptr: the lowest
  // request at or above ptr, else the lowest request overall
  logic [NT-1:0] avail, upper;
  logic          found;
  logic [PB-1:0] next;
  always_comb begin
    avail = frame_avail;
    for (int i = 0; i < NT; i++) upper[i] = avail[i] && (i >= int'(ptr));
    found = |avail;
    next  = '0;
    for (int i = NT - 1; i >= 0; i--) if (avail[i]) next = PB'(i);
    if (|upper)
      for (int i = NT - 1; i >= 0; i--) if (upper[i]) next = PB'(i);
  end

  assign pu    = int'(sel) / NCH;
  assign rd_ch = ($bits(rd_ch))'(int'(sel) % NCH);

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_last  = 1'b0;
    rd_word   = '0;
    rd_done   = '0;
    if (!out_full) begin
      unique case (st)
        M_H0: begin out_valid = 1'b1; out_data = 32'h0; end
        M_H1: begin out_valid = 1'b1; out_data = {8'(sel), 8'h00, rd_nwords[pu] + 16'd3}; end
        M_H2: begin out_valid = 1'b1; out_data = rd_ts[pu]; out_last = (rd_nwords[pu] == 0);
                    rd_done[pu] = (rd_nwords[pu] == 0); end
        M_DATA: begin
          out_valid   = 1'b1;
          out_data    = rd_data[pu];
          out_last    = (left == 16'd1);
          rd_word[pu] = 1'b1;
          rd_done[pu] = (left == 16'd1);
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_SCAN; ptr <= '0; sel <= '0; left <= '0; n_frames <= '0;
    end else begin
      unique case (st)
        M_SCAN: if (found) begin sel <= next; st <= M_H0; end
        M_H0:   if (!out_full) st <= M_H1;
        M_H1:   if (!out_full) begin st <= M_H2; left <= rd_nwords[pu]; end
        M_H2:   if (!out_full) begin
                  if (left == 0) begin
                    st <= M_SCAN; ptr <= (int'(sel) == NT - 1) ? '0 : sel + 1'b1; n_frames <= n_frames + 1;
                  end else st <= M_DATA;
                end
        M_DATA: if (!out_full) begin
                  left <= left - 16'd1;
                  if (left == 16'd1) begin
                    st <= M_SCAN; ptr <= (int'(sel) == NT - 1) ? '0 : sel + 1'b1; n_frames <= n_frames + 1;
                  end
                end
        default: st <= M_SCAN;
      endcase
    end
  end

endmodule
