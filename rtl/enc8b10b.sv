// enc8b10b: 8b/10b encoder for a word of BYTES bytes.
//
// Each byte HGF EDCBA is split into a 5-bit and a 3-bit part, coded to the
// 6-bit block abcdei and the 4-bit block fghj, as in the Widmer/Franaszek code
// used by the UCF link. A byte flagged in `charisk` is sent as a K character
// (K28.0-K28.7, K23.7, K27.7, K29.7, K30.7). The running disparity starts
// negative after reset and is carried from byte 0 to byte BYTES-1 and on to the
// next word; a sub-block with more ones than zeros makes it positive, one
// with fewer makes it negative.
//
// Symbol layout: code[10*i+9 -: 6] = abcdei, code[10*i+3 -: 4] = fghj, with
// 'a' in the most significant bit. Byte 0 is the first symbol on the line.
// Timing: one register stage, code follows data by one clock. `en` low holds
// the output and the disparity.
module enc8b10b #(
  parameter int BYTES = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [8*BYTES-1:0] data,
  input  logic [BYTES-1:0]   charisk,
  output logic [10*BYTES-1:0] code
);

  // 5b/6b code for negative running disparity.
  function automatic logic [5:0] code6_neg(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;  5'd2:  return 6'b101101;
      5'd3:  return 6'b110001;  5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;  5'd8:  return 6'b111001;
      5'd9:  return 6'b100101;  5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;  5'd14: return 6'b011100;
      5'd15: return 6'b010111;  5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;  5'd20: return 6'b001011;
      5'd21: return 6'b101010;  5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;  5'd26: return 6'b010110;
      5'd27: return 6'b110110;  5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b code of data characters for negative running disparity (primary D.x.7).
  function automatic logic [3:0] code4_neg(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;  3'd2: return 4'b0101;
      3'd3: return 4'b1100;  3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // 3b/4b code of K characters for negative running disparity.
  function automatic logic [3:0] k4_neg(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;  3'd2: return 4'b1010;
      3'd3: return 4'b1100;  3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  function automatic int unsigned ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  function automatic int unsigned ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Encode one byte; rd = 1 means positive running disparity.
  function automatic logic [10:0] enc_byte(input logic [7:0] b, input logic k, input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6, rd4;
    x = b[4:0];
    y = b[7:5];
    // 6-bit block
    if (k && x == 5'd28) c6 = 6'b001111;
    else                 c6 = code6_neg(x);
    if (rd && (ones6(c6) != 3 || c6 == 6'b111000)) c6 = ~c6;
    rd6 = (ones6(c6) > 3) ? 1'b1 : (ones6(c6) < 3) ? 1'b0 : rd;
    // 4-bit block
    if (k) begin
      c4 = k4_neg(y);
      if (rd6) c4 = ~c4;
    end else begin
      c4 = code4_neg(y);
      if (y == 3'd7 && ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                        ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
        c4 = 4'b0111;
      if (rd6 && (ones4(c4) != 2 || c4 == 4'b1100)) c4 = ~c4;
    end
    rd4 = (ones4(c4) > 2) ? 1'b1 : (ones4(c4) < 2) ? 1'b0 : rd6;
    return {c6, c4, rd4};
  endfunction

  logic rd_q;
  logic [10*BYTES-1:0] code_d;
  logic rd_d;

  always_comb begin
    logic       r;
    logic [10:0] e;
    r = rd_q;
    code_d = '0;
    for (int i = 0; i < BYTES; i++) begin
      e = enc_byte(data[8*i +: 8], charisk[i], r);
      code_d[10*i +: 10] = e[10:1];
      r = e[0];
    end
    rd_d = r;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0;
      code <= '0;
    end else if (en) begin
      rd_q <= rd_d;
      code <= code_d;
    end
  end

endmodule
