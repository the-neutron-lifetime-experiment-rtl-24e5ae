// dec8b10b: 8b/10b decoder for a word of BYTES 10-bit symbols.
//
// Each symbol abcdei fghj is looked up in both disparity columns of the
// 5b/6b and 3b/4b code tables (the inverse of enc8b10b). A 6-bit block of
// 001111/110000 marks K28.y; a 4-bit block 0111/1000 after the 6-bit code of
// 23, 27, 29 or 30 marks K.x.7. Symbols that are in neither column are
// reported in `code_err` and decode to zero. Running disparity is not
// checked: a symbol is accepted in either disparity form.
//
// Symbol layout as in enc8b10b: code[10*i+9 -: 6] = abcdei, 'a' is the MSB.
// Timing: one register stage.
module dec8b10b #(
  parameter int BYTES = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [10*BYTES-1:0] code,
  output logic [8*BYTES-1:0]  data,
  output logic [BYTES-1:0]    charisk,
  output logic [BYTES-1:0]    code_err
);

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

  function automatic int unsigned ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  // Returns {err, k, byte}.
  function automatic logic [9:0] dec_sym(input logic [9:0] s);
    logic [5:0] c6, n6;
    logic [3:0] c4;
    logic [4:0] x;
    logic [2:0] y;
    logic       ok6, ok4, k28, k;
    c6 = s[9:4];
    c4 = s[3:0];
    x = '0;
    ok6 = 1'b0;
    k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
    for (int v = 0; v < 32; v++) begin
      n6 = code6_neg(5'(v));
      if (c6 == n6 || ((ones6(n6) != 3 || n6 == 6'b111000) && c6 == ~n6)) begin
        x = 5'(v);
        ok6 = 1'b1;
      end
    end
    if (k28) begin
      x = 5'd28;
      ok6 = 1'b1;
    end
    y = '0;
    ok4 = 1'b1;
    k = 1'b0;
    if (k28) begin
      k = 1'b1;
      // 001111 leaves positive disparity: 4-bit block from the positive column.
      case (c6 == 6'b001111 ? ~c4 : c4)
        4'b1011: y = 3'd0;  4'b0110: y = 3'd1;  4'b1010: y = 3'd2;  4'b1100: y = 3'd3;
        4'b1101: y = 3'd4;  4'b0101: y = 3'd5;  4'b1001: y = 3'd6;  4'b0111: y = 3'd7;
        default: ok4 = 1'b0;
      endcase
    end else begin
      case (c4)
        4'b1011, 4'b0100:                   y = 3'd0;
        4'b1001:                            y = 3'd1;
        4'b0101:                            y = 3'd2;
        4'b1100, 4'b0011:                   y = 3'd3;
        4'b1101, 4'b0010:                   y = 3'd4;
        4'b1010:                            y = 3'd5;
        4'b0110:                            y = 3'd6;
        4'b1110, 4'b0001:                   y = 3'd7;
        4'b0111, 4'b1000: begin
          y = 3'd7;
          k = (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
          ok4 = k || x == 5'd11 || x == 5'd13 || x == 5'd14 || x == 5'd17 || x == 5'd18 || x == 5'd20;
        end
        default: ok4 = 1'b0;
      endcase
    end
    if (!(ok6 && ok4)) return {1'b1, 1'b0, 8'h00};
    return {1'b0, k, y, x};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      data <= '0;
      charisk <= '0;
      code_err <= '0;
    end else begin
      for (int i = 0; i < BYTES; i++) begin
        logic [9:0] r;
        r = dec_sym(code[10*i +: 10]);
        code_err[i]     <= r[9];
        charisk[i]      <= r[8];
        data[8*i +: 8]  <= r[7:0];
      end
    end
  end

endmodule
