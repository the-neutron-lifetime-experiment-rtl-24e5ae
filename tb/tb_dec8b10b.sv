// tb_dec8b10b: checks the 8b/10b decoder.
//
// Known symbols of both disparities decode to their bytes: D0.0 as
// 100111 0100 and 011000 1011, K28.5 as 001111 1010 and 110000 0101. The
// bit-inverse of a comma decodes to the same comma (the property the link
// uses to find a swapped pair). Symbols that are not in the code (all zeros,
// all ones) are flagged as errors. Random words from the encoder decode
// back to the same bytes.
`timescale 1ns/1ps
module tb_dec8b10b;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [39:0] code = '0, enc_code;
  logic [31:0] d_out, e_data = '0;
  logic [3:0]  k_out, err, e_k = '0;
  logic        use_enc = 0;

  enc8b10b #(.BYTES(4)) u_enc (.clk, .rst, .en(1'b1), .data(e_data), .charisk(e_k), .code(enc_code));
  dec8b10b #(.BYTES(4)) u_dec (.clk, .rst, .code(use_enc ? enc_code : code), .data(d_out), .charisk(k_out), .code_err(err));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  task automatic apply(input logic [39:0] c);
    @(negedge clk); code = c; @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    apply({10'b0110001011, 10'b1001110100, 10'b1100000101, 10'b0011111010});
    check(d_out == 32'h0000_BCBC && k_out == 4'b0011 && err == 0, "known symbols");
    apply(~{10'b0110001011, 10'b1001110100, 10'b1100000101, 10'b0011111010});
    check(d_out[15:0] == 16'hBCBC && k_out[1:0] == 2'b11 && err[1:0] == 0, "inverted commas");
    apply({10'b0000000000, 10'b1111111111, 10'b0000000000, 10'b1111111111});
    check(err == 4'b1111, "invalid symbols flagged");
    // random round trip
    use_enc = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] d; logic [3:0] k;
      @(negedge clk);
      d = $urandom; k = '0;
      if ($urandom % 3 == 0) begin d[7:0] = 8'hBC; k[0] = 1'b1; end
      e_data = d; e_k = k;
      @(posedge clk); @(posedge clk); #1;
      check(d_out == d && k_out == k && err == 0, $sformatf("round trip %h", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
