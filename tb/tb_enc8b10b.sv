// tb_enc8b10b: checks the 8b/10b encoder.
//
// Known symbols from the code table: K28.5 with negative running disparity
// is 001111 1010, D0.0 after it (positive disparity) is 011000 1011. Then
// 3000 random words of data and K characters are encoded; every 10-bit
// symbol must have four, five or six ones and must keep the running
// disparity legal (a symbol with six ones only from negative disparity, four
// only from positive), and the decoder must give back the same bytes.
`timescale 1ns/1ps
module tb_enc8b10b;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  logic [31:0] data = '0, d_out;
  logic [3:0]  k = '0, k_out, err;
  logic [39:0] code;

  enc8b10b #(.BYTES(4)) u_enc (.clk, .rst, .en, .data, .charisk(k), .code);
  dec8b10b #(.BYTES(4)) u_dec (.clk, .rst, .code, .data(d_out), .charisk(k_out), .code_err(err));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  localparam logic [7:0] KS [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};
  logic [31:0] exp_d [$];
  logic [3:0]  exp_k [$];
  int rd = -1;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0; en = 1; data = 32'h0000_00BC; k = 4'b0001;
    exp_d.push_back(data); exp_k.push_back(k);
    @(posedge clk); #1;
    check(code[9:0]   == 10'b0011111010, "K28.5 RD-");
    check(code[19:10] == 10'b0110001011, "D0.0 RD+");
    check(code[29:20] == 10'b0110001011, "D0.0 RD+ again");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        k[b] = ($urandom % 4) == 0;
        data[8*b +: 8] = k[b] ? KS[$urandom % 12] : 8'($urandom);
      end
      exp_d.push_back(data); exp_k.push_back(k);
    end
    @(negedge clk); en = 0;
    repeat (5) @(posedge clk);
    check(exp_d.size() == 0, "all words decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // disparity of every symbol, in transmission order
  always @(posedge clk) if (!rst && en) begin
    #1;
    for (int b = 0; b < 4; b++) begin
      int ones;
      ones = $countones(code[10*b +: 10]);
      if (ones == 6)      begin check(rd < 0, "six ones only from RD-"); rd = 1; end
      else if (ones == 4) begin check(rd > 0, "four ones only from RD+"); rd = -1; end
      else check(ones == 5, "balanced symbol");
    end
  end

  // round trip: encoder and decoder each add one clock
  logic [1:0] en_d = '0;
  always @(posedge clk) begin
    en_d <= {en_d[0], en && !rst};
    if (en_d[1] && exp_d.size() > 0 && $time > 40) begin
      if (checks < 12010) check(d_out == exp_d[0] && k_out == exp_k[0] && err == 0,
                                $sformatf("round trip %h/%b got %h/%b", exp_d[0], exp_k[0], d_out, k_out));
      void'(exp_d.pop_front()); void'(exp_k.pop_front());
    end
  end
endmodule
