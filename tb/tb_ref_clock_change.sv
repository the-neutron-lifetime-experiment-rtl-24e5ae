// tb_ref_clock_change: reference clock selection for transceivers 0, 4 and
// 6 of the configuration table. Checks the default code, the switch to the
// generated-clock code once its lock is seen (two clocks of
// synchronisation), the fall-back when lock is lost or when use_gen_clock is
// low, and the RST_CYCLES-long reset pulse after every change (none when
// the code stays the same, as for transceiver 0).
`timescale 1ns/1ps
module tb_ref_clock_change;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] generate_id = 4'd4;
  logic use_gen_clock = 1, gen_clock_lock = 0, using_gen, rst_out;
  logic [2:0] ref_clk_sel;

  ref_clock_change #(.N_TRANSCEIVERS(15), .RST_CYCLES(16)) dut (
    .clk, .rst, .generate_id, .use_gen_clock, .gen_clock_lock, .ref_clk_sel, .using_gen, .rst_out);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end

  int pulse_len;
  task automatic measure_pulse();
    pulse_len = 0;
    repeat (40) begin @(posedge clk); #1; if (rst_out) pulse_len++; end
  endtask

  task automatic run_id(input int id, input logic [2:0] def, input logic [2:0] gen);
    @(negedge clk); rst = 1; generate_id = 4'(id); gen_clock_lock = 0; use_gen_clock = 1;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (3) @(posedge clk); #1;
    check(ref_clk_sel == def && !rst_out && !using_gen, $sformatf("id %0d default", id));
    @(negedge clk); gen_clock_lock = 1;
    measure_pulse();
    check(ref_clk_sel == gen && using_gen, $sformatf("id %0d generated clock", id));
    check(pulse_len == ((def != gen) ? 17 : 0), $sformatf("id %0d reset pulse %0d", id, pulse_len));
    @(negedge clk); use_gen_clock = 0;
    measure_pulse();
    check(ref_clk_sel == def && !using_gen, $sformatf("id %0d use_gen_clock low", id));
    @(negedge clk); use_gen_clock = 1;
    repeat (30) @(posedge clk);
    @(negedge clk); gen_clock_lock = 0;
    measure_pulse();
    check(ref_clk_sel == def, $sformatf("id %0d lock lost", id));
    check(pulse_len == ((def != gen) ? 17 : 0), $sformatf("id %0d reset after loss %0d", id, pulse_len));
  endtask

  initial begin
    run_id(0, 3'b001, 3'b001);
    run_id(4, 3'b101, 3'b000);
    run_id(6, 3'b000, 3'b101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
