// ref_clock_change: automatic choice of the reference clock of a UCF
// transceiver.
//
// Each transceiver (index `generate_id`, up to N_TRANSCEIVERS) has two
// reference clock select codes in a configuration table: a default/fall-back
// code and a code used once the generated clock (for example a cleaned clock
// recovered on another board) reports lock. The generated clock is used only
// while `use_gen_clock` is high; when it loses lock the module falls back to
// the local clock. Every change of the select code pulses `rst_out` for
// RST_CYCLES clocks so the link re-initializes. The lock input is
// synchronised with two flip-flops.
//
// The table holds the select columns of the example configuration of the
// UCF reference clock module; rows are per transceiver, the last row is a
// dummy. `ref_clk_sel` is registered.
module ref_clock_change #(
  parameter int N_TRANSCEIVERS = 15,
  parameter int RST_CYCLES     = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] generate_id,
  input  logic       use_gen_clock,
  input  logic       gen_clock_lock,
  output logic [2:0] ref_clk_sel,
  output logic       using_gen,
  output logic       rst_out
);

  // {default, after lock} per transceiver
  localparam logic [2:0] SEL_DEF [15] = '{3'b001, 3'b000, 3'b000, 3'b000, 3'b101, 3'b101, 3'b000,
                                          3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000};
  localparam logic [2:0] SEL_GEN [15] = '{3'b001, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b101,
                                          3'b101, 3'b101, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000};

  logic lock_s1, lock_s2;
  logic [2:0] sel_d;
  logic [$clog2(RST_CYCLES+1)-1:0] rcnt;
  logic [3:0] id;

  assign id    = (int'(generate_id) < N_TRANSCEIVERS && generate_id < 4'd15) ? generate_id : 4'd14;
  assign sel_d = (use_gen_clock && lock_s2) ? SEL_GEN[id] : SEL_DEF[id];

  always_ff @(posedge clk) begin
    if (rst) begin
      lock_s1 <= 1'b0; lock_s2 <= 1'b0;
      ref_clk_sel <= SEL_DEF[id];
      using_gen <= 1'b0;
      rcnt <= '0;
      rst_out <= 1'b1;
    end else begin
      lock_s1 <= gen_clock_lock; lock_s2 <= lock_s1;
      using_gen <= use_gen_clock && lock_s2;
      if (sel_d != ref_clk_sel) begin
        ref_clk_sel <= sel_d;
        rcnt <= ($bits(rcnt))'(RST_CYCLES);
        rst_out <= 1'b1;
      end else if (rcnt != 0) begin
        rcnt <= rcnt - 1'b1;
        rst_out <= 1'b1;
      end else begin
        rst_out <= 1'b0;
      end
    end
  end

endmodule
