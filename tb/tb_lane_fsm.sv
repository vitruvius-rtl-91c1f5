// tb_lane_fsm: checks the lane state sequence IDLE -> READ_OP_A -> READ_OP_B
// -> READ_OP_C -> WB -> MEM and back to READ_OP_A while busy, or to IDLE
// when not, one state per cycle (a round takes five cycles), with random busy.
`timescale 1ns/1ps
module tb_lane_fsm;
  import vpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, busy;
  always #5 clk = ~clk;
  lane_state_e state;
  logic round_end;
  lane_fsm dut (.*);
  int checks = 0, failures = 0;
  lane_state_e exp;
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    busy = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exp = S_IDLE;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (state !== exp || round_end !== (exp == S_MEM)) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: state %s expected %s", t, state.name(), exp.name());
      end
      busy = ($urandom_range(0, 3) != 0);
      unique case (exp)
        S_IDLE:      exp = busy ? S_READ_OP_A : S_IDLE;
        S_READ_OP_A: exp = S_READ_OP_B;
        S_READ_OP_B: exp = S_READ_OP_C;
        S_READ_OP_C: exp = S_WB;
        S_WB:        exp = S_MEM;
        default:     exp = busy ? S_READ_OP_A : S_IDLE;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
