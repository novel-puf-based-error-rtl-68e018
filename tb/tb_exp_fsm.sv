// tb_exp_fsm: with T = 4 the controller must stay in Idle without start,
// then walk Init, Load, 4 x {Square, Mult} with i = 0..3, Result, Idle: 11
// cycles from start to Idle. halt in the middle of a run must return it to
// Idle and keep it there while held, even with start high.
module tb_exp_fsm;
  import puf_pkg::*;
  localparam int unsigned T = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, halt = 0;
  exp_state_e state;
  logic [1:0] i;

  exp_fsm #(.T(T)) dut (.clk, .rst_n, .start, .halt, .state, .i);

  always #5 clk = ~clk;

  task automatic expect_st(input exp_state_e s, input int idx, input string what);
    checks++;
    if (state != s || (idx >= 0 && i != 2'(idx))) begin
      failures++;
      $display("FAIL %s: state %0d i %0d, expected %0d i %0d", what, state, i, s, idx);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin @(negedge clk); expect_st(S_IDLE, -1, "idle, start=0"); end
    for (int r = 0; r < 2; r++) begin
      start = 1; @(negedge clk); start = 0;
      expect_st(S_INIT, -1, "init");   @(negedge clk);
      expect_st(S_LOAD, 0, "load");    @(negedge clk);
      for (int k = 0; k < T; k++) begin
        expect_st(S_SQUARE, k, "square"); @(negedge clk);
        expect_st(S_MULT, k, "mult");     @(negedge clk);
      end
      expect_st(S_RESULT, -1, "result"); @(negedge clk);
      expect_st(S_IDLE, -1, "back to idle");
    end
    start = 1; @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    expect_st(S_SQUARE, 1, "mid run");
    halt = 1; start = 1;
    repeat (3) begin @(negedge clk); expect_st(S_IDLE, 0, "halted"); end
    halt = 0; start = 0;
    @(negedge clk); expect_st(S_IDLE, -1, "after halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
