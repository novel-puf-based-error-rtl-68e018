// tb_mismatch_edn: threshold L = 1 with two levels. One violation in a run
// is tolerated, a second raises the sticky error; two violations in one
// cycle (both levels) also trip it; clear resets the count, not the flag;
// comparisons with check low count nothing.
module tb_mismatch_edn;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, check = 0;
  logic [1:0] x = 0, w = 0;
  logic [7:0] violations;
  logic error;

  mismatch_edn #(.LEVELS(2), .L_THR(1)) dut (.clk, .rst_n, .clear, .check, .x, .w, .violations, .error);

  always #5 clk = ~clk;

  task automatic step(input logic chk, input logic [1:0] xx, input logic [1:0] ww);
    check = chk; x = xx; w = ww;
    @(negedge clk);
    check = 0;
  endtask

  task automatic expect_out(input int v, input logic e, input string what);
    checks++;
    if (violations != 8'(v) || error !== e) begin
      failures++;
      $display("FAIL %s: violations %0d error %0b, expected %0d %0b", what, violations, error, v, e);
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
    step(1, 2'b10, 2'b10); expect_out(0, 0, "match");
    step(0, 2'b11, 2'b00); expect_out(0, 0, "no check");
    step(1, 2'b01, 2'b00); expect_out(1, 0, "one violation");
    step(1, 2'b00, 2'b00); expect_out(1, 0, "match again");
    clear = 1; @(negedge clk); clear = 0; expect_out(0, 0, "clear");
    step(1, 2'b00, 2'b10); expect_out(1, 0, "one");
    step(1, 2'b01, 2'b00); expect_out(2, 1, "two trips");
    clear = 1; @(negedge clk); clear = 0; expect_out(0, 1, "clear keeps error");
    rst_n = 0; @(negedge clk); rst_n = 1; expect_out(0, 0, "reset");
    step(1, 2'b11, 2'b00); expect_out(2, 1, "two in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
