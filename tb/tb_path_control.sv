// tb_path_control: sub-sequences of 2, 2 and 1 states repeated 1, 3 and 1
// times (K = 9). After a start pulse the counter must run 1..9 on the
// following cycles with select 0,0,1,1,1,1,1,1,2, last only at 9, then go
// idle; a start during a run is ignored and stop clears the counter.
module tb_path_control;
  localparam int unsigned P   [3] = '{2, 2, 1};
  localparam int unsigned CNT [3] = '{1, 3, 1};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic active, last;
  logic [1:0] sel;
  logic [31:0] count;

  path_control #(.Q(3), .P(P), .CNT(CNT)) dut (.clk, .rst_n, .start, .stop, .active, .last, .sel, .count);

  always #5 clk = ~clk;

  task automatic expect_state(input int c, input int s);
    checks++;
    if (count != 32'(c) || active != (c != 0) || last != (c == 9) || (c != 0 && sel != 2'(s))) begin
      failures++;
      $display("FAIL expected C=%0d sel=%0d, got C=%0d sel=%0d active=%0b last=%0b", c, s, count, sel, active, last);
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
    int exp_sel [9] = '{0, 0, 1, 1, 1, 1, 1, 1, 2};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); expect_state(0, 0);
    for (int run = 0; run < 2; run++) begin
      start = 1; @(negedge clk); start = (run == 1);  // run 1 holds start high throughout
      for (int c = 1; c <= 9; c++) begin
        expect_state(c, exp_sel[c-1]);
        @(negedge clk);
      end
      start = 0;
      expect_state(0, 0);
      @(negedge clk);
    end
    start = 1; @(negedge clk); start = 0;
    @(negedge clk); @(negedge clk);
    expect_state(3, 1);
    stop = 1; @(negedge clk); stop = 0;
    expect_state(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
