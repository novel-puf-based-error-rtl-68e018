// tb_exp_datapath: drives the state sequence of the controller with the bits
// of a random exponent and compares y with x^e mod 2^32 computed by
// repeated squaring in the testbench, for random and corner-case operands.
// y_valid must pulse once, one cycle after Result; flush must clear y.
module tb_exp_datapath;
  import puf_pkg::*;
  localparam int unsigned T = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, e_i = 0, flush = 0;
  exp_state_e state = S_IDLE;
  logic [31:0] x = 0, y;
  logic y_valid;

  exp_datapath #(.W(32)) dut (.clk, .rst_n, .state, .e_i, .flush, .x, .y, .y_valid);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_pow(input logic [31:0] b, input logic [T-1:0] e);
    logic [31:0] r = 1, s = b;
    for (int k = 0; k < T; k++) begin
      if (e[k]) r = r * s;
      s = s * s;
    end
    return r;
  endfunction

  task automatic run(input logic [31:0] b, input logic [T-1:0] e);
    int pulses = 0;
    x = b;
    state = S_INIT;   @(negedge clk);
    state = S_LOAD;   @(negedge clk);
    for (int k = 0; k < T; k++) begin
      e_i = e[k];
      state = S_SQUARE; @(negedge clk);
      state = S_MULT;   @(negedge clk);
    end
    state = S_RESULT; @(negedge clk);
    state = S_IDLE;
    pulses += y_valid;
    checks++;
    if (!y_valid || y !== ref_pow(b, e)) begin
      failures++;
      $display("FAIL %0d^%0d: y %0d valid %0b expected %0d", b, e, y, y_valid, ref_pow(b, e));
    end
    @(negedge clk);
    checks++;
    if (y_valid) begin failures++; $display("FAIL y_valid longer than one cycle"); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 5);
    run(2, 12'd31);
    run(7, 0);
    run(0, 1);
    run(32'hffffffff, 12'hfff);
    for (int k = 0; k < 30; k++) run($urandom, T'($urandom));
    flush = 1; @(negedge clk); flush = 0;
    checks++;
    if (y !== 0) begin failures++; $display("FAIL flush kept y"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
