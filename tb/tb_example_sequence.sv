// tb_example_sequence: the protected exponentiation unit with a 2-bit
// exponent (one key row of 2 bits, one key permutation), whose controller
// walks the 7-state sequence Init, Load, Square, Mult, Square, Mult, Result,
// i.e. states 1,2,3,4,3,4,5. The testbench records the sequence, checks it
// and the results x^e for all four exponents, checks that an enrolled
// fingerprint accepts clean runs, and that forcing Mult to Result in the
// first iteration (skipping the second) is flagged or, if the PUF happens
// to answer the same for the skipped states, that the violation count equals
// the one predicted from the PUF delay model.
module tb_example_sequence;
  import puf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, fsm_enroll = 0;
  logic [31:0] x = 0, y;
  logic y_valid, busy;
  logic [2:0] fsm_state;
  logic key_we = 0, key_enroll = 0, key_check = 0;
  logic [0:0] key_waddr = 0, key_bad_row;
  logic [1:0] key_wdata = 0;
  logic key_busy, key_done;
  logic edn_enroll = 0, edn_valid = 0;
  logic [31:0] edn_main = 0, edn_pred = 0;
  logic edn_ready, edn_done, edn_mismatch;
  logic [7:0] fsm_violations;
  logic fsm_error, key_error, edn_error, alarm;

  puf_fsm_protect #(.KEY_ROWS(1), .KEY_COLS(2), .KEY_PERMS(1)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic ref_bit(input int s);
    logic [7:0] h, c;
    int acc;
    for (int b = 0; b < 8; b++) h[b] = $countones(((s + 1) % 8) & b) % 2;
    for (int b = 0; b < 7; b++) c[b] = h[b] ^ h[b+1];
    c[7] = h[7];
    acc = delay_weight(11, 8);
    for (int i = 0; i < 8; i++) acc += (^(c >> i)) ? -delay_weight(11, i) : delay_weight(11, i);
    return acc > 0;
  endfunction

  task automatic run(input logic [31:0] b, input logic enr, output int seq [$]);
    seq = {};
    @(negedge clk);
    x = b; start = 1; fsm_enroll = enr;
    @(negedge clk);
    start = 0; fsm_enroll = 0;
    while (busy) begin seq.push_back(int'(fsm_state)); @(negedge clk); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq [$];
    int expected [7] = '{1, 2, 3, 4, 3, 4, 5};
    int ideal [7] = '{1, 2, 3, 4, 3, 4, 5};
    int attacked [7] = '{1, 2, 3, 5, 0, 0, 0};
    int ev;
    logic [31:0] b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); key_we = 1; key_wdata = 2'b11; @(negedge clk); key_we = 0;
    run(5, 1, seq);
    checks++;
    if (seq.size() != 7) begin failures++; $display("FAIL sequence length %0d", seq.size()); end
    else for (int k = 0; k < 7; k++) if (seq[k] != expected[k]) begin failures++; $display("FAIL state %0d = %0d", k, seq[k]); end
    for (int e = 0; e < 4; e++) begin
      @(negedge clk); key_we = 1; key_wdata = 2'(e); @(negedge clk); key_we = 0;
      b = $urandom;
      run(b, 0, seq);
      checks++;
      if (y !== b ** e) begin failures++; $display("FAIL %0d^%0d = %0d", b, e, y); end
      checks++;
      if (fsm_error || fsm_violations != 0) begin failures++; $display("FAIL clean run flagged"); end
    end
    // attack: Mult -> Result in the first iteration
    ev = 0;
    for (int k = 0; k < 7; k++) ev += (ref_bit(ideal[k]) != ref_bit(attacked[k]));
    @(negedge clk); x = 3; start = 1; @(negedge clk); start = 0;
    while (fsm_state != S_MULT) @(negedge clk);
    force dut.u_fsm.state = S_RESULT;
    @(negedge clk);
    release dut.u_fsm.state;
    repeat (8) @(negedge clk);
    $display("attack on the 7-state sequence: %0d violations predicted, error %0b", ev, fsm_error);
    checks++;
    if (fsm_error !== (ev > 1) || (!fsm_error && fsm_violations != 8'(ev))) begin
      failures++;
      $display("FAIL attack outcome: violations %0d error %0b", fsm_violations, fsm_error);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
