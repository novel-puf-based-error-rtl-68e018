// tb_fsm_puf_checker: drives the state input with the sequence of the
// exponentiation controller for T = 5 iterations (Init, Load, 5 x
// {Square, Mult}, Result: K = 13 states). After an enrolment run, a clean run
// must show no violation. Faulty runs (the skip from Mult to Result, a
// skipped Square, single-cycle glitches to a random state) must show exactly
// the number of violations predicted by an independent model of the encoder
// and the PUF delay model, and raise error iff that number exceeds L = 1. A
// second checker with two PUF levels and a third with two levels sharing one
// PUF (the second level seeing a permuted state code) run alongside. The active window must
// last exactly K cycles after start.
module tb_fsm_puf_checker;
  import puf_pkg::*;
  localparam int unsigned T = 5;
  localparam int unsigned K = 2 * T + 3;
  localparam int unsigned P   [3] = '{2, 2, 1};
  localparam int unsigned CNT [3] = '{1, T, 1};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, enroll = 0;
  logic [2:0] state = 0;
  logic active1, active2, error1, error2;
  logic [7:0] viol1, viol2, viol3;
  logic active3, error3;
  int detected = 0, faulty_runs = 0;

  fsm_puf_checker #(.STATE_W(3), .N(8), .Q(3), .P(P), .CNT(CNT), .LEVELS(1), .L_THR(1), .SEED(11)) dut1 (
    .clk, .rst_n, .start, .enroll, .stop(1'b0), .state, .active(active1), .violations(viol1), .error(error1));
  fsm_puf_checker #(.STATE_W(3), .N(8), .Q(3), .P(P), .CNT(CNT), .LEVELS(2), .L_THR(1), .SEED(77)) dut2 (
    .clk, .rst_n, .start, .enroll, .stop(1'b0), .state, .active(active2), .violations(viol2), .error(error2));

  fsm_puf_checker #(.STATE_W(3), .N(8), .Q(3), .P(P), .CNT(CNT), .LEVELS(2), .L_THR(1), .SEED(55), .SHARED_PUF(1'b1)) dut3 (
    .clk, .rst_n, .start, .enroll, .stop(1'b0), .state, .active(active3), .violations(viol3), .error(error3));

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_permute(input logic [7:0] c);
    logic [7:0] o;
    for (int p = 0; p < 8; p++) o[p] = c[perm_index(55 + 7, 1, p, 8)];
    return o;
  endfunction

  function automatic int ref_viol_shared(input int ideal [K], input int actual [K]);
    int v = 0;
    for (int c = 0; c < K; c++) begin
      v += (ref_puf(ref_code(ideal[c]), 55) != ref_puf(ref_code(actual[c]), 55));
      v += (ref_puf(ref_permute(ref_code(ideal[c])), 55) != ref_puf(ref_permute(ref_code(actual[c])), 55));
    end
    return v;
  endfunction

  function automatic logic [7:0] ref_code(input int s);
    logic [7:0] h, c;
    for (int b = 0; b < 8; b++) h[b] = $countones(((s + 1) % 8) & b) % 2;
    for (int b = 0; b < 7; b++) c[b] = h[b] ^ h[b+1];
    c[7] = h[7];
    return c;
  endfunction

  function automatic logic ref_puf(input logic [7:0] c, input int unsigned seed);
    int s;
    logic par;
    s = delay_weight(seed, 8);
    for (int i = 0; i < 8; i++) begin
      par = ^(c >> i);
      s += par ? -delay_weight(seed, i) : delay_weight(seed, i);
    end
    return s > 0;
  endfunction

  function automatic int ref_viol(input int ideal [K], input int actual [K], input int unsigned seed);
    int v = 0;
    for (int c = 0; c < K; c++)
      v += (ref_puf(ref_code(ideal[c]), seed) != ref_puf(ref_code(actual[c]), seed));
    return v;
  endfunction

  task automatic run(input int seq [K], input logic enr);
    int act_cycles = 0;
    @(negedge clk);
    start = 1; enroll = enr; state = S_IDLE;
    @(negedge clk);
    start = 0; enroll = 0;
    for (int c = 0; c < K; c++) begin
      state = 3'(seq[c]);
      act_cycles += active1;
      @(negedge clk);
    end
    state = S_IDLE;
    checks++;
    if (act_cycles != K || active1) begin
      failures++;
      $display("FAIL window: %0d active cycles, expected %0d", act_cycles, K);
    end
  endtask

  task automatic expect_run(input int ideal [K], input int actual [K], input string what);
    int e1, e2, e3;
    e1 = ref_viol(ideal, actual, 11);
    e2 = ref_viol(ideal, actual, 77) + ref_viol(ideal, actual, 1077);
    e3 = ref_viol_shared(ideal, actual);
    checks += 6;
    if (viol3 != 8'(e3)) begin failures++; $display("FAIL %s: shared-PUF violations %0d expected %0d", what, viol3, e3); end
    if (error3 !== (e3 > 1)) begin failures++; $display("FAIL %s: shared-PUF error %0b", what, error3); end
    if (viol1 != 8'(e1)) begin failures++; $display("FAIL %s: level-1 violations %0d expected %0d", what, viol1, e1); end
    if (error1 !== (e1 > 1)) begin failures++; $display("FAIL %s: level-1 error %0b", what, error1); end
    if (viol2 != 8'(e2)) begin failures++; $display("FAIL %s: level-2 violations %0d expected %0d", what, viol2, e2); end
    if (error2 !== (e2 > 1)) begin failures++; $display("FAIL %s: level-2 error %0b", what, error2); end
    if (e1 > 1) detected++;
    $display("%-28s violations d=1: %0d  d=2: %0d  d=2 shared: %0d", what, viol1, viol2, viol3);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ideal [K];
    int bad [K];
    int distinct;
    ideal[0] = S_INIT; ideal[1] = S_LOAD;
    for (int it = 0; it < T; it++) begin ideal[2 + 2*it] = S_SQUARE; ideal[3 + 2*it] = S_MULT; end
    ideal[K-1] = S_RESULT;
    distinct = 0;
    for (int s = 1; s < 6; s++) distinct += (ref_puf(ref_code(s), 11) != ref_puf(ref_code(0), 11));
    $display("PUF bits of the states differ from Idle's in %0d of 5 states", distinct);

    repeat (2) @(negedge clk);
    rst_n = 1;
    run(ideal, 1);                          // enrolment
    run(ideal, 0);
    expect_run(ideal, ideal, "clean run");
    run(ideal, 0);
    expect_run(ideal, ideal, "second clean run");

    // Mult -> Result after the first iteration, then Idle
    bad = ideal;
    bad[3 + 2] = S_RESULT;
    for (int c = 6; c < K; c++) bad[c] = S_IDLE;
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(bad, 0); expect_run(ideal, bad, "skip Mult->Result"); faulty_runs++;

    // a Square skipped: every later state shifted by one
    for (int c = 0; c < K; c++) bad[c] = (c < 4) ? ideal[c] : ideal[c + 1 < K ? c + 1 : K - 1];
    bad[K-1] = S_IDLE;
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(bad, 0); expect_run(ideal, bad, "skipped Square"); faulty_runs++;

    // random glitches: 1..4 positions replaced by random states
    for (int g = 0; g < 20; g++) begin
      bad = ideal;
      for (int n = 0; n < 1 + g % 4; n++) bad[$urandom_range(K - 1)] = $urandom_range(7);
      rst_n = 0; @(negedge clk); rst_n = 1;
      run(bad, 0); expect_run(ideal, bad, $sformatf("glitch run %0d", g)); faulty_runs++;
    end
    checks++;
    if (detected == 0) begin failures++; $display("FAIL no fault detected at all"); end
    $display("detected %0d of %0d faulty runs with d=1", detected, faulty_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
