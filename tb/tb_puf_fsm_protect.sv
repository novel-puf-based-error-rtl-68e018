// tb_puf_fsm_protect: end-to-end test of the protected exponentiation unit at
// its default size (256-bit secret exponent, 32-bit data, 8-bit state code,
// 8 key permutations, 32-bit EDN). It loads a random key, enrols the key
// checksum, enrols the FSM fingerprint in a first exponentiation and the EDN
// record, then checks: exponentiation results against x^e mod 2^32 computed
// here, the 2T+4-cycle latency, clean re-checks of key and EDN, and three
// attacks, each followed by reset (fingerprints survive reset):
//   1. the state register forced from Mult to Result mid-run (the skip of the
//      loop) must raise fsm_error, flush y and block further starts;
//   2. a key row overwritten must raise key_error on the next key check;
//   3. differing main/predictor results must raise edn_error.
// Every mechanism is counted and a mechanism that never happened is a failure.
module tb_puf_fsm_protect;
  import puf_pkg::*;
  localparam int unsigned KR = 4, KC = 64, T = KR * KC;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, fsm_enroll = 0;
  logic [31:0] x = 0, y;
  logic y_valid, busy;
  logic [2:0] fsm_state;
  logic key_we = 0, key_enroll = 0, key_check = 0;
  logic [1:0] key_waddr = 0, key_bad_row;
  logic [63:0] key_wdata = 0;
  logic key_busy, key_done;
  logic edn_enroll = 0, edn_valid = 0;
  logic [31:0] edn_main = 0, edn_pred = 0;
  logic edn_ready, edn_done, edn_mismatch;
  logic [7:0] fsm_violations;
  logic fsm_error, key_error, edn_error, alarm;

  logic [63:0] key [KR];

  typedef enum int {
    M_FSM_ENROLL, M_FSM_CLEAN, M_FSM_FAULT, M_KEY_ENROLL, M_KEY_CLEAN, M_KEY_FAULT,
    M_EDN_ENROLL, M_EDN_CLEAN, M_EDN_FAULT, M_HALT, M_FLUSH, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  puf_fsm_protect dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_pow(input logic [31:0] b);
    logic [31:0] r = 1, s = b;
    for (int k = 0; k < T; k++) begin
      if (key[k / KC][k % KC]) r = r * s;
      s = s * s;
    end
    return r;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic do_reset();
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
  endtask

  task automatic write_key(input int r, input logic [63:0] v);
    @(negedge clk);
    key_we = 1; key_waddr = 2'(r); key_wdata = v;
    @(negedge clk);
    key_we = 0;
  endtask

  task automatic key_scan(input logic enr);
    @(negedge clk);
    key_enroll = enr; key_check = !enr;
    @(negedge clk);
    key_enroll = 0; key_check = 0;
    while (!key_done) @(negedge clk);
  endtask

  task automatic exp_run(input logic [31:0] b, input logic enr);
    int cycles = 0;
    @(negedge clk);
    x = b; start = 1; fsm_enroll = enr;
    @(negedge clk);
    start = 0; fsm_enroll = 0; cycles = 1;
    while (!y_valid && cycles < 4 * T) begin cycles++; @(negedge clk); end
    checks++;
    if (cycles != 2 * T + 4) fail($sformatf("latency %0d, expected %0d", cycles, 2 * T + 4));
    checks++;
    if (y !== ref_pow(b)) fail($sformatf("y = %h, expected %h", y, ref_pow(b)));
    @(negedge clk);
    checks++;
    if (fsm_error || fsm_violations != 0) fail($sformatf("clean run flagged (%0d violations)", fsm_violations));
    else if (enr) mech[M_FSM_ENROLL]++;
    else mech[M_FSM_CLEAN]++;
  endtask

  task automatic edn_cmp(input logic [31:0] a, input logic [31:0] b, input logic enr);
    @(negedge clk);
    edn_main = a; edn_pred = b; edn_valid = !enr; edn_enroll = enr;
    @(negedge clk);
    edn_valid = 0; edn_enroll = 0;
    while (!edn_done) @(negedge clk);
  endtask

  task automatic expect_halted(input string what);
    @(negedge clk);
    start = 1;
    repeat (3) @(negedge clk);
    start = 0;
    checks++;
    if (!alarm || busy) fail({what, ": alarm did not halt the controller"});
    else mech[M_HALT]++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] saved;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < KR; r++) begin key[r] = {$urandom, $urandom}; write_key(r, key[r]); end

    // enrolment
    key_scan(1);
    checks++; if (key_error) fail("key error after enrolment"); else mech[M_KEY_ENROLL]++;
    exp_run($urandom, 1);
    edn_cmp(0, 0, 1);
    checks++; if (edn_error) fail("edn error after enrolment"); else mech[M_EDN_ENROLL]++;

    // checked operation
    for (int k = 0; k < 3; k++) exp_run($urandom, 0);
    exp_run(3, 0);
    key_scan(0);
    checks++; if (key_error) fail("clean key flagged"); else mech[M_KEY_CLEAN]++;
    for (int k = 0; k < 5; k++) begin
      logic [31:0] v = $urandom;
      edn_cmp(v, v, 0);
      checks++; if (edn_mismatch || edn_error) fail("equal results flagged"); else mech[M_EDN_CLEAN]++;
    end

    // attack 1: Mult -> Result skip in iteration 3
    @(negedge clk);
    x = $urandom; start = 1;
    @(negedge clk);
    start = 0;
    while (!(fsm_state == S_MULT && dut.u_fsm.i == 3)) @(negedge clk);
    force dut.u_fsm.state = S_RESULT;
    @(negedge clk);
    release dut.u_fsm.state;
    repeat (2 * T + 8) @(negedge clk);
    $display("attack 1: %0d violations", fsm_violations);
    checks++; if (!fsm_error) fail("skipped loop not detected"); else mech[M_FSM_FAULT]++;
    checks++; if (y != 0 || dut.u_dp.r0 != 0 || dut.u_dp.r1 != 0) fail("datapath not flushed"); else mech[M_FLUSH]++;
    expect_halted("state fault");
    do_reset();
    exp_run($urandom, 0);                    // fingerprint survived reset

    // attack 2: overwrite a key row (tries several corruptions until one is caught)
    saved = key[2];
    for (int a = 0; a < 6 && !key_error; a++) begin
      write_key(2, saved ^ (64'd1 << $urandom_range(63)) ^ (64'd1 << $urandom_range(63)));
      key_scan(0);
    end
    checks++;
    if (!key_error || key_bad_row != 2) fail($sformatf("key overwrite not detected (row %0d)", key_bad_row));
    else mech[M_KEY_FAULT]++;
    expect_halted("key fault");
    write_key(2, saved);
    do_reset();
    key_scan(0);
    checks++; if (key_error) fail("restored key flagged");
    exp_run($urandom, 0);

    // attack 3: main and predictor disagree
    for (int a = 0; a < 6 && !edn_error; a++) begin
      logic [31:0] v = $urandom;
      edn_cmp(v, v ^ $urandom, 0);
    end
    checks++; if (!edn_error) fail("EDN missed differing results"); else mech[M_EDN_FAULT]++;
    expect_halted("edn fault");

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) fail($sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-13s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
