// tb_puf_edn: after enrolment (T = 8 cycles, record = PUF of the zero
// challenge), equal main and predictor results must never be flagged, and
// differing results must be flagged exactly when an independent model
// (permutation tables plus the PUF delay model) predicts more than L = 1 of
// the 8 evaluations to disagree with the record. Each comparison must take T
// cycles from acceptance to done; valid while busy is ignored; error is
// sticky until reset.
module tb_puf_edn;
  localparam int unsigned N = 32, T = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enroll = 0, valid = 0;
  logic [31:0] main_res = 0, pred_res = 0;
  logic ready, done, mismatch, error;
  int detected = 0;

  puf_edn #(.N(N), .T(T), .L_THR(1), .PUF_SEED(37), .PERM_SEED(41)) dut (
    .clk, .rst_n, .enroll, .valid, .main_res, .pred_res, .ready, .done, .mismatch, .error);

  always #5 clk = ~clk;

  function automatic logic ref_puf(input logic [31:0] c);
    int s;
    s = puf_pkg::delay_weight(37, 32);
    for (int i = 0; i < 32; i++)
      s += (^(c >> i)) ? -puf_pkg::delay_weight(37, i) : puf_pkg::delay_weight(37, i);
    return s > 0;
  endfunction

  function automatic int ref_mism(input logic [31:0] d);
    int m = 0;
    logic [31:0] o;
    for (int j = 0; j < T; j++) begin
      for (int p = 0; p < 32; p++) o[p] = d[puf_pkg::perm_index(41, j, p, 32)];
      m += (ref_puf(o) != ref_puf(32'd0));
    end
    return m;
  endfunction

  task automatic compare(input logic [31:0] a, input logic [31:0] b, input logic enr);
    int cycles = 0;
    logic exp_m;
    @(negedge clk);
    main_res = a; pred_res = b; valid = !enr; enroll = enr;
    @(negedge clk);
    valid = 1; enroll = 0; main_res = ~a;          // ignored while busy
    while (!done) begin cycles++; @(negedge clk); valid = 0; end
    checks++;
    if (cycles != T) begin failures++; $display("FAIL took %0d cycles", cycles); end
    if (!enr) begin
      exp_m = ref_mism(a ^ b) > 1;
      checks++;
      if (mismatch !== exp_m) begin
        failures++;
        $display("FAIL %h vs %h: mismatch %0b expected %0b", a, b, mismatch, exp_m);
      end
      detected += exp_m;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int faults = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare(0, 0, 1);
    for (int k = 0; k < 20; k++) begin v = $urandom; compare(v, v, 0); end
    checks++;
    if (error) begin failures++; $display("FAIL error on equal results"); end
    for (int k = 0; k < 40; k++) begin
      v = $urandom;
      compare(v, v ^ (k < 20 ? (32'd1 << $urandom_range(31)) : $urandom), 0);
      faults++;
      checks++;
      if (error !== (detected > 0)) begin failures++; $display("FAIL sticky error wrong"); end
    end
    checks++;
    if (detected == 0) begin failures++; $display("FAIL nothing detected"); end
    $display("detected %0d of %0d differing pairs", detected, faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
