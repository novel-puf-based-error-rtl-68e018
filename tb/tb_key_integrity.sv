// tb_key_integrity: a 4 x 64 key held in the testbench is read through the
// row port. Enrolment and a clean check must take K*T = 32 cycles each and
// leave error low. Then rows are corrupted (bit flips, stuck-at-zero,
// whole-row overwrites) and re-checked after a fresh enrolment of the good
// key; for each case an independent model (permutation tables plus the PUF
// delay model evaluated here) predicts the per-row mismatch counts, and the
// block must raise error iff some row has more than L = 1, naming the first
// such row.
module tb_key_integrity;
  localparam int unsigned K = 4, N = 64, T = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enroll = 0, check = 0;
  logic [1:0] row_addr;
  logic [63:0] row_data;
  logic busy, done, error;
  logic [1:0] bad_row;
  logic [63:0] key [K];
  logic [63:0] good [K];
  int detected = 0;

  key_integrity #(.K(K), .N(N), .T(T), .L_THR(1), .PUF_SEED(23), .PERM_SEED(5)) dut (
    .clk, .rst_n, .enroll, .check, .row_addr, .row_data, .busy, .done, .error, .bad_row);

  assign row_data = key[row_addr];

  always #5 clk = ~clk;

  function automatic logic ref_puf(input logic [63:0] c);
    int s;
    s = puf_pkg::delay_weight(23, 64);
    for (int i = 0; i < 64; i++)
      s += (^(c >> i)) ? -puf_pkg::delay_weight(23, i) : puf_pkg::delay_weight(23, i);
    return s > 0;
  endfunction

  function automatic logic [63:0] ref_perm(input logic [63:0] d, input int j);
    logic [63:0] o;
    for (int p = 0; p < 64; p++) o[p] = d[puf_pkg::perm_index(5, j, p, 64)];
    return o;
  endfunction

  task automatic scan(input logic enr);
    int cycles = 0;
    @(negedge clk);
    enroll = enr; check = !enr;
    @(negedge clk);
    enroll = 0; check = 0;
    while (!done) begin cycles++; @(negedge clk); end
    checks++;
    if (cycles != K * T) begin failures++; $display("FAIL scan took %0d cycles, expected %0d", cycles, K * T); end
  endtask

  task automatic expect_check(input string what);
    int m, first;
    first = -1;
    for (int r = 0; r < K; r++) begin
      m = 0;
      for (int j = 0; j < T; j++) m += (ref_puf(ref_perm(good[r], j)) != ref_puf(ref_perm(key[r], j)));
      if (m > 1 && first < 0) first = r;
    end
    checks++;
    if (error !== (first >= 0) || (first >= 0 && bad_row != 2'(first))) begin
      failures++;
      $display("FAIL %s: error %0b row %0d, expected %0b row %0d", what, error, bad_row, first >= 0, first);
    end
    if (first >= 0) detected++;
    $display("%-24s error=%0b bad_row=%0d", what, error, bad_row);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cases = 0;
    for (int r = 0; r < K; r++) begin good[r] = {$urandom, $urandom}; key[r] = good[r]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    scan(1);
    scan(0); expect_check("clean key");
    scan(0); expect_check("clean key again");
    for (int c = 0; c < 24; c++) begin
      int r;
      r = $urandom_range(K - 1);
      case (c % 3)
        0: for (int f = 0; f <= c / 3; f++) key[r][$urandom_range(63)] ^= 1'b1;   // bit flips
        1: key[r] = key[r] & {$urandom, $urandom};                                 // 1 -> 0 only
        2: key[r] = {$urandom, $urandom};                                          // overwrite
      endcase
      scan(0); expect_check($sformatf("fault case %0d row %0d", c, r)); cases++;
      for (int k = 0; k < K; k++) key[k] = good[k];
      scan(1);                                     // re-enrol clears error
      checks++;
      if (error) begin failures++; $display("FAIL enrolment did not clear error"); end
    end
    checks++;
    if (detected == 0) begin failures++; $display("FAIL nothing detected"); end
    $display("detected %0d of %0d corrupted keys", detected, cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
