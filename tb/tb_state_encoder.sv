// tb_state_encoder: for every state value, rebuilds the PUF parity vector of
// the code (suffix XOR) and checks it equals the expected Hadamard row,
// computed here from popcount parity, and that any two distinct states have
// parity vectors exactly N/2 apart.
module tb_state_encoder;
  int checks = 0, failures = 0;
  logic [2:0] state;
  logic [7:0] code;
  logic [7:0] par [8];

  state_encoder #(.STATE_W(3), .N(8)) dut (.state(state), .code(code));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] row;
    for (int s = 0; s < 8; s++) begin
      state = 3'(s);
      #1;
      par[s][7] = code[7];
      for (int i = 6; i >= 0; i--) par[s][i] = par[s][i+1] ^ code[i];
      for (int b = 0; b < 8; b++) row[b] = $countones(((s + 1) % 8) & b) % 2;
      checks++;
      if (par[s] !== row) begin
        failures++;
        $display("FAIL state %0d parity %b expected %b", s, par[s], row);
      end
    end
    for (int a = 0; a < 8; a++)
      for (int b = a + 1; b < 8; b++) begin
        checks++;
        if ($countones(par[a] ^ par[b]) != 4) begin
          failures++;
          $display("FAIL distance(%0d,%0d) = %0d", a, b, $countones(par[a] ^ par[b]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
