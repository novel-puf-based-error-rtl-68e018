// key_integrity: PUF checksum over a secret key memory.
//
// Each key row r_i is fed to an arbiter PUF through T secret permutations
// rho_j, giving a K x T checksum S_w(i,j) = PUF(rho_j(r_i)). An enrolment scan
// computes and stores the checksum; a check scan recomputes it and counts, per
// row, the bits that disagree. Permuting first means an attacker cannot place
// his bit flips so that the PUF's parity vector barely changes: each check bit
// of a corrupted row is wrong with probability about one half, and a row with
// more than L_THR wrong bits out of T raises error (detection about
// 1 - 2^-(T-L)). The checksum array is kept apart from the key and not reset.
//
// One PUF and one permutation are evaluated per clock, so a scan takes K*T
// cycles (this design's choice: one shared PUF, as drawn). enroll or check is
// accepted when busy is low; done pulses one cycle after the last
// evaluation. error is sticky until the next enrolment or reset, and bad_row
// names the first row that failed. row_addr/row_data is a combinational
// read port of the key memory. Reset: asynchronous, active low.
module key_integrity #(
  parameter int unsigned K         = 4,
  parameter int unsigned N         = 64,
  parameter int unsigned T         = 8,
  parameter int unsigned L_THR     = 1,
  parameter int unsigned PUF_SEED  = 23,
  parameter int unsigned PERM_SEED = 5,
  localparam int unsigned AW       = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW       = (T > 1) ? $clog2(T) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enroll,
  input  logic          check,
  output logic [AW-1:0] row_addr,
  input  logic [N-1:0]  row_data,
  output logic          busy,
  output logic          done,
  output logic          error,
  output logic [AW-1:0] bad_row
);
  logic [T-1:0]     cs [K];        // key checksum S_w
  logic [AW-1:0]    row;
  logic [SW-1:0]    j;
  logic [SW:0]      cnt;           // mismatches in the current row
  logic [SW:0]      cnt_next;
  logic             enrolling;
  logic [N-1:0]     challenge;
  logic             resp;
  logic             mism;

  permute_block #(.N(N), .T(T), .SEED(PERM_SEED)) u_perm (
    .sel(j), .din(row_data), .dout(challenge)
  );

  puf_arbiter #(.N(N), .SEED(PUF_SEED)) u_puf (
    .challenge(challenge), .response(resp)
  );

  assign row_addr = row;
  assign mism     = !enrolling && (resp != cs[row][j]);
  assign cnt_next = cnt + (SW + 1)'(mism);

  always_ff @(posedge clk) begin
    if (busy && enrolling) cs[row][j] <= resp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; error <= 1'b0; bad_row <= '0;
      row <= '0; j <= '0; cnt <= '0; enrolling <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (enroll || check) begin
          busy      <= 1'b1;
          enrolling <= enroll;
          row       <= '0;
          j         <= '0;
          cnt       <= '0;
          if (enroll) error <= 1'b0;
        end
      end else if (j == SW'(T - 1)) begin
        j   <= '0;
        cnt <= '0;
        if (cnt_next > (SW + 1)'(L_THR) && !error) begin
          error   <= 1'b1;
          bad_row <= row;
        end
        if (row == AW'(K - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          row <= row + 1'b1;
        end
      end else begin
        j   <= j + 1'b1;
        cnt <= cnt_next;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(busy && enrolling && error))
    else $error("key_integrity: error flag set during enrolment");
endmodule
