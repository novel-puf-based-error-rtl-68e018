// key_memory: on-chip secret key store of K rows r_0..r_{K-1}, N bits each.
//
// One synchronous row write port (loading the key, and also the way a
// memory-overwrite attack is modelled), one combinational row read port for
// the integrity checker and one combinational bit read port for the
// exponentiation datapath: bit b is column b % N of row b / N. The array is
// not reset, like non-volatile key storage. Register-array form and port set
// are this design's choice.
module key_memory #(
  parameter int unsigned K   = 4,
  parameter int unsigned N   = 64,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned BW = (K * N > 1) ? $clog2(K * N) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [N-1:0]  rdata,
  input  logic [BW-1:0] baddr,
  output logic          bdata
);
  logic [N-1:0] mem [K];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
  logic [AW-1:0] brow;
  logic [CW-1:0] bcol;
  assign brow  = AW'(int'(baddr) / int'(N));
  assign bcol  = CW'(int'(baddr) % int'(N));
  assign bdata = mem[brow][bcol];
endmodule
