// puf_fsm_protect: a PUF-protected exponentiation unit and a PUF-based error
// detection network.
//
// Three fault-detection mechanisms built on arbiter PUFs guard one design:
//  * fsm_puf_checker fingerprints the state sequence of the known-path
//    exponentiation controller (exp_fsm), catching a fault that skips,
//    repeats or reorders states;
//  * key_integrity keeps a PUF checksum of the secret exponent held in
//    key_memory, catching overwritten or stuck key bits;
//  * puf_edn compares the results of an external main branch and its
//    predictor through a PUF, so that the comparator itself cannot be
//    silenced by tampering.
// The secret exponent of the exponentiation is the content of the key
// memory (KEY_ROWS*KEY_COLS bits, bit i = row i/KEY_COLS, column
// i%KEY_COLS). Any error flag raises alarm, which returns the FSM to Idle,
// blocks new starts and flushes the datapath registers until reset. Joining
// the three mechanisms in one unit this way is this design's choice.
//
// Usage: load the key (key_we), enrol the key checksum (key_enroll), run one
// fault-free exponentiation with start and fsm_enroll high, enrol the EDN
// (edn_enroll). Afterwards start runs are checked and key_check re-verifies
// the key. An exponentiation takes 2*KEY_ROWS*KEY_COLS + 3 cycles after
// start; y_valid pulses one cycle after the Result state.
// Reset: asynchronous, active low; fingerprints and key are not reset.
module puf_fsm_protect #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned KEY_ROWS  = 4,
  parameter int unsigned KEY_COLS  = 64,
  parameter int unsigned KEY_PERMS = 8,
  parameter int unsigned ENC_W     = 8,
  parameter int unsigned LEVELS    = 1,
  parameter bit          SHARED_PUF = 1'b0,
  parameter int unsigned L_THR     = 1,
  parameter int unsigned EDN_W     = 32,
  parameter int unsigned EDN_PERMS = 8,
  localparam int unsigned EXP_T    = KEY_ROWS * KEY_COLS,
  localparam int unsigned KAW      = (KEY_ROWS > 1) ? $clog2(KEY_ROWS) : 1,
  localparam int unsigned IW       = (EXP_T > 1) ? $clog2(EXP_T) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // exponentiation
  input  logic              start,
  input  logic              fsm_enroll,
  input  logic [DATA_W-1:0] x,
  output logic [DATA_W-1:0] y,
  output logic              y_valid,
  output logic              busy,
  output logic [2:0]        fsm_state,
  // key memory and its integrity check
  input  logic              key_we,
  input  logic [KAW-1:0]    key_waddr,
  input  logic [KEY_COLS-1:0] key_wdata,
  input  logic              key_enroll,
  input  logic              key_check,
  output logic              key_busy,
  output logic              key_done,
  output logic [KAW-1:0]    key_bad_row,
  // PUF-based EDN for an external main/predictor pair
  input  logic              edn_enroll,
  input  logic              edn_valid,
  input  logic [EDN_W-1:0]  edn_main,
  input  logic [EDN_W-1:0]  edn_pred,
  output logic              edn_ready,
  output logic              edn_done,
  output logic              edn_mismatch,
  // alarms
  output logic [7:0]        fsm_violations,
  output logic              fsm_error,
  output logic              key_error,
  output logic              edn_error,
  output logic              alarm
);
  import puf_pkg::*;

  localparam int unsigned SUB_P   [3] = '{2, 2, 1};      // {Init,Load} {Square,Mult} {Result}
  localparam int unsigned SUB_CNT [3] = '{1, EXP_T, 1};

  exp_state_e      state;
  logic [IW-1:0]   i;
  logic            e_i;
  logic            go;
  logic [KAW-1:0]  key_raddr;
  logic [KEY_COLS-1:0] key_rdata;

  assign alarm     = fsm_error | key_error | edn_error;
  assign go        = start && !alarm;
  assign busy      = (state != S_IDLE);
  assign fsm_state = state;

  exp_fsm #(.T(EXP_T)) u_fsm (
    .clk(clk), .rst_n(rst_n), .start(go), .halt(alarm), .state(state), .i(i)
  );

  exp_datapath #(.W(DATA_W)) u_dp (
    .clk(clk), .rst_n(rst_n), .state(state), .e_i(e_i), .flush(alarm),
    .x(x), .y(y), .y_valid(y_valid)
  );

  fsm_puf_checker #(
    .STATE_W(3), .N(ENC_W), .Q(3), .P(SUB_P), .CNT(SUB_CNT),
    .LEVELS(LEVELS), .L_THR(L_THR), .SEED(11), .SHARED_PUF(SHARED_PUF)
  ) u_fsm_chk (
    .clk(clk), .rst_n(rst_n), .start(go && state == S_IDLE), .enroll(fsm_enroll),
    .stop(alarm), .state(state), .active(), .violations(fsm_violations), .error(fsm_error)
  );

  key_memory #(.K(KEY_ROWS), .N(KEY_COLS)) u_key (
    .clk(clk), .we(key_we), .waddr(key_waddr), .wdata(key_wdata),
    .raddr(key_raddr), .rdata(key_rdata), .baddr(i), .bdata(e_i)
  );

  key_integrity #(
    .K(KEY_ROWS), .N(KEY_COLS), .T(KEY_PERMS), .L_THR(L_THR), .PUF_SEED(23), .PERM_SEED(5)
  ) u_key_chk (
    .clk(clk), .rst_n(rst_n), .enroll(key_enroll), .check(key_check),
    .row_addr(key_raddr), .row_data(key_rdata), .busy(key_busy), .done(key_done),
    .error(key_error), .bad_row(key_bad_row)
  );

  puf_edn #(
    .N(EDN_W), .T(EDN_PERMS), .L_THR(L_THR), .PUF_SEED(37), .PERM_SEED(41)
  ) u_edn (
    .clk(clk), .rst_n(rst_n), .enroll(edn_enroll), .valid(edn_valid),
    .main_res(edn_main), .pred_res(edn_pred), .ready(edn_ready), .done(edn_done),
    .mismatch(edn_mismatch), .error(edn_error)
  );
endmodule
