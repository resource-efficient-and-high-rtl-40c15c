// prince_datapath - datapath processing unit of the PRINCE cipher.
//
// The twelve round operations are cut into four pipeline stages by the round
// registers of the register unit:
//   stage 1  inp = st_reg ^ kr0, R0 (RC0), R1..R3         -> r3_new
//   stage 2  R4, R5, middle round (S, M', S^-1)           -> mr_new
//   stage 3  R6..R8 (inverse rounds)                      -> r8_new
//   stage 4  R9, R10, R11 (RC11), Out = R11 ^ krs         -> out
// Every round uses kr1 and its own round constant RC1..RC11. The unit also
// selects the next value of the state register: the input block P while the
// controller is in the initialization state (i_s, which also loads the keys),
// and Out in the updation state (u_s). The placement of the stage cuts follows
// the register names R3_reg, MR_reg and R8_reg. k_en is the initialization
// state itself. Purely combinational.
module prince_datapath
  import prince_pkg::*;
(
  input  word_t pt_i,
  input  logic  i_s_i,
  input  logic  u_s_i,
  input  word_t st_reg_i,
  input  word_t kr0_i,
  input  word_t kr1_i,
  input  word_t krs_i,
  input  word_t r3_reg_i,
  input  word_t mr_reg_i,
  input  word_t r8_reg_i,
  output word_t r3_new_o,
  output word_t mr_new_o,
  output word_t r8_new_o,
  output word_t out_o,
  output word_t st_new_o,
  output logic  st_en_o,
  output logic  k_en_o
);

  word_t inp;
  word_t r [12];  // r[i] = output of round Ri
  word_t mr;

  assign inp = st_reg_i ^ kr0_i;

  // stage 1
  prince_round #(.KIND(RND_KEY),    .RC_IDX(0)) u_r0 (.x_i(inp),      .k_i(kr1_i), .y_o(r[0]));
  prince_round #(.KIND(RND_NORMAL), .RC_IDX(1)) u_r1 (.x_i(r[0]),     .k_i(kr1_i), .y_o(r[1]));
  prince_round #(.KIND(RND_NORMAL), .RC_IDX(2)) u_r2 (.x_i(r[1]),     .k_i(kr1_i), .y_o(r[2]));
  prince_round #(.KIND(RND_NORMAL), .RC_IDX(3)) u_r3 (.x_i(r[2]),     .k_i(kr1_i), .y_o(r[3]));
  // stage 2
  prince_round #(.KIND(RND_NORMAL), .RC_IDX(4)) u_r4 (.x_i(r3_reg_i), .k_i(kr1_i), .y_o(r[4]));
  prince_round #(.KIND(RND_NORMAL), .RC_IDX(5)) u_r5 (.x_i(r[4]),     .k_i(kr1_i), .y_o(r[5]));
  prince_round #(.KIND(RND_MIDDLE), .RC_IDX(0)) u_mr (.x_i(r[5]),     .k_i(kr1_i), .y_o(mr));
  // stage 3
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(6)) u_r6 (.x_i(mr_reg_i), .k_i(kr1_i), .y_o(r[6]));
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(7)) u_r7 (.x_i(r[6]),     .k_i(kr1_i), .y_o(r[7]));
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(8)) u_r8 (.x_i(r[7]),     .k_i(kr1_i), .y_o(r[8]));
  // stage 4
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(9))  u_r9  (.x_i(r8_reg_i), .k_i(kr1_i), .y_o(r[9]));
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(10)) u_r10 (.x_i(r[9]),     .k_i(kr1_i), .y_o(r[10]));
  prince_round #(.KIND(RND_KEY),     .RC_IDX(11)) u_r11 (.x_i(r[10]),    .k_i(kr1_i), .y_o(r[11]));

  assign r3_new_o = r[3];
  assign mr_new_o = mr;
  assign r8_new_o = r[8];
  assign out_o    = r[11] ^ krs_i;

  assign st_en_o  = i_s_i | u_s_i;
  assign k_en_o   = i_s_i;
  assign st_new_o = i_s_i ? pt_i : out_o;

endmodule
