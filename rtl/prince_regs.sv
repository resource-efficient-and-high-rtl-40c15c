// prince_regs - register updation unit of the PRINCE cipher.
//
// Holds every register of the cipher so that the datapath and the controller
// stay purely combinational:
//   key registers   kr0/kr1/krs  loaded with kn0/kn1/kns when k_en is high
//   round registers r3/mr/r8     loaded every cycle (the pipeline registers
//                                after round R3, the middle round and R8)
//   state register  st_reg       loaded with st_new when st_en is high
//   control register c_reg       loaded with c_new when c_en is high
// The register sets and their enables follow the cipher's description. An
// active-low asynchronous reset clears all data registers
// to zero and puts the controller in idle; those reset values are this
// design's choice.
module prince_regs
  import prince_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        st_en_i,
  input  word_t       st_new_i,
  input  logic        k_en_i,
  input  word_t       kn0_i,
  input  word_t       kn1_i,
  input  word_t       kns_i,
  input  word_t       r3_new_i,
  input  word_t       mr_new_i,
  input  word_t       r8_new_i,
  input  logic        c_en_i,
  input  ctrl_state_t c_new_i,
  output word_t       st_reg_o,
  output word_t       kr0_o,
  output word_t       kr1_o,
  output word_t       krs_o,
  output word_t       r3_reg_o,
  output word_t       mr_reg_o,
  output word_t       r8_reg_o,
  output ctrl_state_t c_reg_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r3_reg_o <= '0;
      mr_reg_o <= '0;
      r8_reg_o <= '0;
    end else begin
      r3_reg_o <= r3_new_i;
      mr_reg_o <= mr_new_i;
      r8_reg_o <= r8_new_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       st_reg_o <= '0;
    else if (st_en_i) st_reg_o <= st_new_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kr0_o <= '0;
      kr1_o <= '0;
      krs_o <= '0;
    end else if (k_en_i) begin
      kr0_o <= kn0_i;
      kr1_o <= kn1_i;
      krs_o <= kns_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c_reg_o <= ST_IDLE;
    else if (c_en_i) c_reg_o <= c_new_i;
  end

endmodule
