// prince_fsm - controller of the PRINCE cipher.
//
// Next-state and output decoding for the control register c_reg, which lives
// in the register unit. One operation walks idle -> s0 -> s1 -> s2 -> su ->
// idle, one state per clock, with c_en high in each step:
//   idle  with start: i_s = 1 (load the block and the keys)
//   s0..s2          : the block moves through the three round registers
//   su              : u_s = 1 (Out into the state register), done = 1
// The state sequence and the i_s/u_s/done decoding follow the cipher's
// controller description. Waiting in idle for start_i, rather than running
// continuously, is this design's choice. Purely combinational.
module prince_fsm
  import prince_pkg::*;
(
  input  logic        start_i,
  input  ctrl_state_t c_reg_i,
  output ctrl_state_t c_new_o,
  output logic        c_en_o,
  output logic        i_s_o,
  output logic        u_s_o,
  output logic        done_o,
  output logic        busy_o
);

  always_comb begin
    c_new_o = ST_IDLE;
    c_en_o  = 1'b0;
    i_s_o   = 1'b0;
    u_s_o   = 1'b0;
    done_o  = 1'b0;
    unique case (c_reg_i)
      ST_IDLE: if (start_i) begin
        i_s_o   = 1'b1;
        c_new_o = ST_S0;
        c_en_o  = 1'b1;
      end
      ST_S0: begin c_new_o = ST_S1; c_en_o = 1'b1; end
      ST_S1: begin c_new_o = ST_S2; c_en_o = 1'b1; end
      ST_S2: begin c_new_o = ST_SU; c_en_o = 1'b1; end
      ST_SU: begin
        c_new_o = ST_IDLE;
        c_en_o  = 1'b1;
        u_s_o   = 1'b1;
        done_o  = 1'b1;
      end
      default: begin c_new_o = ST_IDLE; c_en_o = 1'b1; end
    endcase
  end

  assign busy_o = (c_reg_i != ST_IDLE);

endmodule
