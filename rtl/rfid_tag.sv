// rfid_tag - tag side of the RFID mutual authentication.
//
// The tag knows K, its ID_T and the seed S. When a session starts it computes
// its tag cipher T_C = E(S). When the reader cipher R_C arrives it compares:
// on a match the reader is authenticated, the seed register becomes
// US_T = R_C ^ K1 (K1 = K[63:0]) and the tag answers with
// T_R = E(US_T ^ ID_T). On a mismatch it raises fail_o, keeps its seed, sends
// nothing and waits for the next session. The checks and formulas follow the
// protocol. Starting T_C at session start, so that it is ready before R_C
// arrives, and the message format are this design's choices.
//
// Timing: R_C may arrive any time after start_i; it is registered and
// compared in the cycle after both it and T_C are present. tr_o pulses five
// cycles after that comparison. start_i is accepted when idle or waiting.
module rfid_tag
  import prince_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init_i,
  input  logic  start_i,
  input  key_t  key_i,
  input  word_t seed_init_i,
  input  word_t id_tag_i,
  input  msg_t  rc_i,
  output msg_t  tr_o,
  output word_t tag_cipher_o,
  output word_t tag_response_o,
  output word_t updated_seed_o,
  output word_t seed_o,
  output logic  reader_auth_o,
  output logic  fail_o
);

  typedef enum logic [1:0] {TG_IDLE, TG_TC, TG_WAIT, TG_RESP} tg_state_t;

  tg_state_t state;
  word_t     seed_q, rc_q, k1, us_t;
  logic      rc_got, go, match_now;
  logic      tc_done, tr_done;
  word_t     tc_ct, tr_ct;

  assign k1        = key_i[63:0];
  assign us_t      = rc_q ^ k1;
  assign go        = start_i && (state == TG_IDLE || state == TG_WAIT);
  assign match_now = (state == TG_WAIT) && !start_i && rc_got && (tag_cipher_o == rc_q);

  // T_C = E(S)
  prince_cipher u_enc_tc (
    .clk(clk), .rst_n(rst_n), .start_i(go), .mode_i(1'b1), .key_i(key_i),
    .pt_i(seed_q), .ct_o(tc_ct), .done_o(tc_done), .busy_o()
  );
  // T_R = E(US_T ^ ID_T)
  prince_cipher u_enc_tr (
    .clk(clk), .rst_n(rst_n), .start_i(match_now), .mode_i(1'b1), .key_i(key_i),
    .pt_i(us_t ^ id_tag_i), .ct_o(tr_ct), .done_o(tr_done), .busy_o()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= TG_IDLE;
      seed_q         <= '0;
      rc_q           <= '0;
      rc_got         <= 1'b0;
      tr_o           <= '0;
      tag_cipher_o   <= '0;
      tag_response_o <= '0;
      updated_seed_o <= '0;
      reader_auth_o  <= 1'b0;
      fail_o         <= 1'b0;
    end else begin
      tr_o.valid <= 1'b0;
      if (init_i && (state == TG_IDLE || state == TG_WAIT)) seed_q <= seed_init_i;
      if (go) begin
        rc_got        <= 1'b0;
        reader_auth_o <= 1'b0;
        fail_o        <= 1'b0;
        state         <= TG_TC;
      end else begin
        unique case (state)
          TG_IDLE: ;
          TG_TC: if (tc_done) begin
            tag_cipher_o <= tc_ct;
            state        <= TG_WAIT;
          end
          TG_WAIT: if (rc_got) begin
            if (match_now) begin
              reader_auth_o  <= 1'b1;
              updated_seed_o <= us_t;
              seed_q         <= us_t;
              state          <= TG_RESP;
            end else begin
              fail_o <= 1'b1;
              state  <= TG_IDLE;
            end
          end
          TG_RESP: if (tr_done) begin
            tag_response_o <= tr_ct;
            tr_o           <= '{valid: 1'b1, data: tr_ct};
            state          <= TG_IDLE;
          end
          default: state <= TG_IDLE;
        endcase
      end
      if (rc_i.valid) begin
        rc_q   <= rc_i.data;
        rc_got <= 1'b1;
      end
    end
  end

  assign seed_o = seed_q;

endmodule
