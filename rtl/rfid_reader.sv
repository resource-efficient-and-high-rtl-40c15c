// rfid_reader - reader side of the RFID mutual authentication.
//
// The reader knows K and its ID_R. On the server's query SC1 it computes
// SD1 = D(SC1) and then the reader cipher R_C = E(SD1 ^ ID_R), which it sends
// to the tag. With the server's query SC1 = E(S ^ ID_R), R_C equals E(S) when
// both sides share K and ID_R. The tag's response T_R is passed on to the
// server through one register. The operations follow the protocol; one
// cipher per operation (one decryption, one encryption) and the message
// timing are this design's choices.
//
// Timing: rc_o pulses 9 cycles after query_i.valid; tr_o repeats tr_i one
// cycle later. A query that arrives while the reader is busy is dropped.
module rfid_reader
  import prince_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  key_t  key_i,
  input  word_t id_reader_i,
  input  msg_t  query_i,
  output msg_t  rc_o,
  input  msg_t  tr_i,
  output msg_t  tr_o,
  output word_t decipher1_o,
  output word_t reader_cipher_o
);

  typedef enum logic [1:0] {RD_IDLE, RD_DEC, RD_ENC} rd_state_t;

  rd_state_t state;
  logic      d1_done, e_done;
  word_t     d1_ct, e_ct;

  // SD1 = D(SC1)
  prince_cipher u_dec_sd1 (
    .clk(clk), .rst_n(rst_n), .start_i(state == RD_IDLE && query_i.valid),
    .mode_i(1'b0), .key_i(key_i), .pt_i(query_i.data),
    .ct_o(d1_ct), .done_o(d1_done), .busy_o()
  );
  // R_C = E(SD1 ^ ID_R), started in the cycle SD1 is ready
  prince_cipher u_enc_rc (
    .clk(clk), .rst_n(rst_n), .start_i(state == RD_DEC && d1_done),
    .mode_i(1'b1), .key_i(key_i), .pt_i(d1_ct ^ id_reader_i),
    .ct_o(e_ct), .done_o(e_done), .busy_o()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= RD_IDLE;
      rc_o            <= '0;
      tr_o            <= '0;
      decipher1_o     <= '0;
      reader_cipher_o <= '0;
    end else begin
      rc_o.valid <= 1'b0;
      tr_o       <= tr_i;
      unique case (state)
        RD_IDLE: if (query_i.valid) state <= RD_DEC;
        RD_DEC: if (d1_done) begin
          decipher1_o <= d1_ct;
          state       <= RD_ENC;
        end
        RD_ENC: if (e_done) begin
          reader_cipher_o <= e_ct;
          rc_o            <= '{valid: 1'b1, data: e_ct};
          state           <= RD_IDLE;
        end
        default: state <= RD_IDLE;
      endcase
    end
  end

endmodule
