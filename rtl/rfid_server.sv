// rfid_server - server database side of the RFID mutual authentication.
//
// The database knows K, the seed S, the tag's ID_T and the reader's ID_R.
// A session (start_i) sends the query SC1 = E(S ^ ID_R) to the reader and
// computes SC2 = E(S) in parallel. When the tag's response T_R arrives
// through the reader it computes SD2 = D(T_R) and ID_S = K1 ^ SC2 ^ SD2. If
// ID_S equals the stored ID_T the tag is authenticated and the seed register
// becomes US_S = SC2 ^ K1, so the next session starts from the updated seed;
// otherwise fail_o is raised and the seed is kept. K1 is K[63:0].
// The operations and their order follow the protocol; the message format,
// the one-cipher-per-operation structure (two encryptions, one decryption)
// and the restart on a new start_i are this design's choices.
//
// Timing: query_o is a one-cycle pulse 5 cycles after start_i. done_o pulses
// 5 cycles after resp_i.valid, with tag_auth_o/fail_o valid from then until
// the next start_i. init_i loads seed_init_i when no cipher is running
// (idle, or waiting for the response).
module rfid_server
  import prince_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init_i,
  input  logic  start_i,
  input  key_t  key_i,
  input  word_t seed_init_i,
  input  word_t id_tag_i,
  input  word_t id_reader_i,
  output msg_t  query_o,
  input  msg_t  resp_i,
  output word_t server_data_o,
  output word_t server_cipher_o,
  output word_t server_cipher2_o,
  output word_t server_decipher2_o,
  output word_t id_match_o,
  output word_t updated_seed_o,
  output word_t seed_o,
  output logic  tag_auth_o,
  output logic  fail_o,
  output logic  done_o
);

  typedef enum logic [1:0] {SV_IDLE, SV_QUERY, SV_WAIT_TR, SV_DEC} sv_state_t;

  sv_state_t state;
  word_t     seed_q, k1;
  logic      go;
  logic      e1_done, e2_done, d2_done;
  word_t     e1_ct, e2_ct, d2_ct, ids;

  assign k1 = key_i[63:0];
  assign go = start_i && (state == SV_IDLE || state == SV_WAIT_TR);

  // SC1 = E(S ^ ID_R)
  prince_cipher u_enc_sc1 (
    .clk(clk), .rst_n(rst_n), .start_i(go), .mode_i(1'b1), .key_i(key_i),
    .pt_i(seed_q ^ id_reader_i), .ct_o(e1_ct), .done_o(e1_done), .busy_o()
  );
  // SC2 = E(S)
  prince_cipher u_enc_sc2 (
    .clk(clk), .rst_n(rst_n), .start_i(go), .mode_i(1'b1), .key_i(key_i),
    .pt_i(seed_q), .ct_o(e2_ct), .done_o(e2_done), .busy_o()
  );
  // SD2 = D(T_R)
  prince_cipher u_dec_sd2 (
    .clk(clk), .rst_n(rst_n), .start_i(state == SV_WAIT_TR && resp_i.valid && !start_i),
    .mode_i(1'b0), .key_i(key_i), .pt_i(resp_i.data),
    .ct_o(d2_ct), .done_o(d2_done), .busy_o()
  );

  assign ids = k1 ^ server_cipher2_o ^ d2_ct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state              <= SV_IDLE;
      seed_q             <= '0;
      query_o            <= '0;
      server_data_o      <= '0;
      server_cipher_o    <= '0;
      server_cipher2_o   <= '0;
      server_decipher2_o <= '0;
      id_match_o         <= '0;
      updated_seed_o     <= '0;
      tag_auth_o         <= 1'b0;
      fail_o             <= 1'b0;
      done_o             <= 1'b0;
    end else begin
      query_o.valid <= 1'b0;
      done_o        <= 1'b0;
      if (init_i && (state == SV_IDLE || state == SV_WAIT_TR)) seed_q <= seed_init_i;
      if (go) begin
        server_data_o <= seed_q ^ id_reader_i;
        tag_auth_o    <= 1'b0;
        fail_o        <= 1'b0;
        state         <= SV_QUERY;
      end else begin
        unique case (state)
          SV_IDLE: ;
          SV_QUERY: if (e1_done) begin
            server_cipher_o  <= e1_ct;
            server_cipher2_o <= e2_ct;
            query_o          <= '{valid: 1'b1, data: e1_ct};
            state            <= SV_WAIT_TR;
          end
          SV_WAIT_TR: if (resp_i.valid) state <= SV_DEC;
          SV_DEC: if (d2_done) begin
            server_decipher2_o <= d2_ct;
            id_match_o         <= ids;
            done_o             <= 1'b1;
            state              <= SV_IDLE;
            if (ids == id_tag_i) begin
              tag_auth_o     <= 1'b1;
              updated_seed_o <= server_cipher2_o ^ k1;
              seed_q         <= server_cipher2_o ^ k1;
            end else begin
              fail_o <= 1'b1;
            end
          end
          default: state <= SV_IDLE;
        endcase
      end
    end
  end

  assign seed_o = seed_q;

  // Both query encryptions start together and finish together.
  a_sc_lockstep: assert property (@(posedge clk) disable iff (!rst_n) e1_done == e2_done);

endmodule
