// rfid_map - RFID mutual authentication system built on the PRINCE cipher.
//
// A server database, a reader and a tag run the mutual authentication
// protocol with seven PRINCE cipher instances: five encryptions (SC1, SC2,
// R_C, T_C, T_R) and two decryptions (SD1, SD2).
//   server -> reader : SC1 = E(S ^ ID_R)
//   reader -> tag    : R_C = E(D(SC1) ^ ID_R)            (= E(S))
//   tag              : reader authenticated if E(S) == R_C, US_T = R_C ^ K1
//   tag -> reader -> server : T_R = E(US_T ^ ID_T)
//   server           : tag authenticated if K1 ^ E(S) ^ D(T_R) == ID_T,
//                      US_S = E(S) ^ K1
//   sync_done        : both authenticated and US_T == US_S
// After a successful session tag and server both hold the updated seed, so
// the next session starts from it. Each party has its own key and ID inputs
// (all equal in normal use) so that a party with wrong secrets can be
// modelled; this and the message timing are this design's choices, the
// protocol steps follow the published protocol.
//
// Timing: init_i loads seed_i into tag and server. A pulse on start_i begins a
// session; session_done_o pulses when the server has checked the response
// (27 cycles after start_i on success) or when the tag rejected the reader.
// sync_done_o, reader_auth_o and tag_auth_o stay valid until the next start.
// seed_tag_o and seed_server_o show the seed each side will use next.
module rfid_map
  import prince_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     init_i,
  input  logic     start_i,
  input  key_t     key_server_i,
  input  key_t     key_reader_i,
  input  key_t     key_tag_i,
  input  word_t    seed_i,
  input  word_t    id_tag_server_i,
  input  word_t    id_tag_i,
  input  word_t    id_reader_server_i,
  input  word_t    id_reader_i,
  output map_obs_t obs_o,
  output logic     reader_auth_o,
  output logic     tag_auth_o,
  output logic     sync_done_o,
  output logic     session_done_o,
  output word_t    seed_tag_o,
  output word_t    seed_server_o
);

  msg_t query, rc, tr_tag, tr_fwd;
  logic srv_done, srv_fail, tag_fail;
  word_t seed_tag, seed_srv;

  rfid_server u_server (
    .clk(clk), .rst_n(rst_n), .init_i(init_i), .start_i(start_i),
    .key_i(key_server_i), .seed_init_i(seed_i),
    .id_tag_i(id_tag_server_i), .id_reader_i(id_reader_server_i),
    .query_o(query), .resp_i(tr_fwd),
    .server_data_o(obs_o.server_data), .server_cipher_o(obs_o.server_cipher),
    .server_cipher2_o(obs_o.server_cipher2), .server_decipher2_o(obs_o.server_decipher2),
    .id_match_o(obs_o.id_match), .updated_seed_o(obs_o.updated_seed_server),
    .seed_o(seed_srv), .tag_auth_o(tag_auth_o), .fail_o(srv_fail), .done_o(srv_done)
  );

  rfid_reader u_reader (
    .clk(clk), .rst_n(rst_n), .key_i(key_reader_i), .id_reader_i(id_reader_i),
    .query_i(query), .rc_o(rc), .tr_i(tr_tag), .tr_o(tr_fwd),
    .decipher1_o(obs_o.server_decipher1), .reader_cipher_o(obs_o.reader_cipher)
  );

  rfid_tag u_tag (
    .clk(clk), .rst_n(rst_n), .init_i(init_i), .start_i(start_i),
    .key_i(key_tag_i), .seed_init_i(seed_i), .id_tag_i(id_tag_i),
    .rc_i(rc), .tr_o(tr_tag),
    .tag_cipher_o(obs_o.tag_cipher), .tag_response_o(obs_o.tag_response),
    .updated_seed_o(obs_o.updated_seed_tag), .seed_o(seed_tag),
    .reader_auth_o(reader_auth_o), .fail_o(tag_fail)
  );

  logic tag_fail_q;

  assign seed_tag_o    = seed_tag;
  assign seed_server_o = seed_srv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_done_o    <= 1'b0;
      session_done_o <= 1'b0;
      tag_fail_q     <= 1'b0;
    end else begin
      tag_fail_q     <= tag_fail;
      session_done_o <= srv_done || (tag_fail && !tag_fail_q);
      if (start_i)
        sync_done_o <= 1'b0;
      else if (srv_done)
        sync_done_o <= reader_auth_o && tag_auth_o && !srv_fail
                       && (obs_o.updated_seed_tag == obs_o.updated_seed_server)
                       && (seed_tag == seed_srv);
    end
  end

endmodule
