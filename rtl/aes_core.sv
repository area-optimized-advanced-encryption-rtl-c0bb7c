// aes_core: iterative AES-128 encryption/decryption core, one round per clock cycle.
//
// A single 128-bit state register and a single 128-bit round-key register are reused
// for all rounds; the round keys are computed on the fly, forwards for encryption
// (aes_key_expand) and backwards for decryption (aes_inv_key_expand), so no table of
// round keys is stored. Decryption uses the equivalent inverse cipher of aes_dec_round,
// where InvMixColumns is applied to the round key before AddRoundKey.
//
// Interface (names as in the source design's simulation): clk_i, nrst_i (active-low
// asynchronous reset), load_i, decrypt_i, key_i[127:0], data_i[127:0], data_o[127:0],
// ready_o. data_o is the state register itself, so after the load edge it already shows
// the initial round (data_i ^ key_i) for encryption, as the source design's waveform of
// the initial round shows.
//
// Timing: load_i is taken on a rising edge while the core is idle or done (ignored while
// busy). Encryption: the load edge performs the initial AddRoundKey, the following 10
// edges perform rounds 1..10, and ready_o is high from the 10th of them until the next
// accepted load (11 cycles per block with load_i held high). Decryption: the load edge
// parks the ciphertext in the state register, 10 edges step the key schedule to the last
// round key (the last of them also adds it to the state), then 10 inverse rounds;
// ready_o rises 20 edges after the load edge. The round structure and the decryption key
// handling follow the source design; the handshake, the latency and the on-the-fly
// backwards key schedule are this design's choices.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk_i,
  input  logic   nrst_i,
  input  logic   load_i,
  input  logic   decrypt_i,
  input  block_t key_i,
  input  block_t data_i,
  output block_t data_o,
  output logic   ready_o
);
  logic   start, keyprep, keyprep_last, enc_round, dec_round, final_round, busy;
  byte_t  rcon;
  block_t state_q, key_q;
  block_t fwd_key, inv_key, enc_next, dec_next;
  block_t ark_state, ark_key, ark_out;

  aes_control #(.NR(AES_NR)) u_ctrl (
    .clk_i          (clk_i),
    .nrst_i         (nrst_i),
    .load_i         (load_i),
    .decrypt_i      (decrypt_i),
    .start_o        (start),
    .keyprep_o      (keyprep),
    .keyprep_last_o (keyprep_last),
    .enc_round_o    (enc_round),
    .dec_round_o    (dec_round),
    .final_round_o  (final_round),
    .rcon_o         (rcon),
    .busy_o         (busy),
    .ready_o        (ready_o)
  );

  // Key schedule, one step per cycle in either direction.
  aes_key_expand     u_kexp  (.key_i(key_q), .rcon_i(rcon), .key_o(fwd_key));
  aes_inv_key_expand u_ikexp (.key_i(key_q), .rcon_i(rcon), .key_o(inv_key));

  // Round datapaths.
  aes_enc_round u_enc (.state_i(state_q), .round_key_i(fwd_key), .final_i(final_round), .state_o(enc_next));
  aes_dec_round u_dec (.state_i(state_q), .round_key_i(inv_key), .final_i(final_round), .state_o(dec_next));

  // Stand-alone key addition: initial round at load, last round key before decryption.
  assign ark_state = start ? data_i : state_q;
  assign ark_key   = start ? key_i  : fwd_key;
  aes_add_round_key u_ark (.state_i(ark_state), .key_i(ark_key), .state_o(ark_out));

  always_ff @(posedge clk_i or negedge nrst_i) begin
    if (!nrst_i) begin
      state_q <= '0;
      key_q   <= '0;
    end else if (start) begin
      state_q <= decrypt_i ? data_i : ark_out;
      key_q   <= key_i;
    end else if (keyprep) begin
      key_q   <= fwd_key;
      if (keyprep_last) state_q <= ark_out;
    end else if (enc_round) begin
      state_q <= enc_next;
      key_q   <= fwd_key;
    end else if (dec_round) begin
      state_q <= dec_next;
      key_q   <= inv_key;
    end
  end

  assign data_o = state_q;

  // Only one kind of update can happen in a cycle.
  a_one_phase: assert property (@(posedge clk_i) disable iff (!nrst_i)
    $onehot0({start, keyprep, enc_round, dec_round}));
  // While busy the core does not accept a new load.
  a_no_start_busy: assert property (@(posedge clk_i) disable iff (!nrst_i)
    busy |-> !start);
endmodule
