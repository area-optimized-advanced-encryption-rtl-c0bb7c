// aes_ctrl_pkg: state encoding of the AES-128 core's sequencer (aes_control).
//
// IDLE    after reset, waiting for load_i
// KEYPREP decryption only: the forward key schedule is run Nr times to reach the last
//         round key, which the inverse cipher needs first
// ENC     one encryption round per cycle
// DEC     one inverse round per cycle, round keys produced backwards
// DONE    result on data_o, ready_o high; a new load_i is accepted here as in IDLE
package aes_ctrl_pkg;
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_KEYPREP = 3'd1,
    S_ENC     = 3'd2,
    S_DEC     = 3'd3,
    S_DONE    = 3'd4
  } ctrl_state_e;
endpackage
