// tb_aes_enc_round: checks one encryption round, normal and final, on random states and
// keys against the reference transformations, and the first round of the AES standard's
// example cipher.
module tb_aes_enc_round;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  `include "tb_common.svh"

  logic [127:0] s, k, o, e;
  logic         fin;
  aes_enc_round dut (.state_i(s), .round_key_i(k), .final_i(fin), .state_o(o));

  initial begin
    init();
    // Standard example: state after initial round and round key 1 give the round-1 output.
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    fin = 1'b0;
    #1;
    `CHECK(o == 128'ha49c7ff2689f352b6b5bea43026a5049, "example round 1")
    for (int i = 0; i < 1000; i++) begin
      s = rand128();
      k = rand128();
      fin = 1'($urandom);
      #1;
      e = shift_rows(sub_bytes(s, 0), 0);
      if (!fin) e = mix_columns(e, 0);
      e ^= k;
      `CHECK(o == e, $sformatf("final=%0b state %032h: got %032h expected %032h", fin, s, o, e))
    end
    finish_tb();
  end
endmodule
