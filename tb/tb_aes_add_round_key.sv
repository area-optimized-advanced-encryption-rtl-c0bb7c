// tb_aes_add_round_key: checks the key addition on random state/key pairs against a
// bytewise XOR computed in the reference model's 4x4 array form.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  `include "tb_common.svh"

  logic [127:0] s, k, o;
  aes_add_round_key dut (.state_i(s), .key_i(k), .state_o(o));

  initial begin
    for (int i = 0; i < 500; i++) begin
      st_t a, b;
      s = rand128();
      k = rand128();
      #1;
      a = to_st(s);
      b = to_st(k);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) a[r][c] = a[r][c] ^ b[r][c];
      `CHECK(o == from_st(a), $sformatf("state %032h key %032h: got %032h", s, k, o))
    end
    finish_tb();
  end
endmodule
