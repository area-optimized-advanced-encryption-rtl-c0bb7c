// tb_aes_dec_round: checks one round of the equivalent inverse cipher against the
// reference written in the standard order, InvMixColumns(InvSubBytes(InvShiftRows(s)) ^ k)
// for normal rounds and InvSubBytes(InvShiftRows(s)) ^ k for the final round.
module tb_aes_dec_round;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  `include "tb_common.svh"

  logic [127:0] s, k, o, e;
  logic         fin;
  aes_dec_round dut (.state_i(s), .round_key_i(k), .final_i(fin), .state_o(o));

  initial begin
    init();
    for (int i = 0; i < 1000; i++) begin
      s = rand128();
      k = rand128();
      fin = 1'($urandom);
      #1;
      e = sub_bytes(shift_rows(s, 1), 1) ^ k;
      if (!fin) e = mix_columns(e, 1);
      `CHECK(o == e, $sformatf("final=%0b state %032h: got %032h expected %032h", fin, s, o, e))
    end
    finish_tb();
  end
endmodule
