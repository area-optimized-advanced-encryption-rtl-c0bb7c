// tb_aes_key_expand: steps the key schedule forward for every round of random keys and of
// the AES standard's example key, comparing with the reference key expansion.
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  `include "tb_common.svh"

  logic [127:0] ki, ko;
  logic [7:0]   rc;
  aes_key_expand dut (.key_i(ki), .rcon_i(rc), .key_o(ko));

  task automatic run_key(logic [127:0] key);
    u128 rk [11];
    u8   rcs [11];
    expand_key(key, rk);
    rcs[1] = 8'h01;
    for (int r = 2; r <= 10; r++) rcs[r] = gmul(rcs[r-1], 8'h02);
    for (int r = 1; r <= 10; r++) begin
      ki = rk[r-1];
      rc = rcs[r];
      #1;
      `CHECK(ko == rk[r], $sformatf("key %032h round %0d: got %032h expected %032h", key, r, ko, rk[r]))
    end
  endtask

  initial begin
    u128 rk [11];
    init();
    expand_key(128'h2b7e151628aed2a6abf7158809cf4f3c, rk);
    `CHECK(rk[1]  == 128'ha0fafe1788542cb123a339392a6c7605, "reference model: round key 1")
    `CHECK(rk[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference model: round key 10")
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run_key('0);
    for (int i = 0; i < 50; i++) run_key(rand128());
    finish_tb();
  end
endmodule
