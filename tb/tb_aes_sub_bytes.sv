// tb_aes_sub_bytes: checks aes_sub_bytes on random 128-bit inputs and a few fixed ones against
// the reference model: SubBytes with the reference S-box.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  `include "tb_common.svh"

  logic [127:0] si, so, exp_o;
  aes_sub_bytes dut (.state_i(si), .state_o(so));

  task automatic one(logic [127:0] v);
    si = v;
    #1;
    exp_o = sub_bytes(si, 0);
    `CHECK(so == exp_o, $sformatf("in %032h: got %032h, expected %032h", si, so, exp_o))
  endtask

  initial begin
    init();
    one('0);
    one('1);
    one(128'h000102030405060708090a0b0c0d0e0f);

    for (int i = 0; i < 500; i++) one(rand128());
    finish_tb();
  end
endmodule
