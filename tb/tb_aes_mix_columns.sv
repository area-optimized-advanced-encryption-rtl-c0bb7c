// tb_aes_mix_columns: checks aes_mix_columns on random 128-bit inputs and a few fixed ones against
// the reference model: matrix product with a shift-and-add GF multiplier.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 100000;
  `include "tb_common.svh"

  logic [127:0] si, so, exp_o;
  aes_mix_columns dut (.state_i(si), .state_o(so));

  task automatic one(logic [127:0] v);
    si = v;
    #1;
    exp_o = mix_columns(si, 0);
    `CHECK(so == exp_o, $sformatf("in %032h: got %032h, expected %032h", si, so, exp_o))
  endtask

  initial begin
    init();
    one('0);
    one('1);
    one(128'h000102030405060708090a0b0c0d0e0f);
    si = 128'hdb135345f20a225c01010101c6c6c6c6; #1;
    `CHECK(so == 128'h8e4da1bc9fdc589d01010101c6c6c6c6, "MixColumns known columns")
    for (int i = 0; i < 500; i++) one(rand128());
    finish_tb();
  end
endmodule
