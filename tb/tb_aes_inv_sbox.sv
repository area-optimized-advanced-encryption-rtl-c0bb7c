// tb_aes_inv_sbox: exhaustive check of the inverse S-box table against the reference,
// plus published entries.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 10000;
  `include "tb_common.svh"

  logic [7:0] a, y;
  aes_inv_sbox dut (.a_i(a), .y_o(y));

  initial begin
    init();
    for (int x = 0; x < 256; x++) begin
      a = 8'(x);
      #1;
      `CHECK(y == isb[x], $sformatf("InvS(%02h) = %02h, expected %02h", a, y, isb[x]))
    end
    a = 8'h63; #1; `CHECK(y == 8'h00, "InvS(63) != 00")
    a = 8'h00; #1; `CHECK(y == 8'h52, "InvS(00) != 52")
    finish_tb();
  end
endmodule
