// tb_aes_core: end-to-end test of the AES-128 core at its default (and only) size.
//
// Runs the stimulus of the source design's initial-round waveform, the AES standard's
// example vectors, and random encryptions and decryptions against the reference model,
// checking latency (ready_o 10 edges after the load edge for encryption, 20 for
// decryption). It also exercises and counts every mechanism of the core: encryption,
// decryption with key preparation, the final round without MixColumns, a load ignored
// while busy, back-to-back operations with load_i held high, and reset during an
// operation. A mechanism that never happens counts as a failure.
module tb_aes_core;
  import aes_ref_pkg::*;
  localparam int WATCHDOG_CYCLES = 200000;
  `include "tb_common.svh"

  logic         nrst, load, dec, ready;
  logic [127:0] key, din, dout;

  aes_core dut (
    .clk_i(clk), .nrst_i(nrst), .load_i(load), .decrypt_i(dec),
    .key_i(key), .data_i(din), .data_o(dout), .ready_o(ready)
  );

  int n_enc = 0, n_dec = 0, n_keyprep = 0, n_final = 0, n_ignored = 0, n_b2b = 0, n_reset = 0;

  // Mechanism counters taken from the core's own strobes.
  always @(posedge clk) if (nrst) begin
    if (dut.keyprep_last) n_keyprep++;
    if (dut.final_round)  n_final++;
  end

  // One operation: load on the next edge, then wait for ready_o. Optionally pulses a
  // foreign load in the middle, which must be ignored.
  task automatic op(input logic d, input logic [127:0] k, input logic [127:0] x,
                    input bit disturb, output logic [127:0] res, output int cycles);
    @(negedge clk);
    load = 1'b1; dec = d; key = k; din = x;
    @(negedge clk);
    load = 1'b0;
    key = rand128(); din = rand128(); dec = 1'($urandom);
    cycles = 0;
    while (!ready && cycles < 100) begin
      if (disturb && cycles == 3) begin
        load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        n_ignored++;
      end else begin
        @(negedge clk);
      end
      cycles++;
    end
    res = dout;
  endtask

  task automatic check_enc(logic [127:0] k, logic [127:0] p, logic [127:0] c_known, bit use_known,
                           bit disturb);
    logic [127:0] c, p2;
    int cyc;
    op(1'b0, k, p, disturb, c, cyc);
    `CHECK(cyc == 10, $sformatf("encryption took %0d cycles, expected 10", cyc))
    `CHECK(c == (use_known ? c_known : encrypt(p, k)), $sformatf("encrypt %032h: got %032h", p, c))
    n_enc++;
    op(1'b1, k, c, disturb, p2, cyc);
    `CHECK(cyc == 20, $sformatf("decryption took %0d cycles, expected 20", cyc))
    `CHECK(p2 == p, $sformatf("decrypt %032h: got %032h expected %032h", c, p2, p))
    `CHECK(p2 == decrypt(c, k), "decryption matches reference")
    n_dec++;
  endtask

  initial begin
    logic [127:0] r, pts [3];
    int cyc;
    init();
    nrst = 1'b0; load = 1'b0; dec = 1'b0; key = '0; din = '0;
    repeat (3) @(negedge clk);
    `CHECK(dout == '0 && !ready, "outputs cleared by reset")
    nrst = 1'b1;

    // Stimulus printed in the source design's waveform: after the load edge data_o
    // shows the initial round, data_i xor key_i.
    @(negedge clk);
    load = 1'b1; dec = 1'b0;
    key = 128'h00000000000000000000000012153524;
    din = 128'hFFFFFFFFFFFFFFFFFFFFFFFFC0895E81;
    @(negedge clk);
    `CHECK(dout == 128'hFFFFFFFFFFFFFFFFFFFFFFFFD29C6BA5, $sformatf("initial round %032h", dout))
    `CHECK(!ready, "ready low during the operation")
    load = 1'b0;
    cyc = 0;
    while (!ready && cyc < 100) begin @(negedge clk); cyc++; end
    `CHECK(cyc == 10, $sformatf("waveform stimulus took %0d cycles", cyc))
    `CHECK(dout == encrypt(128'hFFFFFFFFFFFFFFFFFFFFFFFFC0895E81, 128'h12153524), "waveform stimulus ciphertext")
    n_enc++;

    // AES standard examples.
    check_enc(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
              128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1, 1'b0);
    check_enc(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
              128'h3925841d02dc09fbdc118597196a0b32, 1'b1, 1'b1);

    // Random blocks, some with a load pulse while busy.
    for (int i = 0; i < 60; i++) check_enc(rand128(), rand128(), '0, 1'b0, (i % 4) == 0);

    // load_i held high: each result is taken in its one ready cycle, the next block
    // starts on the following edge.
    key = rand128();
    for (int i = 0; i < 3; i++) pts[i] = rand128();
    @(negedge clk);
    load = 1'b1; dec = 1'b0; din = pts[0];
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      cyc = 0;
      while (!ready && cyc < 100) begin @(negedge clk); cyc++; end
      `CHECK(cyc == 10, $sformatf("back-to-back block %0d took %0d cycles", i, cyc))
      `CHECK(dout == encrypt(pts[i], key), $sformatf("back-to-back block %0d", i))
      if (i < 2) din = pts[i+1];
      else       load = 1'b0;
      n_b2b++;
    end

    // Reset during a decryption aborts it; the core then works normally.
    @(negedge clk);
    load = 1'b1; dec = 1'b1; din = rand128();
    @(negedge clk);
    load = 1'b0;
    repeat (5) @(negedge clk);
    nrst = 1'b0; #1;
    `CHECK(dout == '0 && !ready, "reset during operation clears the core")
    @(negedge clk);
    nrst = 1'b1;
    n_reset++;
    repeat (3) @(negedge clk);
    `CHECK(!ready, "idle after reset")
    check_enc(rand128(), rand128(), '0, 1'b0, 1'b0);

    $display("mechanisms: enc=%0d dec=%0d keyprep=%0d final_round=%0d ignored_load=%0d back_to_back=%0d reset=%0d",
             n_enc, n_dec, n_keyprep, n_final, n_ignored, n_b2b, n_reset);
    `CHECK(n_enc > 0,     "encryption never happened")
    `CHECK(n_dec > 0,     "decryption never happened")
    `CHECK(n_keyprep > 0, "key preparation never happened")
    `CHECK(n_final > 0,   "final round never happened")
    `CHECK(n_ignored > 0, "ignored load never happened")
    `CHECK(n_b2b > 0,     "back-to-back operation never happened")
    `CHECK(n_reset > 0,   "reset during operation never happened")
    finish_tb();
  end
endmodule
