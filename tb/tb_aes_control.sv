// tb_aes_control: follows the sequencer cycle by cycle through an encryption and a
// decryption, checking the phase strobes, the round constants, the final-round flag and
// the cycle counts (10 rounds; 10 key-preparation cycles plus 10 rounds), that load_i is
// ignored while busy, that a held load_i restarts from DONE, and that reset aborts.
module tb_aes_control;
  localparam int WATCHDOG_CYCLES = 2000;
  `include "tb_common.svh"

  logic       nrst, load, dec;
  logic       start, kp, kp_last, enc_r, dec_r, fin, busy, ready;
  logic [7:0] rcon;
  logic [7:0] rc_exp [1:10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_control dut (
    .clk_i(clk), .nrst_i(nrst), .load_i(load), .decrypt_i(dec),
    .start_o(start), .keyprep_o(kp), .keyprep_last_o(kp_last), .enc_round_o(enc_r),
    .dec_round_o(dec_r), .final_round_o(fin), .rcon_o(rcon), .busy_o(busy), .ready_o(ready)
  );

  // Issue a load on the next edge; returns with the clock just past that edge.
  task automatic do_load(logic d);
    @(negedge clk);
    load = 1'b1;
    dec  = d;
    #1;
    `CHECK(start, "start_o high when idle and load_i")
    @(negedge clk);
    load = 1'b0;
  endtask

  initial begin
    nrst = 1'b0; load = 1'b0; dec = 1'b0;
    repeat (2) @(negedge clk);
    `CHECK(!busy && !ready && !start, "idle after reset")
    nrst = 1'b1;

    // Encryption: 10 round cycles, rcon 01..36, final in round 10, then ready.
    do_load(1'b0);
    for (int r = 1; r <= 10; r++) begin
      `CHECK(enc_r && !dec_r && !kp && busy, $sformatf("enc round %0d strobes", r))
      `CHECK(rcon == rc_exp[r], $sformatf("enc round %0d rcon %02h", r, rcon))
      `CHECK(fin == (r == 10), $sformatf("enc round %0d final flag", r))
      if (r == 4) begin
        load = 1'b1; #1;
        `CHECK(!start, "load ignored while busy")
      end
      @(negedge clk);
      load = 1'b0;
    end
    `CHECK(ready && !busy, "ready after 10 encryption rounds")
    @(negedge clk);
    `CHECK(ready, "ready holds until the next load")

    // Decryption: 10 key-preparation cycles, then rounds 10..1.
    do_load(1'b1);
    for (int r = 1; r <= 10; r++) begin
      `CHECK(kp && !enc_r && !dec_r, $sformatf("key prep %0d strobe", r))
      `CHECK(kp_last == (r == 10), $sformatf("key prep %0d last flag", r))
      `CHECK(rcon == rc_exp[r], $sformatf("key prep %0d rcon %02h", r, rcon))
      @(negedge clk);
    end
    for (int r = 10; r >= 1; r--) begin
      `CHECK(dec_r && !kp && !enc_r, $sformatf("dec round %0d strobe", r))
      `CHECK(rcon == rc_exp[r], $sformatf("dec round %0d rcon %02h", r, rcon))
      `CHECK(fin == (r == 1), $sformatf("dec round %0d final flag", r))
      @(negedge clk);
    end
    `CHECK(ready && !busy, "ready after decryption")

    // load_i held high: a new encryption starts straight from DONE.
    load = 1'b1; dec = 1'b0;
    @(negedge clk);
    `CHECK(enc_r && !ready, "held load restarts from DONE")
    load = 1'b0;

    // Reset in the middle of an operation returns to idle.
    repeat (3) @(negedge clk);
    nrst = 1'b0; #1;
    `CHECK(!busy && !ready, "reset aborts the operation")
    @(negedge clk);
    nrst = 1'b1;
    @(negedge clk);
    `CHECK(!busy && !ready, "stays idle after reset")
    finish_tb();
  end
endmodule
