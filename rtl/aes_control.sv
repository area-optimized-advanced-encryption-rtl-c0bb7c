// aes_control: sequencer of the iterative AES-128 core.
//
// A load_i seen on a rising clock edge in IDLE or DONE starts an operation (start_o is
// the combinational accept strobe for that edge). Encryption then runs NR round cycles
// (round counter 1..NR, final_round_o in round NR) and enters DONE. Decryption first
// spends NR key-preparation cycles stepping the key schedule forwards (counter 1..NR),
// then NR inverse rounds counting down NR..1, final_round_o in round 1. rcon_o is the
// round constant of the current counter value, used by both the forward and the backward
// key-schedule step. ready_o is high in DONE; load_i is ignored while busy_o is high.
// nrst_i is an active-low asynchronous reset. The round count NR = 10 is the source
// design's; the state machine, the handshake and the key-preparation phase are this
// design's own choices.
module aes_control
  import aes_pkg::*;
  import aes_ctrl_pkg::*;
#(
  parameter int unsigned NR = AES_NR
) (
  input  logic  clk_i,
  input  logic  nrst_i,
  input  logic  load_i,
  input  logic  decrypt_i,
  output logic  start_o,
  output logic  keyprep_o,
  output logic  keyprep_last_o,
  output logic  enc_round_o,
  output logic  dec_round_o,
  output logic  final_round_o,
  output byte_t rcon_o,
  output logic  busy_o,
  output logic  ready_o
);
  localparam int unsigned CW = $clog2(NR + 1);

  ctrl_state_e    state_q, state_d;
  logic [CW-1:0]  round_q, round_d;

  assign busy_o         = (state_q == S_KEYPREP) || (state_q == S_ENC) || (state_q == S_DEC);
  assign ready_o        = (state_q == S_DONE);
  assign start_o        = load_i && !busy_o;
  assign keyprep_o      = (state_q == S_KEYPREP);
  assign keyprep_last_o = keyprep_o && (round_q == CW'(NR));
  assign enc_round_o    = (state_q == S_ENC);
  assign dec_round_o    = (state_q == S_DEC);
  assign final_round_o  = (enc_round_o && round_q == CW'(NR)) || (dec_round_o && round_q == CW'(1));
  assign rcon_o         = rcon_of(int'(round_q));

  always_comb begin
    state_d = state_q;
    round_d = round_q;
    unique case (state_q)
      S_IDLE, S_DONE: begin
        if (load_i) begin
          state_d = decrypt_i ? S_KEYPREP : S_ENC;
          round_d = CW'(1);
        end
      end
      S_KEYPREP: begin
        if (round_q == CW'(NR)) state_d = S_DEC;   // counter stays at NR: first inverse round
        else                    round_d = round_q + CW'(1);
      end
      S_ENC: begin
        if (round_q == CW'(NR)) state_d = S_DONE;
        else                    round_d = round_q + CW'(1);
      end
      S_DEC: begin
        if (round_q == CW'(1))  state_d = S_DONE;
        else                    round_d = round_q - CW'(1);
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge nrst_i) begin
    if (!nrst_i) begin
      state_q <= S_IDLE;
      round_q <= '0;
    end else begin
      state_q <= state_d;
      round_q <= round_d;
    end
  end

  // The round counter stays within 1..NR whenever a round or key step is running.
  a_round_range: assert property (@(posedge clk_i) disable iff (!nrst_i)
    busy_o |-> (round_q >= CW'(1) && round_q <= CW'(NR)));
  // A finished result is never flagged while the core is still working.
  a_ready_not_busy: assert property (@(posedge clk_i) disable iff (!nrst_i)
    !(ready_o && busy_o));
endmodule
