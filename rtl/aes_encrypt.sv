// aes_encrypt: iterative AES-128 cipher, one round per clock cycle.
//
// A single round datapath is reused in a loop: SubBytes, ShiftRows,
// MixColumns and AddRoundKey. The initial AddRoundKey is done while the block
// is loaded (the round datapath is bypassed and din goes straight to the key
// addition), rounds 1..NR-1 use the full datapath, and round NR skips
// MixColumns. The state lives in one 128-bit register.
//
// Interface and timing: start (sampled when not busy) loads din and applies
// RoundKey[0]; rounds 1..NR follow on the next NR clock edges. done is a
// one-cycle pulse in the cycle after the last round, NR+1 cycles after the
// start cycle, and dout holds the ciphertext until the next start. rk_idx
// asks the key store for the round key of the current step and rk must
// return it in the same cycle (a combinational read).
//
// The round order and the final round without MixColumns follow the design;
// the one-round-per-cycle schedule and the start/done handshake are this
// implementation's choices.
module aes_encrypt #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  aes_pkg::state_t  din,
  output aes_pkg::rk_idx_t rk_idx,
  input  aes_pkg::state_t  rk,
  output logic             busy,
  output logic             done,
  output aes_pkg::state_t  dout
);
  import aes_pkg::*;

  state_t  state_q;
  rk_idx_t round_q;
  logic    last;
  logic    load;
  state_t  sb, sr, mc, ark_in, ark_out;

  assign load   = start && !busy;
  assign last   = (round_q == rk_idx_t'(NR));
  assign rk_idx = busy ? round_q : '0;

  aes_sub_bytes     u_sb  (.din(state_q), .dout(sb));
  aes_shift_rows    u_sr  (.din(sb),      .dout(sr));
  aes_mix_columns   u_mc  (.din(sr),      .dout(mc));

  always_comb begin
    if (!busy)     ark_in = din;   // initial AddRoundKey
    else if (last) ark_in = sr;    // final round: no MixColumns
    else           ark_in = mc;
  end

  aes_add_round_key u_ark (.din(ark_in), .rk(rk), .dout(ark_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        state_q <= ark_out;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= ark_out;
        round_q <= round_q + 4'd1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;
endmodule
