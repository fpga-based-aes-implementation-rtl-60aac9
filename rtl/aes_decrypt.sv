// aes_decrypt: iterative AES-128 inverse cipher, one round per clock cycle.
//
// The round keys are used in reverse order. Loading applies RoundKey[NR];
// each of the rounds NR-1 down to 1 applies InvShiftRows, InvSubBytes,
// AddRoundKey with RoundKey[round] and then InvMixColumns; the final round
// applies InvShiftRows, InvSubBytes and AddRoundKey with RoundKey[0], without
// InvMixColumns. The state lives in one 128-bit register.
//
// Interface and timing: as aes_encrypt. start (sampled when not busy) loads
// din; done pulses for one cycle NR+1 cycles after the start cycle, and dout
// holds the plaintext until the next start. rk_idx names the round key needed
// in the current cycle and rk must return it combinationally.
//
// The order of the inverse transformations within a round follows the
// design's decryption algorithm; the schedule and handshake are this
// implementation's choices.
module aes_decrypt #(
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
  state_t  isr, isb, ark_in, ark_out, imc;

  assign load   = start && !busy;
  assign last   = (round_q == '0);
  assign rk_idx = busy ? round_q : rk_idx_t'(NR);

  aes_inv_shift_rows  u_isr (.din(state_q), .dout(isr));
  aes_inv_sub_bytes   u_isb (.din(isr),     .dout(isb));

  assign ark_in = busy ? isb : din;   // not busy: initial AddRoundKey

  aes_add_round_key   u_ark (.din(ark_in), .rk(rk), .dout(ark_out));
  aes_inv_mix_columns u_imc (.din(ark_out), .dout(imc));

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
        round_q <= rk_idx_t'(NR - 1);
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= last ? ark_out : imc;
        round_q <= round_q - 4'd1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;
endmodule
