// aes_key_expand: AES-128 key schedule. Expands the 128-bit cipher key into
// the eleven round keys RoundKey[0..NR] and keeps them in a register file that
// the cipher and the inverse cipher both read, in opposite orders.
//
// Expansion is iterative, one round key per clock: RoundKey[0] is the cipher
// key; RoundKey[i] is made from RoundKey[i-1] by the FIPS-197 recurrence on
// words, with RotWord, SubWord through four S-box instances and the round
// constant Rcon (kept in a register and doubled in GF(2^8) each step).
//
// Interface and timing: a one-cycle pulse on load captures key. RoundKey[i]
// is written on the i-th following clock edge, and ready rises together with
// the last write, NR cycles after load was sampled. ready falls on load and
// stays low until the new schedule is complete. rk is a combinational read of
// RoundKey[rk_idx]; an index above NR reads zero.
//
// The four S-boxes in the key schedule and the eleven stored round keys follow
// the design; the serial one-key-per-cycle expansion and the load/ready
// handshake are this implementation's choices.
module aes_key_expand #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  aes_pkg::state_t key,
  output logic            ready,
  input  aes_pkg::rk_idx_t rk_idx,
  output aes_pkg::state_t rk
);
  import aes_pkg::*;

  state_t     rk_mem [NR+1];
  state_t     cur_q;          // most recently written round key
  state_t     nxt;            // next round key from cur_q
  logic [7:0] rcon_q;
  rk_idx_t    cnt_q;          // index of the round key written next
  logic       run_q;

  // RotWord then SubWord of the last word of cur_q: bytes 13, 14, 15, 12.
  logic [3:0][7:0] sub_in, sub_out;
  assign sub_in = {cur_q[13], cur_q[14], cur_q[15], cur_q[12]};
  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.a(sub_in[i]), .y(sub_out[i]));
  end

  always_comb begin
    logic [31:0] temp, w0, w1, w2, w3;
    temp = sub_out ^ {rcon_q, 24'h0};
    w0 = cur_q[0:3]   ^ temp;
    w1 = cur_q[4:7]   ^ w0;
    w2 = cur_q[8:11]  ^ w1;
    w3 = cur_q[12:15] ^ w2;
    nxt = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      rcon_q <= 8'h01;
      cnt_q  <= '0;
      run_q  <= 1'b0;
      ready  <= 1'b0;
    end else if (load) begin
      cur_q  <= key;
      rcon_q <= 8'h01;
      cnt_q  <= 4'd1;
      run_q  <= 1'b1;
      ready  <= 1'b0;
    end else if (run_q) begin
      cur_q  <= nxt;
      rcon_q <= xtime(rcon_q);
      cnt_q  <= cnt_q + 4'd1;
      if (cnt_q == rk_idx_t'(NR)) begin
        run_q <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // Round key storage: written once per cycle during expansion, no reset.
  always_ff @(posedge clk) begin
    if (load)       rk_mem[0]     <= key;
    else if (run_q) rk_mem[cnt_q] <= nxt;
  end

  assign rk = (rk_idx <= rk_idx_t'(NR)) ? rk_mem[rk_idx] : '0;
endmodule
