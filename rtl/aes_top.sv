// aes_top: AES-128 encryptor/decryptor. One key schedule feeds an iterative
// cipher core and an iterative inverse-cipher core; a mode bit picks which
// core handles each 128-bit block.
//
// Use: pulse key_load with the cipher key on key_in; key_ready rises NR
// cycles later once RoundKey[0..NR] are stored. A block request is start with
// mode (0 encrypt, 1 decrypt) and data_in; it is accepted in a cycle where
// start_ready is high, and the caller holds start, mode and data_in until
// then (a request made before the key schedule is ready, or while a block is
// in flight, stalls). The chosen core runs NR+1 cycles; done then pulses for
// one cycle and data_out holds the result until the next accepted request.
// key_load must not be asserted while busy is high.
//
// Blocks, round structure and key size follow the design (AES-128, Nr = 10,
// both directions, a shared key schedule); the handshake, the single shared
// read port of the round-key store and the request stall are this
// implementation's choices.
module aes_top #(
  parameter int unsigned NR = aes_pkg::NR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,
  input  logic [127:0] key_in,
  output logic         key_ready,
  input  logic         start,
  input  logic         mode,
  input  logic [127:0] data_in,
  output logic         start_ready,
  output logic         busy,
  output logic         done,
  output logic [127:0] data_out
);
  import aes_pkg::*;

  rk_idx_t rk_idx, enc_idx, dec_idx;
  state_t  rk, enc_out, dec_out;
  logic    enc_busy, dec_busy, enc_done, dec_done;
  logic    accept, use_dec, mode_q;

  assign busy        = enc_busy || dec_busy;
  assign start_ready = key_ready && !busy && !key_load;
  assign accept      = start && start_ready;

  aes_key_expand #(.NR(NR)) u_keys (
    .clk, .rst_n, .load(key_load), .key(key_in), .ready(key_ready),
    .rk_idx, .rk
  );

  aes_encrypt #(.NR(NR)) u_enc (
    .clk, .rst_n, .start(accept && !mode), .din(data_in),
    .rk_idx(enc_idx), .rk, .busy(enc_busy), .done(enc_done), .dout(enc_out)
  );

  aes_decrypt #(.NR(NR)) u_dec (
    .clk, .rst_n, .start(accept && mode), .din(data_in),
    .rk_idx(dec_idx), .rk, .busy(dec_busy), .done(dec_done), .dout(dec_out)
  );

  // The cores never run together, so they share the key store's read port.
  assign use_dec = dec_busy || (!enc_busy && mode);
  assign rk_idx  = use_dec ? dec_idx : enc_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mode_q <= 1'b0;
    else if (accept) mode_q <= mode;
  end

  assign done     = enc_done || dec_done;
  assign data_out = mode_q ? dec_out : enc_out;

  a_no_rekey_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    key_load |-> !busy)
    else $error("key_load asserted while a block is in flight");
  a_one_core: assert property (@(posedge clk) disable iff (!rst_n)
    !(enc_busy && dec_busy));
endmodule
