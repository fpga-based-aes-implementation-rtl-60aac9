// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 blocks.
//
// The 128-bit state is held as sixteen bytes, state_t, numbered 0..15 in the
// order of the input block: byte 0 is bits [127:120]. Byte i is the State
// element in row i%4 and column i/4, so a column is four consecutive bytes.
// The S-box and inverse S-box tables are computed here by constant functions
// at elaboration, from the field inverse and affine map that define them, so
// the hardware holds them as 256-entry lookup tables without a pasted table.
// The round count NR = 10 is that of AES-128 (128-bit block and key);
// the byte numbering and the table generation are this design's own choices.
package aes_pkg;

  localparam int unsigned NR = 10;  // rounds (AES-128)

  typedef logic [0:15][7:0]  state_t;       // byte 0 is the most significant
  typedef logic [255:0][7:0] sbox_table_t;  // entry i is table[i]
  typedef logic [3:0]        rk_idx_t;      // round key index 0..NR

  // Multiply by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product.
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] acc, aa;
    acc = 8'h00;
    aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= aa;
      aa = xtime(aa);
    end
    return acc;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int unsigned n);
    return 8'((b << n) | (b >> (8 - n)));
  endfunction

  // S-box: walk the multiplicative group with generator 3 (p) while tracking
  // its inverse (q = p^-1, multiplied by 3^-1 each step), then apply the
  // affine map q ^ rotl(q,1..4) ^ 0x63. S(0) = 0x63.
  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    logic [7:0]  p, q;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int n = 0; n < 255; n++) begin
      p = p ^ xtime(p);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'b0000};
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  // Inverse S-box: the S-box read backwards.
  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t s, t;
    s = gen_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[s[i]] = 8'(i);
    return t;
  endfunction

endpackage
