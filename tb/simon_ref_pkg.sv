// simon_ref_pkg: reference model of SIMON32/64 for the testbenches, written
// directly from the cipher specification and independent of the RTL: the
// full key schedule is expanded into an array first, with the constant
// sequence z0 taken from its 62-bit literal, then the 32 rounds run.
package simon_ref_pkg;

  localparam logic [61:0] Z0 = 62'b11111010001001010110000111001101111101000100101011000011100110;

  function automatic logic [15:0] rl(input logic [15:0] v, input int s);
    return (v << s) | (v >> (16 - s));
  endfunction

  // plaintext = {x, y}, key = {k3, k2, k1, k0}; returns {x, y}
  function automatic logic [31:0] encrypt(input logic [31:0] plaintext, input logic [63:0] key);
    logic [15:0] k [32];
    logic [15:0] x, y, t;
    for (int i = 0; i < 4; i++) k[i] = key[16*i +: 16];
    for (int i = 4; i < 32; i++) begin
      t = rl(k[i-1], 13) ^ k[i-3];     // rotate right by 3, then add k[i-3]
      t = t ^ rl(t, 15);               // add rotate right by 1
      k[i] = 16'hFFFC ^ k[i-4] ^ t ^ {15'd0, Z0[61-(i-4)]};
    end
    x = plaintext[31:16];
    y = plaintext[15:0];
    for (int i = 0; i < 32; i++) begin
      t = x;
      x = y ^ ((rl(x, 1) & rl(x, 8)) ^ rl(x, 2)) ^ k[i];
      y = t;
    end
    return {x, y};
  endfunction

endpackage
