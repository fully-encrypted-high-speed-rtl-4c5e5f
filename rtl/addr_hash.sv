// addr_hash: keyed, collision-free hash of a 32-bit user data address.
//
// In user mode the plaintext address from the shadow registers is not put
// on the memory bus. It is hashed first, and the TLB then places the hashed
// address. The document asks for a hash with no collisions over the 32-bit
// address space but does not name one. This design uses a bijection built
// from steps that are each invertible: XOR with a key word, multiplication
// by an odd constant modulo 2^32, and xor-shift. Distinct addresses
// therefore always give distinct hashes.
//
// Combinational. The key is a 64-bit secret, taken from the cipher key.
module addr_hash (
  input  logic [63:0] key,
  input  logic [31:0] addr,
  output logic [31:0] hash
);
  logic [31:0] h0, h1, h2, h3, h4;
  always_comb begin
    h0   = addr ^ key[31:0];
    h1   = h0 * 32'h9E37_79B1;
    h2   = h1 ^ (h1 >> 15);
    h3   = h2 * 32'h85EB_CA77;
    h4   = h3 ^ (h3 >> 13);
    hash = h4 ^ key[63:32];
  end
endmodule
