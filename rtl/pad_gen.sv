// pad_gen: pseudo-random padding source for encryptions.
//
// Each 32-bit plaintext is encrypted together with 32 padding bits so that
// the same value encrypts differently from one time to the next. The
// document asks for (pseudo-)random padding but does not say how it is
// made. This is a 32-bit Galois LFSR (polynomial x^32+x^22+x^2+x+1, period
// 2^32-1) that steps whenever 'step' is high. Reset loads SEED, which must
// not be zero.
module pad_gen #(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [31:0] pad
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pad <= SEED;
    else if (step) pad <= (pad >> 1) ^ (pad[0] ? 32'h8020_0003 : 32'h0);
  end
endmodule
