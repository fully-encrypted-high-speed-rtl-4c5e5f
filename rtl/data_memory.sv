// data_memory: data memory of encrypted-width words.
//
// Every access is a whole 64-bit word, because a user data word is a 64-bit
// ciphertext. There is no 32-bit access. There is no split into user and
// supervisor regions. Words are addressed by word index (modulo WORDS).
// The processor has a read port (r_*, combinational) and a write port
// (w_*, clock edge); its pipeline reads in one stage and writes in another.
// Port B belongs to the host, which loads encrypted input and reads
// encrypted output: combinational read, write on the clock edge. If both
// write the same word in one cycle, the host wins. The size is this design's choice. The document's programs fit
// in an 8 MB cache, and the caches are not modelled.
module data_memory #(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] r_addr,
  output logic [63:0]   r_data,
  input  logic [AW-1:0] w_addr,
  input  logic          w_we,
  input  logic [63:0]   w_data,
  input  logic [AW-1:0] b_addr,
  output logic [63:0]   b_rdata,
  input  logic          b_we,
  input  logic [63:0]   b_wdata
);
  logic [63:0] mem [WORDS];

  assign r_data  = mem[r_addr];
  assign b_rdata = mem[b_addr];

  always_ff @(posedge clk) begin
    if (w_we) mem[w_addr] <= w_data;
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
