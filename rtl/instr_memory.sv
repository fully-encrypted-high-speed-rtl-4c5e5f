// instr_memory: program memory (the instruction side of the Harvard layout).
//
// WORDS 32-bit instruction words, addressed by byte address (bits [1:0]
// ignored; addresses wrap modulo the size). The fetch port reads
// combinationally. The load port writes on the clock edge and is used to
// place a program in memory. Contents are cleared by nothing: the program
// loader is expected to write what is fetched. The size is this design's
// choice; the document gives none for program memory.
module instr_memory #(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] fetch_addr,
  output logic [31:0] fetch_data,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  logic [31:0] mem [WORDS];

  assign fetch_data = mem[fetch_addr[2 +: AW]];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr[2 +: AW]] <= load_data;

  logic unused;
  assign unused = ^{fetch_addr[31:AW+2], fetch_addr[1:0], load_addr[31:AW+2], load_addr[1:0]};
endmodule
