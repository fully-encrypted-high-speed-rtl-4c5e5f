// imm_cache: user-mode cache of decrypted immediates.
//
// An instruction carrying an encrypted constant needs a decryption the
// first time it runs. This cache remembers the decrypted 32-bit constant by
// the instruction's address. When the same instruction is met again, decode
// takes the plaintext from here and the instruction skips the codec. It
// then runs as a type-A instruction, reading its registers early. It is
// used only in user mode. Supervisor mode never sees it, and 'clear'
// (asserted on a key change) empties it.
//
// The document describes this as a user-mode-only cache of decoded
// instructions. Holding just the decrypted constant, direct-mapped by
// instruction address, is this design's simplification.
//
// Timing: lookup combinational; fill on the clock edge.
module imm_cache #(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [31:0] lookup_pc,
  output logic        hit,
  output logic [31:0] data,
  input  logic        fill,
  input  logic [31:0] fill_pc,
  input  logic [31:0] fill_data
);
  localparam int unsigned TW = 30 - IW;

  logic [ENTRIES-1:0]        valid;
  logic [ENTRIES-1:0][TW-1:0] tags;
  logic [ENTRIES-1:0][31:0]   vals;

  logic [IW-1:0] li, fi;
  assign li = lookup_pc[2 +: IW];
  assign fi = fill_pc[2 +: IW];

  assign hit  = valid[li] && tags[li] == lookup_pc[31 -: TW];
  assign data = vals[li];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      valid <= '0;
    else if (clear)  valid <= '0;
    else if (fill)   valid[fi] <= 1'b1;
  end

  always_ff @(posedge clk)
    if (fill) begin
      tags[fi] <= fill_pc[31 -: TW];
      vals[fi] <= fill_data;
    end

  logic unused;
  assign unused = ^{lookup_pc[1:0], fill_pc[1:0]};
endmodule
