// user_tlb: user-mode address remapping buffer.
//
// Addresses generated in user mode are scattered over a huge space (here,
// hashed 32-bit addresses). The TLB maps each one individually onto a
// contiguous linear sequence of memory words, in order of first use: the
// first new address gets slot 0, the next new one slot 1, and so on. A
// lookup that hits returns the slot already given. A miss with room left
// assigns the next free slot when 'commit' is high. A miss with no room left
// raises 'fault', the point where the document's minor TLB fault handler
// would consult the mapping database kept in memory. That handler and the
// database are software and are not built here.
//
// Timing: lookup is combinational. Assignment happens on the clock edge when
// lookup_valid && commit && miss && !full. 'clear' (on a key change) empties
// the buffer. Each entry holds a 32-bit tag and a valid bit. Its slot
// number is its position, so no separate mapping field is stored. ENTRIES
// is this design's choice; the document does not give a size.
module user_tlb #(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          lookup_valid,
  input  logic [31:0]   tag,
  input  logic          commit,
  output logic          hit,
  output logic          fault,
  output logic          assign_new,
  output logic [IW-1:0] slot
);
  logic [ENTRIES-1:0]       valid;
  logic [ENTRIES-1:0][31:0] tags;
  logic [IW:0]              used;    // number of slots given out
  logic                     full;

  assign full = (used == (IW+1)'(ENTRIES));

  always_comb begin
    hit  = 1'b0;
    slot = used[IW-1:0];
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (valid[i] && tags[i] == tag) begin
        hit  = 1'b1;
        slot = IW'(i);
      end
    fault      = lookup_valid && !hit && full;
    assign_new = lookup_valid && !hit && !full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      used  <= '0;
    end else if (clear) begin
      valid <= '0;
      used  <= '0;
    end else if (assign_new && commit) begin
      valid[used[IW-1:0]] <= 1'b1;
      used                <= used + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (assign_new && commit && !clear) tags[used[IW-1:0]] <= tag;
endmodule
