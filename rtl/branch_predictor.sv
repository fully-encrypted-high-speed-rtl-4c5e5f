// branch_predictor: branch prediction buffer for the fetch stage.
//
// A direct-mapped table of ENTRIES entries, indexed by the low bits of the
// instruction's word address. Each entry holds a tag (the rest of the PC and
// the mode, so user and supervisor code never share an entry), the branch
// target and a 2-bit saturating counter. At fetch, a PC that hits an entry
// whose counter is 2 or 3 is predicted taken and fetch continues at the
// stored target. A PC that misses, or hits with counter 0 or 1, is predicted
// not taken.
//
// The execute stage reports every resolved jump or conditional branch on
// the update port: a hit moves its counter one step towards the outcome; a
// miss allocates the entry (replacing what was there) with counter 2 for a
// taken branch and 1 for a not-taken one. 'clear' empties the table.
//
// The document names the buffer and reports its hit and right/wrong
// counts; its size and organisation are this design's choice.
//
// Interface: combinational lookup (lk_*), update on the clock edge (up_*).
module branch_predictor #(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        lk_user,
  input  logic [31:0] lk_pc,
  output logic        lk_hit,
  output logic        lk_taken,
  output logic [31:0] lk_target,
  input  logic        up_valid,
  input  logic        up_user,
  input  logic [31:0] up_pc,
  input  logic        up_taken,
  input  logic [31:0] up_target
);
  localparam int unsigned TW = 31 - IW;   // PC bits above the index, plus the mode

  logic [ENTRIES-1:0]         valid;
  logic [ENTRIES-1:0][TW-1:0] tags;
  logic [ENTRIES-1:0][31:0]   targets;
  logic [ENTRIES-1:0][1:0]    ctrs;

  logic [IW-1:0] li, ui;
  logic [TW-1:0] lt, ut;
  assign li = lk_pc[2 +: IW];
  assign ui = up_pc[2 +: IW];
  assign lt = {lk_user, lk_pc[31 -: TW-1]};
  assign ut = {up_user, up_pc[31 -: TW-1]};

  assign lk_hit    = valid[li] && tags[li] == lt;
  assign lk_taken  = lk_hit && ctrs[li][1];
  assign lk_target = targets[li];

  logic up_hit;
  assign up_hit = valid[ui] && tags[ui] == ut;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   valid <= '0;
    else if (clear)               valid <= '0;
    else if (up_valid && !up_hit) valid[ui] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (up_valid) begin
      if (up_hit) begin
        if (up_taken && ctrs[ui] != 2'd3)       ctrs[ui] <= ctrs[ui] + 2'd1;
        else if (!up_taken && ctrs[ui] != 2'd0) ctrs[ui] <= ctrs[ui] - 2'd1;
      end else begin
        ctrs[ui] <= up_taken ? 2'd2 : 2'd1;
      end
      tags[ui]    <= ut;
      targets[ui] <= up_target;
    end
  end

  logic unused;
  assign unused = ^{lk_pc[1:0], up_pc[1:0]};
endmodule
