// rc2_codec: stand-alone pipelined RC2-64 encryption/decryption unit.
//
// One request (a 64-bit block, a direction and a tag) can enter every cycle.
// Its result leaves STAGES cycles later, so throughput is one block per
// cycle and latency is STAGES cycles. The document gives those figures for
// the codec: ten stages, one operation completing per cycle. The round split
// across stages is in rc2_stage. Inside the processor core the same stage
// logic is laid along the main pipeline. This module is the codec on its
// own, as used by the encrypted ALU (enc_alu).
//
// Interface: in_valid/in_dec/in_data/in_tag in; out_valid/out_dec/out_data/
// out_tag out. The key is an input and stays stable while requests are in
// flight. There is no back-pressure. Reset clears the valid bits only.
module rc2_codec
  import ecpu_pkg::*;
#(
  parameter int unsigned STAGES = 10,
  parameter int unsigned TAG_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rc2_key_t         key,
  input  logic             in_valid,
  input  logic             in_dec,
  input  logic [63:0]      in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_dec,
  output logic [63:0]      out_data,
  output logic [TAG_W-1:0] out_tag
);
  logic [STAGES:0]            v;
  logic [STAGES:0]            d;
  logic [STAGES:0][63:0]      blk;
  logic [STAGES:0][TAG_W-1:0] tag;
  logic [STAGES-1:0][63:0]    nxt;

  assign v[0]   = in_valid;
  assign d[0]   = in_dec;
  assign blk[0] = in_data;
  assign tag[0] = in_tag;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    rc2_stage #(.STAGES(STAGES), .STAGE(s)) u_round (
      .dec(d[s]), .din(blk[s]), .key(key), .dout(nxt[s])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[s+1] <= 1'b0;
      else        v[s+1] <= v[s];
    end
    always_ff @(posedge clk) begin
      d[s+1]   <= d[s];
      blk[s+1] <= nxt[s];
      tag[s+1] <= tag[s];
    end
  end

  assign out_valid = v[STAGES];
  assign out_dec   = d[STAGES];
  assign out_data  = blk[STAGES];
  assign out_tag   = tag[STAGES];
endmodule
