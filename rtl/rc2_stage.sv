// rc2_stage: the combinational logic of one stage of the pipelined RC2-64
// codec.
//
// The 18 round operations of RC2 (16 mixing rounds and 2 mashing rounds) are
// spread evenly over STAGES pipeline stages. Stage STAGE applies its share of
// them: the encryption ops when dec = 0, the decryption ops (which undo the
// encryption ops in reverse order) when dec = 1. Spreading the rounds evenly
// is this design's choice. The document gives only the codec's depth: 10
// stages, one result per cycle.
//
// Interface: din/dout are 64-bit blocks, key is the expanded key. There are
// no registers here. The caller puts a register between consecutive stages.
module rc2_stage
  import ecpu_pkg::*;
#(
  parameter int unsigned STAGES = 10,
  parameter int unsigned STAGE  = 0
) (
  input  logic        dec,
  input  logic [63:0] din,
  input  rc2_key_t    key,
  output logic [63:0] dout
);
  localparam int unsigned FIRST = rc2_stage_first(STAGE, STAGES);
  localparam int unsigned LAST  = rc2_stage_first(STAGE + 1, STAGES);  // exclusive

  logic [63:0] enc_v, dec_v;

  always_comb begin
    enc_v = din;
    dec_v = din;
    for (int unsigned o = FIRST; o < LAST; o++) begin
      enc_v = rc2_enc_op(enc_v, o, key);
      dec_v = rc2_dec_op(dec_v, o, key);
    end
    dout = dec ? dec_v : enc_v;
  end
endmodule
