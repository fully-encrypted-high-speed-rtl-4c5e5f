// enc_alu: the modified arithmetic unit ALU' in its abstract form,
// z' = E(D(x') op D(y')).
//
// Two decryption units (one RC2 codec each) turn the 64-bit encrypted
// operands into 32-bit plaintexts. The unmodified ALU combines them, and an
// encryption unit re-encrypts the 32-bit result with fresh padding. The
// 1-bit compare result leaves the unit directly, as in the document's ALU'
// diagram (32-bit paths into and out of the ALU, a 1-bit compare output).
// The processor core does not use this unit as it stands: there the codec
// is shared and is used only at the start and end of a series of
// operations. The unit here is the construction that defines what encrypted
// arithmetic means.
//
// Timing: fully pipelined, one operation per cycle. The ALU sits between
// the decryption and encryption pipelines, so out_valid/z_enc follow
// in_valid by 2*STAGES cycles. 'flag' comes out with z_enc.
// Interface choices (valid strobe, tag-free in-order results) are this
// design's own.
module enc_alu
  import ecpu_pkg::*;
#(
  parameter int unsigned STAGES = 10,
  parameter logic [31:0] SEED   = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rc2_key_t    key,
  input  logic        in_valid,
  input  alu_op_e     op,
  input  logic [63:0] x_enc,
  input  logic [63:0] y_enc,
  output logic        out_valid,
  output logic [63:0] z_enc,
  output logic        flag
);
  localparam int unsigned TAG_W = $bits(alu_op_e);

  logic        dx_valid, dy_valid, dx_dec, dy_dec;
  logic [63:0] dx, dy;
  logic [TAG_W-1:0] dx_tag, dy_tag;
  logic [63:0] r;
  logic        f;
  logic [31:0] pad;
  logic        e_dec;
  logic [TAG_W:0] e_tag;

  rc2_codec #(.STAGES(STAGES), .TAG_W(TAG_W)) u_dx (
    .clk, .rst_n, .key, .in_valid, .in_dec(1'b1), .in_data(x_enc), .in_tag(op),
    .out_valid(dx_valid), .out_dec(dx_dec), .out_data(dx), .out_tag(dx_tag)
  );
  rc2_codec #(.STAGES(STAGES), .TAG_W(TAG_W)) u_dy (
    .clk, .rst_n, .key, .in_valid, .in_dec(1'b1), .in_data(y_enc), .in_tag(op),
    .out_valid(dy_valid), .out_dec(dy_dec), .out_data(dy), .out_tag(dy_tag)
  );

  alu u_alu (
    .op(alu_op_e'(dx_tag)), .wide(1'b0), .a({32'h0, dx[31:0]}), .b({32'h0, dy[31:0]}),
    .y(r), .flag(f)
  );

  pad_gen #(.SEED(SEED)) u_pad (.clk, .rst_n, .step(dx_valid), .pad);

  rc2_codec #(.STAGES(STAGES), .TAG_W(TAG_W+1)) u_e (
    .clk, .rst_n, .key, .in_valid(dx_valid), .in_dec(1'b0), .in_data({pad, r[31:0]}),
    .in_tag({f, dx_tag}),
    .out_valid, .out_dec(e_dec), .out_data(z_enc), .out_tag(e_tag)
  );

  assign flag = e_tag[TAG_W];

  // The two decryption pipelines run in lockstep.
  assert property (@(posedge clk) disable iff (!rst_n) dx_valid == dy_valid);

  logic unused;
  assign unused = ^{dx_dec, dy_dec, dy_tag, dx[63:32], dy[63:32], r[63:32], e_dec, e_tag[TAG_W-1:0], dy_valid};
endmodule
