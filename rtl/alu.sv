// alu: the processor's unmodified arithmetic logic unit.
//
// It computes add, subtract, the bitwise operations, multiply, the four
// shifts/rotates and the OpenRISC set-flag comparisons. A comparison's
// 1-bit result leaves on the separate 'flag' output (the "1 (compare)" line
// of the ALU in the encrypted-ALU diagram). The unit is combinational.
//
// With wide = 0 (user mode) the operands are the 32-bit plaintexts beneath
// the encryption, and the result is 32 bits, zero extended. With wide = 1
// (supervisor mode) it works on 64 bits, as in the 64-bit OpenRISC
// semantics used unencrypted. Shift amounts are taken modulo the width. The
// set of operations follows the OpenRISC instructions this processor
// decodes. Carry and overflow flags are not produced.
module alu
  import ecpu_pkg::*;
(
  input  alu_op_e     op,
  input  logic        wide,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y,
  output logic        flag
);
  logic [63:0] r64;
  logic [31:0] r32;
  logic        f64, f32;
  logic [5:0]  sh64;
  logic [4:0]  sh32;
  logic [31:0] a32, b32;

  assign a32  = a[31:0];
  assign b32  = b[31:0];
  assign sh64 = b[5:0];
  assign sh32 = b[4:0];

  always_comb begin
    r64 = '0;
    r32 = '0;
    f64 = 1'b0;
    f32 = 1'b0;
    unique case (op)
      ALU_ADD: begin r64 = a + b;          r32 = a32 + b32; end
      ALU_SUB: begin r64 = a - b;          r32 = a32 - b32; end
      ALU_AND: begin r64 = a & b;          r32 = a32 & b32; end
      ALU_OR : begin r64 = a | b;          r32 = a32 | b32; end
      ALU_XOR: begin r64 = a ^ b;          r32 = a32 ^ b32; end
      ALU_MUL: begin r64 = a * b;          r32 = a32 * b32; end
      ALU_SLL: begin r64 = a << sh64;      r32 = a32 << sh32; end
      ALU_SRL: begin r64 = a >> sh64;      r32 = a32 >> sh32; end
      ALU_SRA: begin r64 = 64'($signed(a) >>> sh64); r32 = 32'($signed(a32) >>> sh32); end
      ALU_ROR: begin
        r64 = (a >> sh64) | (a << (7'd64 - {1'b0, sh64}));
        r32 = (a32 >> sh32) | (a32 << (6'd32 - {1'b0, sh32}));
      end
      ALU_SFEQ : begin f64 = (a == b);                   f32 = (a32 == b32); end
      ALU_SFNE : begin f64 = (a != b);                   f32 = (a32 != b32); end
      ALU_SFGTU: begin f64 = (a >  b);                   f32 = (a32 >  b32); end
      ALU_SFGEU: begin f64 = (a >= b);                   f32 = (a32 >= b32); end
      ALU_SFLTU: begin f64 = (a <  b);                   f32 = (a32 <  b32); end
      ALU_SFLEU: begin f64 = (a <= b);                   f32 = (a32 <= b32); end
      ALU_SFGTS: begin f64 = ($signed(a) >  $signed(b)); f32 = ($signed(a32) >  $signed(b32)); end
      ALU_SFGES: begin f64 = ($signed(a) >= $signed(b)); f32 = ($signed(a32) >= $signed(b32)); end
      ALU_SFLTS: begin f64 = ($signed(a) <  $signed(b)); f32 = ($signed(a32) <  $signed(b32)); end
      ALU_SFLES: begin f64 = ($signed(a) <= $signed(b)); f32 = ($signed(a32) <= $signed(b32)); end
      default: ;
    endcase
    y    = wide ? r64 : {32'h0, r32};
    flag = wide ? f64 : f32;
  end
endmodule
