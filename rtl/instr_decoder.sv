// instr_decoder: decoder for the OpenRISC subset as modified for encrypted
// running.
//
// Instructions are 32 bits in both modes. The fields follow OpenRISC 1.1,
// with the document's changes:
//   * prefix [31:26]=opcode, [25:24] fill, [23:0] a 24-bit fragment of a
//     64-bit encrypted constant. Two prefixes and the 16-bit immediate of
//     the next instruction make up the 64-bit ciphertext.
//   * shift immediate: in user mode all of [15:0] is a fragment of the
//     encrypted constant. The decrypted constant holds the shift kind in
//     [7:6] and the amount in [5:0], so the kind of shift is encrypted too.
//   * load/store: [25:21] and [20:16] are the two register fields and
//     [15:0] is fill (the displacement is gone). The address is the
//     register in [20:16] alone. A load writes [25:21]; a store writes the
//     register named in [25:21] to memory.
//   * move to SPR: [25:21] and [10:0] give the SPR number. The register
//     field [20:16] is ignored.
// In user mode every immediate of an arithmetic or compare instruction is
// encrypted (enc_imm = 1); such an instruction is of type B (decrypt
// first). In supervisor mode immediates are in the clear and the prefix is
// a no-op. A user-mode move to SPR is dropped (writes to SPRs out of bounds
// are ignored). Jumps and branches have no delay slot; that is this
// design's choice.
//
// Combinational.
module instr_decoder
  import ecpu_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        user,
  output dec_t        d
);
  logic [5:0] opc;
  assign opc = instr[31:26];

  function automatic alu_op_e sf_op(logic [4:0] c);
    case (c)
      5'h00: return ALU_SFEQ;
      5'h01: return ALU_SFNE;
      5'h02: return ALU_SFGTU;
      5'h03: return ALU_SFGEU;
      5'h04: return ALU_SFLTU;
      5'h05: return ALU_SFLEU;
      5'h0A: return ALU_SFGTS;
      5'h0B: return ALU_SFGES;
      5'h0C: return ALU_SFLTS;
      default: return ALU_SFLES;
    endcase
  endfunction

  function automatic alu_op_e sh_op(logic [1:0] k);
    case (k)
      2'd0: return ALU_SLL;
      2'd1: return ALU_SRL;
      2'd2: return ALU_SRA;
      default: return ALU_ROR;
    endcase
  endfunction

  always_comb begin
    d           = '0;
    d.cls       = IC_ILLEGAL;
    d.op        = ALU_ADD;
    d.ra        = instr[20:16];
    d.rb        = instr[15:11];
    d.rd        = {1'b0, instr[25:21]};
    d.imm16     = instr[15:0];
    d.off26     = instr[25:0];
    d.branch_if = (opc == OPC_BF);
    d.spr       = {instr[25:21], instr[10:0]};
    unique case (opc)
      OPC_J, OPC_JAL: begin
        d.cls  = IC_JUMP;
        d.link = (opc == OPC_JAL);
        d.wr   = (opc == OPC_JAL);
        d.rd   = 6'd9;
      end
      OPC_BF, OPC_BNF: begin
        d.cls  = IC_BRANCH;
        d.rd_f = 1'b1;
      end
      OPC_NOP:    d.cls = IC_NOP;
      OPC_SYS:    d.cls = user ? IC_SYS : IC_NOP;
      OPC_RFE:    d.cls = user ? IC_NOP : IC_RFE;
      OPC_PREFIX: d.cls = user ? IC_PREFIX : IC_NOP;
      OPC_LWZ, OPC_LWS: begin
        d.cls  = IC_LOAD;
        d.rd_a = 1'b1;
        d.wr   = 1'b1;
      end
      OPC_SW: begin
        d.cls  = IC_STORE;
        d.rd_a = 1'b1;
        d.rd_b = 1'b1;
        d.rb   = instr[25:21];    // data register sits in the first register field
      end
      OPC_ADDI, OPC_ANDI, OPC_ORI, OPC_XORI, OPC_MULI: begin
        d.cls      = IC_ALU;
        d.rd_a     = 1'b1;
        d.wr       = 1'b1;
        d.use_imm  = 1'b1;
        d.enc_imm  = user;
        d.sext_imm = (opc == OPC_ADDI) || (opc == OPC_XORI) || (opc == OPC_MULI);
        case (opc)
          OPC_ANDI: d.op = ALU_AND;
          OPC_ORI : d.op = ALU_OR;
          OPC_XORI: d.op = ALU_XOR;
          OPC_MULI: d.op = ALU_MUL;
          default : d.op = ALU_ADD;
        endcase
      end
      OPC_SHI: begin
        d.cls     = IC_SHI;
        d.rd_a    = 1'b1;
        d.wr      = 1'b1;
        d.use_imm = 1'b1;
        d.enc_imm = user;
        d.op      = sh_op(instr[7:6]);
      end
      OPC_SFI: begin
        d.cls      = IC_SETF;
        d.rd_a     = 1'b1;
        d.wr       = 1'b1;
        d.rd       = regnum_t'(FLAG_REG);
        d.use_imm  = 1'b1;
        d.enc_imm  = user;
        d.sext_imm = 1'b1;
        d.op       = sf_op(instr[25:21]);
      end
      OPC_SF: begin
        d.cls  = IC_SETF;
        d.rd_a = 1'b1;
        d.rd_b = 1'b1;
        d.wr   = 1'b1;
        d.rd   = regnum_t'(FLAG_REG);
        d.op   = sf_op(instr[25:21]);
      end
      OPC_MTSPR: begin
        d.cls  = user ? IC_NOP : IC_MTSPR;
        d.rd_b = !user;
      end
      OPC_ALU: begin
        d.cls  = IC_ALU;
        d.rd_a = 1'b1;
        d.rd_b = 1'b1;
        d.wr   = 1'b1;
        case (instr[3:0])
          4'h0: d.op = ALU_ADD;
          4'h2: d.op = ALU_SUB;
          4'h3: d.op = ALU_AND;
          4'h4: d.op = ALU_OR;
          4'h5: d.op = ALU_XOR;
          4'h6: d.op = ALU_MUL;
          4'h8: d.op = sh_op(instr[7:6]);
          default: d.cls = IC_ILLEGAL;
        endcase
      end
      default: d.cls = IC_ILLEGAL;
    endcase
    // writes to r0 are discarded
    if (d.wr && d.rd == 6'd0) d.wr = 1'b0;
    if (d.cls == IC_ILLEGAL) begin
      d.wr = 1'b0; d.rd_a = 1'b0; d.rd_b = 1'b0;
    end
  end
endmodule
