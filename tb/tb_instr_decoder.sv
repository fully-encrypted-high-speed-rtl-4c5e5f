// tb_instr_decoder: checks instruction field extraction and mode rules.
//
// Random instructions of every supported opcode are built from random
// fields and decoded in both modes. An independent table here gives the
// expected class, register fields, read/write flags and whether the
// immediate is encrypted. Mode rules checked: prefix and system call only
// act in user mode, return from exception and move to SPR only in
// supervisor mode, user immediates are encrypted (type B), writes to r0
// are dropped, unknown opcodes read and write nothing.
module tb_instr_decoder;
  import ecpu_pkg::*;

  logic [31:0] instr;
  logic        user;
  dec_t        d;

  instr_decoder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s instr=%h user=%0d", what, instr, user);
    end
  endtask

  localparam logic [5:0] OPCS [19] = '{OPC_J, OPC_JAL, OPC_BNF, OPC_BF, OPC_NOP, OPC_SYS,
    OPC_RFE, OPC_PREFIX, OPC_LWZ, OPC_LWS, OPC_ADDI, OPC_ANDI, OPC_ORI, OPC_XORI, OPC_MULI,
    OPC_SHI, OPC_SFI, OPC_MTSPR, OPC_SW};

  initial begin
    logic [5:0] opc;
    logic [4:0] rd, ra, rb;
    iclass_e    cls;
    logic       wr, rda, rdb, enc;
    for (int n = 0; n < 6000; n++) begin
      user = 1'($urandom);
      case ($urandom_range(0, 21))
        19: opc = OPC_ALU;
        20: opc = OPC_SF;
        21: opc = 6'h3F;               // unused opcode
        default: opc = OPCS[$urandom_range(0, 18)];
      endcase
      instr = {opc, 26'($urandom)};
      if (opc == OPC_ALU) instr[3:0] = ($urandom_range(0, 1) == 0) ? 4'h0 : 4'h2;
      rd = instr[25:21]; ra = instr[20:16]; rb = (opc == OPC_SW) ? instr[25:21] : instr[15:11];
      wr = 0; rda = 0; rdb = 0; enc = 0;
      case (opc)
        OPC_J:      cls = IC_JUMP;
        OPC_JAL:    begin cls = IC_JUMP; wr = 1; end
        OPC_BF, OPC_BNF: cls = IC_BRANCH;
        OPC_NOP:    cls = IC_NOP;
        OPC_SYS:    cls = user ? IC_SYS : IC_NOP;
        OPC_RFE:    cls = user ? IC_NOP : IC_RFE;
        OPC_PREFIX: cls = user ? IC_PREFIX : IC_NOP;
        OPC_LWZ, OPC_LWS: begin cls = IC_LOAD; rda = 1; wr = (rd != 0); end
        OPC_SW:     begin cls = IC_STORE; rda = 1; rdb = 1; end
        OPC_ADDI, OPC_ANDI, OPC_ORI, OPC_XORI, OPC_MULI:
                    begin cls = IC_ALU; rda = 1; wr = (rd != 0); enc = user; end
        OPC_SHI:    begin cls = IC_SHI; rda = 1; wr = (rd != 0); enc = user; end
        OPC_SFI:    begin cls = IC_SETF; rda = 1; wr = 1; enc = user; end
        OPC_SF:     begin cls = IC_SETF; rda = 1; rdb = 1; wr = 1; end
        OPC_MTSPR:  begin cls = user ? IC_NOP : IC_MTSPR; rdb = !user; end
        OPC_ALU:    begin cls = IC_ALU; rda = 1; rdb = 1; wr = (rd != 0); end
        default:    cls = IC_ILLEGAL;
      endcase
      #1;
      check("class", d.cls == cls);
      check("write", d.wr == wr);
      check("read a", d.rd_a == rda);
      check("read b", d.rd_b == rdb);
      check("encrypted imm", d.enc_imm == enc);
      if (rda) check("ra field", d.ra == ra);
      if (rdb) check("rb field", d.rb == rb);
      if (wr) begin
        if (opc == OPC_JAL) check("link register", d.rd == 6'd9 && d.link);
        else if (cls == IC_SETF) check("flag target", d.rd == 6'(FLAG_REG));
        else check("rd field", d.rd == {1'b0, rd});
      end
      if (cls inside {IC_ALU, IC_SHI, IC_SETF, IC_PREFIX}) check("imm16", d.imm16 == instr[15:0]);
      if (cls inside {IC_JUMP, IC_BRANCH}) check("offset", d.off26 == instr[25:0]);
      if (cls == IC_BRANCH) check("branch sense", d.branch_if == (opc == OPC_BF) && d.rd_f);
      if (cls == IC_MTSPR) check("spr number", d.spr == {instr[25:21], instr[10:0]});
      if (opc == OPC_ALU) check("alu op", d.op == (instr[3:0] == 4'h2 ? ALU_SUB : ALU_ADD));
      if (opc == OPC_SHI && !user) check("shift kind", d.op == (instr[7:6] == 2'd0 ? ALU_SLL :
                                                     instr[7:6] == 2'd1 ? ALU_SRL :
                                                     instr[7:6] == 2'd2 ? ALU_SRA : ALU_ROR));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
