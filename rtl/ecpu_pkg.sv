// ecpu_pkg: types, constants and the RC2 round functions shared by the
// encrypted processor.
//
// The processor runs the OpenRISC instruction set in two modes. Supervisor
// mode is unencrypted and works on 64-bit real registers. User mode is
// encrypted: every data word in memory and every immediate constant in the
// program is a 64-bit RC2 block that hides a 32-bit value. Inside the
// processor, user arithmetic runs on plaintext held in shadow registers. The
// codec decrypts when data enters (loads, immediates) and encrypts when it
// leaves (stores).
//
// The RC2 block layout is this design's choice: the 64-bit block holds four
// 16-bit words, R[i] = block[16*i +: 16]. The 32-bit plaintext sits in
// block[31:0] and 32 bits of padding in block[63:32]. The cipher is keyed by
// its 64-word expanded key K[0..63]. Key expansion is outside the processor:
// the document only says how keys get in, not how they are expanded.
package ecpu_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned WORD_W   = 64;  // encrypted (hardware) word
  localparam int unsigned PLAIN_W  = 32;  // data word under the encryption
  localparam int unsigned NREG     = 32;  // general purpose registers
  localparam int unsigned FLAG_REG = 32;  // register number used for the compare flag

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [PLAIN_W-1:0] plain_t;
  typedef logic [63:0][15:0]  rc2_key_t;  // expanded RC2 key, K[0] in [0]
  typedef logic [5:0]         regnum_t;   // 0..31 GPRs, 32 = compare flag

  // ------------------------------------------------------- instruction set
  // Major opcodes, bits [31:26], as in OpenRISC 1.1. PREFIX is a new opcode
  // (the document adds a prefix instruction without printing its opcode);
  // the custom-instruction slot 0x1C is used for it.
  localparam logic [5:0] OPC_J      = 6'h00;
  localparam logic [5:0] OPC_JAL    = 6'h01;
  localparam logic [5:0] OPC_BNF    = 6'h03;
  localparam logic [5:0] OPC_BF     = 6'h04;
  localparam logic [5:0] OPC_NOP    = 6'h05;
  localparam logic [5:0] OPC_SYS    = 6'h08;
  localparam logic [5:0] OPC_RFE    = 6'h09;
  localparam logic [5:0] OPC_PREFIX = 6'h1C;
  localparam logic [5:0] OPC_LWZ    = 6'h21;
  localparam logic [5:0] OPC_LWS    = 6'h22;
  localparam logic [5:0] OPC_ADDI   = 6'h27;
  localparam logic [5:0] OPC_ANDI   = 6'h29;
  localparam logic [5:0] OPC_ORI    = 6'h2A;
  localparam logic [5:0] OPC_XORI   = 6'h2B;
  localparam logic [5:0] OPC_MULI   = 6'h2C;
  localparam logic [5:0] OPC_SHI    = 6'h2E;
  localparam logic [5:0] OPC_SFI    = 6'h2F;
  localparam logic [5:0] OPC_MTSPR  = 6'h30;
  localparam logic [5:0] OPC_SW     = 6'h35;
  localparam logic [5:0] OPC_ALU    = 6'h38;
  localparam logic [5:0] OPC_SF     = 6'h39;

  // Exception vectors and special registers (OpenRISC numbering).
  localparam logic [31:0] RESET_VEC   = 32'h0000_0100;
  localparam logic [31:0] TLBMISS_VEC = 32'h0000_0900;
  localparam logic [31:0] SYSCALL_VEC = 32'h0000_0C00;
  localparam logic [15:0] SPR_EPCR    = 16'd32;

  // ALU operations.
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_MUL,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_ROR,
    ALU_SFEQ, ALU_SFNE, ALU_SFGTU, ALU_SFGEU, ALU_SFLTU, ALU_SFLEU,
    ALU_SFGTS, ALU_SFGES, ALU_SFLTS, ALU_SFLES
  } alu_op_e;

  // Instruction classes after decode.
  typedef enum logic [3:0] {
    IC_NOP, IC_PREFIX, IC_ALU, IC_SETF, IC_SHI, IC_LOAD, IC_STORE,
    IC_BRANCH, IC_JUMP, IC_SYS, IC_RFE, IC_MTSPR, IC_ILLEGAL
  } iclass_e;

  // Decoded instruction.
  typedef struct packed {
    iclass_e     cls;
    alu_op_e     op;
    logic        use_imm;   // second operand is the immediate
    logic        enc_imm;   // immediate is encrypted (user mode): type B
    logic        sext_imm;  // clear immediate is sign extended
    logic        rd_a;      // reads ra
    logic        rd_b;      // reads rb
    logic        rd_f;      // reads the compare flag
    logic        wr;        // writes rd (or the flag)
    logic [4:0]  ra;
    logic [4:0]  rb;
    regnum_t     rd;        // FLAG_REG for compare instructions
    logic [15:0] imm16;     // immediate field / encrypted fragment
    logic [25:0] off26;     // jump / branch offset (words)
    logic        link;      // l.jal writes r9
    logic        branch_if; // l.bf (1) or l.bnf (0)
    logic [15:0] spr;       // l.mtspr special register number
  } dec_t;

  // Event counters kept by the core (cycle counts, instruction mix, codec
  // use, stalls), in the spirit of the document's performance tables.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] user_cycles;     // cycles with the fetch side in user mode
    logic [31:0] user_insns;      // committed user-mode instruction words
    logic [31:0] super_insns;     // committed supervisor-mode instruction words
    logic [31:0] prefixes;        // committed prefix words
    logic [31:0] nops;            // committed no-ops
    logic [31:0] stall_dep;       // cycles frozen on a register dependency
    logic [31:0] stall_mem;       // cycles a load waited for an older store
    logic [31:0] stall_codec;     // cycles decode waited for a free codec stage
    logic [31:0] flushes;         // pipeline refills after a redirect
    logic [31:0] encryptions;     // stores encrypted
    logic [31:0] dec_loads;       // loads decrypted
    logic [31:0] dec_imms;        // immediates decrypted
    logic [31:0] imm_hits;        // immediates taken from the decrypted-immediate cache
    logic [31:0] forwards;        // operands taken from an in-flight instruction
    logic [31:0] tlb_assigns;     // new TLB slots given out
    logic [31:0] tlb_faults;      // user accesses that found the TLB full
    logic [31:0] mode_switches;   // user/supervisor changes
    logic [31:0] bp_taken;        // jumps and branches fetched on a taken prediction
    logic [31:0] bp_wrong;        // jumps and branches resolved against their prediction
  } perf_t;

  // ------------------------------------------------------------ RC2 rounds
  // Ops of one RC2 encryption, in order: 5 mixing rounds, a mashing round,
  // 6 mixing rounds, a mashing round, 5 mixing rounds (RFC 2268). Op e is a
  // mashing round for e = 5 and e = 12, else mixing round rc2_mix_idx(e).
  localparam int unsigned RC2_OPS = 18;

  function automatic int unsigned rc2_mix_idx(int unsigned e);
    if (e < 5)       return e;
    else if (e < 12) return e - 1;
    else             return e - 2;
  endfunction

  function automatic logic rc2_is_mash(int unsigned e);
    return (e == 5) || (e == 12);
  endfunction

  function automatic logic [15:0] rol16(logic [15:0] x, int unsigned s);
    return (x << s) | (x >> (16 - s));
  endfunction

  function automatic logic [15:0] ror16(logic [15:0] x, int unsigned s);
    return (x >> s) | (x << (16 - s));
  endfunction

  function automatic int unsigned rc2_rot(int unsigned i);
    case (i)
      0: return 1;
      1: return 2;
      2: return 3;
      default: return 5;
    endcase
  endfunction

  // One mixing round (four "mix up" steps) with key words K[4j..4j+3].
  function automatic logic [63:0] rc2_mix(logic [63:0] b, int unsigned j, rc2_key_t k);
    logic [3:0][15:0] r;
    r = b;
    for (int unsigned i = 0; i < 4; i++) begin
      r[i] = r[i] + k[4*j + i] + (r[(i+3)%4] & r[(i+2)%4]) + (~r[(i+3)%4] & r[(i+1)%4]);
      r[i] = rol16(r[i], rc2_rot(i));
    end
    return r;
  endfunction

  // One mashing round.
  function automatic logic [63:0] rc2_mash(logic [63:0] b, rc2_key_t k);
    logic [3:0][15:0] r;
    r = b;
    for (int unsigned i = 0; i < 4; i++)
      r[i] = r[i] + k[r[(i+3)%4][5:0]];
    return r;
  endfunction

  // Inverse of rc2_mix.
  function automatic logic [63:0] rc2_rmix(logic [63:0] b, int unsigned j, rc2_key_t k);
    logic [3:0][15:0] r;
    r = b;
    for (int i = 3; i >= 0; i--) begin
      r[i] = ror16(r[i], rc2_rot(i));
      r[i] = r[i] - k[4*j + i] - (r[(i+3)%4] & r[(i+2)%4]) - (~r[(i+3)%4] & r[(i+1)%4]);
    end
    return r;
  endfunction

  // Inverse of rc2_mash.
  function automatic logic [63:0] rc2_rmash(logic [63:0] b, rc2_key_t k);
    logic [3:0][15:0] r;
    r = b;
    for (int i = 3; i >= 0; i--)
      r[i] = r[i] - k[r[(i+3)%4][5:0]];
    return r;
  endfunction

  // Encryption op e (0..17).
  function automatic logic [63:0] rc2_enc_op(logic [63:0] b, int unsigned e, rc2_key_t k);
    if (rc2_is_mash(e)) return rc2_mash(b, k);
    else                return rc2_mix(b, rc2_mix_idx(e), k);
  endfunction

  // Decryption op d (0..17): the inverse of encryption op 17-d.
  function automatic logic [63:0] rc2_dec_op(logic [63:0] b, int unsigned d, rc2_key_t k);
    int unsigned e;
    e = RC2_OPS - 1 - d;
    if (rc2_is_mash(e)) return rc2_rmash(b, k);
    else                return rc2_rmix(b, rc2_mix_idx(e), k);
  endfunction

  // First op performed by codec stage s of n stages (ops are spread evenly).
  function automatic int unsigned rc2_stage_first(int unsigned s, int unsigned n);
    return (s * RC2_OPS) / n;
  endfunction

endpackage
