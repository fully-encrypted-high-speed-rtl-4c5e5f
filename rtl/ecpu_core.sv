// ecpu_core: the encrypted processor pipeline.
//
// Every instruction moves through the same STAGES+5 pipeline slots, one
// slot per clock. The codec is laid along the middle slots. It is one
// codec: each of its STAGES stage circuits exists once. The pipeline is used
// in two configurations:
//
//   type A: Fetch(0) Decode(1) Read(2) Execute(3) codec(4..STAGES+3) Write
//   type B: Fetch(0) Decode(1) codec(2..STAGES+1) Read Execute Write
//
// Type B is for user-mode instructions that carry an encrypted constant.
// The constant is decrypted first, and the instruction reads its registers
// and executes at the end of the pipeline. Everything else is type A. A
// user-mode load or store uses the codec after its execute stage: a load
// decrypts the word read from memory, a store encrypts the value it writes.
// Register-to-register arithmetic does not use the codec at all, and its
// result is ready right after the early execute stage. With STAGES = 10 the
// user pipeline has 15 slots.
//
// Registers and modes. Supervisor-mode instructions run the 64-bit
// OpenRISC semantics, unencrypted, on the real registers. User-mode
// instructions run the 32-bit semantics on plaintext in shadow registers.
// Each slot carries its instruction's mode, so both modes can be in the
// pipeline at once. l.sys (user) and l.rfe (supervisor) switch mode. So
// does a TLB fault, which traps to supervisor mode.
//
// Hazards. Results are written to the register file in the Write slot, in
// program order. An instruction in its Read slot takes each operand from the
// nearest older in-flight instruction that writes the same register in the
// same mode (forwarding), if that result has been produced. If it has not,
// the instruction stalls there: it and everything behind it freeze, and a
// bubble moves on ahead. A load also waits in Read while an older store is
// in flight. Decode holds back a type-B instruction if it would meet a
// type-A codec user on the same codec stage (a type-A codec user two slots
// ahead). Only then could two instructions need one codec stage at once.
// Jumps and branches have no delay slot. Fetch looks them up in the branch
// prediction buffer (branch_predictor) and, on a taken prediction, goes on
// at the stored target. They resolve in the type-A Execute slot, which
// trains the buffer. A wrong prediction, l.sys, l.rfe and TLB faults
// redirect from there and flush the three younger slots. The buffer's hit
// output is not needed: a miss already reads as "not taken".
//
// Encrypted constants. Two prefix words and the 16-bit immediate field of
// the following instruction form the 64-bit ciphertext. A decrypted
// constant is kept in the decrypted-immediate cache. The next time the
// instruction is met it skips the codec and runs as type A.
//
// User data addresses are hashed (collision free) and then placed by the
// TLB in a linear region starting at word USER_BASE. Supervisor addresses
// are byte addresses of 64-bit words. The displacement of load/store is
// ignored in both modes.
//
// Taken from the document: the two configurations and their stage order,
// one pipelined codec of ten stages, shadow registers aliased per
// instruction mode, forwarding, prefixes, the decrypted-immediate cache,
// the address hash, the TLB and the shadow reset on a key change. This
// design's own choices: the hazard, codec-conflict and memory-order rules
// above, the exception vectors, the l.nop 1 halt convention (from the
// OpenRISC simulator), and running supervisor mode through the full-length
// pipeline too (the document runs it in 5 stages).
//
// Lint note: rst_n is reported as used both asynchronously and
// synchronously. The only synchronous use is the disable condition of the
// codec-sharing assertion; the registers all reset asynchronously.
//
// Interface: instruction fetch (imem_*), data memory read (dm_r*) and write
// (dm_w*) ports, key load (key_we/key_in; the key is held in the core and
// cannot be read), halted, user_mode and event counters (perf).
module ecpu_core
  import ecpu_pkg::*;
#(
  parameter int unsigned STAGES      = 10,
  parameter int unsigned DMEM_AW     = 12,
  parameter int unsigned TLB_ENTRIES = 64,
  parameter int unsigned IMC_ENTRIES = 64,
  parameter int unsigned BP_ENTRIES  = 64,
  parameter int unsigned USER_BASE   = 2048,
  parameter logic [31:0] PAD_SEED    = 32'h1234_5678
) (
  input  logic               clk,
  input  logic               rst_n,
  // key load
  input  logic               key_we,
  input  rc2_key_t           key_in,
  // instruction fetch
  output logic [31:0]        imem_addr,
  input  logic [31:0]        imem_data,
  // data memory
  output logic [DMEM_AW-1:0] dm_raddr,
  input  logic [63:0]        dm_rdata,
  output logic [DMEM_AW-1:0] dm_waddr,
  output logic               dm_we,
  output logic [63:0]        dm_wdata,
  // status
  output logic               halted,
  output logic               user_mode,
  output perf_t              perf
);
  localparam int NS   = STAGES + 5;   // slots
  localparam int S_RA = 2;            // type A read
  localparam int S_EA = 3;            // type A execute
  localparam int S_RB = STAGES + 2;   // type B read
  localparam int S_EB = STAGES + 3;   // type B execute
  localparam int S_W  = STAGES + 4;   // write
  localparam int TIW  = $clog2(TLB_ENTRIES);

  typedef struct packed {
    logic               valid;
    logic               user;
    logic [31:0]        pc;
    logic [31:0]        instr;
    dec_t               d;
    logic               typeB;   // decrypt first, read late
    logic               cod;     // uses the codec
    logic               cdec;    // codec direction: 1 = decrypt
    logic [63:0]        cdata;   // codec block
    logic [63:0]        imm;     // plain immediate
    logic [63:0]        va;
    logic [63:0]        vb;
    logic [63:0]        res;
    logic               res_ok;
    logic [DMEM_AW-1:0] maddr;
    logic               pred;    // fetched on a taken prediction
  } slot_t;

  slot_t [NS-1:0] cur, nxt;

  // ------------------------------------------------------------ state
  logic [31:0]  pc, pc_n;
  logic         fmode, fmode_n;        // mode of the fetch side (1 = user)
  logic [31:0]  epcr, epcr_n;
  logic [47:0]  pfx, pfx_n;            // prefix accumulator
  rc2_key_t     key;
  logic         halted_n;

  // decrypted-immediate cache and codec signals
  logic                    imc_hit;
  logic [31:0]             imc_data;
  logic                    imc_fill;
  logic [STAGES-1:0]       cod_selB;
  logic [STAGES-1:0][63:0] cod_in, cod_out;
  logic [STAGES-1:0]       cod_dec;

  // ------------------------------------------------------------ decode
  dec_t dec1;
  instr_decoder u_dec (.instr(cur[1].instr), .user(cur[1].user), .d(dec1));

  // ------------------------------------------------------------ register file
  regnum_t [3:0] rf_num;
  logic    [3:0] rf_user;
  word_t   [3:0] rf_val;
  logic          rf_we;
  regnum_t       rf_wnum;
  word_t         rf_wval;

  function automatic regnum_t src_a(slot_t s);
    return s.d.rd_f ? regnum_t'(FLAG_REG) : {1'b0, s.d.ra};
  endfunction

  always_comb begin
    rf_num[0]  = src_a(cur[S_RA]);
    rf_num[1]  = {1'b0, cur[S_RA].d.rb};
    rf_num[2]  = src_a(cur[S_RB]);
    rf_num[3]  = {1'b0, cur[S_RB].d.rb};
    rf_user[0] = cur[S_RA].user;
    rf_user[1] = cur[S_RA].user;
    rf_user[2] = cur[S_RB].user;
    rf_user[3] = cur[S_RB].user;
  end

  shadow_regfile #(.NRD(4)) u_rf (
    .clk, .rst_n, .clear_shadow(key_we),
    .rd_user(rf_user), .rd_num(rf_num), .rd_val(rf_val),
    .we(rf_we), .we_user(cur[S_W].user), .we_num(rf_wnum), .we_val(rf_wval)
  );

  // ------------------------------------------------------------ execute units
  // Two ALUs: one at the type-A execute slot, one at the type-B execute slot.
  function automatic alu_op_e ex_op(slot_t s);
    if (s.d.cls == IC_SHI)
      case (s.imm[7:6])
        2'd0: return ALU_SLL;
        2'd1: return ALU_SRL;
        2'd2: return ALU_SRA;
        default: return ALU_ROR;
      endcase
    return s.d.op;
  endfunction

  function automatic logic [63:0] ex_b(slot_t s);
    if (s.d.cls == IC_SHI) return {58'h0, s.imm[5:0]};
    if (s.d.use_imm)       return s.imm;
    return s.vb;
  endfunction

  function automatic logic produces_at_ex(slot_t s);
    return s.valid && (s.d.cls == IC_ALU || s.d.cls == IC_SETF || s.d.cls == IC_SHI ||
                       (s.d.cls == IC_JUMP && s.d.link));
  endfunction

  logic [63:0] ya, yb;
  logic        fa, fb;
  alu u_alu_a (.op(ex_op(cur[S_EA])), .wide(!cur[S_EA].user), .a(cur[S_EA].va),
               .b(ex_b(cur[S_EA])), .y(ya), .flag(fa));
  alu u_alu_b (.op(ex_op(cur[S_EB])), .wide(!cur[S_EB].user), .a(cur[S_EB].va),
               .b(ex_b(cur[S_EB])), .y(yb), .flag(fb));

  logic [63:0] resA, resB;
  always_comb begin
    resA = (cur[S_EA].d.cls == IC_SETF) ? {63'h0, fa} :
           (cur[S_EA].d.cls == IC_JUMP) ? {32'h0, cur[S_EA].pc + 32'd4} : ya;
    resB = (cur[S_EB].d.cls == IC_SETF) ? {63'h0, fb} : yb;
  end

  // Result availability per slot, for forwarding.
  logic [NS-1:0]       avail;
  logic [NS-1:0][63:0] aval;
  always_comb
    for (int s = 0; s < NS; s++) begin
      avail[s] = cur[s].res_ok;
      aval[s]  = cur[s].res;
      if (s == S_EA && !cur[s].typeB && produces_at_ex(cur[s])) begin
        avail[s] = 1'b1;
        aval[s]  = resA;
      end
      if (s == S_EB && cur[s].typeB && produces_at_ex(cur[s])) begin
        avail[s] = 1'b1;
        aval[s]  = resB;
      end
    end

  // Operand lookup for a reader in slot c.
  logic [1:0]       ra_ok, rb_ok, ra_fw, rb_fw;     // [0] = slot S_RA, [1] = slot S_RB
  logic [1:0][63:0] ra_v, rb_v;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      int c;
      logic fa_found, fb_found;
      regnum_t na, nb;
      slot_t r;
      c = (k == 0) ? S_RA : S_RB;
      r = cur[c];
      na = src_a(r);
      nb = {1'b0, r.d.rb};
      ra_ok[k] = 1'b1; rb_ok[k] = 1'b1; ra_fw[k] = 1'b0; rb_fw[k] = 1'b0;
      ra_v[k]  = rf_val[2*k];
      rb_v[k]  = rf_val[2*k+1];
      fa_found = !(r.d.rd_a || r.d.rd_f) || na == 6'd0;
      fb_found = !r.d.rd_b || nb == 6'd0;
      if (na == 6'd0) ra_v[k] = '0;
      if (nb == 6'd0) rb_v[k] = '0;
      for (int s = c + 1; s < NS; s++) begin
        if (!fa_found && cur[s].valid && cur[s].d.wr && cur[s].d.rd == na && cur[s].user == r.user) begin
          fa_found = 1'b1;
          if (avail[s]) begin ra_v[k] = aval[s]; ra_fw[k] = 1'b1; end
          else            ra_ok[k] = 1'b0;
        end
        if (!fb_found && cur[s].valid && cur[s].d.wr && cur[s].d.rd == nb && cur[s].user == r.user) begin
          fb_found = 1'b1;
          if (avail[s]) begin rb_v[k] = aval[s]; rb_fw[k] = 1'b1; end
          else            rb_ok[k] = 1'b0;
        end
      end
      // user values are 32-bit plaintexts
      if (r.user) begin
        ra_v[k] = {32'h0, ra_v[k][31:0]};
        rb_v[k] = {32'h0, rb_v[k][31:0]};
      end
    end
  end

  // ------------------------------------------------------------ stall control
  logic older_store;
  logic stall_ra_dep, stall_ra_mem, stall_rb, stall_d;
  int   f;   // highest frozen slot, -1 for none

  always_comb begin
    older_store = 1'b0;
    for (int s = S_RA + 1; s < NS; s++)
      if (cur[s].valid && cur[s].d.cls == IC_STORE) older_store = 1'b1;
    stall_rb     = cur[S_RB].valid && cur[S_RB].typeB && !(ra_ok[1] && rb_ok[1]);
    stall_ra_dep = cur[S_RA].valid && !cur[S_RA].typeB && !(ra_ok[0] && rb_ok[0]);
    stall_ra_mem = cur[S_RA].valid && !cur[S_RA].typeB && cur[S_RA].d.cls == IC_LOAD && older_store;
    stall_d      = cur[1].valid && cur[1].user && dec1.enc_imm && !imc_hit &&
                   cur[S_EA].valid && !cur[S_EA].typeB && cur[S_EA].cod;
    if (halted)                           f = NS - 1;
    else if (stall_rb)                    f = S_RB;
    else if (stall_ra_dep || stall_ra_mem) f = S_RA;
    else if (stall_d)                     f = 1;
    else                                  f = -1;
  end

  // ------------------------------------------------------------ execute slot A
  logic        ea_v;      // a type-A instruction executes this cycle
  slot_t       ea;
  logic [31:0] uaddr_hash;
  logic        tlb_hit, tlb_fault, tlb_new;
  logic [TIW-1:0] tlb_slot;
  logic        ea_user_mem;
  logic        redirect;
  logic [31:0] redirect_pc;
  logic        redirect_mode;
  logic [31:0] pad;
  logic        bp_taken, bp_up, bp_up_taken, bp_wrong;
  logic [31:0] bp_target, br_target;

  assign ea   = cur[S_EA];
  assign ea_v = ea.valid && !ea.typeB && (f < S_EA);
  assign ea_user_mem = ea.valid && !ea.typeB && ea.user &&
                       (ea.d.cls == IC_LOAD || ea.d.cls == IC_STORE);

  addr_hash u_hash (.key({key[3], key[2], key[1], key[0]}), .addr(ea.va[31:0]), .hash(uaddr_hash));

  user_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n, .clear(key_we), .lookup_valid(ea_user_mem), .tag(uaddr_hash),
    .commit(ea_v), .hit(tlb_hit), .fault(tlb_fault), .assign_new(tlb_new), .slot(tlb_slot)
  );

  pad_gen #(.SEED(PAD_SEED)) u_pad (
    .clk, .rst_n, .step(ea_v && ea.user && ea.d.cls == IC_STORE), .pad
  );

  // Branch prediction buffer: looked up at fetch, trained at execute.
  branch_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n, .clear(key_we),
    .lk_user(fmode), .lk_pc(pc), .lk_hit(), .lk_taken(bp_taken), .lk_target(bp_target),
    .up_valid(bp_up), .up_user(ea.user), .up_pc(ea.pc), .up_taken(bp_up_taken), .up_target(br_target)
  );

  assign br_target = ea.pc + {{4{ea.d.off26[25]}}, ea.d.off26, 2'b00};

  always_comb begin
    redirect      = 1'b0;
    redirect_pc   = ea.pc + 32'd4;
    redirect_mode = ea.user;
    epcr_n        = epcr;
    bp_up         = 1'b0;
    bp_up_taken   = 1'b0;
    bp_wrong      = 1'b0;
    if (ea_v) begin
      unique case (ea.d.cls)
        IC_JUMP: begin
          bp_up       = 1'b1;
          bp_up_taken = 1'b1;
          bp_wrong    = !ea.pred;
          redirect    = !ea.pred;
          redirect_pc = br_target;
        end
        IC_BRANCH: begin
          bp_up       = 1'b1;
          bp_up_taken = (ea.va[0] == ea.d.branch_if);
          bp_wrong    = (bp_up_taken != ea.pred);
          redirect    = bp_wrong;
          redirect_pc = bp_up_taken ? br_target : ea.pc + 32'd4;
        end
        IC_SYS: begin
          redirect      = 1'b1;
          redirect_pc   = SYSCALL_VEC;
          redirect_mode = 1'b0;
          epcr_n        = ea.pc + 32'd4;
        end
        IC_RFE: begin
          redirect      = 1'b1;
          redirect_pc   = epcr;
          redirect_mode = 1'b1;
        end
        IC_MTSPR: if (ea.d.spr == SPR_EPCR) epcr_n = ea.vb[31:0];
        IC_LOAD, IC_STORE: if (ea.user && tlb_fault) begin
          redirect      = 1'b1;
          redirect_pc   = TLBMISS_VEC;
          redirect_mode = 1'b0;
          epcr_n        = ea.pc;
        end
        default: ;
      endcase
      // a prediction on anything else (a stale entry) is undone
      if (ea.pred && !(ea.d.cls inside {IC_JUMP, IC_BRANCH}) && !redirect) begin
        bp_wrong    = 1'b1;
        redirect    = 1'b1;
        redirect_pc = ea.pc + 32'd4;
      end
    end
  end

  assign dm_raddr = ea.user ? DMEM_AW'(USER_BASE + 32'(tlb_slot)) : ea.va[3 +: DMEM_AW];

  // ------------------------------------------------------------ decrypted-immediate cache
  imm_cache #(.ENTRIES(IMC_ENTRIES)) u_imc (
    .clk, .rst_n, .clear(key_we),
    .lookup_pc(cur[1].pc), .hit(imc_hit), .data(imc_data),
    .fill(imc_fill), .fill_pc(cur[S_RB-1].pc), .fill_data(cod_out[STAGES-1][31:0])
  );

  // ------------------------------------------------------------ the codec
  // Stage k serves the type-B instruction in slot 2+k or the type-A
  // instruction in slot 4+k; decode guarantees never both.

  for (genvar k = 0; k < STAGES; k++) begin : g_codec
    always_comb begin
      cod_selB[k] = cur[2+k].valid && cur[2+k].typeB && cur[2+k].cod;
      cod_in[k]   = cod_selB[k] ? cur[2+k].cdata : cur[4+k].cdata;
      cod_dec[k]  = cod_selB[k] ? 1'b1 : cur[4+k].cdec;
    end
    rc2_stage #(.STAGES(STAGES), .STAGE(k)) u_stage (
      .dec(cod_dec[k]), .din(cod_in[k]), .key(key), .dout(cod_out[k])
    );
    // one codec stage, one user
    assert property (@(posedge clk) disable iff (!rst_n)
      !(cod_selB[k] && cur[4+k].valid && !cur[4+k].typeB && cur[4+k].cod));
  end

  assign imc_fill = cur[S_RB-1].valid && cur[S_RB-1].typeB && cur[S_RB-1].cod &&
                    cur[S_RB-1].user && (f < S_RB - 1);

  // ------------------------------------------------------------ slot movement
  always_comb begin
    slot_t s;
    s        = '0;
    nxt      = cur;
    pc_n     = pc;
    fmode_n  = fmode;
    pfx_n    = pfx;
    halted_n = halted;
    for (int t = NS - 1; t >= 0; t--) begin
      if (t <= f) begin
        nxt[t] = cur[t];
      end else if (t == f + 1) begin
        nxt[t] = '0;
      end else begin
        // t >= 1 here, and slot t-1 advances into slot t
        s = cur[t-1];
        // decode
        if (t - 1 == 1) begin
          s.d = s.valid ? dec1 : '0;
          s.typeB = 1'b0;
          s.cod   = 1'b0;
          s.cdec  = 1'b1;
          s.cdata = {pfx, dec1.imm16};
          s.res_ok = 1'b0;
          if (dec1.cls == IC_SHI) s.imm = {48'h0, dec1.imm16};
          else if (dec1.sext_imm) s.imm = {{48{dec1.imm16[15]}}, dec1.imm16};
          else s.imm = {48'h0, dec1.imm16};
          if (s.valid && dec1.enc_imm) begin
            if (imc_hit) s.imm = {32'h0, imc_data};
            else begin
              s.typeB = 1'b1;
              s.cod   = 1'b1;
            end
          end
          if (s.valid && s.user && (dec1.cls == IC_LOAD || dec1.cls == IC_STORE))
            s.cod = 1'b1;
          if (dec1.cls == IC_ILLEGAL) s.d.cls = IC_NOP;
          if (s.valid && dec1.cls == IC_PREFIX)   pfx_n = {pfx[23:0], cur[1].instr[23:0]};
          else if (s.valid && dec1.enc_imm)       pfx_n = '0;
        end
        // type-A read
        if (t - 1 == S_RA && !s.typeB) begin
          s.va = ra_v[0];
          s.vb = rb_v[0];
        end
        // type-B read
        if (t - 1 == S_RB && s.typeB) begin
          s.va = ra_v[1];
          s.vb = rb_v[1];
        end
        // type-A execute
        if (t - 1 == S_EA && !s.typeB && s.valid) begin
          if (produces_at_ex(s)) begin
            s.res    = resA;
            s.res_ok = 1'b1;
          end
          if (s.d.cls == IC_LOAD || s.d.cls == IC_STORE) begin
            s.maddr = dm_raddr;
            if (s.user && tlb_fault) s.valid = 1'b0;   // killed by the trap
          end
          if (s.d.cls == IC_LOAD) begin
            if (s.user) s.cdata = dm_rdata;
            else begin
              s.res    = dm_rdata;
              s.res_ok = 1'b1;
            end
          end
          if (s.d.cls == IC_STORE && s.user) begin
            s.cdata = {pad, s.vb[31:0]};
            s.cdec  = 1'b0;
          end
        end
        // type-B execute
        if (t - 1 == S_EB && s.typeB && s.valid && produces_at_ex(s)) begin
          s.res    = resB;
          s.res_ok = 1'b1;
        end
        // codec stages
        if (s.typeB && s.cod && t - 1 >= 2 && t - 1 < 2 + STAGES)
          s.cdata = cod_out[t-3];
        if (!s.typeB && s.cod && t - 1 >= 4 && t - 1 < 4 + STAGES)
          s.cdata = cod_out[t-5];
        // end of decryption of an immediate
        if (t - 1 == S_RB - 1 && s.typeB && s.cod)
          s.imm = {32'h0, cod_out[STAGES-1][31:0]};
        // end of decryption of a loaded word
        if (t - 1 == S_W - 1 && !s.typeB && s.cod && s.d.cls == IC_LOAD) begin
          s.res    = {32'h0, cod_out[STAGES-1][31:0]};
          s.res_ok = 1'b1;
        end
        nxt[t] = s;
      end
    end
    // fetch
    if (f < 0) begin
      nxt[0]       = '0;
      nxt[0].valid = 1'b1;
      nxt[0].user  = fmode;
      nxt[0].pc    = pc;
      nxt[0].instr = imem_data;
      nxt[0].pred  = bp_taken;
      pc_n         = bp_taken ? bp_target : pc + 32'd4;
    end
    // redirect: flush the younger slots
    if (redirect) begin
      for (int t = 0; t <= S_EA; t++) nxt[t] = '0;
      pc_n    = redirect_pc;
      fmode_n = redirect_mode;
      pfx_n   = '0;
    end
    // write slot: halt on l.nop 1
    if (!halted && cur[S_W].valid && cur[S_W].d.cls == IC_NOP && cur[S_W].d.imm16 == 16'h0001)
      halted_n = 1'b1;
  end

  assign imem_addr = pc;

  // ------------------------------------------------------------ write slot
  always_comb begin
    slot_t w;
    w        = cur[S_W];
    rf_we    = !halted && w.valid && w.d.wr;
    rf_wnum  = w.d.rd;
    rf_wval  = w.res;
    dm_we    = !halted && w.valid && w.d.cls == IC_STORE;
    dm_waddr = w.maddr;
    dm_wdata = w.user ? w.cdata : w.vb;
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      pc     <= RESET_VEC;
      fmode  <= 1'b0;
      epcr   <= '0;
      pfx    <= '0;
      halted <= 1'b0;
    end else begin
      cur    <= nxt;
      pc     <= pc_n;
      fmode  <= fmode_n;
      epcr   <= epcr_n;
      pfx    <= pfx_n;
      halted <= halted_n;
    end
  end

  // The key is loaded from outside and never read back.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      key <= '0;
    else if (key_we) key <= key_in;
  end

  assign user_mode = fmode;

  // ------------------------------------------------------------ event counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) perf <= '0;
    else if (!halted) begin
      perf.cycles <= perf.cycles + 1;
      if (fmode) perf.user_cycles <= perf.user_cycles + 1;
      if (cur[S_W].valid) begin
        if (cur[S_W].user) perf.user_insns  <= perf.user_insns + 1;
        else               perf.super_insns <= perf.super_insns + 1;
        if (cur[S_W].d.cls == IC_PREFIX) perf.prefixes <= perf.prefixes + 1;
        if (cur[S_W].d.cls == IC_NOP)    perf.nops     <= perf.nops + 1;
        if (cur[S_W].d.cls == IC_STORE && cur[S_W].user) perf.encryptions <= perf.encryptions + 1;
        if (cur[S_W].d.cls == IC_LOAD  && cur[S_W].user) perf.dec_loads   <= perf.dec_loads + 1;
      end
      if (f == S_RB || (f == S_RA && stall_ra_dep)) perf.stall_dep <= perf.stall_dep + 1;
      if (f == S_RA && !stall_ra_dep && stall_ra_mem) perf.stall_mem <= perf.stall_mem + 1;
      if (f == 1) perf.stall_codec <= perf.stall_codec + 1;
      if (redirect) perf.flushes <= perf.flushes + 1;
      if (ea_v && bp_up && ea.pred) perf.bp_taken <= perf.bp_taken + 1;
      if (ea_v && bp_wrong)         perf.bp_wrong <= perf.bp_wrong + 1;
      if (redirect && redirect_mode != ea.user) perf.mode_switches <= perf.mode_switches + 1;
      if (imc_fill) perf.dec_imms <= perf.dec_imms + 1;
      if (f < 1 && cur[1].valid && cur[1].user && dec1.enc_imm && imc_hit && !redirect)
        perf.imm_hits <= perf.imm_hits + 1;
      perf.forwards <= perf.forwards
        + ((f < S_RA && cur[S_RA].valid && !cur[S_RA].typeB) ? 32'(ra_fw[0]) + 32'(rb_fw[0]) : 32'd0)
        + ((f < S_RB && cur[S_RB].valid &&  cur[S_RB].typeB) ? 32'(ra_fw[1]) + 32'(rb_fw[1]) : 32'd0);
      if (ea_v && tlb_new)   perf.tlb_assigns <= perf.tlb_assigns + 1;
      if (ea_v && ea_user_mem && tlb_fault) perf.tlb_faults <= perf.tlb_faults + 1;
    end
  end
endmodule
