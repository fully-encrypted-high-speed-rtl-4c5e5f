// tb_ecpu_top: end-to-end test of the encrypted processor at its default
// parameters.
//
// The testbench assembles a program in memory. Constants in the user part
// are encrypted with the reference RC2 model and split into two prefix words
// plus the 16-bit immediate field. The program is:
//   0x100 supervisor: a little unencrypted arithmetic, a store, then l.rfe
//         into user mode at 0x400.
//   0x400 user: encrypted constants, register arithmetic, a store followed
//         by a load, a counted loop (runs the same encrypted constants again,
//         so they come from the decrypted-immediate cache), encrypted shift
//         kinds, more stores, then l.sys.
//   0xC00 supervisor: stores its own r3 (which must be the supervisor value,
//         not the user's), then l.rfe back into user mode.
//   user: a loop storing to new addresses until the TLB is full and faults.
//   0x900 supervisor: a final store and l.nop 1 (halt).
// After the halt the host reads memory. It checks the supervisor words in
// the clear, and decrypts the user words with the reference model. User
// words are found in TLB order (first come, first served) from USER_BASE.
// The event counters must show that every mechanism happened: type-B
// decryption, cached immediates, forwarding, dependency, memory-order and
// codec-conflict stalls, flushes, encryptions, load decryptions, TLB
// assignment and fault, and mode switches. Last, one operation goes through
// the stand-alone encrypted ALU beside the processor: its decrypted result,
// its padding and its latency of 2*STAGES cycles are checked.
module tb_ecpu_top;
  import ecpu_pkg::*;
  import rc2_ref_pkg::*;

  localparam int unsigned USER_BASE   = 2048;
  localparam int unsigned TLB_ENTRIES = 64;

  logic        clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic        key_we, prog_we, host_we, halted, user_mode;
  rc2_key_t    key_in;
  logic [31:0] prog_addr, prog_data;
  logic [11:0] host_addr;
  logic [63:0] host_wdata, host_rdata;
  perf_t       perf;
  logic        xalu_valid, xalu_out_valid, xalu_flag;
  alu_op_e     xalu_op;
  rc2_key_t    xalu_key;
  logic [63:0] xalu_x, xalu_y, xalu_z;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ecpu_top dut (.*);

  int checks = 0, failures = 0;
  rc2_key_t k;

  // ------------------------------------------------------------ assembler
  logic [31:0] prog [int unsigned];
  int unsigned at;

  function automatic void emit(logic [31:0] w);
    prog[at] = w;
    at += 4;
  endfunction

  function automatic logic [31:0] i_alu(int rd, int ra, int rb, logic [3:0] op, logic [1:0] sh = 2'd0);
    return {OPC_ALU, 5'(rd), 5'(ra), 5'(rb), 3'b000, sh, 2'b00, op};
  endfunction
  function automatic logic [31:0] i_imm(logic [5:0] opc, int rd, int ra, logic [15:0] imm);
    return {opc, 5'(rd), 5'(ra), imm};
  endfunction
  function automatic logic [31:0] i_lw(int rd, int ra);
    return {OPC_LWS, 5'(rd), 5'(ra), 16'h0};
  endfunction
  function automatic logic [31:0] i_sw(int ra, int rb);
    return {OPC_SW, 5'(rb), 5'(ra), 16'h0};
  endfunction
  function automatic logic [31:0] i_bf(int off);
    return {OPC_BF, 26'(off)};
  endfunction
  function automatic logic [31:0] i_nop(logic [15:0] kk);
    return {OPC_NOP, 2'b01, 8'h0, kk};
  endfunction
  function automatic logic [31:0] i_mtspr(int rb, logic [15:0] spr);
    return {OPC_MTSPR, spr[15:11], 5'd0, 5'(rb), spr[10:0]};
  endfunction
  function automatic logic [31:0] i_prefix(logic [23:0] frag);
    return {OPC_PREFIX, 2'b00, frag};
  endfunction

  // User-mode instruction with an encrypted 32-bit constant: two prefixes
  // and the instruction carrying the low 16 bits of the ciphertext.
  function automatic void emit_enc(logic [5:0] opc, int rd, int ra, logic [31:0] plain);
    logic [63:0] c;
    c = ref_encrypt({$urandom, plain}, k);
    emit(i_prefix(c[63:40]));
    emit(i_prefix(c[39:16]));
    emit(i_imm(opc, rd, ra, c[15:0]));
  endfunction

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic check_true(string what, logic c);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Copy of data memory, read out through the host port after the halt.
  logic [63:0] mem_copy [4096];

  function automatic logic [63:0] rd_mem(int unsigned a);
    return mem_copy[a];
  endfunction

  // Plaintext of the user word in TLB slot i, zero-extended.
  function automatic logic [63:0] dec_slot(int i);
    logic [63:0] t;
    t = ref_decrypt(rd_mem(USER_BASE + i), k);
    return {32'h0, t[31:0]};
  endfunction

  int unsigned loop1, loop2, after_sys;
  logic [63:0] c77;
  logic [31:0] r9v, r12v, r14v;

  initial begin
    k = ref_key(11);
    key_we = 0; key_in = '0; prog_we = 0; prog_addr = 0; prog_data = 0;
    xalu_valid = 0; xalu_op = ALU_ADD; xalu_x = '0; xalu_y = '0; xalu_key = '0;
    host_we = 0; host_addr = 0; host_wdata = 0;

    // -------------------------------- supervisor start-up at 0x100
    at = 32'h100;
    emit(i_imm(OPC_ORI,  2, 0, 16'd5));
    emit(i_imm(OPC_ADDI, 3, 2, 16'd7));           // 12, forwarded
    emit(i_imm(OPC_ORI,  4, 0, 16'h100));
    emit(i_sw(4, 3));                             // word 32 = 12
    emit(i_imm(OPC_ORI,  1, 0, 16'h400));
    emit(i_mtspr(1, SPR_EPCR));
    emit({OPC_RFE, 26'h0});                       // into user mode at 0x400

    // -------------------------------- user program at 0x400
    at = 32'h400;
    emit_enc(OPC_ADDI, 1, 0, 32'd1000);
    emit_enc(OPC_ADDI, 2, 0, 32'd7);
    emit(i_alu(3, 1, 2, 4'h0));                   // r3 = 1007
    emit(i_alu(4, 3, 2, 4'h6));                   // r4 = 7049
    emit_enc(OPC_ADDI, 5, 0, 32'h2000);
    emit(i_sw(5, 4));                             // user slot 0 = 7049
    emit(i_lw(6, 5));                             // r6 = 7049
    emit(i_imm(OPC_ALU, 7, 0, 16'h0));            // l.add r7,r0,r0 (rb=0)
    emit_enc(OPC_ADDI, 8, 0, 32'd5);
    loop1 = at;
    emit_enc(OPC_ADDI, 7, 7, 32'd3);
    emit_enc(OPC_ADDI, 8, 8, 32'hFFFF_FFFF);
    begin
      logic [63:0] c;
      c = ref_encrypt({$urandom, 32'd0}, k);
      emit(i_prefix(c[63:40]));
      emit(i_prefix(c[39:16]));
      emit({OPC_SFI, 5'h0A, 5'd8, c[15:0]});      // l.sfgtsi r8, 0
    end
    emit(i_bf((int'(loop1) - int'(at)) / 4));     // r7 = 15, r8 = 0
    emit(i_alu(9, 6, 7, 4'h2));                   // r9 = 7034
    emit_enc(OPC_ADDI, 10, 5, 32'd8);
    emit(i_sw(10, 9));                            // slot 1 = 7034
    emit_enc(OPC_SHI, 11, 9, {24'h0, 2'd0, 6'd3});  // r11 = r9 << 3
    emit_enc(OPC_SHI, 12, 11, {24'h0, 2'd2, 6'd2}); // r12 = r11 >>> 2
    emit_enc(OPC_ADDI, 13, 5, 32'd16);
    emit(i_sw(13, 12));                           // slot 2 = r12
    emit(i_alu(14, 12, 9, 4'h5));                 // r14 = r12 ^ r9
    emit_enc(OPC_ADDI, 15, 5, 32'd24);
    emit(i_sw(15, 14));                           // slot 3 = r14
    // codec conflict: prefixes, a store, a no-op, then the instruction
    // that the prefixes belong to, two slots behind the store
    c77 = ref_encrypt({$urandom, 32'd77}, k);
    emit(i_prefix(c77[63:40]));
    emit(i_prefix(c77[39:16]));
    emit(i_sw(15, 14));                           // same address again
    emit(i_nop(16'h0));
    emit(i_imm(OPC_ADDI, 16, 0, c77[15:0]));      // r16 = 77
    emit_enc(OPC_ADDI, 17, 5, 32'd32);
    emit(i_sw(17, 16));                           // slot 4 = 77
    emit({OPC_SYS, 26'h0});
    after_sys = at;
    // part 2: fill the TLB until it faults
    emit_enc(OPC_ADDI, 1, 0, 32'h3000);
    emit_enc(OPC_ADDI, 2, 0, 32'd70);
    loop2 = at;
    emit(i_sw(1, 2));
    emit_enc(OPC_ADDI, 1, 1, 32'd8);
    emit_enc(OPC_ADDI, 2, 2, 32'hFFFF_FFFF);
    begin
      logic [63:0] c;
      c = ref_encrypt({$urandom, 32'd0}, k);
      emit(i_prefix(c[63:40]));
      emit(i_prefix(c[39:16]));
      emit({OPC_SFI, 5'h0A, 5'd2, c[15:0]});
    end
    emit(i_bf((int'(loop2) - int'(at)) / 4));
    emit(i_nop(16'h1));                           // not reached

    // -------------------------------- system call handler at 0xC00
    at = 32'hC00;
    emit(i_imm(OPC_ORI, 20, 0, 16'h108));
    emit(i_sw(20, 3));                            // word 33 = supervisor r3 = 12
    emit({OPC_RFE, 26'h0});

    // -------------------------------- TLB fault handler at 0x900
    at = 32'h900;
    emit(i_imm(OPC_ORI, 21, 0, 16'h110));
    emit(i_sw(21, 21));                           // word 34 = 0x110
    emit(i_nop(16'h1));

    // -------------------------------- load and run
    for (int unsigned a = 0; a < 4 * 4096; a += 4) begin
      @(negedge clk);
      prog_we = 1; prog_addr = a; prog_data = prog.exists(a) ? prog[a] : i_nop(16'h0);
    end
    @(negedge clk);
    prog_we = 0;
    for (int unsigned a = 0; a < 4096; a++) begin
      host_we = 1; host_addr = 12'(a); host_wdata = '0;
      @(negedge clk);
    end
    host_we = 0;
    rst_n = 1;
    @(negedge clk);
    key_in = k; key_we = 1;
    @(negedge clk);
    key_we = 0;

    wait (halted);
    repeat (2) @(negedge clk);
    for (int a = 0; a < 4096; a++) begin
      host_addr = 12'(a);
      #1 mem_copy[a] = host_rdata;
    end

    // -------------------------------- results
    r9v  = 32'd7049 - 32'd15;
    r12v = 32'($signed(r9v << 3) >>> 2);
    r14v = r12v ^ r9v;
    check("supervisor store", rd_mem(32), 64'd12);
    check("supervisor r3 not aliased with user r3", rd_mem(33), 64'd12);
    check("fault handler store", rd_mem(34), 64'h110);
    check("user slot 0", dec_slot(0), 64'd7049);
    check("user slot 1", dec_slot(1), {32'h0, r9v});
    check("user slot 2", dec_slot(2), {32'h0, r12v});
    check("user slot 3", dec_slot(3), {32'h0, r14v});
    check("user slot 4", dec_slot(4), 64'd77);
    for (int i = 5; i < int'(TLB_ENTRIES); i++)
      check($sformatf("user slot %0d", i),
            dec_slot(i), 64'(70 - (i - 5)));
    check_true("user data is not stored in the clear", rd_mem(USER_BASE)[63:32] != 0);
    check_true("nothing written past the TLB region", rd_mem(USER_BASE + TLB_ENTRIES) == 0);
    check_true("halted in supervisor mode", !user_mode);

    // -------------------------------- mechanisms
    $display("cycles=%0d user_insns=%0d super_insns=%0d prefixes=%0d nops=%0d",
             perf.cycles, perf.user_insns, perf.super_insns, perf.prefixes, perf.nops);
    $display("stall_dep=%0d stall_mem=%0d stall_codec=%0d flushes=%0d forwards=%0d",
             perf.stall_dep, perf.stall_mem, perf.stall_codec, perf.flushes, perf.forwards);
    $display("encryptions=%0d dec_loads=%0d dec_imms=%0d imm_hits=%0d tlb_assigns=%0d tlb_faults=%0d mode_switches=%0d",
             perf.encryptions, perf.dec_loads, perf.dec_imms, perf.imm_hits,
             perf.tlb_assigns, perf.tlb_faults, perf.mode_switches);
    $display("bp_taken=%0d bp_wrong=%0d", perf.bp_taken, perf.bp_wrong);
    check_true("immediate decryptions happened", perf.dec_imms > 0);

    // -------------------------------- stand-alone encrypted ALU
    begin
      int t0, lat;
      logic [63:0] zp;
      xalu_key = ref_key(12);
      @(negedge clk);
      xalu_valid = 1; xalu_op = ALU_SUB;
      xalu_x = ref_encrypt({32'h0BAD_F00D, 32'd1000}, xalu_key);
      xalu_y = ref_encrypt({32'h1234_4321, 32'd58}, xalu_key);
      t0 = cyc;
      @(negedge clk);
      xalu_valid = 0;
      lat = -1;
      for (int i = 0; i < 100 && lat < 0; i++) begin
        if (xalu_out_valid) lat = cyc - t0;
        else @(negedge clk);
      end
      zp = ref_decrypt(xalu_z, xalu_key);
      check("encrypted ALU: D(E(1000) - E(58))", {32'h0, zp[31:0]}, 64'd942);
      check("encrypted ALU latency", 64'(lat), 64'(2 * 10));
      check_true("encrypted ALU result is padded", zp[63:32] != 0);
    end
    check_true("decrypted-immediate cache hits happened", perf.imm_hits > 0);
    check_true("forwarding happened", perf.forwards > 0);
    check_true("dependency stalls happened", perf.stall_dep > 0);
    check_true("load/store order stalls happened", perf.stall_mem > 0);
    check_true("codec conflict stalls happened", perf.stall_codec > 0);
    check_true("pipeline flushes happened", perf.flushes > 0);
    check_true("branches followed on a taken prediction", perf.bp_taken > 0);
    check_true("mispredicted branches", perf.bp_wrong > 0);
    check("store encryptions", 64'(perf.encryptions), 64'(6 + (TLB_ENTRIES - 5)));
    check("load decryptions", 64'(perf.dec_loads), 64'd1);
    check("TLB slots assigned", 64'(perf.tlb_assigns), 64'(TLB_ENTRIES));
    check("TLB faults", 64'(perf.tlb_faults), 64'd1);
    check("mode switches", 64'(perf.mode_switches), 64'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
