// tb_ecpu_core: random-program test of the pipeline core against an
// instruction-set interpreter.
//
// For each of several seeds the testbench builds a random user-mode
// program: register arithmetic, encrypted-constant arithmetic and shifts,
// compares with forward branches, stores and loads. The body runs twice, so
// the second pass takes its constants from the decrypted-immediate cache.
// The program is entered from supervisor mode with l.rfe and leaves with
// l.sys. A plain interpreter in the testbench runs the same binary,
// decrypting the constants with the reference RC2 model. At the end every
// shadow register, the user flag and the stored words (decrypted) must
// match it. The testbench also checks that an instruction with no hazards
// reaches the write slot STAGES+4 cycles after it is fetched (15 slots at
// the default depth).
module tb_ecpu_core;
  import ecpu_pkg::*;
  import rc2_ref_pkg::*;

  localparam int unsigned STAGES    = 10;
  localparam int unsigned USER_BASE = 2048;
  localparam int unsigned NSEED     = 4;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic        key_we, dm_we, halted, user_mode;
  rc2_key_t    key_in;
  logic [31:0] imem_addr, imem_data;
  logic [11:0] dm_raddr, dm_waddr;
  logic [63:0] dm_rdata, dm_wdata;
  perf_t       perf;

  ecpu_core #(.STAGES(STAGES), .USER_BASE(USER_BASE)) dut (.*);

  // memories of the testbench
  logic [31:0] imem [4096];
  logic [63:0] dmem [4096];
  assign imem_data = imem[imem_addr[13:2]];
  assign dm_rdata  = dmem[dm_raddr];
  always @(posedge clk) if (dm_we) dmem[dm_waddr] <= dm_wdata;

  int checks = 0, failures = 0;
  rc2_key_t k;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ assembler
  int unsigned at;
  function automatic void emit(logic [31:0] w);
    imem[at[13:2]] = w;
    at += 4;
  endfunction
  function automatic void emit_enc(logic [5:0] opc, int rd, int ra, logic [4:0] cond, logic [31:0] plain);
    logic [63:0] c;
    c = ref_encrypt({$urandom, plain}, k);
    emit({OPC_PREFIX, 2'b00, c[63:40]});
    emit({OPC_PREFIX, 2'b00, c[39:16]});
    if (opc == OPC_SFI) emit({opc, cond, 5'(ra), c[15:0]});
    else                emit({opc, 5'(rd), 5'(ra), c[15:0]});
  endfunction

  // ------------------------------------------------------------ interpreter
  logic [31:0] rr [32];
  logic        rflag;
  logic [31:0] rmem [logic [31:0]];
  logic [31:0] addr_order [$];

  function automatic logic cmp(logic [4:0] c, logic [31:0] a, logic [31:0] b);
    case (c)
      5'h00: return a == b;
      5'h01: return a != b;
      5'h02: return a > b;
      5'h03: return a >= b;
      5'h04: return a < b;
      5'h05: return a <= b;
      5'h0A: return $signed(a) > $signed(b);
      5'h0B: return $signed(a) >= $signed(b);
      5'h0C: return $signed(a) < $signed(b);
      default: return $signed(a) <= $signed(b);
    endcase
  endfunction

  function automatic logic [31:0] shf(logic [1:0] kind, logic [31:0] a, logic [4:0] s);
    case (kind)
      2'd0: return a << s;
      2'd1: return a >> s;
      2'd2: return $signed(a) >>> s;
      default: return (s == 0) ? a : ((a >> s) | (a << (32 - s)));
    endcase
  endfunction

  task automatic interpret(logic [31:0] start);
    logic [31:0] pc, w, c, a, b;
    logic [47:0] pfx;
    int steps;
    pc = start; pfx = '0; steps = 0;
    for (int i = 0; i < 32; i++) rr[i] = 0;
    rflag = 0;
    rmem.delete();
    addr_order.delete();
    while (steps < 100000) begin
      logic [5:0] opc;
      logic [31:0] npc;
      w = imem[pc[13:2]];
      opc = w[31:26];
      npc = pc + 4;
      a = rr[w[20:16]];
      b = rr[w[15:11]];
      c = ref_decrypt({pfx, w[15:0]}, k);
      steps++;
      case (opc)
        OPC_PREFIX: pfx = {pfx[23:0], w[23:0]};
        OPC_ADDI: begin rr[w[25:21]] = a + c; pfx = 0; end
        OPC_ANDI: begin rr[w[25:21]] = a & c; pfx = 0; end
        OPC_ORI : begin rr[w[25:21]] = a | c; pfx = 0; end
        OPC_XORI: begin rr[w[25:21]] = a ^ c; pfx = 0; end
        OPC_MULI: begin rr[w[25:21]] = a * c; pfx = 0; end
        OPC_SHI : begin rr[w[25:21]] = shf(c[7:6], a, c[4:0]); pfx = 0; end
        OPC_SFI : begin rflag = cmp(w[25:21], a, c); pfx = 0; end
        OPC_SF  : rflag = cmp(w[25:21], a, b);
        OPC_ALU : case (w[3:0])
          4'h0: rr[w[25:21]] = a + b;
          4'h2: rr[w[25:21]] = a - b;
          4'h3: rr[w[25:21]] = a & b;
          4'h4: rr[w[25:21]] = a | b;
          4'h5: rr[w[25:21]] = a ^ b;
          4'h6: rr[w[25:21]] = a * b;
          4'h8: rr[w[25:21]] = shf(w[7:6], a, b[4:0]);
          default: ;
        endcase
        OPC_LWS: rr[w[25:21]] = rmem.exists(a) ? rmem[a] : 32'h0;
        OPC_SW: begin
          if (!rmem.exists(a)) addr_order.push_back(a);
          rmem[a] = rr[w[25:21]];
        end
        OPC_BF, OPC_BNF: if (rflag == (opc == OPC_BF)) begin
          npc = pc + {{4{w[25]}}, w[25:0], 2'b00};
          pfx = 0;
        end
        OPC_SYS: break;
        default: ;
      endcase
      rr[0] = 0;
      pc = npc;
    end
  endtask

  // ------------------------------------------------------------ program generator
  task automatic gen_program();
    int unsigned body, groups[$];
    for (int i = 0; i < 4096; i++) imem[i] = {OPC_NOP, 2'b01, 24'h0};
    // supervisor entry
    at = 32'h100;
    emit({OPC_ORI, 5'd1, 5'd0, 16'h400});
    emit({OPC_MTSPR, 5'd0, 5'd0, 5'd1, 11'd32});
    emit({OPC_RFE, 26'h0});
    at = 32'hC00;
    emit({OPC_NOP, 2'b01, 8'h0, 16'h1});
    // user program
    at = 32'h400;
    emit_enc(OPC_ADDI, 30, 0, 0, 32'd2);                   // pass counter
    for (int r = 20; r < 24; r++) emit_enc(OPC_ADDI, r, 0, 0, 32'h1000 + 8 * (r - 20));
    for (int r = 1; r < 16; r++) emit_enc(OPC_ADDI, r, 0, 0, $urandom);
    for (int r = 20; r < 24; r++) emit({OPC_SW, 5'(r - 19), 5'(r), 16'h0});
    body = at;
    for (int n = 0; n < 120; n++) begin
      int kind, rd, ra, rb;
      logic [31:0] cst;
      rd = $urandom_range(1, 15);
      ra = $urandom_range(0, 15);
      rb = $urandom_range(0, 15);
      cst = ($urandom_range(0, 3) == 0) ? $urandom : $urandom_range(0, 40);
      kind = $urandom_range(0, 9);
      case (kind)
        0, 1: emit({OPC_ALU, 5'(rd), 5'(ra), 5'(rb), 3'b000, 2'($urandom_range(0, 3)), 2'b00,
                    4'(($urandom_range(0, 6) == 6) ? 8 : $urandom_range(2, 6))});
        2: emit({OPC_ALU, 5'(rd), 5'(ra), 5'(rb), 11'h0});   // add
        3, 4: begin
          logic [5:0] o;
          case ($urandom_range(0, 4))
            0: o = OPC_ADDI; 1: o = OPC_ANDI; 2: o = OPC_ORI; 3: o = OPC_XORI; default: o = OPC_MULI;
          endcase
          emit_enc(o, rd, ra, 0, cst);
        end
        5: emit_enc(OPC_SHI, rd, ra, 0, {24'h0, 2'($urandom_range(0, 3)), 6'($urandom_range(0, 31))});
        6: begin
          // compare, then skip forward over 1..3 whole instructions
          int skip, from;
          logic [4:0] cc;
          cc = 5'($urandom_range(0, 5));
          if ($urandom_range(0, 1)) emit({OPC_SF, cc, 5'(ra), 5'(rb), 11'h0});
          else                      emit_enc(OPC_SFI, 0, ra, cc, cst);
          from = at;
          skip = $urandom_range(1, 3);
          emit({($urandom_range(0, 1) ? OPC_BF : OPC_BNF), 26'(1 + 3 * skip)});
          for (int q = 0; q < skip; q++) emit_enc(OPC_ADDI, rd, ra, 0, cst + q);
        end
        7: emit({OPC_SW, 5'(rb), 5'($urandom_range(20, 23)), 16'h0});
        8: emit({OPC_LWS, 5'(rd), 5'($urandom_range(20, 23)), 16'h0});
        default: begin                                   // dependent chain
          emit({OPC_ALU, 5'(rd), 5'(ra), 5'(rb), 11'h0});
          emit_enc(OPC_ADDI, rd, rd, 0, cst);
          emit({OPC_ALU, 5'(rb == 0 ? 1 : rb), 5'(rd), 5'(ra), 11'h2});
        end
      endcase
    end
    emit_enc(OPC_ADDI, 30, 30, 0, 32'hFFFF_FFFF);
    emit_enc(OPC_SFI, 0, 30, 5'h0A, 32'd0);
    emit({OPC_BF, 26'((int'(body) - int'(at)) / 4)});
    emit({OPC_SYS, 26'h0});
  endtask

  // ------------------------------------------------------------ latency probe
  int cyc = 0, t_fetch = -1, t_write = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && t_fetch < 0 && dut.cur[0].valid && dut.cur[0].pc == 32'h100) t_fetch = cyc;
    if (rst_n && t_write < 0 && dut.cur[STAGES+4].valid && dut.cur[STAGES+4].pc == 32'h100) t_write = cyc;
  end

  initial begin
    key_we = 0; key_in = '0;
    for (int seed = 0; seed < int'(NSEED); seed++) begin
      k = ref_key(100 + seed);
      gen_program();
      for (int i = 0; i < 4096; i++) dmem[i] = '0;
      rst_n = 0;
      t_fetch = -1; t_write = -1;
      repeat (3) @(negedge clk);
      rst_n = 1;
      key_in = k; key_we = 1;
      @(negedge clk);
      key_we = 0;
      wait (halted);
      @(negedge clk);
      interpret(32'h400);
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (dut.u_rf.shad_r[r] !== rr[r]) begin
          failures++;
          $display("FAIL seed %0d r%0d = %h expected %h", seed, r, dut.u_rf.shad_r[r], rr[r]);
        end
      end
      checks++;
      if (dut.u_rf.shad_f !== rflag) begin failures++; $display("FAIL seed %0d flag", seed); end
      foreach (addr_order[i]) begin
        logic [63:0] p;
        p = ref_decrypt(dmem[USER_BASE + i], k);
        checks++;
        if (p[31:0] !== rmem[addr_order[i]]) begin
          failures++;
          $display("FAIL seed %0d memory %h = %h expected %h", seed, addr_order[i], p[31:0], rmem[addr_order[i]]);
        end
      end
      checks++;
      if (t_write - t_fetch != int'(STAGES) + 4) begin
        failures++;
        $display("FAIL pipeline length: fetch %0d write %0d", t_fetch, t_write);
      end
      $display("seed %0d: cycles=%0d user=%0d stall_dep=%0d stall_mem=%0d stall_codec=%0d fwd=%0d imm_hits=%0d dec_imms=%0d",
               seed, perf.cycles, perf.user_insns, perf.stall_dep, perf.stall_mem, perf.stall_codec,
               perf.forwards, perf.imm_hits, perf.dec_imms);
      checks++;
      if (perf.imm_hits == 0) begin failures++; $display("FAIL no cached immediates"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
