// tb_enc_alu: self-checking test of the encrypted ALU z' = E(D(x') op D(y')).
//
// Feeds one pair of encrypted operands per cycle (random plaintexts, random
// padding), decrypts each output with the reference model and compares the
// plaintext with the operation computed here. Also checks the compare flag,
// the 2*STAGES-cycle latency, and that equal results encrypt differently
// (fresh padding).
module tb_enc_alu;
  import ecpu_pkg::*;
  import rc2_ref_pkg::*;

  localparam int unsigned STAGES = 10;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  rc2_key_t    key;
  logic        in_valid, out_valid, flag;
  alu_op_e     op;
  logic [63:0] x_enc, y_enc, z_enc;

  enc_alu #(.STAGES(STAGES)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] exp_q[$];
  logic        expf_q[$];
  int          t_q[$];
  logic [63:0] seen_zero_ct[$];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] p;
    logic [31:0] e;
    p = ref_decrypt(z_enc, key);
    e = exp_q.pop_front();
    checks += 3;
    if (p[31:0] !== e) begin failures++; $display("FAIL value %h exp %h", p[31:0], e); end
    if (flag !== expf_q.pop_front()) begin failures++; $display("FAIL flag"); end
    if (cyc - t_q.pop_front() != 2 * STAGES) begin failures++; $display("FAIL latency"); end
    if (e == 0) seen_zero_ct.push_back(z_enc);
  end

  initial begin
    logic [31:0] a, b, r;
    logic f;
    key = ref_key(3);
    in_valid = 0; op = ALU_ADD; x_enc = 0; y_enc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = $urandom; b = $urandom;
      case (i % 6)
        0: op = ALU_ADD;
        1: op = ALU_SUB;
        2: op = ALU_MUL;
        3: op = ALU_XOR;
        4: op = ALU_SFLTU;
        default: begin op = ALU_SUB; b = a; end   // result zero
      endcase
      r = 0; f = 0;
      case (op)
        ALU_ADD: r = a + b;
        ALU_SUB: r = a - b;
        ALU_MUL: r = a * b;
        ALU_XOR: r = a ^ b;
        ALU_SFLTU: f = a < b;
        default: ;
      endcase
      x_enc = ref_encrypt({$urandom, a}, key);
      y_enc = ref_encrypt({$urandom, b}, key);
      in_valid = 1;
      exp_q.push_back(r); expf_q.push_back(f); t_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (2 * STAGES + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    // results equal to zero must not all share one ciphertext
    checks++;
    if (seen_zero_ct.size() < 2 || seen_zero_ct[0] == seen_zero_ct[1]) begin
      failures++; $display("FAIL padding does not vary");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
