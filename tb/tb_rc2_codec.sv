// tb_rc2_codec: self-checking test of the pipelined RC2-64 codec.
//
// Streams back-to-back encryptions and decryptions (one per cycle) through
// the codec and compares each result with the reference model, checks that
// each result arrives exactly STAGES cycles after it entered, and that
// decrypting an encryption gives back the original block.
module tb_rc2_codec;
  import ecpu_pkg::*;
  import rc2_ref_pkg::*;

  localparam int unsigned STAGES = 10;
  localparam int unsigned N      = 200;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  rc2_key_t    key;
  logic        in_valid, in_dec, out_valid, out_dec;
  logic [63:0] in_data, out_data;
  logic [7:0]  in_tag, out_tag;

  rc2_codec #(.STAGES(STAGES), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] exp_q [$];
  int          t_in  [$];
  int          cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: every output compared in order with the expected queue.
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    int t0;
    e  = exp_q.pop_front();
    t0 = t_in.pop_front();
    checks++;
    if (out_data !== e) begin
      failures++;
      $display("FAIL data tag=%0d got %h exp %h", out_tag, out_data, e);
    end
    checks++;
    if (cyc - t0 != STAGES) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
  end

  initial begin
    logic [63:0] p, c;
    key = ref_key(7);
    in_valid = 0; in_dec = 0; in_data = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // self-consistency of the reference model
    for (int i = 0; i < 20; i++) begin
      p = {$urandom, $urandom};
      checks++;
      if (ref_decrypt(ref_encrypt(p, key), key) !== p) failures++;
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      p = {$urandom, $urandom};
      in_valid = 1'b1;
      in_dec   = i[0];
      in_data  = p;
      in_tag   = i[7:0];
      exp_q.push_back(i[0] ? ref_decrypt(p, key) : ref_encrypt(p, key));
      t_in.push_back(cyc);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (STAGES + 3) @(posedge clk);
    // round trip through the hardware twice
    for (int i = 0; i < 10; i++) begin
      p = {$urandom, $urandom};
      @(negedge clk);
      in_valid = 1; in_dec = 0; in_data = p; exp_q.push_back(ref_encrypt(p, key)); t_in.push_back(cyc);
      @(negedge clk) in_valid = 0;
      wait (out_valid); c = out_data;
      @(negedge clk);
      in_valid = 1; in_dec = 1; in_data = c; exp_q.push_back(p); t_in.push_back(cyc);
      @(negedge clk) in_valid = 0;
      wait (out_valid);
      @(posedge clk);
    end
    repeat (STAGES + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
