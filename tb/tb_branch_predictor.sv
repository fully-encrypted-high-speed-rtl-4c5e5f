// tb_branch_predictor: checks the branch prediction buffer.
//
// Random branch outcomes are reported for a small set of branch addresses
// in both modes, chosen so that two addresses share each table index. A model of
// the table (tag, target, 2-bit counter per index) predicts every lookup:
// hit, taken and target. 'clear' must empty the table.
module tb_branch_predictor;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned IW = $clog2(ENTRIES);

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic        clear, lk_user, lk_hit, lk_taken, up_valid, up_user, up_taken;
  logic [31:0] lk_pc, lk_target, up_pc, up_target;

  branch_predictor #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  bit          m_ok   [ENTRIES];
  logic [32:0] m_tag  [ENTRIES];   // {mode, pc}
  logic [31:0] m_tgt  [ENTRIES];
  int          m_ctr  [ENTRIES];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_pc();
    return {25'($urandom_range(0, 1)), 5'($urandom), 2'b00};
  endfunction

  initial begin
    int unsigned i;
    bit eh;
    clear = 0; lk_user = 0; lk_pc = '0; up_valid = 0; up_user = 0; up_pc = '0; up_taken = 0; up_target = '0;
    foreach (m_ok[k]) m_ok[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      lk_user = ($urandom_range(0, 7) == 0);
      lk_pc   = rand_pc();
      #1;
      i  = 32'(lk_pc[2 +: IW]);
      eh = m_ok[i] && m_tag[i] == {lk_user, lk_pc};
      checks++;
      if (lk_hit !== eh) begin failures++; $display("FAIL hit %h", lk_pc); end
      else if (eh) begin
        checks++;
        if (lk_taken !== (m_ctr[i] >= 2) || lk_target !== m_tgt[i]) begin
          failures++; $display("FAIL prediction %h", lk_pc);
        end
      end else begin
        checks++;
        if (lk_taken) begin failures++; $display("FAIL taken on a miss %h", lk_pc); end
      end
      up_valid  = ($urandom_range(0, 1) == 0);
      up_user   = ($urandom_range(0, 7) == 0);
      up_pc     = rand_pc();
      up_taken  = ($urandom_range(0, 3) != 0);
      up_target = up_pc + 32'h40;
      clear     = ($urandom_range(0, 400) == 0);
      @(posedge clk);
      if (clear) foreach (m_ok[k]) m_ok[k] = 0;
      else if (up_valid) begin
        i = 32'(up_pc[2 +: IW]);
        if (m_ok[i] && m_tag[i] == {up_user, up_pc}) begin
          if (up_taken && m_ctr[i] < 3) m_ctr[i]++;
          else if (!up_taken && m_ctr[i] > 0) m_ctr[i]--;
        end else begin
          m_ok[i] = 1; m_tag[i] = {up_user, up_pc}; m_ctr[i] = up_taken ? 2 : 1;
        end
        m_tgt[i] = up_target;
      end
      #1 up_valid = 0; clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
