// tb_imm_cache: checks the direct-mapped cache of decrypted immediates.
//
// Random fills and lookups over program addresses chosen so that many map
// to the same entry. A model keeps the last (tag, value) per entry and
// predicts hit and data; 'clear' must invalidate everything.
module tb_imm_cache;
  localparam int unsigned ENTRIES = 16;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic        clear, hit, fill;
  logic [31:0] lookup_pc, data, fill_pc, fill_data;

  imm_cache #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] m_pc [ENTRIES];
  logic [31:0] m_val [ENTRIES];
  bit          m_ok [ENTRIES];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_pc();
    return {22'($urandom_range(0, 3)), 8'($urandom), 2'b00};
  endfunction

  initial begin
    int unsigned i;
    clear = 0; fill = 0; lookup_pc = '0; fill_pc = '0; fill_data = '0;
    foreach (m_ok[k]) m_ok[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      lookup_pc = rand_pc();
      #1;
      i = int'(lookup_pc[2 +: $clog2(ENTRIES)]);
      checks++;
      if (hit !== (m_ok[i] && m_pc[i] == lookup_pc)) begin
        failures++; $display("FAIL hit pc %h got %b", lookup_pc, hit);
      end else if (hit && data !== m_val[i]) begin
        failures++; $display("FAIL data pc %h", lookup_pc);
      end
      fill      = ($urandom_range(0, 2) == 0);
      fill_pc   = rand_pc();
      fill_data = $urandom;
      clear     = ($urandom_range(0, 200) == 0);
      @(posedge clk);
      if (clear) foreach (m_ok[k]) m_ok[k] = 0;
      else if (fill) begin
        i = int'(fill_pc[2 +: $clog2(ENTRIES)]);
        m_ok[i] = 1; m_pc[i] = fill_pc; m_val[i] = fill_data;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
