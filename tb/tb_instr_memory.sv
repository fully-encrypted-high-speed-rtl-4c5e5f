// tb_instr_memory: checks program loading and instruction fetch.
//
// Writes random words at random word addresses through the load port and
// reads them back through the fetch port, which is combinational.
module tb_instr_memory;
  localparam int unsigned WORDS = 256;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic        load_we;
  logic [31:0] fetch_addr, fetch_data, load_addr, load_data;

  instr_memory #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [int];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    load_we = 0; load_addr = '0; load_data = '0; fetch_addr = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n < 300 || $urandom_range(0, 1) == 0) begin
        a = $urandom_range(0, WORDS - 1);
        load_we = 1; load_addr = 32'(a) << 2; load_data = $urandom;
        model[a] = load_data;
      end else load_we = 0;
      @(posedge clk);
      #1 load_we = 0;
      a = $urandom_range(0, WORDS - 1);
      fetch_addr = 32'(a) << 2;
      #1;
      if (model.exists(a)) begin
        checks++;
        if (fetch_data !== model[a]) begin failures++; $display("FAIL word %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
