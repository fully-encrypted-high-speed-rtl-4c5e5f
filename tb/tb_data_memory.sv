// tb_data_memory: checks the three-port data memory.
//
// Random writes through the processor write port and the host port, with
// random reads on the processor read port and the host port (both
// combinational). When both ports write the same word in one cycle the
// host's value must win.
module tb_data_memory;
  localparam int unsigned WORDS = 128;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] r_addr, w_addr, b_addr;
  logic          w_we, b_we;
  logic [63:0]   r_data, w_data, b_rdata, b_wdata;

  data_memory #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [int];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_we = 0; b_we = 0; r_addr = '0; w_addr = '0; b_addr = '0; w_data = '0; b_wdata = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      r_addr = AW'($urandom);
      b_addr = AW'($urandom);
      #1;
      if (model.exists(int'(r_addr))) begin
        checks++;
        if (r_data !== model[int'(r_addr)]) begin failures++; $display("FAIL r %0d", r_addr); end
      end
      if (model.exists(int'(b_addr))) begin
        checks++;
        if (b_rdata !== model[int'(b_addr)]) begin failures++; $display("FAIL b %0d", b_addr); end
      end
      w_we = 1'($urandom); w_addr = AW'($urandom); w_data = {$urandom, $urandom};
      b_we = 1'($urandom); b_wdata = {$urandom, $urandom};
      if (n % 7 == 0) w_addr = b_addr;
      @(posedge clk);
      if (w_we) model[int'(w_addr)] = w_data;
      if (b_we) model[int'(b_addr)] = b_wdata;
      #1 w_we = 0; b_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
