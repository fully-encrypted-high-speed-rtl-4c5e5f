// tb_addr_hash: checks the user address hash.
//
// Compares the hash with a step-by-step computation done here, checks that
// 4096 consecutive addresses and 4096 random addresses give no collisions,
// and that a different key gives a different hash.
module tb_addr_hash;
  logic [63:0] key;
  logic [31:0] addr, hash;

  addr_hash dut (.*);

  int checks = 0, failures = 0;
  bit seen [logic [31:0]];

  function automatic logic [31:0] model(logic [63:0] kk, logic [31:0] a);
    logic [31:0] h;
    h = a ^ kk[31:0];
    h = h * 32'd2654435761;           // 0x9E3779B1
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;           // 0x85EBCA77
    h = h ^ (h >> 13);
    return h ^ kk[63:32];
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] h1;
    key = 64'h0123_4567_89AB_CDEF;
    for (int i = 0; i < 8192; i++) begin
      addr = (i < 4096) ? 32'h1000 + 32'(i) : $urandom;
      #1;
      checks++;
      if (hash !== model(key, addr)) begin failures++; $display("FAIL hash %h", addr); end
    end
    // collision check over consecutive addresses
    seen.delete();
    for (int i = 0; i < 4096; i++) begin
      addr = 32'h2000 + 32'(i) * 8;
      #1;
      checks++;
      if (seen.exists(hash)) begin failures++; $display("FAIL collision at %h", addr); end
      seen[hash] = 1;
    end
    addr = 32'h1234; key = 64'h1; #1; h1 = hash;
    key = 64'h2; #1;
    checks++;
    if (hash == h1) begin failures++; $display("FAIL key has no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
