// tb_user_tlb: checks first-come, first-served remapping in the user TLB.
//
// Presents random tags, some repeated. New tags must get consecutive slots
// in order of first use, repeats must hit their earlier slot, a lookup
// without 'commit' must not assign, and once all ENTRIES slots are used a
// new tag must raise 'fault'. 'clear' must empty the buffer.
module tb_user_tlb;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned IW = $clog2(ENTRIES);

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic          clear, lookup_valid, commit, hit, fault, assign_new;
  logic [31:0]   tag;
  logic [IW-1:0] slot;

  user_tlb #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  int model [logic [31:0]];
  int used;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic [31:0] t, logic do_commit);
    @(negedge clk);
    tag = t; lookup_valid = 1; commit = do_commit;
    #1;
    if (model.exists(t)) begin
      checks += 2;
      if (!hit || slot != IW'(model[t])) begin failures++; $display("FAIL hit %h", t); end
      if (fault || assign_new) begin failures++; $display("FAIL flags on hit"); end
    end else if (used < int'(ENTRIES)) begin
      checks += 2;
      if (hit || !assign_new || slot != IW'(used)) begin failures++; $display("FAIL assign %h slot %0d exp %0d", t, slot, used); end
      if (fault) begin failures++; $display("FAIL fault with room"); end
      if (do_commit) begin model[t] = used; used++; end
    end else begin
      checks++;
      if (!fault || hit || assign_new) begin failures++; $display("FAIL no fault when full"); end
    end
    @(posedge clk);
    #1 lookup_valid = 0; commit = 0;
  endtask

  initial begin
    logic [31:0] tags[$];
    clear = 0; lookup_valid = 0; commit = 0; tag = 0; used = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      logic [31:0] t;
      if (tags.size() > 0 && $urandom_range(0, 2) == 0) t = tags[$urandom_range(0, tags.size() - 1)];
      else begin t = $urandom; tags.push_back(t); end
      access(t, $urandom_range(0, 4) != 0);
    end
    checks++;
    if (used != int'(ENTRIES)) begin failures++; $display("FAIL only %0d slots used", used); end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    model.delete(); used = 0;
    access(tags[0], 1);
    access(32'hDEAD_BEEF, 1);
    access(tags[0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
