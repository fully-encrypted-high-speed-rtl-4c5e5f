// tb_shadow_regfile: checks the real and shadow register banks.
//
// Random writes go to either bank (registers 0..32, 32 being the flag)
// while four read ports read random registers of random banks. A model
// of both banks predicts every read. Checked: user writes never reach
// the real bank and the reverse, user values are cut to 32 bits, r0 reads
// zero, and 'clear_shadow' zeroes the shadow bank but not the real one.
module tb_shadow_regfile;
  import ecpu_pkg::*;
  localparam int unsigned NRD = 4;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic                clear_shadow, we, we_user;
  logic [NRD-1:0]      rd_user;
  regnum_t [NRD-1:0]   rd_num;
  word_t [NRD-1:0]     rd_val;
  regnum_t             we_num;
  word_t               we_val;

  shadow_regfile #(.NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  word_t  m_real [33];
  plain_t m_shad [33];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(logic u, regnum_t n);
    if (n == 6'd0) return '0;
    if (u) return (n == 6'(FLAG_REG)) ? word_t'(m_shad[n][0]) : word_t'(m_shad[n]);
    return (n == 6'(FLAG_REG)) ? word_t'(m_real[n][0]) : m_real[n];
  endfunction

  initial begin
    foreach (m_real[i]) begin m_real[i] = '0; m_shad[i] = '0; end
    clear_shadow = 0; we = 0; we_user = 0; we_num = '0; we_val = '0;
    rd_user = '0; rd_num = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < int'(NRD); p++) begin
        rd_user[p] = 1'($urandom);
        rd_num[p]  = regnum_t'($urandom_range(0, 32));
      end
      #1;
      for (int p = 0; p < int'(NRD); p++) begin
        checks++;
        if (rd_val[p] !== expect_rd(rd_user[p], rd_num[p])) begin
          failures++;
          $display("FAIL read u=%0d r%0d got %h exp %h", rd_user[p], rd_num[p], rd_val[p],
                   expect_rd(rd_user[p], rd_num[p]));
        end
      end
      we           = ($urandom_range(0, 3) != 0);
      we_user      = 1'($urandom);
      we_num       = regnum_t'($urandom_range(0, 32));
      we_val       = {$urandom, $urandom};
      clear_shadow = ($urandom_range(0, 60) == 0);
      @(posedge clk);
      if (we && we_num != 6'd0) begin
        if (!we_user) m_real[we_num] = (we_num == 6'(FLAG_REG)) ? word_t'(we_val[0]) : we_val;
        else if (!clear_shadow)
          m_shad[we_num] = (we_num == 6'(FLAG_REG)) ? plain_t'(we_val[0]) : we_val[31:0];
      end
      if (clear_shadow) foreach (m_shad[i]) m_shad[i] = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
