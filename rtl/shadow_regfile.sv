// shadow_regfile: real and shadow register banks with per-access aliasing.
//
// Supervisor-mode instructions see the 32 real 64-bit registers and the
// real compare flag. User-mode instructions see 32 shadow registers and a
// shadow flag. The shadows hold the 32-bit plaintexts that user arithmetic
// works on between a decryption and an encryption. Every read and write
// port carries the mode of the instruction using it, so instructions of
// both modes can be in the pipeline together and each reaches its own bank.
// Supervisor mode cannot name a shadow register. Register 0 reads as zero
// in both banks and ignores writes. A key change ('clear_shadow') zeroes
// all shadow registers and the shadow flag, so a new user cannot see the
// old user's plaintext.
//
// Ports: NRD combinational read ports (register number 0..31, or 32 for the
// flag, read in bit 0), one write port written on the clock edge.
module shadow_regfile
  import ecpu_pkg::*;
#(
  parameter int unsigned NRD = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear_shadow,
  input  logic [NRD-1:0]          rd_user,
  input  regnum_t [NRD-1:0]       rd_num,
  output word_t [NRD-1:0]         rd_val,
  input  logic                    we,
  input  logic                    we_user,
  input  regnum_t                 we_num,
  input  word_t                   we_val
);
  word_t  [NREG-1:0] real_r;
  plain_t [NREG-1:0] shad_r;
  logic              real_f, shad_f;

  always_comb
    for (int unsigned p = 0; p < NRD; p++) begin
      if (rd_num[p] == regnum_t'(FLAG_REG))
        rd_val[p] = {63'h0, rd_user[p] ? shad_f : real_f};
      else if (rd_num[p][4:0] == 5'd0 || rd_num[p][5])
        rd_val[p] = '0;
      else if (rd_user[p])
        rd_val[p] = {32'h0, shad_r[rd_num[p][4:0]]};
      else
        rd_val[p] = real_r[rd_num[p][4:0]];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      real_r <= '0;
      shad_r <= '0;
      real_f <= 1'b0;
      shad_f <= 1'b0;
    end else begin
      if (we && !we_user) begin
        if (we_num == regnum_t'(FLAG_REG))         real_f <= we_val[0];
        else if (!we_num[5] && we_num[4:0] != 5'd0) real_r[we_num[4:0]] <= we_val;
      end
      if (clear_shadow) begin
        shad_r <= '0;
        shad_f <= 1'b0;
      end else if (we && we_user) begin
        if (we_num == regnum_t'(FLAG_REG))         shad_f <= we_val[0];
        else if (!we_num[5] && we_num[4:0] != 5'd0) shad_r[we_num[4:0]] <= we_val[31:0];
      end
    end
  end
endmodule
