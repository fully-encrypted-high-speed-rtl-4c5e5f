// tb_alu: self-checking test of the ALU in both widths.
//
// Random operands for every operation, in 32-bit (user) and 64-bit
// (supervisor) width, compared with results computed here with integer
// arithmetic on longint/int types.
module tb_alu;
  import ecpu_pkg::*;

  alu_op_e     op;
  logic        wide;
  logic [63:0] a, b, y;
  logic        flag;

  alu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect64(alu_op_e o, logic [63:0] x, logic [63:0] z,
                                   output logic [63:0] ry, output logic rf);
    longint sx, sz;
    int unsigned s;
    sx = x; sz = z; s = z[5:0];
    ry = 0; rf = 0;
    case (o)
      ALU_ADD: ry = sx + sz;
      ALU_SUB: ry = sx - sz;
      ALU_AND: ry = x & z;
      ALU_OR : ry = x | z;
      ALU_XOR: ry = x ^ z;
      ALU_MUL: ry = sx * sz;
      ALU_SLL: ry = x << s;
      ALU_SRL: ry = x >> s;
      ALU_SRA: ry = sx >>> s;
      ALU_ROR: ry = (s == 0) ? x : ((x >> s) | (x << (64 - s)));
      ALU_SFEQ : rf = (x == z);
      ALU_SFNE : rf = (x != z);
      ALU_SFGTU: rf = (x > z);
      ALU_SFGEU: rf = (x >= z);
      ALU_SFLTU: rf = (x < z);
      ALU_SFLEU: rf = (x <= z);
      ALU_SFGTS: rf = (sx > sz);
      ALU_SFGES: rf = (sx >= sz);
      ALU_SFLTS: rf = (sx < sz);
      ALU_SFLES: rf = (sx <= sz);
      default: ;
    endcase
  endfunction

  function automatic void expect32(alu_op_e o, logic [31:0] x, logic [31:0] z,
                                   output logic [63:0] ry, output logic rf);
    int sx, sz;
    int unsigned s;
    logic [31:0] r;
    sx = x; sz = z; s = z[4:0];
    r = 0; rf = 0;
    case (o)
      ALU_ADD: r = sx + sz;
      ALU_SUB: r = sx - sz;
      ALU_AND: r = x & z;
      ALU_OR : r = x | z;
      ALU_XOR: r = x ^ z;
      ALU_MUL: r = sx * sz;
      ALU_SLL: r = x << s;
      ALU_SRL: r = x >> s;
      ALU_SRA: r = sx >>> s;
      ALU_ROR: r = (s == 0) ? x : ((x >> s) | (x << (32 - s)));
      ALU_SFEQ : rf = (x == z);
      ALU_SFNE : rf = (x != z);
      ALU_SFGTU: rf = (x > z);
      ALU_SFGEU: rf = (x >= z);
      ALU_SFLTU: rf = (x < z);
      ALU_SFLEU: rf = (x <= z);
      ALU_SFGTS: rf = (sx > sz);
      ALU_SFGES: rf = (sx >= sz);
      ALU_SFLTS: rf = (sx < sz);
      ALU_SFLES: rf = (sx <= sz);
      default: ;
    endcase
    ry = {32'h0, r};
  endfunction

  initial begin
    logic [63:0] ey;
    logic ef;
    for (int i = 0; i < 4000; i++) begin
      op   = alu_op_e'($urandom_range(0, 19));
      wide = i[0];
      a    = {$urandom, $urandom};
      b    = {$urandom, $urandom};
      if (i % 7 == 0) b = a;                 // equal operands for compares
      if (i % 5 == 0) b[63:6] = '0;          // small shift amounts
      #1;
      if (wide) expect64(op, a, b, ey, ef);
      else      expect32(op, a[31:0], b[31:0], ey, ef);
      checks += 2;
      if (y !== ey) begin failures++; $display("FAIL %s wide=%0d a=%h b=%h y=%h exp %h", op.name(), wide, a, b, y, ey); end
      if (flag !== ef) begin failures++; $display("FAIL flag %s wide=%0d", op.name(), wide); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
