// ecpu_top: the encrypted processor with its program and data memories.
//
// The pipeline core (ecpu_core) fetches from a program memory and reads and
// writes a data memory of 64-bit words, on separate paths (Harvard layout).
// A host loads programs through the prog_* port. It loads encrypted input
// data and reads encrypted results through the host_* port, and loads the
// cipher key through key_we/key_in. After reset the processor starts in
// supervisor mode at 0x100. It stops, with 'halted' high, when an l.nop 1
// reaches the write stage.
//
// Beside the processor, and independent of it, sits the single-operation
// encrypted ALU of the abstract model (enc_alu): decrypt both operands,
// compute, encrypt the result. The processor does not use it (it spreads
// the same function over its pipeline, its shadow registers and its one
// codec); it has its own ports, xalu_*, and its own key input, and returns
// a result 2*STAGES cycles after its operands.
//
// Memory sizes and USER_BASE, the first word of the region where the TLB
// places user data, are this design's choices. The caches the document
// places in front of these memories are not modelled: every access takes
// one cycle, as if it always hit in the cache.
module ecpu_top
  import ecpu_pkg::*;
#(
  parameter int unsigned STAGES      = 10,
  parameter int unsigned IMEM_WORDS  = 4096,
  parameter int unsigned DMEM_WORDS  = 4096,
  parameter int unsigned TLB_ENTRIES = 64,
  parameter int unsigned IMC_ENTRIES = 64,
  parameter int unsigned BP_ENTRIES  = 64,
  parameter int unsigned USER_BASE   = 2048,
  localparam int unsigned DAW        = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           key_we,
  input  rc2_key_t       key_in,
  input  logic           prog_we,
  input  logic [31:0]    prog_addr,
  input  logic [31:0]    prog_data,
  input  logic [DAW-1:0] host_addr,
  input  logic           host_we,
  input  logic [63:0]    host_wdata,
  output logic [63:0]    host_rdata,
  output logic           halted,
  output logic           user_mode,
  output perf_t          perf,
  input  rc2_key_t       xalu_key,
  input  logic           xalu_valid,
  input  alu_op_e        xalu_op,
  input  logic [63:0]    xalu_x,
  input  logic [63:0]    xalu_y,
  output logic           xalu_out_valid,
  output logic [63:0]    xalu_z,
  output logic           xalu_flag
);
  logic [31:0]    imem_addr, imem_data;
  logic [DAW-1:0] dm_raddr, dm_waddr;
  logic [63:0]    dm_rdata, dm_wdata;
  logic           dm_we;

  ecpu_core #(
    .STAGES(STAGES), .DMEM_AW(DAW), .TLB_ENTRIES(TLB_ENTRIES),
    .IMC_ENTRIES(IMC_ENTRIES), .BP_ENTRIES(BP_ENTRIES), .USER_BASE(USER_BASE)
  ) u_core (
    .clk, .rst_n, .key_we, .key_in,
    .imem_addr, .imem_data,
    .dm_raddr, .dm_rdata, .dm_waddr, .dm_we, .dm_wdata,
    .halted, .user_mode, .perf
  );

  enc_alu #(.STAGES(STAGES)) u_xalu (
    .clk, .rst_n, .key(xalu_key), .in_valid(xalu_valid), .op(xalu_op),
    .x_enc(xalu_x), .y_enc(xalu_y),
    .out_valid(xalu_out_valid), .z_enc(xalu_z), .flag(xalu_flag)
  );

  instr_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .fetch_addr(imem_addr), .fetch_data(imem_data),
    .load_we(prog_we), .load_addr(prog_addr), .load_data(prog_data)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .r_addr(dm_raddr), .r_data(dm_rdata),
    .w_addr(dm_waddr), .w_we(dm_we), .w_data(dm_wdata),
    .b_addr(host_addr), .b_rdata(host_rdata), .b_we(host_we), .b_wdata(host_wdata)
  );
endmodule
