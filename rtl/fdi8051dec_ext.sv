// fdi8051dec_ext: Java Card interpreter extension of an 8051 core (FDI8051DEC).
//
// The interpreter runs as "pseudo-threaded" software: every bytecode function
// ends with GOTONEXTJBCFUNCT, which fetches the next bytecode at JPC and jumps
// straight to its function through a jump table, all in hardware
// (jbc_fetch_decode). Dictionary-compressed programs contain macro bytecodes;
// their function calls PRECALL_MACRO, which saves JPC and points it at the
// macro definition found through the dictionary look-up table, and ret_macro
// calls REST_DICT_JBC to resume after the macro (dict_macro_unit). This module
// joins both units, the decoder of the extended instructions and the code
// memory that the core and the extension share.
//
// Core interface: the core strobes ext_valid_i for one cycle with the second
// opcode byte and its operand {B, A} (16 bits; only A is used by
// PRECALL_MACRO) and then stalls until ext_done_o. Single-cycle instructions
// (GET_JPC_IN_A, SET_JPC_FROM_A, SET_JBC_TABLE, SET_DICTLOOKUP_TABLE,
// REST_DICT_JBC, or an unknown opcode, flagged on ext_illegal_o) complete in
// the strobe cycle; GET_JPC_IN_A returns JPC on res_o with res_we_o.
// GOTONEXTJBCFUNCT and PRECALL_MACRO complete three cycles later. The core
// loads its PC from pc_wdata_o whenever pc_load_o is high, including the
// temporary table address during PRECALL_MACRO. While ext_busy_o is high, or
// in the strobe cycle of a multi-cycle instruction, the extension drives the
// code memory address; otherwise core_code_addr_i does. Code memory reads
// return one cycle after the address. jbc_o is the current bytecode, readable
// by the core as a special function register ("MOV A, JBC").
//
// The split into units, the registers and their state machines follow the
// design; the handshake with the core, the opcode values, the 16-bit operand
// and the load port of the code memory are this implementation's choices.
module fdi8051dec_ext
  import fdi_pkg::*;
#(
  parameter int unsigned ROM_ADDR_W  = ADDR_W,
  parameter addr_t       TABLE_RESET = 16'h0100
) (
  input  logic  clk,
  input  logic  rst_n,
  // extended instructions from the core
  input  logic  ext_valid_i,
  input  byte_t ext_opcode_i,
  input  addr_t ext_opnd_i,
  input  addr_t core_pc_i,
  output logic  ext_done_o,
  output logic  ext_illegal_o,
  output logic  ext_busy_o,
  output logic  res_we_o,
  output addr_t res_o,
  output logic  pc_load_o,
  output addr_t pc_wdata_o,
  output byte_t jbc_o,
  output addr_t jpc_o,
  // register view for debug
  output addr_t jbc_table_o,
  output addr_t macro_table_o,
  output addr_t jpc_ret_o,
  output addr_t pc_ret_o,
  // core instruction fetch
  input  addr_t core_code_addr_i,
  output byte_t code_rdata_o,
  // code memory image load
  input  logic  rom_we_i,
  input  addr_t rom_waddr_i,
  input  byte_t rom_wdata_i
);

  ext_cmd_e cmd;
  logic     illegal;

  ext_decoder u_dec (
    .valid_i  (ext_valid_i),
    .opcode_i (ext_opcode_i),
    .cmd_o    (cmd),
    .illegal_o(illegal)
  );

  // jbc_fetch_decode <-> dict_macro_unit
  logic  fd_rom_req, fd_pc_load, fd_busy, fd_done;
  addr_t fd_rom_addr, fd_pc_wdata, jpc, jbc_tbl;
  byte_t jbc;
  logic  dm_rom_req, dm_pc_load, dm_busy, dm_done, dm_jpc_we;
  addr_t dm_rom_addr, dm_pc_wdata, dm_jpc_wdata;
  addr_t macro_table, jpc_ret, pc_ret;
  byte_t rom_rdata;

  logic  jpc_we;
  addr_t jpc_wdata;
  assign jpc_we    = (cmd == CMD_SET_JPC) || dm_jpc_we;
  assign jpc_wdata = (cmd == CMD_SET_JPC) ? ext_opnd_i : dm_jpc_wdata;

  jbc_fetch_decode #(.TABLE_RESET(TABLE_RESET)) u_fd (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_i    (cmd == CMD_GOTONEXT),
    .jpc_we_i   (jpc_we),
    .jpc_wdata_i(jpc_wdata),
    .tbl_we_i   (cmd == CMD_SET_JBC_TABLE),
    .tbl_wdata_i(ext_opnd_i),
    .rom_req_o  (fd_rom_req),
    .rom_addr_o (fd_rom_addr),
    .rom_rdata_i(rom_rdata),
    .pc_load_o  (fd_pc_load),
    .pc_wdata_o (fd_pc_wdata),
    .busy_o     (fd_busy),
    .done_o     (fd_done),
    .jpc_o      (jpc),
    .jbc_o      (jbc),
    .tbl_o      (jbc_tbl)
  );

  dict_macro_unit u_dm (
    .clk          (clk),
    .rst_n        (rst_n),
    .set_table_i  (cmd == CMD_SET_DICT_TABLE),
    .table_wdata_i(ext_opnd_i),
    .precall_i    (cmd == CMD_PRECALL),
    .macro_value_i(ext_opnd_i[DATA_W-1:0]),
    .rest_i       (cmd == CMD_REST_DICT),
    .core_pc_i    (core_pc_i),
    .jpc_i        (jpc),
    .pc_load_o    (dm_pc_load),
    .pc_wdata_o   (dm_pc_wdata),
    .jpc_we_o     (dm_jpc_we),
    .jpc_wdata_o  (dm_jpc_wdata),
    .rom_req_o    (dm_rom_req),
    .rom_addr_o   (dm_rom_addr),
    .rom_rdata_i  (rom_rdata),
    .busy_o       (dm_busy),
    .done_o       (dm_done),
    .macro_table_o(macro_table),
    .jpc_ret_o    (jpc_ret),
    .pc_ret_o     (pc_ret)
  );

  // Code bus: the extension owns it while one of its units reads.
  addr_t rom_addr;
  always_comb begin
    if (fd_rom_req)      rom_addr = fd_rom_addr;
    else if (dm_rom_req) rom_addr = dm_rom_addr;
    else                 rom_addr = core_code_addr_i;
  end

  code_rom #(.ADDR_W(ROM_ADDR_W), .DATA_W(DATA_W)) u_rom (
    .clk      (clk),
    .rd_addr_i(rom_addr[ROM_ADDR_W-1:0]),
    .rd_data_o(rom_rdata),
    .wr_en_i  (rom_we_i),
    .wr_addr_i(rom_waddr_i[ROM_ADDR_W-1:0]),
    .wr_data_i(rom_wdata_i)
  );
  assign code_rdata_o = rom_rdata;

  // Core side.
  logic single_cycle;
  assign single_cycle  = illegal || (cmd inside {CMD_GET_JPC, CMD_SET_JPC, CMD_SET_JBC_TABLE,
                                                 CMD_SET_DICT_TABLE, CMD_REST_DICT});
  assign ext_done_o    = single_cycle || fd_done || dm_done;
  assign ext_illegal_o = illegal;
  assign ext_busy_o    = fd_busy || dm_busy;
  assign res_we_o      = (cmd == CMD_GET_JPC);
  assign res_o         = jpc;
  assign pc_load_o     = fd_pc_load || dm_pc_load;
  assign pc_wdata_o    = fd_pc_load ? fd_pc_wdata : dm_pc_wdata;
  assign jbc_o         = jbc;
  assign jpc_o         = jpc;
  assign jbc_table_o   = jbc_tbl;
  assign macro_table_o = macro_table;
  assign jpc_ret_o     = jpc_ret;
  assign pc_ret_o      = pc_ret;

  // The core stalls while an extended instruction is in progress.
  a_no_issue_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    ext_busy_o |-> !ext_valid_i);
  a_one_pc_load:   assert property (@(posedge clk) disable iff (!rst_n)
                                    !(fd_pc_load && dm_pc_load));

endmodule
