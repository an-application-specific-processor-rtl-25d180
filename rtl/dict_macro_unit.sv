// dict_macro_unit: hardware support for dictionary-compressed bytecode.
//
// A compressed bytecode program contains macro bytecodes; each stands for a
// sequence of bytecodes held in a dictionary in ROM: a look-up table of macro
// definition addresses plus the definitions, each ending in ret_macro. The
// unit holds the registers that make a macro call a single machine
// instruction:
//   MACRO_TABLE  base of the look-up table     (SET_DICTLOOKUP_TABLE, from A)
//   JPC_RET      JPC to resume after the macro
//   PC_RET       core PC saved during the look-up
// PRECALL_MACRO (macro value in A) runs the state machine:
//   step 1   PC_RET <- PC, JPC_RET <- JPC
//   step 2   PC <- MACRO_TABLE + macro_value * 2
//   step 3   JPC <- fetch(PC) (two bytes, MSB first), PC <- PC_RET
// so that the following GOTONEXTJBCFUNCT fetches the first bytecode of the
// definition. REST_DICT_JBC (used by ret_macro) copies JPC_RET back to JPC in
// the cycle it is issued.
//
// Timing: step 1 is the cycle of precall_i; step 2 the next cycle, in which
// pc_load_o carries the table address and the entry's high byte is read; the
// low byte is read one cycle later; step 3 (jpc_we_o, pc_load_o with PC_RET,
// done_o) comes three cycles after precall_i. busy_o covers the cycles after
// precall_i up to and including step 3; rom_req_o marks the cycles in which
// the unit drives the code bus.
//
// The registers and the three steps follow the design. Scaling the macro
// value by the two-byte entry size, the byte order, the timing and the reset
// values (all registers cleared) are this implementation's choices. There is
// one JPC_RET register, so macros do not nest.
module dict_macro_unit
  import fdi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // commands
  input  logic  set_table_i,   // SET_DICTLOOKUP_TABLE
  input  addr_t table_wdata_i,
  input  logic  precall_i,     // PRECALL_MACRO
  input  byte_t macro_value_i, // macro bytecode (accumulator)
  input  logic  rest_i,        // REST_DICT_JBC
  // processor state
  input  addr_t core_pc_i,     // core PC (address after PRECALL_MACRO)
  input  addr_t jpc_i,         // current JPC
  output logic  pc_load_o,
  output addr_t pc_wdata_o,
  output logic  jpc_we_o,
  output addr_t jpc_wdata_o,
  // code memory
  output logic  rom_req_o,
  output addr_t rom_addr_o,
  input  byte_t rom_rdata_i,
  // status and registers
  output logic  busy_o,
  output logic  done_o,
  output addr_t macro_table_o,
  output addr_t jpc_ret_o,
  output addr_t pc_ret_o
);

  typedef enum logic [1:0] {S_IDLE, S_TABLE, S_ADDR_HI, S_ADDR_LO} state_e;

  state_e state_q, state_d;
  addr_t  macro_table_q, jpc_ret_q, pc_ret_q;
  byte_t  macro_value_q, addr_hi_q;

  addr_t lut_addr;
  assign lut_addr = macro_table_q + addr_t'(macro_value_q) * addr_t'(ENTRY_BYTES);

  always_comb begin
    state_d     = state_q;
    pc_load_o   = 1'b0;
    pc_wdata_o  = lut_addr;
    jpc_we_o    = 1'b0;
    jpc_wdata_o = jpc_ret_q;
    rom_req_o   = 1'b0;
    rom_addr_o  = lut_addr;
    done_o      = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        if (precall_i) state_d = S_TABLE;
        else if (rest_i) jpc_we_o = 1'b1;      // REST_DICT_JBC: JPC <- JPC_RET
      end
      S_TABLE: begin                            // PC <- MACRO_TABLE + macro_value
        pc_load_o  = 1'b1;
        rom_req_o  = 1'b1;
        rom_addr_o = lut_addr;
        state_d    = S_ADDR_HI;
      end
      S_ADDR_HI: begin
        rom_req_o  = 1'b1;
        rom_addr_o = lut_addr + addr_t'(1);
        state_d    = S_ADDR_LO;
      end
      S_ADDR_LO: begin                          // JPC <- fetch(PC), PC <- PC_RET
        jpc_we_o    = 1'b1;
        jpc_wdata_o = {addr_hi_q, rom_rdata_i};
        pc_load_o   = 1'b1;
        pc_wdata_o  = pc_ret_q;
        done_o      = 1'b1;
        state_d     = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      macro_table_q <= '0;
      jpc_ret_q     <= '0;
      pc_ret_q      <= '0;
      macro_value_q <= '0;
      addr_hi_q     <= '0;
    end else begin
      state_q <= state_d;
      if (set_table_i) macro_table_q <= table_wdata_i;
      if (state_q == S_IDLE && precall_i) begin  // PC_RET <- PC, JPC_RET <- JPC
        pc_ret_q      <= core_pc_i;
        jpc_ret_q     <= jpc_i;
        macro_value_q <= macro_value_i;
      end
      if (state_q == S_ADDR_HI) addr_hi_q <= rom_rdata_i;
    end
  end

  assign busy_o        = (state_q != S_IDLE);
  assign macro_table_o = macro_table_q;
  assign jpc_ret_o     = jpc_ret_q;
  assign pc_ret_o      = pc_ret_q;

  // Commands must not overlap a PRECALL_MACRO in progress.
  a_no_cmd_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                  busy_o |-> !precall_i && !rest_i && !set_table_i);

endmodule
