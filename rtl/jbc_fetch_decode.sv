// jbc_fetch_decode: hardware fetch and decode stage of the Java Card interpreter.
//
// The unit holds the Java program counter JPC, the current bytecode JBC and the
// base address of the bytecode jump table. The interpreter software ends every
// bytecode function with GOTONEXTJBCFUNCT, which starts the three steps of the
// fetch/decode state machine:
//   State1 (FETCH)   JBC      = *(JPC)
//   State2 (DECODE)  JBCFunct = *(JBCTableOffset + JBC * 2)   (two bytes, MSB first)
//   State3           jump to JBCFunct (core PC load), JPC = JPC + 1
// after which the core executes the bytecode function in software.
//
// Timing, with the synchronous code memory: the JPC read is issued in the
// cycle of start_i, the bytecode returns one cycle later together with the
// read of the table's high byte, then the low byte is read; pc_load_o and
// done_o are high for one cycle, three cycles after start_i. busy_o is high in
// the cycles between; while it or rom_req_o is high the unit owns the code bus.
//
// The three states and their actions follow the design. The two-byte table
// entries, the byte order, the synchronous memory timing and the load port
// for JPC (used by SET_JPC_FROM_A, PRECALL_MACRO and REST_DICT_JBC) are this
// implementation's choices. Reset clears JPC and JBC and sets the table base to
// TABLE_RESET.
module jbc_fetch_decode
  import fdi_pkg::*;
#(
  parameter addr_t TABLE_RESET = 16'h0100
) (
  input  logic  clk,
  input  logic  rst_n,
  // commands
  input  logic  start_i,      // GOTONEXTJBCFUNCT
  input  logic  jpc_we_i,     // load JPC
  input  addr_t jpc_wdata_i,
  input  logic  tbl_we_i,     // load jump-table base (SET_JBC_TABLE)
  input  addr_t tbl_wdata_i,
  // code memory
  output logic  rom_req_o,
  output addr_t rom_addr_o,
  input  byte_t rom_rdata_i,
  // core program counter
  output logic  pc_load_o,
  output addr_t pc_wdata_o,
  // status and registers
  output logic  busy_o,
  output logic  done_o,
  output addr_t jpc_o,
  output byte_t jbc_o,
  output addr_t tbl_o
);

  typedef enum logic [1:0] {S_IDLE, S_JBC, S_FUNC_HI, S_FUNC_LO} state_e;

  state_e state_q, state_d;
  addr_t  jpc_q, tbl_q;
  byte_t  jbc_q, func_hi_q;

  // Address of the jump-table entry of the bytecode now on the bus, and of
  // the bytecode held in JBC.
  addr_t entry_addr, entry_jbc;
  assign entry_addr = tbl_q + addr_t'(rom_rdata_i) * addr_t'(ENTRY_BYTES);
  assign entry_jbc    = tbl_q + addr_t'(jbc_q) * addr_t'(ENTRY_BYTES);

  always_comb begin
    state_d    = state_q;
    rom_req_o  = 1'b0;
    rom_addr_o = jpc_q;
    pc_load_o  = 1'b0;
    pc_wdata_o = {func_hi_q, rom_rdata_i};
    done_o     = 1'b0;
    unique case (state_q)
      S_IDLE: if (start_i) begin
        rom_req_o  = 1'b1;
        rom_addr_o = jpc_q;                 // State1: read *(JPC)
        state_d    = S_JBC;
      end
      S_JBC: begin
        rom_req_o  = 1'b1;
        rom_addr_o = entry_addr;            // State2: table entry, high byte
        state_d    = S_FUNC_HI;
      end
      S_FUNC_HI: begin
        rom_req_o  = 1'b1;
        rom_addr_o = entry_jbc + addr_t'(1);  // low byte
        state_d    = S_FUNC_LO;
      end
      S_FUNC_LO: begin
        pc_load_o  = 1'b1;                  // State3: jmp JBCFunct
        done_o     = 1'b1;
        state_d    = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      jpc_q     <= '0;
      jbc_q     <= '0;
      tbl_q     <= TABLE_RESET;
      func_hi_q <= '0;
    end else begin
      state_q <= state_d;
      if (tbl_we_i) tbl_q <= tbl_wdata_i;
      if (state_q == S_JBC) jbc_q <= rom_rdata_i;
      if (state_q == S_FUNC_HI) func_hi_q <= rom_rdata_i;
      if (state_q == S_FUNC_LO)  jpc_q <= jpc_q + addr_t'(1);  // State3: increment JPC
      else if (jpc_we_i)         jpc_q <= jpc_wdata_i;
    end
  end

  assign busy_o = (state_q != S_IDLE);
  assign jpc_o  = jpc_q;
  assign jbc_o  = jbc_q;
  assign tbl_o  = tbl_q;

  // A new command or a JPC load must not arrive while a fetch is under way.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    busy_o |-> !start_i && !jpc_we_i && !tbl_we_i);

endmodule
