// code_rom: code memory of the processor.
//
// One byte-wide memory holds everything the interpreter executes or reads:
// the 8051 interpreter code, the bytecode jump table, the dictionary (look-up
// table of macro addresses and the macro definitions) and the bytecode of the
// applications. Reads are synchronous: the byte at rd_addr_i appears on
// rd_data_o one clock later. The write port stands in for the programming of
// the non-volatile memory and is used only to load a memory image; it is not
// reachable from software.
//
// The design only names this memory. Its 64 KiB size is the full 8051 code
// space, and the synchronous read and the load port are this implementation's
// choices. The contents are not reset.
module code_rom #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] rd_addr_i,
  output logic [DATA_W-1:0] rd_data_o,
  input  logic              wr_en_i,
  input  logic [ADDR_W-1:0] wr_addr_i,
  input  logic [DATA_W-1:0] wr_data_i
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    rd_data_o <= mem[rd_addr_i];
  end

endmodule
