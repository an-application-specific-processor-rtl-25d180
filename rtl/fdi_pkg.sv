// fdi_pkg: types and constants shared by the Java Card interpreter extension.
//
// The extension adds a handful of machine instructions to an 8051 core. The
// instruction names (GET_JPC_IN_A, SET_JPC_FROM_A, GOTONEXTJBCFUNCT,
// SET_DICTLOOKUP_TABLE, PRECALL_MACRO, REST_DICT_JBC) follow the design; their
// byte encodings and the SET_JBC_TABLE instruction (which loads the base of the
// bytecode jump table) are choices of this implementation. Code addresses are
// 16 bits wide as on the 8051; addresses stored in ROM tables take two bytes,
// most significant byte first.
package fdi_pkg;

  localparam int unsigned ADDR_W      = 16;  // 8051 code address width
  localparam int unsigned DATA_W      = 8;   // code memory byte
  localparam int unsigned ENTRY_BYTES = 2;   // bytes per address in a ROM table

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] byte_t;

  // Second byte of an extended instruction (the first is the 8051's spare
  // opcode 0xA5, recognised by the core).
  typedef enum logic [7:0] {
    OPC_GET_JPC_IN_A        = 8'h01,
    OPC_SET_JPC_FROM_A      = 8'h02,
    OPC_GOTONEXTJBCFUNCT    = 8'h03,
    OPC_SET_JBC_TABLE       = 8'h04,
    OPC_SET_DICTLOOKUP_TABLE= 8'h05,
    OPC_PRECALL_MACRO       = 8'h06,
    OPC_REST_DICT_JBC       = 8'h07
  } ext_opcode_e;

  // Decoded command.
  typedef enum logic [2:0] {
    CMD_NONE,
    CMD_GET_JPC,
    CMD_SET_JPC,
    CMD_GOTONEXT,
    CMD_SET_JBC_TABLE,
    CMD_SET_DICT_TABLE,
    CMD_PRECALL,
    CMD_REST_DICT
  } ext_cmd_e;

endpackage
