// ext_decoder: decoder for the interpreter's extended machine instructions.
//
// The core recognises an extended instruction by its prefix and hands the
// second opcode byte to this decoder together with a one-cycle strobe. The
// decoder maps it onto one of the commands of the two extension units and
// flags a byte that names no extended instruction, so that the core can treat
// it as a no-operation. Purely combinational: the command is valid in the same
// cycle as the strobe.
//
// The set of instructions is the design's; the byte values (see fdi_pkg) and
// the illegal flag are this implementation's choices.
module ext_decoder
  import fdi_pkg::*;
(
  input  logic     valid_i,   // core issues an extended instruction this cycle
  input  byte_t    opcode_i,  // second byte of the instruction
  output ext_cmd_e cmd_o,     // decoded command, CMD_NONE when not valid
  output logic     illegal_o  // valid_i with an unknown opcode
);

  always_comb begin
    cmd_o     = CMD_NONE;
    illegal_o = 1'b0;
    if (valid_i) begin
      unique case (opcode_i)
        OPC_GET_JPC_IN_A:         cmd_o = CMD_GET_JPC;
        OPC_SET_JPC_FROM_A:       cmd_o = CMD_SET_JPC;
        OPC_GOTONEXTJBCFUNCT:     cmd_o = CMD_GOTONEXT;
        OPC_SET_JBC_TABLE:        cmd_o = CMD_SET_JBC_TABLE;
        OPC_SET_DICTLOOKUP_TABLE: cmd_o = CMD_SET_DICT_TABLE;
        OPC_PRECALL_MACRO:        cmd_o = CMD_PRECALL;
        OPC_REST_DICT_JBC:        cmd_o = CMD_REST_DICT;
        default:                  illegal_o = 1'b1;
      endcase
    end
  end

endmodule
