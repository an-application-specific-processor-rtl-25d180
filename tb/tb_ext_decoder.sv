// tb_ext_decoder: exhaustive check of the extended-instruction decoder.
// Every opcode byte is applied with and without the strobe and the decoded
// command and illegal flag are compared with a reference table written out
// here independently of the package's enumeration.
module tb_ext_decoder;
  import fdi_pkg::*;

  logic     valid;
  byte_t    opcode;
  ext_cmd_e cmd;
  logic     illegal;
  int       checks = 0, failures = 0;

  ext_decoder dut (.valid_i(valid), .opcode_i(opcode), .cmd_o(cmd), .illegal_o(illegal));

  function automatic ext_cmd_e ref_cmd(input logic v, input int op);
    if (!v) return CMD_NONE;
    case (op)
      1: return CMD_GET_JPC;
      2: return CMD_SET_JPC;
      3: return CMD_GOTONEXT;
      4: return CMD_SET_JBC_TABLE;
      5: return CMD_SET_DICT_TABLE;
      6: return CMD_PRECALL;
      7: return CMD_REST_DICT;
      default: return CMD_NONE;
    endcase
  endfunction

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int op = 0; op < 256; op++) begin
        valid  = v[0];
        opcode = byte_t'(op);
        #1;
        checks++;
        if (cmd !== ref_cmd(v[0], op) ||
            illegal !== (v[0] && (op < 1 || op > 7))) begin
          failures++;
          $display("FAIL valid=%0d op=%02h cmd=%0d illegal=%0d", v, op, cmd, illegal);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
