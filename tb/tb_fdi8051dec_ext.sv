// tb_fdi8051dec_ext: end-to-end run of a dictionary-compressed bytecode
// program on the interpreter extension, at the default parameters.
//
// The 8051 core is replaced by a behavioural model of the interpreter
// software: at the address the extension jumps to it identifies the bytecode
// function and runs its instruction sequence through the extended
// instructions, as the interpreter would:
//   plain bytecode    GOTONEXTJBCFUNCT
//   bspush (operand)  GET_JPC_IN_A, read operand, SET_JPC_FROM_A (JPC+1),
//                     GOTONEXTJBCFUNCT
//   macro             SET_DICTLOOKUP_TABLE, MOV A,JBC, PRECALL_MACRO,
//                     GOTONEXTJBCFUNCT
//   ret_macro         REST_DICT_JBC, GOTONEXTJBCFUNCT
//   halt              end of program
// The memory image (jump table, function entry signatures, dictionary look-up
// table and macro definitions, compressed program) is generated here from a
// random seed. The bytecodes the model executes, with their operands, must
// equal the program expanded independently in the testbench. Each extended
// instruction's latency is checked (0 extra cycles for register instructions,
// 3 for GOTONEXTJBCFUNCT and PRECALL_MACRO), as are the temporary core PC at
// the look-up table and its restore during PRECALL_MACRO. Every mechanism
// (dispatch, macro call, macro return, table loads, JPC read and write, core
// stall, core fetch over the shared code bus, unknown opcode) is counted and
// must occur.
module tb_fdi8051dec_ext;
  import fdi_pkg::*;

  // memory map of the test image
  localparam addr_t JBC_TABLE = 16'h0200;
  localparam addr_t FUNC_BASE = 16'h1000;  // function of bytecode b at FUNC_BASE + 16*b
  localparam addr_t LUT       = 16'h3000;  // dictionary look-up table
  localparam addr_t DEFS      = 16'h3100;  // macro definitions
  localparam addr_t PROG      = 16'h4000;  // compressed program
  localparam byte_t MACRO0    = 8'hC0;     // macro bytecodes MACRO0 .. MACRO0+N_MACROS-1
  localparam int    N_MACROS  = 8;
  localparam byte_t RET_MACRO = 8'hBA;
  localparam byte_t BSPUSH    = 8'h10;
  localparam byte_t HALT      = 8'hFF;
  localparam int    PROG_LEN  = 300;       // program items (bytecodes or macros)
  localparam addr_t DICT_BASE = LUT - addr_t'(MACRO0) * 16'd2;

  byte_t plain_ops [10] = '{8'h03, 8'h04, 8'h05, 8'h1C, 8'h1D, 8'h2B, 8'h2C, 8'h41, 8'h60, 8'h6D};

  logic  clk = 0, rst_n = 0;
  logic  ext_valid = 0;
  byte_t ext_opcode = '0;
  addr_t ext_opnd = '0, core_pc = '0, core_code_addr = '0;
  logic  ext_done, ext_illegal, ext_busy, res_we, pc_load;
  addr_t res, pc_wdata, jpc, jbc_table, macro_table, jpc_ret, pc_ret;
  byte_t jbc, code_rdata;
  logic  rom_we = 0;
  addr_t rom_waddr = '0;
  byte_t rom_wdata = '0;

  fdi8051dec_ext dut (
    .clk(clk), .rst_n(rst_n),
    .ext_valid_i(ext_valid), .ext_opcode_i(ext_opcode), .ext_opnd_i(ext_opnd),
    .core_pc_i(core_pc), .ext_done_o(ext_done), .ext_illegal_o(ext_illegal),
    .ext_busy_o(ext_busy), .res_we_o(res_we), .res_o(res), .pc_load_o(pc_load),
    .pc_wdata_o(pc_wdata), .jbc_o(jbc), .jpc_o(jpc), .jbc_table_o(jbc_table),
    .macro_table_o(macro_table), .jpc_ret_o(jpc_ret), .pc_ret_o(pc_ret),
    .core_code_addr_i(core_code_addr), .code_rdata_o(code_rdata),
    .rom_we_i(rom_we), .rom_waddr_i(rom_waddr), .rom_wdata_i(rom_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dispatch = 0, n_precall = 0, n_rest = 0, n_set_dict = 0, n_set_jbc = 0;
  int n_get_jpc = 0, n_set_jpc = 0, n_stall = 0, n_core_fetch = 0, n_illegal = 0;
  int n_operand = 0, cycles = 0;

  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d %s", cycles, what); end
  endtask

  // ---------------------------------------------------------------- image
  byte_t  img   [addr_t];        // sparse memory image
  byte_t  defs  [N_MACROS][$];   // macro definitions (without ret_macro)
  byte_t  expected [$];          // expanded bytecode stream with operands
  byte_t  executed [$];

  function automatic byte_t sig(input byte_t b);
    return b ^ 8'h5A;            // first byte of each bytecode function
  endfunction

  function automatic addr_t func_addr(input byte_t b);
    return FUNC_BASE + 16'(b) * 16'd16;
  endfunction

  // one random plain bytecode (with operand for bspush) appended to q
  function automatic void rand_plain(ref byte_t q [$]);
    if ($urandom_range(0, 3) == 0) begin
      q.push_back(BSPUSH);
      q.push_back(8'($urandom));
    end else begin
      q.push_back(plain_ops[$urandom_range(0, 9)]);
    end
  endfunction

  task automatic build_image();
    addr_t a;
    byte_t body [$];
    // bytecode jump table and function signatures
    for (int b = 0; b < 256; b++) begin
      a = func_addr(byte_t'(b));
      img[JBC_TABLE + 16'(2 * b)]     = a[15:8];
      img[JBC_TABLE + 16'(2 * b + 1)] = a[7:0];
      img[a] = sig(byte_t'(b));
    end
    // dictionary
    a = DEFS;
    for (int m = 0; m < N_MACROS; m++) begin
      img[LUT + 16'(2 * m)]     = a[15:8];
      img[LUT + 16'(2 * m + 1)] = a[7:0];
      body.delete();
      repeat ($urandom_range(1, 5)) rand_plain(body);
      defs[m] = body;
      foreach (body[i]) begin img[a] = body[i]; a++; end
      img[a] = RET_MACRO; a++;
    end
    // compressed program and its expansion
    a = PROG;
    for (int i = 0; i < PROG_LEN; i++) begin
      if ($urandom_range(0, 2) == 0) begin
        int m = $urandom_range(0, N_MACROS - 1);
        img[a] = MACRO0 + byte_t'(m); a++;
        foreach (defs[m][k]) expected.push_back(defs[m][k]);
      end else begin
        body.delete();
        rand_plain(body);
        foreach (body[k]) begin img[a] = body[k]; a++; expected.push_back(body[k]); end
      end
    end
    img[a] = HALT;
  endtask

  task automatic load_image();
    foreach (img[a]) begin
      rom_we = 1; rom_waddr = a; rom_wdata = img[a];
      @(negedge clk);
    end
    rom_we = 0;
  endtask

  // ----------------------------------------------------------- core model
  addr_t pc;            // core program counter
  addr_t pc_loads [$];  // PC values loaded by the last instruction

  // Issue one extended instruction at a negedge; returns at the negedge after
  // it completed, with its extra latency in cycles.
  task automatic issue(input byte_t op, input addr_t opnd, output int lat, output addr_t r);
    pc_loads.delete();
    check(!ext_busy, "issue while busy");
    ext_valid = 1; ext_opcode = op; ext_opnd = opnd; core_pc = pc;
    r = '0;
    lat = 0;
    #1;
    while (!ext_done && lat < 20) begin
      if (lat == 0) begin
        @(negedge clk);
        ext_valid = 0;
      end else begin
        @(negedge clk);
      end
      lat++;
      if (ext_busy || ext_done) n_stall++;
      if (pc_load) pc_loads.push_back(pc_wdata);
    end
    if (lat == 0 && pc_load) pc_loads.push_back(pc_wdata);
    if (res_we) r = res;
    if (ext_illegal) n_illegal++;
    @(negedge clk);
    ext_valid = 0;
    if (pc_loads.size() > 0) pc = pc_loads[$];
    else pc = pc + 16'd2;  // two-byte extended instruction
  endtask

  // core instruction fetch over the shared code bus
  task automatic core_read(input addr_t a, output byte_t d);
    core_code_addr = a;
    @(negedge clk);
    d = code_rdata;
    n_core_fetch++;
  endtask

  task automatic gotonext(output byte_t b);
    int    lat;
    addr_t r;
    byte_t s;
    addr_t exp_jpc;
    exp_jpc = jpc + 16'd1;
    issue(OPC_GOTONEXTJBCFUNCT, '0, lat, r);
    n_dispatch++;
    check(lat == 3, $sformatf("GOTONEXTJBCFUNCT latency %0d", lat));
    check(pc_loads.size() == 1, "GOTONEXTJBCFUNCT loads PC once");
    check(jpc == exp_jpc, "JPC incremented by dispatch");
    b = byte_t'((pc - FUNC_BASE) >> 4);
    check(pc == func_addr(b), $sformatf("jump to %04h is no function entry", pc));
    check(jbc == b, "JBC register matches the function reached");
    core_read(pc, s);
    check(s == sig(b), $sformatf("function signature at %04h", pc));
  endtask

  task automatic run_program();
    int    lat, steps;
    addr_t r, entry, saved_jpc, saved_pc;
    byte_t b, opnd;
    // boot: jump table base, JPC to the program, first dispatch
    pc = 16'h0040;
    issue(OPC_SET_JBC_TABLE, JBC_TABLE, lat, r);
    n_set_jbc++;
    check(lat == 0 && jbc_table == JBC_TABLE, "SET_JBC_TABLE");
    issue(OPC_SET_JPC_FROM_A, PROG, lat, r);
    n_set_jpc++;
    check(lat == 0 && jpc == PROG, "SET_JPC_FROM_A");
    issue(8'hEE, '0, lat, r);
    check(lat == 0 && n_illegal == 1 && jpc == PROG, "unknown opcode is a no-operation");
    gotonext(b);
    steps = 0;
    while (b != HALT && steps < 10000) begin
      steps++;
      pc = pc + 16'd1;                         // past the signature byte
      if (b >= MACRO0 && b < MACRO0 + byte_t'(N_MACROS)) begin
        // macro_jbc: MOV A,#LOOKUP_TABLE; SET_DICTLOOKUP_TABLE; MOV A,JBC; PRECALL_MACRO
        issue(OPC_SET_DICTLOOKUP_TABLE, DICT_BASE, lat, r);
        n_set_dict++;
        check(lat == 0 && macro_table == DICT_BASE, "SET_DICTLOOKUP_TABLE");
        saved_jpc = jpc;
        saved_pc  = pc;
        entry     = LUT + 16'(b - MACRO0) * 16'd2;
        issue(OPC_PRECALL_MACRO, {8'h00, jbc}, lat, r);
        n_precall++;
        check(lat == 3, $sformatf("PRECALL_MACRO latency %0d", lat));
        check(pc_loads.size() == 2 && pc_loads[0] == entry,
              "PRECALL_MACRO points PC at the look-up table entry");
        check(pc == saved_pc, "PRECALL_MACRO restores PC");
        check(jpc_ret == saved_jpc && pc_ret == saved_pc, "return registers");
        check(jpc == {img[entry], img[entry + 16'd1]}, "JPC at macro definition");
      end else if (b == RET_MACRO) begin
        issue(OPC_REST_DICT_JBC, '0, lat, r);
        n_rest++;
        check(lat == 0 && jpc == jpc_ret, "REST_DICT_JBC");
      end else if (b == BSPUSH) begin
        issue(OPC_GET_JPC_IN_A, '0, lat, r);
        n_get_jpc++;
        check(lat == 0 && r == jpc, "GET_JPC_IN_A");
        core_read(r, opnd);
        issue(OPC_SET_JPC_FROM_A, r + 16'd1, lat, r);
        n_set_jpc++;
        executed.push_back(b);
        executed.push_back(opnd);
        n_operand++;
      end else begin
        executed.push_back(b);
      end
      gotonext(b);
    end
  endtask

  initial begin
    build_image();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(jbc_table == 16'h0100 && jpc == 0 && !ext_busy, "reset values");
    load_image();
    run_program();
    check(executed.size() == expected.size(),
          $sformatf("executed %0d bytes, expected %0d", executed.size(), expected.size()));
    foreach (expected[i])
      if (i < executed.size()) check(executed[i] == expected[i], $sformatf("stream byte %0d", i));
    check(n_dispatch > 0, "dispatch happened");
    check(n_precall > 0,  "macro call happened");
    check(n_rest > 0,     "macro return happened");
    check(n_set_dict > 0, "dictionary table load happened");
    check(n_set_jbc > 0,  "jump table load happened");
    check(n_get_jpc > 0,  "JPC read happened");
    check(n_set_jpc > 0,  "JPC write happened");
    check(n_stall > 0,    "core stall happened");
    check(n_core_fetch > 0, "core fetch happened");
    check(n_illegal > 0,  "unknown opcode happened");
    check(n_operand > 0,  "bytecode operand happened");
    $display("dispatch=%0d precall=%0d rest=%0d set_dict=%0d set_jbc=%0d get_jpc=%0d set_jpc=%0d",
             n_dispatch, n_precall, n_rest, n_set_dict, n_set_jbc, n_get_jpc, n_set_jpc);
    $display("stall_cycles=%0d core_fetch=%0d illegal=%0d operands=%0d bytecodes=%0d cycles=%0d",
             n_stall, n_core_fetch, n_illegal, n_operand, expected.size(), cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
