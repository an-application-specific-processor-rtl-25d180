// tb_macro_workload: macro execution workload at the default parameters.
//
// The program is a stream of dictionary macros whose definitions are three
// bytecodes long (the average macro length of the compressed applications),
// drawn from frequently executed bytecodes (sconst_n, sload_n, sstore_n,
// sadd), interleaved with plain bytecodes. It is run twice on the same memory
// image, each time from reset:
//   run 0  macro bytecodes use the dictionary hardware:
//          macro_jbc  = SET_DICTLOOKUP_TABLE, MOV A,JBC, PRECALL_MACRO
//          ret_macro  = REST_DICT_JBC
//   run 1  macro bytecodes are handled in software with only the JPC access
//          instructions: GET_JPC_IN_A, save JPC, read the look-up table entry
//          over the code bus, SET_JPC_FROM_A; ret_macro = SET_JPC_FROM_A of
//          the saved JPC
// Both runs must execute exactly the expanded bytecode stream, with two more
// dispatches per macro than the uncompressed program. The cycles spent inside
// the macro_jbc and ret_macro functions on extended instructions and code-bus
// reads are measured; for run 0 they must be 1 + 4 and 1 cycles (register
// instruction, PRECALL_MACRO with its three-cycle latency, REST_DICT_JBC).
// The 8051 instructions around them are not modelled and cost no time here.
module tb_macro_workload;
  import fdi_pkg::*;

  localparam addr_t JBC_TABLE = 16'h0100;  // reset value of the jump table base
  localparam addr_t FUNC_BASE = 16'h1000;
  localparam addr_t LUT       = 16'h3000;
  localparam addr_t DEFS      = 16'h3100;
  localparam addr_t PROG      = 16'h5000;
  localparam byte_t MACRO0    = 8'hC0;
  localparam int    N_MACROS  = 16;
  localparam int    MACRO_LEN = 3;
  localparam byte_t RET_MACRO = 8'hBA;
  localparam byte_t HALT      = 8'hFF;
  localparam int    N_ITEMS   = 200;
  localparam addr_t DICT_BASE = LUT - addr_t'(MACRO0) * 16'd2;

  byte_t ops [12] = '{8'h03, 8'h04, 8'h05, 8'h06, 8'h1C, 8'h1D, 8'h1E, 8'h2B, 8'h2C, 8'h2D,
                      8'h41, 8'h41};

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

  int checks = 0, failures = 0, cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d %s", cycles, what); end
  endtask

  byte_t img [addr_t];
  byte_t expected [$];
  byte_t executed [$];
  int    n_macro_items, n_plain_items;

  function automatic addr_t func_addr(input byte_t b);
    return FUNC_BASE + 16'(b) * 16'd16;
  endfunction

  task automatic build_image();
    addr_t a;
    byte_t defs [N_MACROS][MACRO_LEN];
    for (int b = 0; b < 256; b++) begin
      a = func_addr(byte_t'(b));
      img[JBC_TABLE + 16'(2 * b)]     = a[15:8];
      img[JBC_TABLE + 16'(2 * b + 1)] = a[7:0];
    end
    a = DEFS;
    for (int m = 0; m < N_MACROS; m++) begin
      img[LUT + 16'(2 * m)]     = a[15:8];
      img[LUT + 16'(2 * m + 1)] = a[7:0];
      for (int k = 0; k < MACRO_LEN; k++) begin
        defs[m][k] = ops[$urandom_range(0, 11)];
        img[a] = defs[m][k]; a++;
      end
      img[a] = RET_MACRO; a++;
    end
    a = PROG;
    n_macro_items = 0;
    n_plain_items = 0;
    for (int i = 0; i < N_ITEMS; i++) begin
      if (i % 4 != 3) begin
        int m = $urandom_range(0, N_MACROS - 1);
        img[a] = MACRO0 + byte_t'(m); a++;
        for (int k = 0; k < MACRO_LEN; k++) expected.push_back(defs[m][k]);
        n_macro_items++;
      end else begin
        img[a] = ops[$urandom_range(0, 11)];
        expected.push_back(img[a]); a++;
        n_plain_items++;
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
  addr_t pc;
  addr_t last_pc_load;
  int    n_dispatch;

  task automatic issue(input byte_t op, input addr_t opnd, output int lat, output addr_t r);
    bit loaded = 0;
    ext_valid = 1; ext_opcode = op; ext_opnd = opnd; core_pc = pc;
    r = '0;
    lat = 0;
    #1;
    while (!ext_done && lat < 20) begin
      @(negedge clk);
      ext_valid = 0;
      lat++;
      if (pc_load) begin loaded = 1; last_pc_load = pc_wdata; end
    end
    if (res_we) r = res;
    @(negedge clk);
    ext_valid = 0;
    pc = loaded ? last_pc_load : pc + 16'd2;
  endtask

  task automatic core_read(input addr_t a, output byte_t d);
    core_code_addr = a;
    @(negedge clk);
    d = code_rdata;
  endtask

  task automatic gotonext(output byte_t b);
    int lat;
    addr_t r;
    issue(OPC_GOTONEXTJBCFUNCT, '0, lat, r);
    check(lat == 3, "dispatch latency");
    n_dispatch++;
    b = byte_t'((pc - FUNC_BASE) >> 4);
  endtask

  // Runs the program; returns the cycles spent inside macro_jbc and ret_macro.
  task automatic run(input bit sw_dict, output int macro_cyc, output int ret_cyc,
                     output int n_macros);
    int    lat, t0;
    addr_t r, saved_jpc, ent;
    byte_t b, hi, lo;
    executed.delete();
    n_dispatch = 0;
    macro_cyc = 0; ret_cyc = 0; n_macros = 0;
    pc = 16'h0040;
    issue(OPC_SET_JPC_FROM_A, PROG, lat, r);
    gotonext(b);
    while (b != HALT && n_dispatch < 10000) begin
      t0 = cycles;
      if (b >= MACRO0 && b < MACRO0 + byte_t'(N_MACROS)) begin
        if (!sw_dict) begin
          issue(OPC_SET_DICTLOOKUP_TABLE, DICT_BASE, lat, r);
          issue(OPC_PRECALL_MACRO, {8'h00, jbc}, lat, r);
          check(lat == 3, "PRECALL_MACRO latency");
        end else begin
          issue(OPC_GET_JPC_IN_A, '0, lat, r);
          saved_jpc = r;
          ent = DICT_BASE + 16'(jbc) * 16'd2;
          core_read(ent, hi);
          core_read(ent + 16'd1, lo);
          issue(OPC_SET_JPC_FROM_A, {hi, lo}, lat, r);
        end
        macro_cyc += cycles - t0;
        n_macros++;
      end else if (b == RET_MACRO) begin
        if (!sw_dict) issue(OPC_REST_DICT_JBC, '0, lat, r);
        else          issue(OPC_SET_JPC_FROM_A, saved_jpc, lat, r);
        ret_cyc += cycles - t0;
      end else begin
        executed.push_back(b);
      end
      gotonext(b);
    end
  endtask

  initial begin
    int mc [2], rc [2], nm [2], nd [2];
    build_image();
    for (int mode = 0; mode < 2; mode++) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      if (mode == 0) load_image();
      run(mode[0], mc[mode], rc[mode], nm[mode]);
      nd[mode] = n_dispatch;
      check(executed == expected, $sformatf("run %0d executes the expanded stream", mode));
      check(nm[mode] == n_macro_items, $sformatf("run %0d macro count", mode));
      // uncompressed: one dispatch per bytecode plus the final HALT
      check(nd[mode] == expected.size() + 2 * n_macro_items + 1,
            $sformatf("run %0d: %0d dispatches", mode, nd[mode]));
    end
    check(mc[0] == 5 * nm[0] && rc[0] == 1 * nm[0], "dictionary hardware cycles per macro");
    $display("macros=%0d, macro length=%0d, bytecodes executed=%0d",
             nm[0], MACRO_LEN, expected.size());
    $display("dictionary hardware: macro_jbc %0d.%02d, ret_macro %0d.%02d extension cycles per macro",
             mc[0] / nm[0], (mc[0] % nm[0]) * 100 / nm[0], rc[0] / nm[0], (rc[0] % nm[0]) * 100 / nm[0]);
    $display("software dictionary: macro_jbc %0d.%02d, ret_macro %0d.%02d extension/bus cycles per macro",
             mc[1] / nm[1], (mc[1] % nm[1]) * 100 / nm[1], rc[1] / nm[1], (rc[1] % nm[1]) * 100 / nm[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
