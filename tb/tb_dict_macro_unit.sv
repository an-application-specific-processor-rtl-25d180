// tb_dict_macro_unit: PRECALL_MACRO and REST_DICT_JBC against a memory model.
// For random look-up table bases, macro values, core PCs and JPCs the test
// checks the three steps of PRECALL_MACRO: the save of PC and JPC, the core PC
// loaded with MACRO_TABLE + 2 * macro_value one cycle after the command, the
// JPC loaded with the two-byte table entry (MSB first) and the PC restored
// three cycles after the command. It then moves JPC as the macro body would
// and checks that REST_DICT_JBC gives back the saved JPC in the same cycle.
module tb_dict_macro_unit;
  import fdi_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  set_table = 0, precall = 0, rest = 0;
  addr_t table_wdata = '0, core_pc = '0, jpc = '0;
  byte_t macro_value = '0;
  logic  pc_load, jpc_we, rom_req, busy, done;
  addr_t pc_wdata, jpc_wdata, rom_addr, macro_table, jpc_ret, pc_ret;
  byte_t rom_rdata;
  byte_t mem [65536];
  int    checks = 0, failures = 0;
  int    n_precall = 0, n_rest = 0;

  dict_macro_unit dut (
    .clk(clk), .rst_n(rst_n), .set_table_i(set_table), .table_wdata_i(table_wdata),
    .precall_i(precall), .macro_value_i(macro_value), .rest_i(rest),
    .core_pc_i(core_pc), .jpc_i(jpc), .pc_load_o(pc_load), .pc_wdata_o(pc_wdata),
    .jpc_we_o(jpc_we), .jpc_wdata_o(jpc_wdata), .rom_req_o(rom_req), .rom_addr_o(rom_addr),
    .rom_rdata_i(rom_rdata), .busy_o(busy), .done_o(done), .macro_table_o(macro_table),
    .jpc_ret_o(jpc_ret), .pc_ret_o(pc_ret));

  always #5 clk = ~clk;
  always_ff @(posedge clk) rom_rdata <= mem[rom_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_macro();
    addr_t t, p, j, ent, exp_def;
    byte_t mv;
    int    cyc;
    t  = 16'($urandom);
    p  = 16'($urandom);
    j  = 16'($urandom);
    mv = 8'($urandom);
    ent     = t + 16'(mv) * 16'd2;
    exp_def = {mem[ent], mem[16'(ent + 16'd1)]};
    // SET_DICTLOOKUP_TABLE
    set_table = 1; table_wdata = t;
    @(negedge clk);
    set_table = 0;
    check(macro_table == t, "MACRO_TABLE load");
    // PRECALL_MACRO
    core_pc = p; jpc = j; macro_value = mv; precall = 1;
    check(!jpc_we && !pc_load, "no side effect in the command cycle");
    @(negedge clk);
    precall = 0; macro_value = 8'($urandom); core_pc = 16'($urandom);
    check(busy, "busy after PRECALL_MACRO");
    check(pc_ret == p && jpc_ret == j, "step 1: PC_RET/JPC_RET saved");
    check(pc_load && pc_wdata == ent && !done,
          $sformatf("step 2: PC %04h, expected %04h", pc_wdata, ent));
    cyc = 1;
    @(negedge clk);
    cyc++;
    while (!done && cyc < 20) begin
      check(!jpc_we, "JPC written early");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 3, $sformatf("PRECALL_MACRO latency %0d, expected 3", cyc));
    check(jpc_we && jpc_wdata == exp_def,
          $sformatf("step 3: JPC %04h, expected %04h", jpc_wdata, exp_def));
    check(pc_load && pc_wdata == p, $sformatf("step 3: PC %04h, expected %04h", pc_wdata, p));
    n_precall++;
    jpc = jpc_wdata;
    @(negedge clk);
    check(!busy, "busy after done");
    // macro body advances JPC
    repeat ($urandom_range(1, 6)) begin
      jpc = jpc + 16'd1;
      @(negedge clk);
    end
    // REST_DICT_JBC
    rest = 1;
    #1;
    check(jpc_we && jpc_wdata == j && !busy,
          $sformatf("REST_DICT_JBC JPC %04h, expected %04h", jpc_wdata, j));
    n_rest++;
    @(negedge clk);
    rest = 0;
    jpc = j;
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && macro_table == 0 && jpc_ret == 0 && pc_ret == 0, "reset values");
    repeat (300) one_macro();
    check(n_precall == 300 && n_rest == 300, "all macros ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
