// tb_jbc_fetch_decode: fetch/decode unit against a code memory model.
// The memory holds random bytes; for many random JPC and jump-table values the
// test issues GOTONEXTJBCFUNCT and checks the fetched bytecode, the function
// address loaded into the core PC (table entry, two bytes, MSB first), the
// JPC increment, the three-cycle latency from start to done, and that runs of
// dispatches without a JPC reload walk through consecutive bytecodes.
module tb_jbc_fetch_decode;
  import fdi_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  start = 0, jpc_we = 0, tbl_we = 0;
  addr_t jpc_wdata = '0, tbl_wdata = '0;
  logic  rom_req, pc_load, busy, done;
  addr_t rom_addr, pc_wdata, jpc, tbl;
  byte_t rom_rdata, jbc;
  byte_t mem [65536];
  int    checks = 0, failures = 0;

  jbc_fetch_decode dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .jpc_we_i(jpc_we), .jpc_wdata_i(jpc_wdata),
    .tbl_we_i(tbl_we), .tbl_wdata_i(tbl_wdata), .rom_req_o(rom_req), .rom_addr_o(rom_addr),
    .rom_rdata_i(rom_rdata), .pc_load_o(pc_load), .pc_wdata_o(pc_wdata), .busy_o(busy),
    .done_o(done), .jpc_o(jpc), .jbc_o(jbc), .tbl_o(tbl));

  always #5 clk = ~clk;
  always_ff @(posedge clk) rom_rdata <= mem[rom_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One GOTONEXTJBCFUNCT; compares with the value computed from the model.
  task automatic dispatch();
    addr_t j0, t0, ent, exp_func;
    byte_t exp_jbc;
    int    cyc;
    bit    loaded;
    j0       = jpc;
    t0       = tbl;
    exp_jbc  = mem[j0];
    ent      = t0 + 16'(exp_jbc) * 16'd2;
    exp_func = {mem[ent], mem[16'(ent + 16'd1)]};
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    loaded = 0;
    while (!done && cyc < 20) begin
      check(!pc_load, "pc_load before done");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 3, $sformatf("latency %0d, expected 3", cyc));
    check(pc_load && pc_wdata == exp_func,
          $sformatf("function address %04h, expected %04h", pc_wdata, exp_func));
    @(negedge clk);
    check(!busy, "busy after done");
    check(jbc == exp_jbc, $sformatf("JBC %02h, expected %02h", jbc, exp_jbc));
    check(jpc == 16'(j0 + 16'd1), $sformatf("JPC %04h, expected %04h", jpc, j0 + 16'd1));
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(jpc == 0 && tbl == 16'h0100 && !busy, "reset values");
    for (int n = 0; n < 200; n++) begin
      tbl_we = 1; tbl_wdata = 16'($urandom);
      jpc_we = 1; jpc_wdata = 16'($urandom);
      @(negedge clk);
      tbl_we = 0; jpc_we = 0;
      check(tbl == tbl_wdata && jpc == jpc_wdata, "register load");
      for (int k = 0; k < 5; k++) dispatch();
    end
    // table near the top of memory: entry addresses wrap around
    tbl_we = 1; tbl_wdata = 16'hFF80; jpc_we = 1; jpc_wdata = 16'h1234;
    mem[16'h1234] = 8'hFF;
    @(negedge clk);
    tbl_we = 0; jpc_we = 0;
    dispatch();
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
