// tb_code_rom: code memory. Writes a pseudo-random image over a reduced
// address space, reads it back in a different order and checks the one-cycle
// read latency (the data of an address is on the output exactly one clock
// after the address) against a shadow array.
module tb_code_rom;
  localparam int unsigned AW = 10;
  localparam int unsigned N  = 2 ** AW;

  logic          clk = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [7:0]    rd_data, wr_data;
  logic          wr_en;
  logic [7:0]    shadow [N];
  int            checks = 0, failures = 0;

  code_rom #(.ADDR_W(AW), .DATA_W(8)) dut (
    .clk(clk), .rd_addr_i(rd_addr), .rd_data_o(rd_data),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data));

  always #5 clk = ~clk;

  initial begin
    wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      wr_en = 1; wr_addr = AW'(i); wr_data = 8'($urandom);
      shadow[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    // read back with a stride that visits every address
    for (int i = 0; i < N; i++) begin
      rd_addr = AW'(i * 37 + 5);
      @(negedge clk);
      checks++;
      if (rd_data !== shadow[rd_addr]) begin
        failures++;
        $display("FAIL addr=%0h got=%02h exp=%02h", rd_addr, rd_data, shadow[rd_addr]);
      end
    end
    // overwrite one location and read it in the next cycle
    wr_en = 1; wr_addr = AW'(3); wr_data = ~shadow[3]; shadow[3] = wr_data;
    @(negedge clk);
    wr_en = 0; rd_addr = AW'(3);
    @(negedge clk);
    checks++;
    if (rd_data !== shadow[3]) begin failures++; $display("FAIL rewrite"); end
    // latency: the output must not follow a new address before the clock
    rd_addr = AW'(4);
    #1;
    checks++;
    if (rd_data !== shadow[3]) begin failures++; $display("FAIL read is not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
