// tb_memory_controller: writes words through the controller into an SRAM
// model, reads them back through the controller, and checks contents, the
// write-pulse width, writes arriving during reads, the word counter and the
// full flag on a small (16-word) memory.
module tb_memory_controller;
  localparam int AW = 4;
  localparam int DW = 16;
  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          clear = 1'b0;
  logic          wr_valid = 1'b0;
  logic [DW-1:0] wr_data = '0;
  logic [AW:0]   wr_count;
  logic          full;
  logic          rd_req = 1'b0;
  logic [AW-1:0] rd_addr = '0;
  logic          rd_done;
  logic [DW-1:0] rd_data;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_dq_o, sram_dq_i;
  logic          sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int            violations, writes;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [1 << AW];

  memory_controller #(.AW(AW), .DW(DW)) dut (
    .clk, .rst, .clear, .wr_valid, .wr_data, .wr_count, .full,
    .rd_req, .rd_addr, .rd_done, .rd_data,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n);

  sram_model #(.AW(AW), .DW(DW), .MIN_WE_PS(30000)) u_sram (
    .addr(sram_addr), .dq_in(sram_dq_o), .dq_out(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .violations, .writes);

  always #10ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [DW-1:0] d);
    @(negedge clk) begin wr_valid = 1'b1; wr_data = d; end
    @(negedge clk) wr_valid = 1'b0;
  endtask

  task automatic get(input int a, output logic [DW-1:0] d);
    int n;
    @(negedge clk) begin rd_req = 1'b1; rd_addr = AW'(a); end
    @(negedge clk) rd_req = 1'b0;
    n = 0;
    while (!rd_done && n < 50) begin @(negedge clk); n++; end
    check(n < 50, "read completes");
    d = rd_data;
  endtask

  initial begin
    logic [DW-1:0] d;
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    // 10 words, spaced
    for (int i = 0; i < 10; i++) begin
      ref_mem[i] = DW'($urandom);
      put(ref_mem[i]);
      repeat (6) @(negedge clk);
    end
    check(wr_count == 5'd10, $sformatf("word count %0d", wr_count));
    for (int i = 0; i < 10; i++) begin
      get(i, d);
      check(d == ref_mem[i], $sformatf("word %0d read %h expected %h", i, d, ref_mem[i]));
    end
    // a write arriving while a read runs
    fork
      get(3, d);
      begin @(negedge clk); ref_mem[10] = 16'hBEEF; put(16'hBEEF); end
    join
    check(d == ref_mem[3], "read during write arrival");
    repeat (8) @(negedge clk);
    get(10, d);
    check(d == 16'hBEEF, "write held during read");
    // fill: 16 words total, the rest dropped
    for (int i = 11; i < 20; i++) begin
      put(DW'(i));
      if (i < 16) ref_mem[i] = DW'(i);
      repeat (6) @(negedge clk);
    end
    check(full, "full flag");
    check(wr_count == 5'd16, $sformatf("word count at full %0d", wr_count));
    check(writes == 16, $sformatf("SRAM saw %0d writes", writes));
    for (int i = 0; i < 16; i++) begin
      check(u_sram.mem[i] == ref_mem[i], $sformatf("SRAM word %0d", i));
    end
    check(violations == 0, $sformatf("%0d SRAM timing violations", violations));
    // clear restarts at address 0
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(!full && wr_count == 0, "clear");
    put(16'h1234);
    repeat (6) @(negedge clk);
    check(u_sram.mem[0] == 16'h1234, "write after clear at address 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
