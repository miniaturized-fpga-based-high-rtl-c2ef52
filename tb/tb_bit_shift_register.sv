// tb_bit_shift_register: feeds random bits, sometimes back to back, and checks
// every word against a packing model here (first bit in bit 0), then checks
// the zero-padded flush of a partial word and that clear drops pending bits.
module tb_bit_shift_register;
  localparam int W = 16;
  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         clear = 1'b0;
  logic         bit_valid = 1'b0;
  logic         bit_in = 1'b0;
  logic         flush = 1'b0;
  logic         word_valid;
  logic [W-1:0] word;
  int checks = 0, failures = 0;
  logic [W-1:0] expq[$];
  logic [W-1:0] acc = '0;
  int           nacc = 0;

  bit_shift_register #(.W(W)) dut (.clk, .rst, .clear, .bit_valid, .bit_in, .flush, .word_valid, .word);

  always #10ns clk = ~clk;

  always @(posedge clk) if (word_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL: unexpected word %h", word);
    end else begin
      logic [W-1:0] e;
      e = expq.pop_front();
      if (word !== e) begin failures++; $display("FAIL: word %h expected %h", word, e); end
    end
  end

  task automatic send(input bit b);
    @(negedge clk) begin bit_valid = 1'b1; bit_in = b; end
    acc[nacc] = b;
    nacc++;
    if (nacc == W) begin expq.push_back(acc); acc = '0; nacc = 0; end
    @(negedge clk) bit_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    for (int i = 0; i < 200; i++) send(1'($urandom_range(0, 1)));
    // back-to-back bits
    for (int i = 0; i < 40; i++) begin
      bit b = 1'($urandom_range(0, 1));
      @(negedge clk) begin bit_valid = 1'b1; bit_in = b; end
      acc[nacc] = b; nacc++;
      if (nacc == W) begin expq.push_back(acc); acc = '0; nacc = 0; end
    end
    @(negedge clk) bit_valid = 1'b0;
    // flush the partial word (40 + 200 = 240 bits: 15 words, 0 left) -> add 5
    for (int i = 0; i < 5; i++) send(1'b1);
    expq.push_back(acc); acc = '0; nacc = 0;
    @(negedge clk) flush = 1'b1;
    @(negedge clk) flush = 1'b0;
    // flush with nothing pending: no word
    @(negedge clk) flush = 1'b1;
    @(negedge clk) flush = 1'b0;
    // clear drops pending bits
    for (int i = 0; i < 7; i++) send(1'b1);
    acc = '0; nacc = 0;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int i = 0; i < W; i++) send(i[0]);
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d words missing", expq.size()); end
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
