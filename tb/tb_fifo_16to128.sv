// tb_fifo_16to128: writes random 16-bit words on a slow clock with random
// pauses and reads 128-bit words on a fast clock with random pauses. Checks
// that each 128-bit word holds the next eight 16-bit words, first in bits
// 15:0, and that the writer was held off by a full FIFO at least once.
module tb_fifo_16to128;
  logic clk = 1'b0, if_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #21 if_clk = ~if_clk;

  logic         in_wr = 1'b0, in_ready, out_rd, out_valid;
  logic [15:0]  in_data = '0;
  logic [127:0] out_data;
  logic [15:0]  sent[$];
  int checks = 0, failures = 0, n_hold = 0, n_words = 0;
  bit slow = 1'b1;

  fifo_16to128 #(.DEPTH(4)) dut (.if_clk, .if_rst_n(rst_n), .in_wr, .in_data, .in_ready,
                                 .clk, .rst_n, .out_rd, .out_data, .out_valid);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader: idle for the first 3000 clocks so the FIFO fills
  assign out_rd = out_valid && !slow && ($urandom_range(99) < 50);
  always @(posedge clk) if (rst_n && out_rd) begin
    for (int j = 0; j < 8; j++) begin
      checks++;
      if (sent.size() == 0 || out_data[16*j +: 16] !== sent[0]) begin
        failures++; $display("FAIL word %0d lane %0d", n_words, j);
      end
      if (sent.size()) void'(sent.pop_front());
    end
    n_words++;
  end
  always @(posedge if_clk) if (rst_n && in_wr && !in_ready) n_hold++;

  initial begin
    repeat (3000) @(posedge clk);
    slow = 1'b0;
  end

  initial begin
    repeat (3) @(posedge if_clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8 * 60; i++) begin
      @(negedge if_clk);
      while ($urandom_range(99) < 20) @(negedge if_clk);
      in_wr = 1'b1;
      in_data = 16'($urandom);
      @(posedge if_clk);
      while (!in_ready) @(posedge if_clk);
      sent.push_back(in_data);
      @(negedge if_clk) in_wr = 1'b0;
    end
    repeat (100) @(posedge clk);
    checks++;
    if (n_words != 60 || sent.size() != 0) begin failures++; $display("FAIL %0d words read", n_words); end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL writer never held off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
