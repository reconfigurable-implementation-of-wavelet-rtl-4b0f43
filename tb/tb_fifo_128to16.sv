// tb_fifo_128to16: writes random 128-bit words on the fast clock whenever
// space allows (and at random), reads 16-bit words on a slow clock with
// random pauses. Checks the order (bits 15:0 of each word first), that space
// reaches zero at least once, and that space never lets a word be lost.
module tb_fifo_128to16;
  logic clk = 1'b0, if_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  always #21 if_clk = ~if_clk;

  logic         in_wr = 1'b0, out_rd = 1'b0, out_valid;
  logic [127:0] in_data = '0;
  logic [15:0]  out_data;
  logic [2:0]   space;
  logic [15:0]  sent[$];
  int checks = 0, failures = 0, n_nospace = 0, n_read = 0;

  fifo_128to16 #(.DEPTH(4)) dut (.clk, .rst_n, .in_wr, .in_data, .space,
                                 .if_clk, .if_rst_n(rst_n), .out_rd, .out_data, .out_valid);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && space == 0) n_nospace++;

  initial begin
    repeat (3) @(posedge if_clk);
    rst_n = 1'b1;
    for (int w = 0; w < 50; w++) begin
      @(negedge clk);
      while (space == 0 || $urandom_range(99) < 30) @(negedge clk);
      in_wr = 1'b1;
      for (int j = 0; j < 8; j++) begin
        in_data[16*j +: 16] = 16'($urandom);
        sent.push_back(in_data[16*j +: 16]);
      end
      @(negedge clk) in_wr = 1'b0;
    end
  end

  initial begin
    @(posedge rst_n);
    while (n_read < 400) begin
      @(negedge if_clk);
      out_rd = 1'b0;
      if (out_valid && $urandom_range(99) < 70) begin
        checks++;
        if (sent.size() == 0 || out_data !== sent[0]) begin failures++; $display("FAIL item %0d", n_read); end
        if (sent.size()) void'(sent.pop_front());
        out_rd = 1'b1;
        n_read++;
      end
    end
    @(negedge if_clk) out_rd = 1'b0;
    checks++;
    if (n_nospace == 0) begin failures++; $display("FAIL space never ran out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
