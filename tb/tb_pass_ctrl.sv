// tb_pass_ctrl: runs the controller of one 2-D transform against simple
// models of its surroundings: a memory port that stalls at random, a row
// buffer that holds two rows and hands a row out over C/2 enabled clocks, and
// a transpose stage that drains C words after every eighth row. Checks every
// read address (rows of the source, in order, pass 0 from src and pass 1 from
// tmp with the dimensions swapped), every write address (column j of group
// g at dst + j*R/8 + g), that reads never run more than two rows ahead, and
// the single done pulse.
module tb_pass_ctrl;
  import dwt_pkg::*;

  localparam int MAX_N = 64;
  localparam int CW = $clog2(MAX_N) + 1;
  localparam int ROWS = 16, COLS = 24;
  localparam int SRC = 1000, TMP = 3000, DST = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, pass, line_taken = 1'b0, out_en, dv = 1'b0, group_done = 1'b0, dr;
  logic [CW-1:0] cur_cols, dcol = '0;
  logic [25:0] mem_adr;
  logic mem_rd, mem_wr, mem_ready = 1'b0;
  int checks = 0, failures = 0, n_done = 0;
  int rq[$], wq[$];

  pass_ctrl #(.MAX_N(MAX_N)) dut (
    .clk, .rst_n, .start, .n_rows(CW'(ROWS)), .n_cols(CW'(COLS)),
    .src_base(26'(SRC)), .tmp_base(26'(TMP)), .dst_base(26'(DST)),
    .pitch(CW'(COLS / 8)), .busy, .done, .pass, .cur_cols, .line_taken, .out_en, .dv, .dcol, .group_done, .dr,
    .mem_adr, .mem_rd, .mem_wr, .mem_ready
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory port: check addresses of accepted commands.
  int words_read = 0, rows_avail = 0, rows_taken = 0;
  always @(posedge clk) if (rst_n) begin
    if (mem_rd && mem_wr) begin failures++; $display("FAIL read and write together"); end
    if (mem_ready && mem_rd) begin
      checks++;
      if (rq.size() == 0 || rq[0] != int'(mem_adr)) begin
        failures++; $display("FAIL read adr %0d exp %0d", mem_adr, rq.size() ? rq[0] : -1);
      end
      if (rq.size()) void'(rq.pop_front());
      words_read++;
      if (words_read % (cur_cols / 8) == 0) rows_avail++;
      if (rows_avail > 2) begin failures++; $display("FAIL more than two rows ahead"); end
    end
    if (mem_ready && mem_wr) begin
      checks++;
      if (wq.size() == 0 || wq[0] != int'(mem_adr)) begin
        failures++; $display("FAIL write adr %0d exp %0d", mem_adr, wq.size() ? wq[0] : -1);
      end
      if (wq.size()) void'(wq.pop_front());
    end
    if (done) n_done++;
  end

  always @(negedge clk) mem_ready <= ($urandom_range(99) < 70);

  // Row buffer model: a row goes out over cur_cols/2 enabled clocks.
  initial begin
    int cnt;
    forever begin
      @(negedge clk);
      line_taken = 1'b0;
      if (rows_avail > 0 && out_en) begin
        cnt = 0;
        while (cnt < int'(cur_cols) / 2) begin
          if (out_en) cnt++;
          @(negedge clk);
        end
        line_taken = 1'b1;
        rows_avail--;
        rows_taken++;
      end
    end
  end

  // Transpose model: after each eighth row, drain cur_cols words.
  initial begin
    forever begin
      @(negedge clk);
      group_done = 1'b0;
      if (rows_taken == 8) begin
        rows_taken = 0;
        repeat (12) @(negedge clk);
        for (int j = 0; j < int'(cur_cols); j++) begin
          dv = 1'b1;
          dcol = CW'(j);
          @(posedge clk);
          while (!dr) @(posedge clk);
          @(negedge clk);
        end
        dv = 1'b0;
        group_done = 1'b1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 2; p++) begin
      int r_n, c_n, s, d;
      r_n = p ? COLS : ROWS;
      c_n = p ? ROWS : COLS;
      s = p ? TMP : SRC;
      d = p ? DST : TMP;
      for (int r = 0; r < r_n; r++)
        for (int w = 0; w < c_n / 8; w++) rq.push_back(s + r * (c_n / 8) + w);
      for (int g = 0; g < r_n / 8; g++)
        for (int j = 0; j < c_n; j++) wq.push_back(d + j * (r_n / 8) + g);
    end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (busy) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (rq.size() != 0 || wq.size() != 0) begin failures++; $display("FAIL %0d reads %0d writes missing", rq.size(), wq.size()); end
    checks++;
    if (n_done != 1) begin failures++; $display("FAIL done pulses %0d", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
