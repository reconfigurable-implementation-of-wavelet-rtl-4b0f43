// tb_usb_dma: a load moves words from a modelled input FIFO (random data
// availability) into the memory model; an unload reads them back into a
// modelled output FIFO of four entries that drains slowly. Checks the
// written memory words and addresses, the unloaded words in order, that
// reads in flight never exceed the free room, and that busy ends.
module tb_usb_dma;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int WORDS = 40, BASE = 100;

  logic         start = 1'b0, dir = 1'b0, busy, in_valid = 1'b0, in_rd, out_wr;
  logic [25:0]  adr = '0, n_words = '0, mem_adr;
  logic [4:0]   out_space;
  logic         mem_rd, mem_wr, mem_ready, mem_rvalid;
  logic [127:0] mem_rdata, up[$], got[$];
  int checks = 0, failures = 0, fill = 0, n_wait = 0;

  usb_dma #(.DEPTH(16)) dut (.clk, .rst_n, .start, .dir, .adr, .n_words, .busy,
                             .in_valid, .in_rd, .out_space, .out_wr,
                             .mem_adr, .mem_rd, .mem_wr, .mem_ready, .mem_rvalid);

  ddr_user_model #(.WORDS(256), .LAT(4), .READY_PCT(70)) u_mem (
    .clk, .adr(mem_adr), .rd(mem_rd && rst_n), .wr(mem_wr && rst_n), .wdata(up.size() ? up[0] : '0),
    .ready(mem_ready), .rdata(mem_rdata), .rvalid(mem_rvalid)
  );

  // output FIFO model: four entries, drains one word every 6 clocks
  assign out_space = 5'(4 - fill);
  int tick = 0;
  always @(posedge clk) if (rst_n) begin
    tick++;
    if (out_wr) begin got.push_back(mem_rdata); fill++; end
    if (fill > 4) begin failures++; $display("FAIL output FIFO overflow"); end
    if (tick % 6 == 0 && fill > 0) fill--;
    if (busy && dir && !dut.room && dut.left != 0) n_wait++;
    if (in_rd) void'(up.pop_front());
    in_valid <= (up.size() > (in_rd ? 1 : 0)) && ($urandom_range(99) < 70);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ref_w[WORDS];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < WORDS; i++) begin ref_w[i] = {$urandom, $urandom, $urandom, $urandom}; up.push_back(ref_w[i]); end
    @(negedge clk) begin dir = 1'b0; adr = 26'(BASE); n_words = 26'(WORDS); start = 1'b1; end
    @(negedge clk) start = 1'b0;
    while (busy) @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (u_mem.mem[BASE + i] !== ref_w[i]) begin failures++; $display("FAIL load word %0d", i); end
    end
    @(negedge clk) begin dir = 1'b1; start = 1'b1; end
    @(negedge clk) start = 1'b0;
    while (busy) @(negedge clk);
    checks++;
    if (got.size() != WORDS) begin failures++; $display("FAIL unloaded %0d words", got.size()); end
    for (int i = 0; i < WORDS && i < got.size(); i++) begin
      checks++;
      if (got[i] !== ref_w[i]) begin failures++; $display("FAIL unload word %0d", i); end
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL unload never waited for room"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
