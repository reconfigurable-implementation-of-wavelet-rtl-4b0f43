// tb_dwt2d_full: end-to-end test of the 2-D engine against a memory model.
//
// A random 8-bit image is placed in memory and transformed with a 2-D DWT;
// the result is compared word for word with the reference model (rows, then
// columns, lows before highs). The engine's own coefficients are then run
// through a 2-D IDWT, compared with the reference inverse, and the
// reconstruction is checked to be within a few counts of the original.
// Mechanisms counted, each of which must occur: both modes, the switch from
// pass 0 to pass 1, group drains, the issue gate closing while a group
// drains, fetches held back because both row buffers are taken, a write and
// a read wanting the memory port in the same clock, and memory stalls.
module tb_dwt2d_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int ROWS  = 1000;
  localparam int COLS  = 1600;
  localparam int MAX_N = 2048;  // the engine's default
  localparam int IMG_W = ROWS * COLS / 8;     // words per image
  localparam int SRC = 0, TMP = IMG_W, DST = 2 * IMG_W, REC = 3 * IMG_W;
  localparam int CW = $clog2(MAX_N) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0;
  mode_e            mode = MODE_DWT;
  logic [25:0]      src_base, tmp_base, dst_base;
  logic             busy, done;
  logic [25:0]      mem_adr;
  logic             mem_rd, mem_wr, mem_ready, mem_rvalid;
  logic [127:0]     mem_wdata, mem_rdata;

  int checks = 0, failures = 0, cyc = 0;
  int n_pass_switch = 0, n_groups = 0, n_gate = 0, n_fetch_hold = 0, n_conflict = 0, n_stall = 0;
  int n_dwt = 0, n_idwt = 0;

  dwt2d_top dut (
    .clk, .rst_n, .start, .mode, .src_usb(1'b0), .n_rows(CW'(ROWS)), .n_cols(CW'(COLS)),
    .src_base, .tmp_base, .dst_base, .pitch(CW'(COLS / 8)), .busy, .done,
    .if_clk(clk), .if_rst_n(rst_n), .usb_in_wr(1'b0), .usb_in_data(16'h0), .usb_in_ready(),
    .usb_out_rd(1'b0), .usb_out_data(), .usb_out_valid(),
    .dma_start(1'b0), .dma_dir(1'b0), .dma_adr(26'h0), .dma_words(26'h0), .dma_busy(),
    .mem_adr, .mem_rd, .mem_wr, .mem_wdata, .mem_ready, .mem_rdata, .mem_rvalid
  );

  ddr_user_model #(.WORDS(4 * IMG_W), .LAT(7), .READY_PCT(90)) u_mem (
    .clk, .adr(mem_adr), .rd(mem_rd && rst_n), .wr(mem_wr && rst_n), .wdata(mem_wdata),
    .ready(mem_ready), .rdata(mem_rdata), .rvalid(mem_rvalid)
  );

  // Mechanism counters.
  logic pass_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.pass != pass_q && dut.pass) n_pass_switch++;
    pass_q <= dut.pass;
    if (dut.group_done) n_groups++;
    if (dut.u_ctrl.state == 2'd1 && !dut.out_en && dut.draining) n_gate++;
    if (dut.u_ctrl.fetching && dut.u_ctrl.ahead == 2'd2 && dut.u_ctrl.f_word == '0) n_fetch_hold++;
    if (dut.u_ctrl.want_wr && dut.u_ctrl.want_rd) n_conflict++;
    if ((mem_rd || mem_wr) && !mem_ready) n_stall++;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int img_t[ROWS][COLS];

  function automatic int get(int base, int r, int c, int ncols);
    logic [127:0] w;
    w = u_mem.mem[base + (r * ncols + c) / 8];
    return int'($signed(w[16*(c%8) +: 16]));
  endfunction

  task automatic put(int base, int r, int c, int ncols, int v);
    u_mem.mem[base + (r * ncols + c) / 8][16*(c%8) +: 16] = 16'(v);
  endtask

  task automatic run(mode_e m, int s, int d);
    src_base = 26'(s);
    tmp_base = 26'(TMP);
    dst_base = 26'(d);
    @(negedge clk);
    mode  = m;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    if (m == MODE_DWT) n_dwt++; else n_idwt++;
  endtask

  // Reference 2-D transforms on whole images.
  function automatic void ref_dwt(input img_t x, output img_t y);
    line_t l, s, d;
    img_t t;
    for (int r = 0; r < ROWS; r++) begin
      l = new[COLS];
      for (int c = 0; c < COLS; c++) l[c] = x[r][c];
      fwd(l, s, d);
      for (int c = 0; c < COLS/2; c++) begin t[r][c] = s[c]; t[r][COLS/2+c] = d[c]; end
    end
    for (int c = 0; c < COLS; c++) begin
      l = new[ROWS];
      for (int r = 0; r < ROWS; r++) l[r] = t[r][c];
      fwd(l, s, d);
      for (int r = 0; r < ROWS/2; r++) begin y[r][c] = s[r]; y[ROWS/2+r][c] = d[r]; end
    end
  endfunction

  function automatic void ref_idwt(input img_t y, output img_t x);
    line_t l, s, d;
    img_t t;
    for (int r = 0; r < ROWS; r++) begin
      s = new[COLS/2];
      d = new[COLS/2];
      for (int c = 0; c < COLS/2; c++) begin s[c] = y[r][c]; d[c] = y[r][COLS/2+c]; end
      inv(s, d, l);
      for (int c = 0; c < COLS; c++) t[r][c] = l[c];
    end
    for (int c = 0; c < COLS; c++) begin
      s = new[ROWS/2];
      d = new[ROWS/2];
      for (int r = 0; r < ROWS/2; r++) begin s[r] = t[r][c]; d[r] = t[ROWS/2+r][c]; end
      inv(s, d, l);
      for (int r = 0; r < ROWS; r++) x[r][c] = l[r];
    end
  endfunction

  task automatic cmp_img(string n, int base, img_t e);
    int bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (get(base, r, c, COLS) != e[r][c]) begin
          failures++;
          if (bad++ < 5) $display("FAIL %s [%0d][%0d] got %0d exp %0d", n, r, c, get(base, r, c, COLS), e[r][c]);
        end
      end
  endtask

  initial begin
    img_t x, y, hw_y, xr;
    int max_err = 0;
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        x[r][c] = int'($urandom_range(255));
        put(SRC, r, c, COLS, x[r][c]);
      end
    // 2-D DWT
    t0 = cyc;
    run(MODE_DWT, SRC, DST);
    $display("DWT of %0dx%0d took %0d clocks", ROWS, COLS, cyc - t0);
    ref_dwt(x, y);
    cmp_img("dwt", DST, y);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) hw_y[r][c] = get(DST, r, c, COLS);
    // 2-D IDWT of the engine's coefficients
    run(MODE_IDWT, DST, REC);
    ref_idwt(hw_y, xr);
    cmp_img("idwt", REC, xr);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int e;
        e = get(REC, r, c, COLS) - x[r][c];
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
      end
    checks++;
    if (max_err > 16) begin failures++; $display("FAIL round trip error %0d", max_err); end
    $display("round trip max error %0d", max_err);
    $display("mechanisms: dwt %0d idwt %0d pass_switch %0d groups %0d issue_gate %0d fetch_hold %0d port_conflict %0d mem_stall %0d",
             n_dwt, n_idwt, n_pass_switch, n_groups, n_gate, n_fetch_hold, n_conflict, n_stall);
    checks += 8;
    if (n_dwt == 0)         begin failures++; $display("FAIL no DWT"); end
    if (n_idwt == 0)        begin failures++; $display("FAIL no IDWT"); end
    if (n_pass_switch == 0) begin failures++; $display("FAIL no pass switch"); end
    if (n_groups == 0)      begin failures++; $display("FAIL no group drain"); end
    if (n_gate == 0)        begin failures++; $display("FAIL issue gate never closed"); end
    if (n_fetch_hold == 0)  begin failures++; $display("FAIL fetch never held"); end
    if (n_conflict == 0)    begin failures++; $display("FAIL no port conflict"); end
    if (n_stall == 0)       begin failures++; $display("FAIL no memory stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
