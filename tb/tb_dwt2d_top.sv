// tb_dwt2d_top: end-to-end test of the 2-D engine against a memory model.
//
// A random 8-bit image is sent in over the USB-side port and loaded into
// memory by a host transfer, then transformed with a 2-D DWT;
// the result is compared word for word with the reference model (rows, then
// columns, lows before highs). The engine's own coefficients are then run
// through a 2-D IDWT, compared with the reference inverse, and the
// reconstruction is checked to be within a few counts of the original and
// read back out over the USB-side port. Last, a second image is sent in
// over the USB-side port while a DWT runs whose first pass takes its rows
// straight from the host FIFO, and that result is compared too.
// Mechanisms counted, each of which must occur: both modes, the switch from
// pass 0 to pass 1, group drains, the issue gate closing while a group
// drains, host loads and unloads, the USB input held off by a full FIFO,
// an unload waiting for FIFO room, a streamed first pass and its waits for
// host data, fetches held back because both row buffers are taken, a write and
// a read wanting the memory port in the same clock, and memory stalls.
// The image size is set by the localparams below.
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int ROWS  = 32;
  localparam int COLS  = 96;
  localparam int MAX_N = 128;
  localparam int IMG_W = ROWS * COLS / 8;     // words per image
  localparam int SRC = 0, TMP = IMG_W, DST = 2 * IMG_W, REC = 3 * IMG_W;
  localparam int DST2 = REC;                  // reused after the unload
  localparam int CW = $clog2(MAX_N) + 1;

  logic clk = 1'b0, rst_n = 1'b0, if_clk = 1'b0;
  always #5 clk = ~clk;        // core clock
  always #21 if_clk = ~if_clk; // slower USB interface clock

  logic         usb_in_wr = 1'b0, usb_in_ready, usb_out_rd = 1'b0, usb_out_valid;
  logic [15:0]  usb_in_data = '0, usb_out_data;
  logic         dma_start = 1'b0, dma_dir = 1'b0, dma_busy;
  logic [25:0]  dma_adr = '0, dma_words = '0;
  int n_load = 0, n_unload = 0, n_up_full = 0, n_down_throttle = 0;

  logic             start = 1'b0;
  mode_e            mode = MODE_DWT;
  logic [25:0]      src_base, tmp_base, dst_base;
  logic             busy, done;
  logic [25:0]      mem_adr;
  logic             mem_rd, mem_wr, mem_ready, mem_rvalid;
  logic [127:0]     mem_wdata, mem_rdata;

  int checks = 0, failures = 0, cyc = 0;
  int n_pass_switch = 0, n_groups = 0, n_gate = 0, n_fetch_hold = 0, n_conflict = 0, n_stall = 0;
  int n_dwt = 0, n_idwt = 0, n_stream = 0, n_stream_wait = 0;
  logic src_usb = 1'b0;

  dwt2d_top #(.MAX_N(MAX_N)) dut (
    .clk, .rst_n, .start, .mode, .src_usb, .n_rows(CW'(ROWS)), .n_cols(CW'(COLS)),
    .src_base, .tmp_base, .dst_base, .pitch(CW'(COLS / 8)), .busy, .done,
    .if_clk, .if_rst_n(rst_n), .usb_in_wr, .usb_in_data, .usb_in_ready,
    .usb_out_rd, .usb_out_data, .usb_out_valid,
    .dma_start, .dma_dir, .dma_adr, .dma_words, .dma_busy,
    .mem_adr, .mem_rd, .mem_wr, .mem_wdata, .mem_ready, .mem_rdata, .mem_rvalid
  );

  ddr_user_model #(.WORDS(4 * IMG_W), .LAT(7), .READY_PCT(60)) u_mem (
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
    if (dma_busy && dma_dir && !dut.u_dma.room && dut.u_dma.left != 0) n_down_throttle++;
  end
  always @(posedge if_clk) if (rst_n && usb_in_wr && !usb_in_ready) n_up_full++;
  always @(posedge clk) if (rst_n && dut.stream && dut.eng_rd) begin
    if (dut.up_valid) n_stream++; else n_stream_wait++;
  end

  // Host side: send samples in over the USB port, then start a load.
  task automatic usb_load(int base, int ncols, ref int img[ROWS][COLS]);
    @(negedge clk);
    dma_dir = 1'b0; dma_adr = 26'(base); dma_words = 26'(ROWS * ncols / 8); dma_start = 1'b1;
    @(negedge clk) dma_start = 1'b0;
    usb_feed(ncols, img);
    while (dma_busy) @(negedge clk);
    n_load++;
  endtask

  // Host side: send an image's samples in over the USB port, row by row.
  task automatic usb_feed(int ncols, ref int img[ROWS][COLS]);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < ncols; c++) begin
        @(negedge if_clk);
        usb_in_wr = 1'b1;
        usb_in_data = 16'(img[r][c]);
        @(posedge if_clk);
        while (!usb_in_ready) @(posedge if_clk);
      end
    @(negedge if_clk) usb_in_wr = 1'b0;
  endtask

  // Host side: start an unload and collect the samples from the USB port.
  task automatic usb_unload(int base, ref int img[ROWS][COLS]);
    @(negedge clk);
    dma_dir = 1'b1; dma_adr = 26'(base); dma_words = 26'(IMG_W); dma_start = 1'b1;
    @(negedge clk) dma_start = 1'b0;
    for (int i = 0; i < ROWS * COLS; i++) begin
      @(negedge if_clk);
      // read slowly at first so the transfer waits for room
      if (i < 200) repeat (3) @(negedge if_clk);
      while (!usb_out_valid) @(negedge if_clk);
      img[i / COLS][i % COLS] = int'($signed(usb_out_data));
      usb_out_rd = 1'b1;
      @(negedge if_clk) usb_out_rd = 1'b0;
    end
    while (dma_busy) @(negedge clk);
    n_unload++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
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
      end
    usb_load(SRC, COLS, x);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (get(SRC, r, c, COLS) != x[r][c]) begin failures++; $display("FAIL load [%0d][%0d]", r, c); end
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
    begin
      img_t u;
      usb_unload(REC, u);
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (u[r][c] != xr[r][c]) begin failures++; $display("FAIL unload [%0d][%0d]", r, c); end
        end
    end
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
    // 2-D DWT whose first pass streams the image straight from the host
    begin
      img_t z;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) z[r][c] = int'($urandom_range(255));
      src_usb = 1'b1;
      fork
        run(MODE_DWT, SRC, DST2);
        usb_feed(COLS, z);
      join
      src_usb = 1'b0;
      ref_dwt(z, y);
      cmp_img("streamed dwt", DST2, y);
    end
    $display("stream: words %0d waits %0d", n_stream, n_stream_wait);
    if (n_stream != ROWS * COLS / 8) begin failures++; $display("FAIL %0d words streamed", n_stream); end
    if (n_stream_wait == 0) begin failures++; $display("FAIL stream never waited for the host"); end
    $display("mechanisms: dwt %0d idwt %0d pass_switch %0d groups %0d issue_gate %0d fetch_hold %0d port_conflict %0d mem_stall %0d",
             n_dwt, n_idwt, n_pass_switch, n_groups, n_gate, n_fetch_hold, n_conflict, n_stall);
    $display("host: load %0d unload %0d usb_in_full %0d unload_throttled %0d", n_load, n_unload, n_up_full, n_down_throttle);
    checks += 12;
    if (n_load == 0)          begin failures++; $display("FAIL no load"); end
    if (n_unload == 0)        begin failures++; $display("FAIL no unload"); end
    if (n_up_full == 0)       begin failures++; $display("FAIL USB input never held off"); end
    if (n_down_throttle == 0) begin failures++; $display("FAIL unload never waited for room"); end
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
