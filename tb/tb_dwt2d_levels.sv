// tb_dwt2d_levels: a two-level 2-D DWT and its inverse on a 64 x 64 image,
// as used for multi-level subband decomposition. Level 1 transforms the
// whole image; level 2 transforms its LL quarter in place (row pitch of the
// full image). The inverse runs level 2 then level 1. Results are compared
// with the reference model applied the same way, and the reconstruction is
// checked to be within a few counts of the original.
module tb_dwt2d_levels;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N     = 64;             // image is N x N
  localparam int MAX_N = 64;
  localparam int CW    = $clog2(MAX_N) + 1;
  localparam int IMG_W = N * N / 8;
  localparam int SRC = 0, TMP = IMG_W, DST = 2 * IMG_W, REC = 3 * IMG_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  mode_e         mode = MODE_DWT;
  logic [CW-1:0] n_rows, n_cols;
  logic [25:0]   src_base, tmp_base, dst_base;
  logic          busy, done;
  logic [25:0]   mem_adr;
  logic          mem_rd, mem_wr, mem_ready, mem_rvalid;
  logic [127:0]  mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  dwt2d_top #(.MAX_N(MAX_N)) dut (
    .clk, .rst_n, .start, .mode, .src_usb(1'b0), .n_rows, .n_cols, .src_base, .tmp_base, .dst_base,
    .pitch(CW'(N / 8)), .busy, .done,
    .if_clk(clk), .if_rst_n(rst_n), .usb_in_wr(1'b0), .usb_in_data(16'h0), .usb_in_ready(),
    .usb_out_rd(1'b0), .usb_out_data(), .usb_out_valid(),
    .dma_start(1'b0), .dma_dir(1'b0), .dma_adr(26'h0), .dma_words(26'h0), .dma_busy(),
    .mem_adr, .mem_rd, .mem_wr, .mem_wdata, .mem_ready, .mem_rdata, .mem_rvalid
  );

  ddr_user_model #(.WORDS(4 * IMG_W), .LAT(5), .READY_PCT(85)) u_mem (
    .clk, .adr(mem_adr), .rd(mem_rd && rst_n), .wr(mem_wr && rst_n), .wdata(mem_wdata),
    .ready(mem_ready), .rdata(mem_rdata), .rvalid(mem_rvalid)
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int img_t[N][N];

  function automatic int get(int base, int r, int c);
    logic [127:0] w;
    w = u_mem.mem[base + (r * N + c) / 8];
    return int'($signed(w[16*(c%8) +: 16]));
  endfunction

  // One 2-D level on the top-left sz x sz corner of img, in place.
  function automatic void ref_level(ref img_t img, input int sz, input bit inverse);
    line_t l, s, d;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < sz; i++) begin
        l = new[sz];
        for (int j = 0; j < sz; j++) l[j] = pass ? img[j][i] : img[i][j];
        if (!inverse) begin
          fwd(l, s, d);
          for (int j = 0; j < sz/2; j++) begin l[j] = s[j]; l[sz/2+j] = d[j]; end
        end else begin
          s = new[sz/2];
          d = new[sz/2];
          for (int j = 0; j < sz/2; j++) begin s[j] = l[j]; d[j] = l[sz/2+j]; end
          inv(s, d, l);
        end
        for (int j = 0; j < sz; j++) if (pass) img[j][i] = l[j]; else img[i][j] = l[j];
      end
  endfunction

  task automatic run(mode_e m, int sz, int s, int d);
    @(negedge clk);
    n_rows = CW'(sz);
    n_cols = CW'(sz);
    src_base = 26'(s);
    tmp_base = 26'(TMP);
    dst_base = 26'(d);
    mode  = m;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  task automatic cmp(string n, int base, img_t e);
    int bad = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (get(base, r, c) != e[r][c]) begin
          failures++;
          if (bad++ < 5) $display("FAIL %s [%0d][%0d] got %0d exp %0d", n, r, c, get(base, r, c), e[r][c]);
        end
      end
  endtask

  initial begin
    img_t x, y, hw;
    int max_err = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        x[r][c] = int'($urandom_range(255));
        u_mem.mem[SRC + (r * N + c) / 8][16*(c%8) +: 16] = 16'(x[r][c]);
      end
    // forward: level 1 whole image, level 2 on LL in place
    run(MODE_DWT, N, SRC, DST);
    run(MODE_DWT, N / 2, DST, DST);
    y = x;
    ref_level(y, N, 1'b0);
    ref_level(y, N / 2, 1'b0);
    cmp("dwt", DST, y);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) hw[r][c] = get(DST, r, c);
    // inverse: level 2 in place, then level 1
    run(MODE_IDWT, N / 2, DST, DST);
    run(MODE_IDWT, N, DST, REC);
    ref_level(hw, N / 2, 1'b1);
    ref_level(hw, N, 1'b1);
    cmp("idwt", REC, hw);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int e;
        e = get(REC, r, c) - x[r][c];
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
      end
    $display("two-level round trip max error %0d", max_err);
    checks++;
    if (max_err > 48) begin failures++; $display("FAIL round trip error %0d", max_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
