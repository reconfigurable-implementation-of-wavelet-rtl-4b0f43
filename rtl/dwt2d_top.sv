// dwt2d_top: 2-D 9/7 integer wavelet engine working on images in external
// DDR SDRAM.
//
// One start command runs a one-level 2-D DWT (mode = MODE_DWT) or IDWT
// (MODE_IDWT) of an n_rows x n_cols image of 16-bit samples. The engine
// streams each row from memory through the shuffle network, the 1-D math
// engine (one sample pair per clock) and the transpose network, which
// writes the rows back as columns of a transposed image. Two such passes,
// image -> tmp -> dst, transform both directions and restore the
// orientation. After a DWT, dst holds the LL subband in the top-left
// quarter, HL top-right, LH bottom-left and HH bottom-right; an IDWT takes
// that layout and returns the image.
//
// Memory port: the user side of a DDR SDRAM controller with 128-bit data.
// mem_adr counts 128-bit words; a command (mem_rd or mem_wr, never both) is
// taken in a clock where mem_ready is high; read data return in order with
// mem_rvalid, any number of clocks later. The controller itself and the
// DDR pins are outside this module.
//
// Images are stored row after row; pitch gives the row length of the src
// and dst buffers in 128-bit words (n_cols/8 for a whole image). Running
// the engine again on the LL quarter, with the full image's pitch and
// dst_base = src_base, gives the next decomposition level in place; the
// inverse runs the levels in reverse order.
//
// Host side: fifo_16to128 and fifo_128to16 carry 16-bit words between the
// USB interface clock (if_clk) and 128-bit memory words; usb_dma loads
// dma_words words from the host into memory at dma_adr, or unloads them
// to the host. The memory port belongs to the engine while busy, else to
// usb_dma; dma_start is ignored while the engine runs and start while a
// transfer runs. With src_usb set at start, pass 0 takes its rows straight
// from the host input FIFO in raster order instead of reading src from
// memory (the source design's multiplexer between the USB FIFO and the
// DDR read data); pass 1 then runs from memory as usual. The rest of the
// host-side sequencing is this design's own.
//
// Limits: n_rows and n_cols multiples of 8, at most MAX_N. The command
// inputs are sampled at start. done pulses when the last word of pass 1 is accepted.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_N = 2048,
  parameter int unsigned ADR_W = 26,
  parameter int unsigned DMA_DEPTH = 16,
  localparam int unsigned CW   = $clog2(MAX_N) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             start,
  input  mode_e            mode,
  input  logic             src_usb,      // pass 0 reads the host input FIFO
  input  logic [CW-1:0]    n_rows,
  input  logic [CW-1:0]    n_cols,
  input  logic [ADR_W-1:0] src_base,
  input  logic [ADR_W-1:0] tmp_base,
  input  logic [ADR_W-1:0] dst_base,
  input  logic [CW-1:0]    pitch,
  output logic             busy,
  output logic             done,
  // host transfers: USB side (if_clk domain)
  input  logic             if_clk,
  input  logic             if_rst_n,
  input  logic             usb_in_wr,
  input  logic [15:0]      usb_in_data,
  output logic             usb_in_ready,
  input  logic             usb_out_rd,
  output logic [15:0]      usb_out_data,
  output logic             usb_out_valid,
  // host transfers: command (clk domain)
  input  logic             dma_start,
  input  logic             dma_dir,      // 0: USB -> memory, 1: memory -> USB
  input  logic [ADR_W-1:0] dma_adr,
  input  logic [ADR_W-1:0] dma_words,
  output logic             dma_busy,
  // memory controller user port
  output logic [ADR_W-1:0] mem_adr,
  output logic             mem_rd,
  output logic             mem_wr,
  output logic [127:0]     mem_wdata,
  input  logic             mem_ready,
  input  logic [127:0]     mem_rdata,
  input  logic             mem_rvalid
);

  mode_e         mode_q;
  logic [CW-1:0] cur_cols;
  logic          pass;
  logic          line_taken, out_en, wr_ready;
  logic          draining, dv, dr, group_done;
  logic [CW-1:0] dcol;
  pair_t         pairs_in, pairs_out;
  logic [ADR_W-1:0] eng_adr, dma_mem_adr;
  logic          eng_rd, eng_wr, eng_rvalid, dma_rd, dma_wr;
  logic [127:0]  eng_wdata, up_data;
  logic          up_valid, up_rd, dma_up_rd, down_wr;
  logic          src_usb_q, stream, ctrl_ready;
  logic [$clog2(DMA_DEPTH):0] down_space;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             mode_q <= MODE_DWT;
    else if (start && !busy) mode_q <= mode;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              src_usb_q <= 1'b0;
    else if (start && !busy) src_usb_q <= src_usb;
  end

  // Pass 0 streaming from the host: a row read is a FIFO pop, and its data
  // arrive in the same clock; writes still go to memory.
  assign stream     = busy && !pass && src_usb_q;
  assign ctrl_ready = (stream && eng_rd) ? up_valid : mem_ready;
  assign up_rd      = dma_up_rd || (stream && eng_rd && up_valid);

  pass_ctrl #(.MAX_N(MAX_N), .ADR_W(ADR_W)) u_ctrl (
    .clk, .rst_n, .start(start && !busy && !dma_busy), .n_rows, .n_cols,
    .src_base, .tmp_base, .dst_base, .pitch, .busy, .done, .pass, .cur_cols,
    .line_taken, .out_en, .dv, .dcol, .group_done, .dr,
    .mem_adr(eng_adr), .mem_rd(eng_rd), .mem_wr(eng_wr), .mem_ready(ctrl_ready)
  );

  shuffle_network #(.MAX_N(MAX_N)) u_shuffle (
    .clk, .rst_n, .mode(mode_q), .n_cols(cur_cols),
    .wr_valid(eng_rvalid), .wr_data(stream ? up_data : mem_rdata), .wr_ready,
    .out_en, .out(pairs_in), .line_taken
  );

  math_engine u_engine (.clk, .rst_n, .mode(mode_q), .in(pairs_in), .out(pairs_out));

  transpose_network #(.MAX_N(MAX_N)) u_transpose (
    .clk, .rst_n, .mode(mode_q), .n_cols(cur_cols), .in(pairs_out),
    .draining, .dv, .dword(eng_wdata), .dcol, .dr, .group_done
  );

  // Host transfers between the USB FIFOs and memory.
  fifo_16to128 #(.DEPTH(DMA_DEPTH)) u_up (
    .if_clk, .if_rst_n, .in_wr(usb_in_wr), .in_data(usb_in_data), .in_ready(usb_in_ready),
    .clk, .rst_n, .out_rd(up_rd), .out_data(up_data), .out_valid(up_valid)
  );

  fifo_128to16 #(.DEPTH(DMA_DEPTH)) u_down (
    .clk, .rst_n, .in_wr(down_wr), .in_data(mem_rdata), .space(down_space),
    .if_clk, .if_rst_n, .out_rd(usb_out_rd), .out_data(usb_out_data), .out_valid(usb_out_valid)
  );

  usb_dma #(.ADR_W(ADR_W), .DEPTH(DMA_DEPTH)) u_dma (
    .clk, .rst_n, .start(dma_start && !busy), .dir(dma_dir), .adr(dma_adr), .n_words(dma_words),
    .busy(dma_busy), .in_valid(up_valid), .in_rd(dma_up_rd), .out_space(down_space), .out_wr(down_wr),
    .mem_adr(dma_mem_adr), .mem_rd(dma_rd), .mem_wr(dma_wr), .mem_ready, .mem_rvalid
  );

  // The memory port belongs to the engine while it runs, else to the
  // transfer unit; the two are never started together.
  always_comb begin
    if (busy) begin
      mem_adr   = eng_adr;
      mem_rd    = eng_rd && !stream;
      mem_wr    = eng_wr;
      mem_wdata = eng_wdata;
    end else begin
      mem_adr   = dma_mem_adr;
      mem_rd    = dma_rd;
      mem_wr    = dma_wr;
      mem_wdata = up_data;
    end
  end

  assign eng_rvalid = stream ? (eng_rd && up_valid) : (mem_rvalid && busy);

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(busy && dma_busy));

  // Read data only come back for rows that have a free buffer.
  a_read_room: assert property (@(posedge clk) disable iff (!rst_n) eng_rvalid |-> wr_ready);

endmodule
