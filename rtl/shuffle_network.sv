// shuffle_network: row buffer that turns 128-bit memory words into the
// sample-pair order the math engine needs.
//
// A row of n_cols samples arrives as n_cols/8 words of eight 16-bit samples
// (sample 0 of a word in bits 15:0), in row order. Once the whole row is held
// it is issued as n_cols/2 pairs, one per clock while out_en is high:
//   MODE_DWT : (x[2k], x[2k+1])        consecutive samples
//   MODE_IDWT: (x[k],  x[n_cols/2+k])  low half against high half, which
//              re-interleaves a row stored as [lows..., highs...]
// Two row buffers are used in turn, so the next row can be loaded while the
// current one is issued. Each buffer is eight lanes (one per sample of a
// word) of MAX_N/8 entries, and each lane (a RAM) has two read ports, so both
// samples of any pair are read in the same clock.
// The source design places a shuffle network and a small FIFO at this point;
// the ping-pong row buffer is this design's own way of providing both
// orders.
//
// Interface: wr_valid/wr_ready handshake for words; wr_ready is high while
// the buffer being filled is free. out is a pair stream with first/last
// flags (one clock from read to out). line_taken pulses when the last pair
// of a row has been issued. n_cols must be a multiple of 8, at most MAX_N,
// and held while rows are in the buffer.
module shuffle_network
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_N = 2048,
  localparam int unsigned CW   = $clog2(MAX_N) + 1,
  localparam int unsigned DEP  = MAX_N / 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mode_e          mode,
  input  logic [CW-1:0]  n_cols,
  input  logic           wr_valid,
  input  logic [127:0]   wr_data,
  output logic           wr_ready,
  input  logic           out_en,
  output pair_t          out,
  output logic           line_taken
);

  localparam int unsigned RW = $clog2(2 * DEP);  // lane row address

  logic [15:0]   rd_a [8];
  logic [15:0]   rd_b [8];
  logic [2:0]    lane_a, lane_b;  // lanes of the pair being read

  logic          wbuf, rbuf;
  logic [1:0]    full;
  logic [CW-1:0] wcnt;   // words written into the current buffer
  logic [CW-1:0] k;      // pair index being issued
  logic [CW-1:0] ia, ib; // sample indices of the pair
  logic          issue;
  logic [CW-1:0] half;

  assign half     = n_cols >> 1;
  assign wr_ready = !full[wbuf];
  assign issue    = full[rbuf] && out_en;

  always_comb begin
    if (mode == MODE_DWT) begin
      ia = k << 1;
      ib = (k << 1) + 1'b1;
    end else begin
      ia = k;
      ib = half + k;
    end
  end

  // Eight lanes: sample j of a word goes to lane j; every lane reads the
  // rows of both samples of the pair and the right lanes are picked after.
  for (genvar j = 0; j < 8; j++) begin : g_lane
    ram_1w2r #(.DEPTH(2 * DEP), .WIDTH(16)) u_lane (
      .clk,
      .we      (wr_valid && wr_ready),
      .waddr   ({wbuf, wcnt[RW-2:0]}),
      .wdata   (wr_data[16*j +: 16]),
      .raddr_a ({rbuf, ia[RW+1:3]}),
      .raddr_b ({rbuf, ib[RW+1:3]}),
      .rdata_a (rd_a[j]),
      .rdata_b (rd_b[j])
    );
  end

  // Pair flags are registered alongside the RAM read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out.valid <= 1'b0;
      out.sol   <= 1'b0;
      out.eol   <= 1'b0;
      lane_a    <= '0;
      lane_b    <= '0;
    end else begin
      out.valid <= issue;
      out.sol   <= (k == '0);
      out.eol   <= (k == half - 1'b1);
      lane_a    <= ia[2:0];
      lane_b    <= ib[2:0];
    end
  end

  assign out.e = sample_t'(rd_a[lane_a]);
  assign out.o = sample_t'(rd_b[lane_b]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbuf       <= 1'b0;
      rbuf       <= 1'b0;
      full       <= '0;
      wcnt       <= '0;
      k          <= '0;
      line_taken <= 1'b0;
    end else begin
      line_taken <= 1'b0;
      if (wr_valid && wr_ready) begin
        if (wcnt == (n_cols >> 3) - 1'b1) begin
          wcnt       <= '0;
          full[wbuf] <= 1'b1;
          wbuf       <= ~wbuf;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (issue) begin
        if (k == half - 1'b1) begin
          k          <= '0;
          full[rbuf] <= 1'b0;
          rbuf       <= ~rbuf;
          line_taken <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

endmodule
