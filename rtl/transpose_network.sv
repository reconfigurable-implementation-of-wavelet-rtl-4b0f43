// transpose_network: eight row RAMs that turn transformed rows into columns.
//
// Transformed rows arrive from the math engine as a pair stream, one pair per
// clock. Row r of a group of eight goes to RAM r (eight 2048x16 RAMs at the
// default size). Each RAM is split into two halves: the first sample of
// every pair is written to half A at address k, the second to half B at k.
// Once the eighth row is in, the group is drained column by column: word j
// holds sample j of all eight rows (row 0 in bits 15:0), read as
//   MODE_DWT : j <  n_cols/2 ? A[j] : B[j - n_cols/2]   lows first, then highs
//   MODE_IDWT: j even ? A[j/2] : B[j/2]                  re-interleaved samples
// so the de-interleaving (DWT) or interleaving (IDWT) of the row costs no
// extra pass. Written to memory at column j, the words build the transposed
// image eight rows at a time, in 128-bit units.
// Splitting each RAM into halves, so two samples can be written per clock
// with one write port per half, is this design's choice.
//
// Interface: in is the pair stream (first/last flags mark rows). The drain
// is a valid/ready stream: dv, dword, dcol (column index j), accepted when
// dr is high. group_done pulses after the last word of a group is accepted.
// draining is high from the eighth row's last pair until group_done; no
// pair may arrive meanwhile (asserted). A synchronous RAM read feeds the
// output register, so one word per clock drains while dr stays high.
module transpose_network
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_N = 2048,
  localparam int unsigned CW   = $clog2(MAX_N) + 1,
  localparam int unsigned HD   = MAX_N / 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mode_e          mode,
  input  logic [CW-1:0]  n_cols,
  input  pair_t          in,
  output logic           draining,
  output logic           dv,
  output logic [127:0]   dword,
  output logic [CW-1:0]  dcol,
  input  logic           dr,
  output logic           group_done
);

  localparam int unsigned HW = $clog2(HD);

  logic [15:0] rd_a [8];
  logic [15:0] rd_b [8];
  logic        sel_q;   // half selected by the word in the output register

  logic [2:0]    row;     // RAM receiving the current row
  logic [HW-1:0] k;       // pair index within the row
  logic [CW-1:0] j;       // next column to read
  logic [CW-1:0] half;
  logic          adv;     // output register may take a new word
  logic          sel_b;
  logic [HW-1:0] radr;
  logic          rd_en;

  assign half = n_cols >> 1;
  assign adv  = !dv || dr;

  always_comb begin
    if (mode == MODE_DWT) begin
      sel_b = (j >= half);
      radr  = HW'(sel_b ? j - half : j);
    end else begin
      sel_b = j[0];
      radr  = HW'(j >> 1);
    end
  end

  // Row writes go to RAM pair `row`; column reads take all eight at once.
  for (genvar r = 0; r < 8; r++) begin : g_row
    sdp_ram #(.DEPTH(HD), .WIDTH(16)) u_a (
      .clk, .we(in.valid && row == 3'(r)), .waddr(k), .wdata(in.e),
      .re(rd_en), .raddr(radr), .rdata(rd_a[r])
    );
    sdp_ram #(.DEPTH(HD), .WIDTH(16)) u_b (
      .clk, .we(in.valid && row == 3'(r)), .waddr(k), .wdata(in.o),
      .re(rd_en), .raddr(radr), .rdata(rd_b[r])
    );
    assign dword[16*r +: 16] = sel_q ? rd_b[r] : rd_a[r];
  end

  assign rd_en = draining && adv && (j < n_cols);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row        <= '0;
      k          <= '0;
      j          <= '0;
      draining   <= 1'b0;
      dv         <= 1'b0;
      dcol       <= '0;
      group_done <= 1'b0;
      sel_q      <= 1'b0;
    end else begin
      if (rd_en) sel_q <= sel_b;
      group_done <= 1'b0;
      if (in.valid) begin
        if (in.eol) begin
          k   <= '0;
          row <= row + 1'b1;
          if (row == 3'd7) draining <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
      if (draining && adv) begin
        if (j < n_cols) begin
          dv   <= 1'b1;
          dcol <= j;
          j    <= j + 1'b1;
        end else begin
          dv         <= 1'b0;
          j          <= '0;
          draining   <= 1'b0;
          group_done <= 1'b1;
        end
      end
    end
  end

  // No row may arrive while a group drains.
  a_no_write_in_drain: assert property (@(posedge clk) disable iff (!rst_n) !(draining && in.valid));

endmodule
