// fifo_128to16: carries 128-bit memory words from the core clock (200 MHz)
// to the USB interface clock (ifClk, 48 MHz) as 16-bit words.
//
// On the core side in_wr writes a 128-bit word into a dual-clock FIFO of
// DEPTH entries; space gives the free entries as seen by the core side, so
// a reader of memory can reserve room before it issues reads. On the USB
// side the head word is sent as eight 16-bit words, bits 15:0 first:
// out_valid shows a word, out_rd takes it. The source design names this
// FIFO and its widths; the order, depth and handshake are this design's
// choices.
module fifo_128to16 #(
  parameter int unsigned DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_wr,
  input  logic [127:0]            in_data,
  output logic [$clog2(DEPTH):0]  space,
  input  logic                    if_clk,
  input  logic                    if_rst_n,
  input  logic                    out_rd,
  output logic [15:0]             out_data,
  output logic                    out_valid
);

  logic [127:0] head;
  logic         full, empty;
  logic [2:0]   idx;
  logic [$clog2(DEPTH):0] wcount;

  async_fifo #(.WIDTH(128), .DEPTH(DEPTH)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(in_wr), .wdata(in_data), .full, .wcount,
    .rclk(if_clk), .rrst_n(if_rst_n), .rd_en(out_rd && !empty && idx == 3'd7), .rdata(head), .empty
  );

  assign space     = ($clog2(DEPTH)+1)'(DEPTH) - wcount;
  assign out_valid = !empty;
  assign out_data  = head[16*idx +: 16];

  always_ff @(posedge if_clk or negedge if_rst_n) begin
    if (!if_rst_n)                idx <= '0;
    else if (out_rd && !empty)    idx <= idx + 1'b1;
  end

  // Writing into a full FIFO loses data.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(in_wr && full));

endmodule
