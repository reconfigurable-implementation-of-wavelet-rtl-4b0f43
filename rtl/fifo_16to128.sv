// fifo_16to128: carries 16-bit words from the USB interface clock (ifClk,
// 48 MHz) to the core clock (200 MHz) as 128-bit memory words.
//
// On the USB side eight consecutive 16-bit words are packed into one
// 128-bit word, the first word in bits 15:0 (the sample order of the
// memory layout), and the packed word enters a dual-clock FIFO of DEPTH
// 128-bit entries. in_ready is low while the FIFO is full and a packed word
// is waiting. On the core side out_valid shows a word; out_rd takes it.
// The source design names this FIFO and its widths; the packing order,
// the depth and the handshake are this design's choices.
module fifo_16to128 #(
  parameter int unsigned DEPTH = 16
) (
  input  logic         if_clk,
  input  logic         if_rst_n,
  input  logic         in_wr,
  input  logic [15:0]  in_data,
  output logic         in_ready,
  input  logic         clk,
  input  logic         rst_n,
  input  logic         out_rd,
  output logic [127:0] out_data,
  output logic         out_valid
);

  logic [127:0] pack;
  logic [2:0]   cnt;
  logic         pend;   // a complete packed word waits for room
  logic         full, empty;
  logic [$clog2(DEPTH):0] wcount;

  assign in_ready = !pend;

  always_ff @(posedge if_clk or negedge if_rst_n) begin
    if (!if_rst_n) begin
      pack <= '0;
      cnt  <= '0;
      pend <= 1'b0;
    end else begin
      if (pend && !full) pend <= 1'b0;
      if (in_wr && in_ready) begin
        pack[16*cnt +: 16] <= in_data;
        cnt <= cnt + 1'b1;
        if (cnt == 3'd7) pend <= 1'b1;
      end
    end
  end

  async_fifo #(.WIDTH(128), .DEPTH(DEPTH)) u_fifo (
    .wclk(if_clk), .wrst_n(if_rst_n), .wr_en(pend), .wdata(pack), .full, .wcount,
    .rclk(clk), .rrst_n(rst_n), .rd_en(out_rd), .rdata(out_data), .empty
  );

  assign out_valid = !empty;

endmodule
