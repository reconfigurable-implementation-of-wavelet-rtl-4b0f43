// usb_dma: moves image data between the USB-side FIFOs and memory.
//
// A load (dir = 0) takes n_words 128-bit words from the 16-to-128 FIFO and
// writes them to memory from word address adr upward. An unload (dir = 1)
// reads n_words words from memory and puts them into the 128-to-16 FIFO,
// issuing a read only while the FIFO has room for it and for every read
// still in flight. busy stays high until the last write is accepted or the
// last read datum has arrived. This plays the part of the USB and memory
// FSMs that the source design names for moving images to and from the host;
// their sequencing is this design's own.
//
// Memory port as in dwt2d_top: one command per clock, taken while
// mem_ready is high; read data return in order with mem_rvalid.
module usb_dma #(
  parameter int unsigned ADR_W = 26,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned SW   = $clog2(DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dir,
  input  logic [ADR_W-1:0] adr,
  input  logic [ADR_W-1:0] n_words,
  output logic             busy,
  // 16-to-128 FIFO, core side
  input  logic             in_valid,
  output logic             in_rd,
  // 128-to-16 FIFO, core side
  input  logic [SW-1:0]    out_space,
  output logic             out_wr,
  // memory port
  output logic [ADR_W-1:0] mem_adr,
  output logic             mem_rd,
  output logic             mem_wr,
  input  logic             mem_ready,
  input  logic             mem_rvalid
);

  logic             dir_q;
  logic [ADR_W-1:0] cur, left;
  logic [SW-1:0]    in_flight;
  logic             room;

  assign room    = (in_flight < out_space);
  assign mem_adr = cur;
  assign mem_wr  = busy && !dir_q && left != '0 && in_valid;
  assign mem_rd  = busy &&  dir_q && left != '0 && room;
  assign in_rd   = mem_wr && mem_ready;
  assign out_wr  = busy && dir_q && mem_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      dir_q     <= 1'b0;
      cur       <= '0;
      left      <= '0;
      in_flight <= '0;
    end else begin
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          dir_q <= dir;
          cur   <= adr;
          left  <= n_words;
        end
      end else begin
        if ((mem_wr || mem_rd) && mem_ready) begin
          cur  <= cur + 1'b1;
          left <= left - 1'b1;
        end
        in_flight <= in_flight + SW'(mem_rd && mem_ready) - SW'(out_wr);
        if (left == '0 && in_flight == '0) busy <= 1'b0;
      end
    end
  end

endmodule
