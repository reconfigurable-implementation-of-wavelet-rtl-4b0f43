// sdp_ram: simple dual-port RAM, one write port and one read port, both
// synchronous to clk (a block RAM in FPGA terms).
//
// Write: wdata is stored at waddr at the clock edge where we is high.
// Read: rdata takes the word at raddr at the clock edge where re is high and
// holds it otherwise. A read of the address written in the same clock
// returns the old word.
module sdp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
