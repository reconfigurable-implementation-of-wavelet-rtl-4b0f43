// ddr_user_model: behavioural model of a DDR SDRAM controller's user port
// together with the memory behind it, for testbenches only.
//
// One command per clock is taken while ready is high; ready drops at random
// (READY_PCT percent high) to model refresh and bank turnarounds. A read
// returns its 128-bit word LAT clocks after it was taken, in order, with
// rvalid. A write updates the word at once, so a later read sees it.
// The array holds WORDS 128-bit words, initialised to zero; testbenches load
// and inspect it through mem[] directly.
module ddr_user_model #(
  parameter int unsigned ADR_W     = 26,
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned LAT       = 6,
  parameter int unsigned READY_PCT = 80
) (
  input  logic             clk,
  input  logic [ADR_W-1:0] adr,
  input  logic             rd,
  input  logic             wr,
  input  logic [127:0]     wdata,
  output logic             ready,
  output logic [127:0]     rdata,
  output logic             rvalid
);

  logic [127:0] mem [WORDS];
  logic [127:0] pipe_d [LAT];
  logic         pipe_v [LAT];
  int           n_busy = 0;

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (pipe_v[i]) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
    ready = 1'b1;
  end

  assign rdata  = pipe_d[LAT-1];
  assign rvalid = pipe_v[LAT-1];

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_d[i] <= pipe_d[i-1];
      pipe_v[i] <= pipe_v[i-1];
    end
    pipe_v[0] <= 1'b0;
    if (ready && rd) begin
      if (adr >= WORDS) $fatal(1, "read outside memory: %0d", adr);
      pipe_d[0] <= mem[adr];
      pipe_v[0] <= 1'b1;
    end
    if (ready && wr) begin
      if (adr >= WORDS) $fatal(1, "write outside memory: %0d", adr);
      mem[adr] <= wdata;
    end
    ready <= (int'($urandom_range(99)) < READY_PCT);
    if (!ready) n_busy++;
  end

endmodule
