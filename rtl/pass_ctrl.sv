// pass_ctrl: sequencing and memory arbitration for one 2-D transform.
//
// A 2-D DWT or IDWT of an n_rows x n_cols image is two row passes. Pass 0
// reads the image at src_base row by row and writes the transformed rows
// transposed to tmp_base (an n_cols x n_rows image); pass 1 does the same
// from tmp_base to dst_base, which leaves the result in the original
// orientation. Memory addresses count 128-bit words (eight samples); images
// are stored row after row, so row r of a C-column image starts at word
// base + r*pitch. pitch is the row length in words of the src and dst
// buffers: n_cols/8 for a whole image, or the full image's row length when
// the engine works on the LL quarter of an earlier level, in place (dst =
// src), to build further decomposition levels. The tmp image is always
// stored compactly.
// The controller does three jobs that run side by side:
//   fetch : issues the read commands of a row when the shuffle network has a
//           free row buffer for it (at most two rows fetched ahead);
//   issue : lets the shuffle network hand rows to the math engine, eight per
//           group, then waits until the transpose network has drained the
//           group before the next eight;
//   write : passes the transpose network's column words to memory, word j
//           of group g going to base + j*P + g (P = R/8 for tmp, pitch for dst).
// Writes win over reads when both want the memory port in the same clock.
// Pass 1 starts only after every write of pass 0 is accepted.
// The source design splits this work over a memory FSM, an arbiter FSM and
// a math-engine/transpose FSM, naming them only; the sequencing here is this
// design's own.
//
// Memory port: one command per clock, accepted while mem_ready is high;
// mem_rd and mem_wr are never high together. Read data come back in order.
// n_rows and n_cols must be multiples of 8, at most MAX_N.
module pass_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_N = 2048,
  parameter int unsigned ADR_W = 26,
  localparam int unsigned CW   = $clog2(MAX_N) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CW-1:0]    n_rows,
  input  logic [CW-1:0]    n_cols,
  input  logic [ADR_W-1:0] src_base,
  input  logic [ADR_W-1:0] tmp_base,
  input  logic [ADR_W-1:0] dst_base,
  input  logic [CW-1:0]    pitch,      // words per row of the src/dst buffers
  output logic             busy,
  output logic             done,
  output logic             pass,       // 0: first row pass, 1: second
  output logic [CW-1:0]    cur_cols,   // row length of the current pass
  // shuffle network
  input  logic             line_taken,
  output logic             out_en,
  // transpose network
  input  logic             dv,
  input  logic [CW-1:0]    dcol,
  input  logic             group_done,
  output logic             dr,
  // memory controller user port
  output logic [ADR_W-1:0] mem_adr,
  output logic             mem_rd,
  output logic             mem_wr,
  input  logic             mem_ready
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_NEXT} state_e;

  state_e        state;
  logic [CW-1:0] cur_rows;
  logic [ADR_W-1:0] src, dst;
  logic [CW-1:0] pitch_q;     // words per row of the buffer being read / written
  logic [CW-1:0] rd_pitch, wr_pitch;
  logic [CW-1:0] f_row;       // row being fetched
  logic [CW-1:0] f_word;      // word within it
  logic [CW-1:0] wpr;         // words per row
  logic [1:0]    ahead;       // rows fetched but not yet taken
  logic [3:0]    in_group;    // rows issued in the current group
  logic [CW-1:0] groups_done;
  logic          fetching, want_rd, want_wr;

  assign wpr      = cur_cols >> 3;
  assign fetching = (state == S_RUN) && (f_row < cur_rows);
  assign want_wr  = dv;
  assign want_rd  = fetching && (ahead < 2'd2 || (f_word != '0));
  assign mem_wr   = want_wr;
  assign mem_rd   = want_rd && !want_wr;
  assign dr       = want_wr && mem_ready;
  assign out_en   = (state == S_RUN) && (in_group < 4'd8);
  assign busy     = (state != S_IDLE);

  // Pass 0 reads the (possibly larger) src buffer and writes tmp compactly;
  // pass 1 reads tmp compactly and writes into the dst buffer.
  assign rd_pitch = pass ? wpr : pitch_q;
  assign wr_pitch = pass ? pitch_q : (cur_rows >> 3);

  always_comb begin
    if (want_wr)
      mem_adr = dst + ADR_W'(dcol) * ADR_W'(wr_pitch) + ADR_W'(groups_done);
    else
      mem_adr = src + ADR_W'(f_row) * ADR_W'(rd_pitch) + ADR_W'(f_word);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pass        <= 1'b0;
      cur_rows    <= '0;
      cur_cols    <= '0;
      src         <= '0;
      dst         <= '0;
      pitch_q     <= '0;
      f_row       <= '0;
      f_word      <= '0;
      ahead       <= '0;
      in_group    <= '0;
      groups_done <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_NEXT;
          pass     <= 1'b0;
          cur_rows <= n_rows;
          cur_cols <= n_cols;
          src      <= src_base;
          dst      <= tmp_base;
          pitch_q  <= pitch;
        end
        S_NEXT: begin
          // new pass: clear the counters
          f_row       <= '0;
          f_word      <= '0;
          ahead       <= '0;
          in_group    <= '0;
          groups_done <= '0;
          state       <= S_RUN;
        end
        default: begin
          // fetch
          if (mem_rd && mem_ready) begin
            if (f_word == wpr - 1'b1) begin
              f_word <= '0;
              f_row  <= f_row + 1'b1;
            end else begin
              f_word <= f_word + 1'b1;
            end
          end
          // rows fetched ahead: +1 when a row's first read goes out, -1 when taken
          ahead <= ahead + 2'((mem_rd && mem_ready && f_word == '0) ? 1 : 0)
                         - 2'(line_taken ? 1 : 0);
          // issue groups
          if (group_done) begin
            in_group    <= '0;
            groups_done <= groups_done + 1'b1;
          end else if (line_taken) begin
            in_group <= in_group + 1'b1;
          end
          // end of pass
          if (group_done && groups_done + 1'b1 == (cur_rows >> 3)) begin
            if (!pass) begin
              pass     <= 1'b1;
              cur_rows <= cur_cols;
              cur_cols <= cur_rows;
              src      <= dst;
              dst      <= dst_base;
              state    <= S_NEXT;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
      endcase
    end
  end

  a_one_command: assert property (@(posedge clk) disable iff (!rst_n) !(mem_rd && mem_wr));

endmodule
