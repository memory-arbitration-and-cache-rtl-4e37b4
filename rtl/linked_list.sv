// linked_list: cache line allocation for the stream cache.
//
// The cache lines that are not assigned to any stream form one ordered
// list, kept as a next-pointer table with a head, a tail and a count. After
// reset the list is line 0 -> 1 -> ... -> NLINES-1. A stream that is opened
// takes its lines from the head of this free list; its lines are then a
// list of their own, closed into a ring (the last line points back to the
// first), which the address generator follows as a circular FIFO buffer.
// The head of the free list moves to the first line that is still free.
// When a stream is closed its whole list is given back in one step,
// either appended behind the tail of the free list or prepended before its
// head. No compaction or garbage collection is ever needed.
//
// Commands (cmd_valid with cmd_ready high):
//   LL_ALLOC   : assign cmd_nlines lines to cmd_stream. Takes one cycle to
//                accept plus one cycle per line (the walk along the free
//                list to find the last line taken).
//   LL_APPEND  : release all lines of cmd_stream to the tail. One cycle.
//   LL_PREPEND : release all lines of cmd_stream to the head. One cycle.
// done pulses when a command ends; err is valid with it (allocation of zero
// lines, of more lines than are free, to a stream that already has lines,
// or release of a stream without lines). done_head is the first line of
// the stream on an allocation. lk_line/lk_next is a combinational read port
// of the next-pointer table used by the address generator.
//
// The free list, taking lines from its head and the append/prepend release
// follow the description (its figures show 8 lines). The ring closure of a
// stream's list is read from the figure of an assigned stream, whose tail
// points back to its head. The command interface and error rules are this
// design's choice.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module linked_list
  import cpa_pkg::*;
#(
  parameter int unsigned NLINES   = NUM_LINES,
  parameter int unsigned NSTREAMS = NUM_STREAMS,
  localparam int unsigned LW = $clog2(NLINES),
  localparam int unsigned SW = $clog2(NSTREAMS),
  localparam int unsigned CW = $clog2(NLINES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  ll_op_e        cmd_op,
  input  logic [SW-1:0] cmd_stream,
  input  logic [CW-1:0] cmd_nlines,
  output logic          done,
  output logic          err,
  output logic [LW-1:0] done_head,
  input  logic [LW-1:0] lk_line,
  output logic [LW-1:0] lk_next,
  output logic [LW-1:0] free_head,
  output logic [LW-1:0] free_tail,
  output logic [CW-1:0] free_count,
  output logic [CW-1:0] stream_count [NSTREAMS]
);

  typedef enum logic {S_IDLE, S_WALK} state_e;

  logic [LW-1:0] next_q [NLINES];
  logic [LW-1:0] s_head_q [NSTREAMS];
  logic [LW-1:0] s_tail_q [NSTREAMS];
  state_e        state_q;
  logic [LW-1:0] cur_q;
  logic [CW-1:0] left_q;
  logic [CW-1:0] n_q;
  logic [SW-1:0] str_q;
  logic          bad_cmd;

  assign cmd_ready = (state_q == S_IDLE);
  assign lk_next   = next_q[lk_line];

  always_comb begin
    unique case (cmd_op)
      LL_ALLOC: bad_cmd = (cmd_nlines == '0) || (cmd_nlines > free_count) ||
                          (stream_count[cmd_stream] != '0);
      default:  bad_cmd = (stream_count[cmd_stream] == '0);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLINES; i++) next_q[i] <= LW'((i + 1) % NLINES);
      for (int s = 0; s < NSTREAMS; s++) begin
        s_head_q[s]     <= '0;
        s_tail_q[s]     <= '0;
        stream_count[s] <= '0;
      end
      free_head  <= '0;
      free_tail  <= LW'(NLINES - 1);
      free_count <= CW'(NLINES);
      state_q    <= S_IDLE;
      cur_q      <= '0;
      left_q     <= '0;
      n_q        <= '0;
      str_q      <= '0;
      done       <= 1'b0;
      err        <= 1'b0;
      done_head  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          if (bad_cmd) begin
            done <= 1'b1;
            err  <= 1'b1;
          end else begin
            unique case (cmd_op)
              LL_ALLOC: begin
                s_head_q[cmd_stream] <= free_head;
                cur_q   <= free_head;
                left_q  <= cmd_nlines - 1'b1;
                n_q     <= cmd_nlines;
                str_q   <= cmd_stream;
                state_q <= S_WALK;
              end
              LL_APPEND: begin
                if (free_count == '0) free_head <= s_head_q[cmd_stream];
                else                  next_q[free_tail] <= s_head_q[cmd_stream];
                free_tail  <= s_tail_q[cmd_stream];
                free_count <= free_count + stream_count[cmd_stream];
                stream_count[cmd_stream] <= '0;
                done <= 1'b1;
                err  <= 1'b0;
              end
              default: begin  // LL_PREPEND
                if (free_count == '0) free_tail <= s_tail_q[cmd_stream];
                else                  next_q[s_tail_q[cmd_stream]] <= free_head;
                free_head  <= s_head_q[cmd_stream];
                free_count <= free_count + stream_count[cmd_stream];
                stream_count[cmd_stream] <= '0;
                done <= 1'b1;
                err  <= 1'b0;
              end
            endcase
          end
        end
        S_WALK: begin
          if (left_q == '0) begin
            // cur_q is the last line taken: close the stream's ring
            next_q[cur_q]       <= s_head_q[str_q];
            s_tail_q[str_q]     <= cur_q;
            stream_count[str_q] <= n_q;
            free_head           <= next_q[cur_q];
            free_count          <= free_count - n_q;
            done_head           <= s_head_q[str_q];
            done                <= 1'b1;
            err                 <= 1'b0;
            state_q             <= S_IDLE;
          end else begin
            cur_q  <= next_q[cur_q];
            left_q <= left_q - 1'b1;
          end
        end
      endcase
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    free_count <= CW'(NLINES));

endmodule
