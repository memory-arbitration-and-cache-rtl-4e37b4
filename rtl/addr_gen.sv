// addr_gen: address generation of the stream cache.
//
// Every stream owns a ring of cache lines handed out by the linked list and
// uses it as a FIFO. For each stream this block keeps a write pointer and a
// read pointer (line number and word within the line), the number of cache
// words stored, the capacity, the direction and the background memory
// address of its next burst.
//
// At most one cache access happens per cycle (the cache memory has one
// port). For an access (acc_valid) it returns, combinationally, the cache
// word address acc_addr = line * WPL + word of the stream's write pointer
// (acc_write = 1, a word is added to the FIFO) or read pointer
// (acc_write = 0, a word is taken out). On the clock edge the pointer
// advances; when it leaves the last word of a line it moves to the next line
// of the stream's ring, found through the linked list lookup port
// (lk_line/lk_next), and the fill count changes by one.
//
// init_* sets a stream up after its lines have been allocated: both
// pointers at the first line, an empty FIFO, WPL words per line of
// capacity. close_* marks it inactive. burst_valid advances the stream's
// background memory address by one burst (LINE_BYTES).
//
// That streams are FIFOs in locked lines, and that there is address
// generation, follows the description; this organisation is this design's
// choice.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module addr_gen
  import cpa_pkg::*;
#(
  parameter int unsigned NLINES   = NUM_LINES,
  parameter int unsigned NSTREAMS = NUM_STREAMS,
  parameter int unsigned WPL      = CWORDS_PER_LINE,
  parameter int unsigned AW_MEM   = MADDR_W,
  localparam int unsigned LW = $clog2(NLINES),
  localparam int unsigned SW = $clog2(NSTREAMS),
  localparam int unsigned WW = (WPL > 1) ? $clog2(WPL) : 1,
  localparam int unsigned AW = $clog2(NLINES * WPL),
  localparam int unsigned FW = $clog2(NLINES * WPL + 1),
  localparam int unsigned CW = $clog2(NLINES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // stream setup
  input  logic              init_valid,
  input  logic [SW-1:0]     init_stream,
  input  logic [LW-1:0]     init_head,
  input  logic [CW-1:0]     init_nlines,
  input  stream_dir_e       init_dir,
  input  logic [AW_MEM-1:0] init_base,
  input  logic              close_valid,
  input  logic [SW-1:0]     close_stream,
  // one cache access per cycle
  input  logic              acc_valid,
  input  logic [SW-1:0]     acc_stream,
  input  logic              acc_write,
  output logic [AW-1:0]     acc_addr,
  // linked list lookup
  output logic [LW-1:0]     lk_line,
  input  logic [LW-1:0]     lk_next,
  // background memory bursts
  input  logic              burst_valid,
  input  logic [SW-1:0]     burst_stream,
  // per-stream status
  output logic              active [NSTREAMS],
  output stream_dir_e       dir    [NSTREAMS],
  output logic [FW-1:0]     fill   [NSTREAMS],
  output logic [FW-1:0]     cap    [NSTREAMS],
  output logic [AW_MEM-1:0] maddr  [NSTREAMS]
);

  logic [LW-1:0] wr_line_q [NSTREAMS];
  logic [WW-1:0] wr_word_q [NSTREAMS];
  logic [LW-1:0] rd_line_q [NSTREAMS];
  logic [WW-1:0] rd_word_q [NSTREAMS];
  logic [LW-1:0] a_line;
  logic [WW-1:0] a_word;

  assign a_line   = acc_write ? wr_line_q[acc_stream] : rd_line_q[acc_stream];
  assign a_word   = acc_write ? wr_word_q[acc_stream] : rd_word_q[acc_stream];
  assign acc_addr = AW'(a_line) * AW'(WPL) + AW'(a_word);
  assign lk_line  = a_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTREAMS; s++) begin
        wr_line_q[s] <= '0;
        wr_word_q[s] <= '0;
        rd_line_q[s] <= '0;
        rd_word_q[s] <= '0;
        active[s]    <= 1'b0;
        dir[s]       <= DIR_TO_MEM;
        fill[s]      <= '0;
        cap[s]       <= '0;
        maddr[s]     <= '0;
      end
    end else begin
      if (init_valid) begin
        wr_line_q[init_stream] <= init_head;
        wr_word_q[init_stream] <= '0;
        rd_line_q[init_stream] <= init_head;
        rd_word_q[init_stream] <= '0;
        active[init_stream]    <= 1'b1;
        dir[init_stream]       <= init_dir;
        fill[init_stream]      <= '0;
        cap[init_stream]       <= FW'(init_nlines) * FW'(WPL);
        maddr[init_stream]     <= init_base;
      end
      if (close_valid)
        active[close_stream] <= 1'b0;
      if (acc_valid) begin
        if (acc_write) begin
          fill[acc_stream] <= fill[acc_stream] + 1'b1;
          if (wr_word_q[acc_stream] == WW'(WPL - 1)) begin
            wr_word_q[acc_stream] <= '0;
            wr_line_q[acc_stream] <= lk_next;
          end else begin
            wr_word_q[acc_stream] <= wr_word_q[acc_stream] + 1'b1;
          end
        end else begin
          fill[acc_stream] <= fill[acc_stream] - 1'b1;
          if (rd_word_q[acc_stream] == WW'(WPL - 1)) begin
            rd_word_q[acc_stream] <= '0;
            rd_line_q[acc_stream] <= lk_next;
          end else begin
            rd_word_q[acc_stream] <= rd_word_q[acc_stream] + 1'b1;
          end
        end
      end
      if (burst_valid)
        maddr[burst_stream] <= maddr[burst_stream] + AW_MEM'(WPL * (CWORD_W / 8));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (acc_valid && acc_write) |-> (fill[acc_stream] < cap[acc_stream]));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (acc_valid && !acc_write) |-> (fill[acc_stream] != '0));

endmodule
