// s2p_conv: serial-to-parallel conversion buffer at a write port of the
// stream cache.
//
// Collects BUS_W-bit words from the switch matrix into one CWORD_W-bit
// cache word (16-bit to 128-bit by default, 8 words). Word k of a group
// lands in bits [k*BUS_W +: BUS_W]. The stream number travels with the words
// and is taken from the first word of a group; all words of a group must
// belong to the same stream. A full group moves to an output register, so
// the next group can be collected while the cache word waits for its slot
// on the cache memory. A new group may start in the very cycle the full one
// moves out, so an unblocked buffer takes one word every cycle. Both sides use valid/ready handshakes; a word or a
// cache word moves in a cycle where valid and ready are both high.
//
// The widths follow the description; the double buffer, the word order and
// the handshakes are this design's choice.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module s2p_conv #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 128,
  parameter int unsigned SID_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SID_W-1:0] in_stream,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [SID_W-1:0] out_stream,
  output logic [OUT_W-1:0] out_data
);

  localparam int unsigned K  = OUT_W / IN_W;
  localparam int unsigned KW = $clog2(K);

  logic [IN_W-1:0]  sh_q [K];
  logic [KW-1:0]    cnt_q;
  logic             full_q;
  logic [SID_W-1:0] sid_q;
  logic             move;

  assign in_ready = ~full_q | move;
  assign move     = full_q & (~out_valid | out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) sh_q[k] <= '0;
      cnt_q      <= '0;
      full_q     <= 1'b0;
      sid_q      <= '0;
      out_valid  <= 1'b0;
      out_stream <= '0;
      out_data   <= '0;
    end else begin
      if (in_valid && in_ready) begin
        sh_q[cnt_q] <= in_data;
        if (cnt_q == '0) sid_q <= in_stream;
        if (cnt_q == KW'(K - 1)) begin
          cnt_q  <= '0;
          full_q <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
      if (move) begin
        full_q     <= 1'b0;
        out_valid  <= 1'b1;
        out_stream <= sid_q;
        for (int k = 0; k < K; k++) out_data[k*IN_W +: IN_W] <= sh_q[k];
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  a_same_stream: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && cnt_q != '0) |-> (in_stream == sid_q));

endmodule
