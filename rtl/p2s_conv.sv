// p2s_conv: parallel-to-serial conversion buffer at a read port of the
// stream cache.
//
// Takes one CWORD_W-bit cache word (128 bits by default) and hands it to
// the switch matrix as BUS_W-bit words (16 bits, 8 words), lowest word
// first, each tagged with the stream it belongs to. A new cache word is
// accepted only when the previous one has been sent completely. Both sides
// use valid/ready handshakes.
//
// The widths follow the description; the word order and the handshakes
// are this design's choice.
module p2s_conv #(
  parameter int unsigned IN_W  = 128,
  parameter int unsigned OUT_W = 16,
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

  localparam int unsigned K  = IN_W / OUT_W;
  localparam int unsigned KW = $clog2(K);

  logic [IN_W-1:0] buf_q;
  logic [KW-1:0]   idx_q;

  assign in_ready = ~out_valid;
  assign out_data = buf_q[idx_q*OUT_W +: OUT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q      <= '0;
      idx_q      <= '0;
      out_valid  <= 1'b0;
      out_stream <= '0;
    end else if (in_valid && in_ready) begin
      buf_q      <= in_data;
      out_stream <= in_stream;
      idx_q      <= '0;
      out_valid  <= 1'b1;
    end else if (out_valid && out_ready) begin
      if (idx_q == KW'(K - 1)) begin
        out_valid <= 1'b0;
        idx_q     <= '0;
      end else begin
        idx_q <= idx_q + 1'b1;
      end
    end
  end

endmodule
