// cache_ram: the cache memory of the stream cache.
//
// A single-port array of DEPTH words of WIDTH bits (80 lines of four
// 128-bit words, 5 kB, by default). One access per clock cycle: a write
// stores wdata at addr on the clock edge; a read returns the word at addr
// in rdata one cycle later. The cache word width and the size of the
// buffering follow the description; the single port is this design's
// choice, made possible because the serial-to-parallel buffers at the ports
// need one cache access per eight bus words only.
module cache_ram #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 320,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
