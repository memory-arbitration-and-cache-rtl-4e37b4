// sdram_model: behavioural model of the SDRAM and its controller, for
// testbenches only.
//
// A 32-bit memory with 64-byte bursts (16 words). ready is high when a new
// burst command is accepted. A stream write burst takes its 16 words over
// wvalid/wready; a stream read burst returns 16 words on rvalid after
// RD_LAT cycles; a burst of another requester (data outside the model)
// occupies the memory for 16 cycles. Every burst is followed by TURN
// cycles of read/write turnaround, so a burst costs 16 + 2 = 18 cycles as
// in the reference example. Contents are held sparsely; poke/peek give the
// testbench access.
module sdram_model #(
  parameter int RD_LAT = 2,
  parameter int TURN   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic        cmd_stream,   // data path used (stream burst)
  input  logic        cmd_write,
  input  logic [25:0] cmd_addr,     // byte address, 64-byte aligned
  output logic        ready,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  output logic        rvalid,
  output logic [31:0] rdata
);
  typedef enum logic [2:0] {M_IDLE, M_WDATA, M_LAT, M_RDATA, M_BUSY, M_TURN} mstate_e;
  mstate_e st;
  int cnt;
  int waddr;
  logic [31:0] mem [int];
  int bursts_w = 0, bursts_r = 0, bursts_other = 0;

  function automatic void poke(input int word_addr, input logic [31:0] d);
    mem[word_addr] = d;
  endfunction
  function automatic logic [31:0] peek(input int word_addr);
    return mem.exists(word_addr) ? mem[word_addr] : 32'hDEAD_BEEF;
  endfunction

  assign ready  = (st == M_IDLE);
  assign wready = (st == M_WDATA);
  assign rvalid = (st == M_RDATA);
  always_comb rdata = peek(waddr);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      cnt <= 0;
      waddr <= 0;
    end else begin
      unique case (st)
        M_IDLE: if (cmd_valid) begin
          waddr <= int'(cmd_addr) / 4;
          cnt   <= 0;
          if (!cmd_stream)   begin st <= M_BUSY;  bursts_other <= bursts_other + 1; end
          else if (cmd_write) begin st <= M_WDATA; bursts_w <= bursts_w + 1; end
          else               begin st <= M_LAT;   bursts_r <= bursts_r + 1; end
        end
        M_WDATA: if (wvalid) begin
          mem[waddr] = wdata;
          waddr <= waddr + 1;
          cnt <= cnt + 1;
          if (cnt == 15) begin st <= M_TURN; cnt <= 0; end
        end
        M_LAT: begin
          cnt <= cnt + 1;
          if (cnt == RD_LAT - 1) begin st <= M_RDATA; cnt <= 0; end
        end
        M_RDATA: begin
          waddr <= waddr + 1;
          cnt <= cnt + 1;
          if (cnt == 15) begin st <= M_TURN; cnt <= 0; end
        end
        M_BUSY: begin
          cnt <= cnt + 1;
          if (cnt == 15) begin st <= M_TURN; cnt <= 0; end
        end
        M_TURN: begin
          cnt <= cnt + 1;
          if (cnt == TURN - 1) begin st <= M_IDLE; cnt <= 0; end
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
