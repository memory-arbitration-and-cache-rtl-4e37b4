// cpa_mem_top: stream cache, cache control and background memory
// arbitration of the coprocessor array (CPA).
//
// The video coprocessors reach the shared SDRAM through the stream cache:
// NPORTS bus ports from the switch matrix, one shared cache memory in which
// each open stream owns a ring of locked lines, a linked list of free lines,
// address generation and a first-come-first-serve (FCFS) unit that orders
// the burst requests of the streams. The SDRAM is shared with a CPU and its
// peripherals, a graphics accelerator, a debugger and the control traffic of
// the array; the three-level arbiter decides in every cycle in which the
// SDRAM controller accepts a burst (mem_ready) who gets it:
//   level 1  random (debugger, CPU, GFX) vs. periodic, service cycle N1/M1
//   level 2a debugger over CPU/GFX; level 3a CPU over GFX with gfx_priority
//   level 2b control requests vs. the periodic streams, service cycle N2/M2
//   level 3b configuration-time control over run-time control
//
// Burst command to the SDRAM controller: in a cycle with mem_ready, if
// anyone requests, mc_valid is high with the winner (mc_src), its byte
// address and direction. Requesters outside the array present their burst
// address and direction on ext_addr/ext_write (index 0 debugger, 1 CPU,
// 2 GFX, 3 configuration-time control, 4 run-time control) and hold req_*
// until gnt_*. The data of stream bursts go over sd_w*/sd_r*; the data of
// the other requesters do not pass through this block.
//
// While a stream burst is due but the stream cache's burst engine is still
// storing the previous line (mem_wait, a few cycles after a prefetch
// burst), the arbiter sees the memory as not ready and grants nobody; this
// costs random requests at most those few cycles of latency and keeps them
// from taking the stream side's cycles. This hold is this design's own.
//
// The structure follows the description; interface details are this
// design's choice (see the sub-blocks).
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module cpa_mem_top
  import cpa_pkg::*;
#(
  parameter int unsigned NLINES   = NUM_LINES,
  parameter int unsigned NSTREAMS = NUM_STREAMS,
  parameter int unsigned NPORTS   = NUM_PORTS,
  parameter int unsigned N1       = SC_N,
  parameter int unsigned M1       = SC_M,
  parameter int unsigned N2       = 1024,
  parameter int unsigned M2       = 896,
  localparam int unsigned SW = $clog2(NSTREAMS),
  localparam int unsigned CW = $clog2(NLINES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // stream configuration
  input  logic               cfg_valid,
  output logic               cfg_ready,
  input  cfg_op_e            cfg_op,
  input  logic [SW-1:0]      cfg_stream,
  input  stream_dir_e        cfg_dir,
  input  logic [CW-1:0]      cfg_nlines,
  input  logic               cfg_prepend,
  input  logic [MADDR_W-1:0] cfg_base,
  output logic               cfg_done,
  output logic               cfg_err,
  // bus ports from the switch matrix
  input  logic               wr_valid      [NPORTS],
  output logic               wr_ready      [NPORTS],
  input  logic [SW-1:0]      wr_stream     [NPORTS],
  input  logic [BUS_W-1:0]   wr_data       [NPORTS],
  input  logic               rd_req        [NPORTS],
  input  logic [SW-1:0]      rd_req_stream [NPORTS],
  output logic               rd_valid      [NPORTS],
  input  logic               rd_ready      [NPORTS],
  output logic [SW-1:0]      rd_stream     [NPORTS],
  output logic [BUS_W-1:0]   rd_data       [NPORTS],
  // other requesters of the background memory
  input  logic [3:0]         gfx_priority,
  input  logic               req_dbg,
  input  logic               req_cpu,
  input  logic               req_gfx,
  input  logic               req_cfgc,
  input  logic               req_rtc,
  output logic               gnt_dbg,
  output logic               gnt_cpu,
  output logic               gnt_gfx,
  output logic               gnt_cfgc,
  output logic               gnt_rtc,
  input  logic [MADDR_W-1:0] ext_addr  [5],
  input  logic               ext_write [5],
  // SDRAM controller
  input  logic               mem_ready,
  output logic               mc_valid,
  output mem_src_e           mc_src,
  output logic [MADDR_W-1:0] mc_addr,
  output logic               mc_write,
  output logic               sd_wvalid,
  input  logic               sd_wready,
  output logic [SD_W-1:0]    sd_wdata,
  input  logic               sd_rvalid,
  input  logic [SD_W-1:0]    sd_rdata,
  // status
  output logic [CW-1:0]      free_count,
  output logic [$clog2(NLINES)-1:0] free_head,
  output logic [$clog2(NLINES)-1:0] free_tail,
  output logic [CW-1:0]      stream_lines [NSTREAMS],
  output logic               eng_busy,
  output logic               l1_sc_start,
  output logic [$clog2(N1+1)-1:0] l1_rand_used,
  output logic               l2b_sc_start,
  output logic [$clog2(N2+1)-1:0] l2b_rand_used
);

  logic               st_req, st_gnt, st_write, st_wait, arb_ready;
  logic [MADDR_W-1:0] st_addr;

  stream_cache #(.NLINES(NLINES), .NSTREAMS(NSTREAMS), .NPORTS(NPORTS)) u_cache (
    .clk, .rst_n,
    .cfg_valid, .cfg_ready, .cfg_op, .cfg_stream, .cfg_dir, .cfg_nlines,
    .cfg_prepend, .cfg_base, .cfg_done, .cfg_err,
    .wr_valid, .wr_ready, .wr_stream, .wr_data,
    .rd_req, .rd_req_stream, .rd_valid, .rd_ready, .rd_stream, .rd_data,
    .mem_req(st_req), .mem_gnt(st_gnt), .mem_addr(st_addr), .mem_write(st_write),
    .mem_wait(st_wait),
    .sd_wvalid, .sd_wready, .sd_wdata, .sd_rvalid, .sd_rdata,
    .free_count, .free_head, .free_tail, .stream_lines, .eng_busy
  );

  // While a stream burst is due but the burst engine is still storing the
  // line of the previous one (a few cycles after a prefetch burst), nobody
  // is granted: otherwise a random burst would slip into every such gap and
  // take cycles the service cycle reserves for the streams.
  assign arb_ready = mem_ready && !st_wait;

  mem_arbiter #(.N1(N1), .M1(M1), .N2(N2), .M2(M2), .PRIO_W(4)) u_arb (
    .clk, .rst_n, .mem_ready(arb_ready), .gfx_priority,
    .req_dbg, .req_cpu, .req_gfx, .req_stream(st_req),
    .req_cfg(req_cfgc), .req_rtc,
    .gnt_dbg, .gnt_cpu, .gnt_gfx, .gnt_stream(st_gnt),
    .gnt_cfg(gnt_cfgc), .gnt_rtc,
    .gnt_src(mc_src), .l1_sc_start, .l1_rand_used,
    .l2b_sc_start, .l2b_rand_used
  );

  assign mc_valid = (mc_src != SRC_NONE);

  always_comb begin
    unique case (mc_src)
      SRC_DBG:    begin mc_addr = ext_addr[0]; mc_write = ext_write[0]; end
      SRC_CPU:    begin mc_addr = ext_addr[1]; mc_write = ext_write[1]; end
      SRC_GFX:    begin mc_addr = ext_addr[2]; mc_write = ext_write[2]; end
      SRC_STREAM: begin mc_addr = st_addr;     mc_write = st_write;     end
      SRC_CFG:    begin mc_addr = ext_addr[3]; mc_write = ext_write[3]; end
      SRC_RTC:    begin mc_addr = ext_addr[4]; mc_write = ext_write[4]; end
      default:    begin mc_addr = '0;          mc_write = 1'b0;         end
    endcase
  end

endmodule
