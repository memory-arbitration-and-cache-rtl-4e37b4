// mem_arbiter: three-level background memory arbiter of the CPA.
//
// The tree decides, in every cycle in which the SDRAM accepts a new burst,
// which requester gets it:
//   level 1  : random vs. periodic, service cycle N1 with M1 periodic cycles
//   level 2a : debugger over the level-3a winner (fixed priority)
//   level 3a : CPU/peripherals over GFX, with the programmable GFX priority
//   level 2b : control requests (random side, R2 = N2 - M2 cycles) vs. the
//              periodic run-time streams (M2 cycles), same service cycle rule
//   level 3b : configuration-time control over run-time control
// The structure and the rule used at levels 1 and 2b follow the
// description. N2 and M2 are not given there; their defaults are this
// design's choice. Both service cycles count every clock cycle.
//
// All requests are levels held until granted; grants are one-cycle,
// combinational, and only given when mem_ready is high. gnt_src names the
// winner for the memory controller.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module mem_arbiter
  import cpa_pkg::*;
#(
  parameter int unsigned N1 = SC_N,
  parameter int unsigned M1 = SC_M,
  parameter int unsigned N2 = 1024,
  parameter int unsigned M2 = 896,
  parameter int unsigned PRIO_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_ready,
  input  logic [PRIO_W-1:0] gfx_priority,
  input  logic              req_dbg,
  input  logic              req_cpu,
  input  logic              req_gfx,
  input  logic              req_stream,
  input  logic              req_cfg,
  input  logic              req_rtc,
  output logic              gnt_dbg,
  output logic              gnt_cpu,
  output logic              gnt_gfx,
  output logic              gnt_stream,
  output logic              gnt_cfg,
  output logic              gnt_rtc,
  output mem_src_e          gnt_src,
  output logic              l1_sc_start,
  output logic [$clog2(N1+1)-1:0] l1_rand_used,
  output logic              l2b_sc_start,
  output logic [$clog2(N2+1)-1:0] l2b_rand_used
);

  logic l1_req, l1_gnt_r, l1_gnt_p;
  logic l2a_req, l2a_gnt_lo;
  logic l3a_req;
  logic l2b_req, l2b_gnt_r;
  logic l3b_req;

  service_cycle_arb #(.N(N1), .M(M1)) u_l1 (
    .clk, .rst_n,
    .req_r(l2a_req), .req_p(l2b_req),
    .gnt_in(1'b1), .mem_ready,
    .req_out(l1_req), .gnt_r(l1_gnt_r), .gnt_p(l1_gnt_p),
    .sc_start(l1_sc_start), .rand_used(l1_rand_used)
  );

  fixed_prio_arb u_l2a (
    .req_hi(req_dbg), .req_lo(l3a_req), .gnt_in(l1_gnt_r),
    .req_out(l2a_req), .gnt_hi(gnt_dbg), .gnt_lo(l2a_gnt_lo)
  );

  gfx_prio_arb #(.PRIO_W(PRIO_W)) u_l3a (
    .clk, .rst_n, .gfx_priority,
    .req_cpu, .req_gfx, .gnt_in(l2a_gnt_lo),
    .req_out(l3a_req), .gnt_cpu, .gnt_gfx
  );

  service_cycle_arb #(.N(N2), .M(M2)) u_l2b (
    .clk, .rst_n,
    .req_r(l3b_req), .req_p(req_stream),
    .gnt_in(l1_gnt_p), .mem_ready,
    .req_out(l2b_req), .gnt_r(l2b_gnt_r), .gnt_p(gnt_stream),
    .sc_start(l2b_sc_start), .rand_used(l2b_rand_used)
  );

  fixed_prio_arb u_l3b (
    .req_hi(req_cfg), .req_lo(req_rtc), .gnt_in(l2b_gnt_r),
    .req_out(l3b_req), .gnt_hi(gnt_cfg), .gnt_lo(gnt_rtc)
  );

  always_comb begin
    unique case (1'b1)
      gnt_dbg:    gnt_src = SRC_DBG;
      gnt_cpu:    gnt_src = SRC_CPU;
      gnt_gfx:    gnt_src = SRC_GFX;
      gnt_stream: gnt_src = SRC_STREAM;
      gnt_cfg:    gnt_src = SRC_CFG;
      gnt_rtc:    gnt_src = SRC_RTC;
      default:    gnt_src = SRC_NONE;
    endcase
  end

  a_grant_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_ready && l1_req) |-> (gnt_src != SRC_NONE));

endmodule
