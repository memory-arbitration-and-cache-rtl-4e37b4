// gfx_prio_arb: level-3a arbiter between CPU/peripheral requests and
// graphics accelerator (GFX) requests.
//
// The CPU has priority in general. The programmable value gfx_priority lets
// the GFX unit claim some grants from the CPU: every time the CPU has been
// granted gfx_priority times while a GFX request was waiting, the next grant
// goes to the GFX unit. gfx_priority = 0 gives the CPU strict priority.
// The existence of a "GFX priority" variable and its purpose come from the
// description; this counting rule is this design's choice.
//
// req_out tells the parent that the node has a request, gnt_in selects the
// node; grants are combinational, the counter updates on the clock edge
// after a grant.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module gfx_prio_arb #(
  parameter int unsigned PRIO_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PRIO_W-1:0] gfx_priority,
  input  logic              req_cpu,
  input  logic              req_gfx,
  input  logic              gnt_in,
  output logic              req_out,
  output logic              gnt_cpu,
  output logic              gnt_gfx
);

  logic [PRIO_W-1:0] skipped_q;   // CPU grants given while GFX waited
  logic              gfx_turn;

  assign gfx_turn = (gfx_priority != '0) && (skipped_q >= gfx_priority);
  assign req_out  = req_cpu | req_gfx;
  assign gnt_gfx  = gnt_in & req_gfx & (gfx_turn | ~req_cpu);
  assign gnt_cpu  = gnt_in & req_cpu & ~gnt_gfx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      skipped_q <= '0;
    else if (gnt_gfx)
      skipped_q <= '0;
    else if (gnt_cpu && req_gfx && skipped_q != '1)
      skipped_q <= skipped_q + 1'b1;
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n)
    !(gnt_cpu && gnt_gfx));

endmodule
