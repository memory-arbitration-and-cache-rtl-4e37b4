// fixed_prio_arb: two-input fixed-priority arbiter node.
//
// Input 0 always wins over input 1. In the CPA arbitration tree it is used
// at level 2a, where debugger requests normally take priority over the
// other random requests (CPU and graphics), and at level 3b, where
// configuration-time control requests are placed ahead of run-time
// parameter and instruction requests. The level-2a priority follows the
// description; the level-3b order is this design's choice, as the
// description only says that the two kinds are told apart.
//
// req_out tells the parent that the node has a request, gnt_in selects the
// node; grants are combinational.
module fixed_prio_arb (
  input  logic req_hi,   // high-priority request
  input  logic req_lo,   // low-priority request
  input  logic gnt_in,   // parent selects this node now
  output logic req_out,
  output logic gnt_hi,
  output logic gnt_lo
);

  assign req_out = req_hi | req_lo;
  assign gnt_hi  = gnt_in & req_hi;
  assign gnt_lo  = gnt_in & req_lo & ~req_hi;

endmodule
