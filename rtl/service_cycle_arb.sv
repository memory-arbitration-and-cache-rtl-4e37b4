// service_cycle_arb: two-class arbiter built on a service cycle.
//
// Time is cut into service cycles of N clock cycles. Of those, M are
// reserved for periodic (continuous, media) requests and R = N - M are for
// random (low-latency, e.g. CPU) requests. Random requests have the highest
// priority as long as the random traffic of this node has occupied the
// memory for fewer than R cycles in the current service cycle; after that
// the periodic requests have priority. A losing class is still served when
// the other class has no request, so no memory cycle is left idle. Because
// the random budget is restored at every service cycle boundary, a random
// burst that starts R cycles before the boundary can run on for R more
// cycles after it (2R in total), which is the worst case the worst-case
// response time W = c*|P| + (c*|P|/(N-R) + 1)*R is built on.
//
// The node is meant to sit in a tree of arbiters (level 1 and level 2b of
// the CPA arbitration). req_out tells the parent that this node has a
// request; gnt_in says the parent selects this node in this cycle. The
// grant outputs are combinational from the requests and the node's state.
// mem_ready is high in the cycles in which the memory accepts a new burst;
// a grant is only given in such a cycle. In every other cycle the memory is
// busy with the burst it accepted last, and the node charges that cycle to
// the class that owns the burst, if the burst is its own.
//
// From the description: the service cycle of N clock cycles, M/R split and
// the priority rule. Own choices: the budget is counted in memory-busy
// cycles, the service cycle counts every clock cycle, and the count is not
// carried over a service cycle boundary.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module service_cycle_arb #(
  parameter int unsigned N = 1024,   // service cycle length in clock cycles
  parameter int unsigned M = 512     // cycles reserved for periodic requests
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_r,      // random (low latency) request
  input  logic req_p,      // periodic request
  input  logic gnt_in,     // parent selects this node now
  input  logic mem_ready,  // memory accepts a new burst this cycle
  output logic req_out,    // this node has a request
  output logic gnt_r,      // grant to the random side
  output logic gnt_p,      // grant to the periodic side
  output logic sc_start,   // first cycle of a service cycle
  output logic [$clog2(N+1)-1:0] rand_used  // random cycles used so far
);

  localparam int unsigned R  = N - M;
  localparam int unsigned CW = $clog2(N+1);

  typedef enum logic [1:0] {OWN_NONE, OWN_R, OWN_P} owner_e;

  logic [CW-1:0] pos_q;
  owner_e        owner_q;
  logic          prefer_r;
  logic          busy_r;

  assign req_out  = req_r | req_p;
  assign prefer_r = (rand_used < CW'(R));
  assign gnt_r    = gnt_in & mem_ready & req_r & (prefer_r | ~req_p);
  assign gnt_p    = gnt_in & mem_ready & req_p & ~gnt_r;
  assign sc_start = (pos_q == '0);

  // This clock cycle is spent on random traffic of this node
  assign busy_r = mem_ready ? gnt_r : (owner_q == OWN_R);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q     <= '0;
      rand_used <= '0;
      owner_q   <= OWN_NONE;
    end else begin
      if (pos_q == CW'(N - 1)) begin
        pos_q     <= '0;
        rand_used <= '0;
      end else begin
        pos_q <= pos_q + 1'b1;
        if (busy_r && rand_used != CW'(N))
          rand_used <= rand_used + 1'b1;
      end
      if (mem_ready)
        owner_q <= gnt_r ? OWN_R : (gnt_p ? OWN_P : OWN_NONE);
    end
  end

  initial begin
    assert (M <= N) else $error("service_cycle_arb: M must not exceed N");
  end

  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n)
    !(gnt_r && gnt_p));
  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    (!gnt_r || req_r) && (!gnt_p || req_p));

endmodule
