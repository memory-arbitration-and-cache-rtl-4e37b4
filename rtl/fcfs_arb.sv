// fcfs_arb: first-come-first-serve arbiter for the periodic streams.
//
// Each stream raises req[i] and holds it until it is granted. A request is
// registered (made pending) in the cycle it is first seen; from the next
// cycle on it can be granted. The arbiter keeps an age matrix:
// older_q[i][j] is set when the pending request of stream i arrived before
// that of stream j. The grant goes to the pending request that is older than
// every other pending request. Requests that arrive in the same cycle are
// ordered by stream number, lowest first. One grant is given per cycle in
// which gnt_in is high; gnt is one-hot, and gnt_id is its index.
//
// A stream that keeps req high in the cycle after its grant places a new
// request; a stream that drops req before it is granted withdraws it. FCFS order and the 20 streams follow the description; the age
// matrix, the one-cycle registration delay and the tie rule are this
// design's choice.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module fcfs_arb #(
  parameter int unsigned NREQ = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NREQ-1:0]          req,
  input  logic                     gnt_in,   // parent grants this cycle
  output logic                     req_out,  // some request is pending
  output logic [NREQ-1:0]          gnt,
  output logic [$clog2(NREQ)-1:0]  gnt_id
);

  localparam int unsigned IW = $clog2(NREQ);

  logic [NREQ-1:0] pend_q;
  logic [NREQ-1:0] older_q [NREQ];
  logic [NREQ-1:0] arrive;
  logic [NREQ-1:0] winner;
  logic [NREQ-1:0] live;

  assign arrive  = req & ~pend_q & ~gnt;
  assign live    = pend_q & req;
  assign req_out = |live;

  // The oldest pending request: older than every other pending one
  always_comb begin
    winner = '0;
    gnt_id = '0;
    for (int i = 0; i < NREQ; i++) begin
      if (live[i] && ((older_q[i] | ~live | (NREQ'(1) << i)) == '1)) begin
        winner[i] = 1'b1;
        gnt_id    = IW'(i);
      end
    end
  end

  assign gnt = gnt_in ? winner : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
      for (int i = 0; i < NREQ; i++) older_q[i] <= '0;
    end else begin
      pend_q <= (live & ~gnt) | arrive;
      for (int i = 0; i < NREQ; i++) begin
        for (int j = 0; j < NREQ; j++) begin
          if (arrive[i] && arrive[j])
            older_q[i][j] <= (i < j);
          else if (arrive[i])
            older_q[i][j] <= 1'b0;          // everything pending is older
          else if (arrive[j])
            older_q[i][j] <= 1'b1;          // i was there first
        end
      end
    end
  end

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(gnt));
  a_gnt_when_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt_in && |live) |-> (gnt != '0));

endmodule
