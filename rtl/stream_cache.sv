// stream_cache: multiport stream cache with its cache control.
//
// One shared cache memory buffers all continuous streams between the
// coprocessors and the background memory (SDRAM), so that each stream needs
// only its average share of buffering instead of its own peak-size buffer.
//
// Parts:
//  * NPORTS bus ports to the switch matrix. Each has a write channel, where
//    16-bit words enter through a serial-to-parallel buffer (s2p_conv) and
//    become 128-bit cache words, and a read channel, where 128-bit cache
//    words leave through a parallel-to-serial buffer (p2s_conv).
//  * cache_ram: one single-port array of 128-bit words, LINES x 4 words.
//  * linked_list: allocates cache lines to a stream when it is opened and
//    takes them back when it is closed; the lines of a stream are locked to
//    it and used as a circular FIFO.
//  * addr_gen: FIFO pointers, fill counts and background memory addresses
//    of all streams.
//  * fcfs_arb: a stream asks for a background memory burst when a whole
//    line can be moved (a stream towards memory holds a full line; a stream
//    from memory has a free line for prefetching). The requests are put in
//    first-come-first-serve order; mem_req goes to the memory arbiter.
//  * a burst engine with a one-line buffer: for a write burst it reads the
//    four cache words of the line and sends sixteen 32-bit words to the
//    SDRAM (sd_wvalid/sd_wready); for a read burst it collects sixteen
//    32-bit words (sd_rvalid) and writes four cache words.
//
// mem_req is only raised while the burst engine is idle. mem_wait is high
// while a stream burst is due but the engine is still busy with the last
// one (after a prefetch burst it needs a few more cycles to store the line
// in the cache); the top holds the memory idle for those cycles so that the
// streams keep the share of memory cycles the arbitration reserves for them.
//
// Cache memory access: one access per cycle. The burst engine always wins;
// the 2*NPORTS port channels share the remaining cycles round robin. A
// write channel is served when its cache word is complete and its stream
// has room; a read channel when rd_req is high, its converter is empty and
// the stream (rd_req_stream) holds data. Read data reach the converter one
// cycle after the access.
//
// Stream setup (cfg_*): CFG_OPEN allocates cfg_nlines lines to cfg_stream
// and sets its direction and background memory base address; CFG_CLOSE
// returns its lines to the free list, appended or, with cfg_prepend,
// prepended. cfg_done pulses at the end, with cfg_err.
//
// Memory side: mem_req asks for a burst. In the cycle mem_gnt is high,
// mem_addr (byte address) and mem_write describe the burst of the stream
// at the head of the FCFS order. One burst is handled at a time.
//
// From the description: the single cache shared by all streams, 5 buses,
// 16-to-128-bit conversion, up to 20 streams, locked lines from a linked
// list, FCFS arbitration of the stream requests, 64-byte bursts on a
// 32-bit SDRAM. Own choices: the port protocol, the single-port memory with
// its access schedule, the one-line burst buffer, the request rule, and
// that a stream is closed only once it is idle.
//
// Reset: asynchronous, active low. rst_n also appears in the disable iff
// of the assertions, which lint reports as a reset used both as an
// asynchronous and a synchronous signal; only the assertions use it that way.
module stream_cache
  import cpa_pkg::*;
#(
  parameter int unsigned NLINES   = NUM_LINES,
  parameter int unsigned NSTREAMS = NUM_STREAMS,
  parameter int unsigned NPORTS   = NUM_PORTS,
  localparam int unsigned LW = $clog2(NLINES),
  localparam int unsigned SW = $clog2(NSTREAMS),
  localparam int unsigned CW = $clog2(NLINES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // stream configuration (control bus)
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
  // write channels of the bus ports
  input  logic               wr_valid  [NPORTS],
  output logic               wr_ready  [NPORTS],
  input  logic [SW-1:0]      wr_stream [NPORTS],
  input  logic [BUS_W-1:0]   wr_data   [NPORTS],
  // read channels of the bus ports
  input  logic               rd_req        [NPORTS],
  input  logic [SW-1:0]      rd_req_stream [NPORTS],
  output logic               rd_valid      [NPORTS],
  input  logic               rd_ready      [NPORTS],
  output logic [SW-1:0]      rd_stream     [NPORTS],
  output logic [BUS_W-1:0]   rd_data       [NPORTS],
  // background memory requests
  output logic               mem_req,
  input  logic               mem_gnt,
  output logic [MADDR_W-1:0] mem_addr,
  output logic               mem_write,
  output logic               mem_wait,   // a burst is due, engine still busy
  // SDRAM data
  output logic               sd_wvalid,
  input  logic               sd_wready,
  output logic [SD_W-1:0]    sd_wdata,
  input  logic               sd_rvalid,
  input  logic [SD_W-1:0]    sd_rdata,
  // status
  output logic [CW-1:0]      free_count,
  output logic [LW-1:0]      free_head,
  output logic [LW-1:0]      free_tail,
  output logic [CW-1:0]      stream_lines [NSTREAMS],
  output logic               eng_busy
);

  localparam int unsigned WPL   = CWORDS_PER_LINE;           // 4
  localparam int unsigned SPC   = CWORD_W / SD_W;            // 4
  localparam int unsigned SPL   = SDWORDS_PER_LINE;          // 16
  localparam int unsigned DEPTH = NLINES * WPL;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned FW    = $clog2(DEPTH + 1);
  localparam int unsigned NCH   = 2 * NPORTS;
  localparam int unsigned CHW   = $clog2(NCH);
  localparam int unsigned PW    = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  // ---------------------------------------------------------------- config
  typedef enum logic {C_IDLE, C_WAIT} cstate_e;
  cstate_e             cstate_q;
  cfg_op_e             cop_q;
  logic [SW-1:0]       cstream_q;
  stream_dir_e         cdir_q;
  logic [CW-1:0]       cn_q;
  logic [MADDR_W-1:0]  cbase_q;

  logic          ll_cmd_valid, ll_cmd_ready, ll_done, ll_err;
  ll_op_e        ll_op;
  logic [LW-1:0] ll_done_head, ll_lk_line, ll_lk_next;

  assign cfg_ready    = (cstate_q == C_IDLE) && ll_cmd_ready;
  assign ll_cmd_valid = cfg_valid && cfg_ready;
  assign ll_op        = (cfg_op == CFG_OPEN) ? LL_ALLOC :
                        (cfg_prepend ? LL_PREPEND : LL_APPEND);

  linked_list #(.NLINES(NLINES), .NSTREAMS(NSTREAMS)) u_ll (
    .clk, .rst_n,
    .cmd_valid(ll_cmd_valid), .cmd_ready(ll_cmd_ready), .cmd_op(ll_op),
    .cmd_stream(cfg_stream), .cmd_nlines(cfg_nlines),
    .done(ll_done), .err(ll_err), .done_head(ll_done_head),
    .lk_line(ll_lk_line), .lk_next(ll_lk_next),
    .free_head, .free_tail,
    .free_count, .stream_count(stream_lines)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate_q  <= C_IDLE;
      cop_q     <= CFG_OPEN;
      cstream_q <= '0;
      cdir_q    <= DIR_TO_MEM;
      cn_q      <= '0;
      cbase_q   <= '0;
    end else if (cstate_q == C_IDLE) begin
      if (ll_cmd_valid) begin
        cstate_q  <= C_WAIT;
        cop_q     <= cfg_op;
        cstream_q <= cfg_stream;
        cdir_q    <= cfg_dir;
        cn_q      <= cfg_nlines;
        cbase_q   <= cfg_base;
      end
    end else if (ll_done) begin
      cstate_q <= C_IDLE;
    end
  end

  assign cfg_done = ll_done;
  assign cfg_err  = ll_err;

  // ------------------------------------------------------ address generator
  logic               acc_valid, acc_write;
  logic [SW-1:0]      acc_stream;
  logic [AW-1:0]      acc_addr;
  logic               st_active [NSTREAMS];
  stream_dir_e        st_dir    [NSTREAMS];
  logic [FW-1:0]      st_fill   [NSTREAMS];
  logic [FW-1:0]      st_cap    [NSTREAMS];
  logic [MADDR_W-1:0] st_maddr  [NSTREAMS];
  logic [SW-1:0]      fcfs_id;

  addr_gen #(.NLINES(NLINES), .NSTREAMS(NSTREAMS), .WPL(WPL), .AW_MEM(MADDR_W)) u_ag (
    .clk, .rst_n,
    .init_valid(ll_done && !ll_err && cop_q == CFG_OPEN),
    .init_stream(cstream_q), .init_head(ll_done_head), .init_nlines(cn_q),
    .init_dir(cdir_q), .init_base(cbase_q),
    .close_valid(ll_done && !ll_err && cop_q == CFG_CLOSE),
    .close_stream(cstream_q),
    .acc_valid, .acc_stream, .acc_write, .acc_addr,
    .lk_line(ll_lk_line), .lk_next(ll_lk_next),
    .burst_valid(mem_gnt), .burst_stream(fcfs_id),
    .active(st_active), .dir(st_dir), .fill(st_fill), .cap(st_cap),
    .maddr(st_maddr)
  );

  // ------------------------------------------------------------ burst engine
  typedef enum logic [2:0] {E_IDLE, E_RD_LINE, E_SEND, E_RECV, E_WR_LINE} estate_e;
  estate_e        estate_q;
  logic [SW-1:0]  estream_q;
  logic [SD_W-1:0] lbuf_q [SPL];
  logic [$clog2(SPL)-1:0] eidx_q;       // SDRAM word index
  logic [$clog2(WPL+1)-1:0] eacc_q;     // cache words accessed
  logic           ecap_q;               // a cache word read by the engine arrives
  logic [$clog2(WPL)-1:0] ecap_idx_q;
  logic           eng_acc;
  logic [CWORD_W-1:0] eng_wdata;
  logic [CWORD_W-1:0] ram_rdata;
  logic [NSTREAMS-1:0] sreq, fcfs_gnt;
  logic           fcfs_req;

  assign eng_busy = (estate_q != E_IDLE);
  assign eng_acc  = ((estate_q == E_RD_LINE) || (estate_q == E_WR_LINE)) &&
                    (eacc_q < ($clog2(WPL+1))'(WPL));

  always_comb begin
    for (int k = 0; k < SPC; k++)
      eng_wdata[k*SD_W +: SD_W] = lbuf_q[eacc_q[$clog2(WPL)-1:0] * SPC + k];
  end

  // Burst requests of the streams
  always_comb begin
    for (int s = 0; s < NSTREAMS; s++) begin
      sreq[s] = st_active[s] && !(eng_busy && estream_q == SW'(s)) &&
                ((st_dir[s] == DIR_TO_MEM) ? (st_fill[s] >= FW'(WPL))
                                           : (st_cap[s] - st_fill[s] >= FW'(WPL)));
    end
  end

  fcfs_arb #(.NREQ(NSTREAMS)) u_fcfs (
    .clk, .rst_n, .req(sreq), .gnt_in(mem_gnt),
    .req_out(fcfs_req), .gnt(fcfs_gnt), .gnt_id(fcfs_id)
  );

  assign mem_req   = fcfs_req && !eng_busy;
  assign mem_wait  = fcfs_req && eng_busy;
  a_fcfs_id: assert property (@(posedge clk) disable iff (!rst_n)
    mem_gnt |-> fcfs_gnt[fcfs_id]);
  assign mem_addr  = st_maddr[fcfs_id];
  assign mem_write = (st_dir[fcfs_id] == DIR_TO_MEM);
  assign sd_wvalid = (estate_q == E_SEND);
  assign sd_wdata  = lbuf_q[eidx_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      estate_q   <= E_IDLE;
      estream_q  <= '0;
      eidx_q     <= '0;
      eacc_q     <= '0;
      ecap_q     <= 1'b0;
      ecap_idx_q <= '0;
      for (int j = 0; j < SPL; j++) lbuf_q[j] <= '0;
    end else begin
      ecap_q     <= (estate_q == E_RD_LINE) && eng_acc;
      ecap_idx_q <= eacc_q[$clog2(WPL)-1:0];
      if (ecap_q)
        for (int k = 0; k < SPC; k++)
          lbuf_q[ecap_idx_q * SPC + k] <= ram_rdata[k*SD_W +: SD_W];
      unique case (estate_q)
        E_IDLE: if (mem_gnt) begin
          estream_q <= fcfs_id;
          eidx_q    <= '0;
          eacc_q    <= '0;
          estate_q  <= (st_dir[fcfs_id] == DIR_TO_MEM) ? E_RD_LINE : E_RECV;
        end
        E_RD_LINE: begin
          if (eng_acc) eacc_q <= eacc_q + 1'b1;
          if (ecap_q && ecap_idx_q == ($clog2(WPL))'(WPL - 1)) estate_q <= E_SEND;
        end
        E_SEND: if (sd_wready) begin
          eidx_q <= eidx_q + 1'b1;
          if (eidx_q == ($clog2(SPL))'(SPL - 1)) estate_q <= E_IDLE;
        end
        E_RECV: if (sd_rvalid) begin
          lbuf_q[eidx_q] <= sd_rdata;
          eidx_q <= eidx_q + 1'b1;
          if (eidx_q == ($clog2(SPL))'(SPL - 1)) estate_q <= E_WR_LINE;
        end
        E_WR_LINE: begin
          eacc_q <= eacc_q + 1'b1;
          if (eacc_q == ($clog2(WPL+1))'(WPL - 1)) estate_q <= E_IDLE;
        end
        default: estate_q <= E_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- bus ports
  logic               s2p_valid  [NPORTS];
  logic               s2p_ready  [NPORTS];
  logic [SW-1:0]      s2p_stream [NPORTS];
  logic [CWORD_W-1:0] s2p_data   [NPORTS];
  logic               p2s_load   [NPORTS];
  logic               p2s_ready  [NPORTS];
  logic               rpend_q    [NPORTS];
  logic [SW-1:0]      rpend_sid_q[NPORTS];
  logic [NCH-1:0]     cand;
  logic [NCH-1:0]     chgnt;
  logic [CHW-1:0]     rr_q;
  logic               ch_any;
  logic [CHW-1:0]     ch_sel;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    s2p_conv #(.IN_W(BUS_W), .OUT_W(CWORD_W), .SID_W(SW)) u_s2p (
      .clk, .rst_n,
      .in_valid(wr_valid[p]), .in_ready(wr_ready[p]),
      .in_stream(wr_stream[p]), .in_data(wr_data[p]),
      .out_valid(s2p_valid[p]), .out_ready(s2p_ready[p]),
      .out_stream(s2p_stream[p]), .out_data(s2p_data[p])
    );
    p2s_conv #(.IN_W(CWORD_W), .OUT_W(BUS_W), .SID_W(SW)) u_p2s (
      .clk, .rst_n,
      .in_valid(p2s_load[p]), .in_ready(p2s_ready[p]),
      .in_stream(rpend_sid_q[p]), .in_data(ram_rdata),
      .out_valid(rd_valid[p]), .out_ready(rd_ready[p]),
      .out_stream(rd_stream[p]), .out_data(rd_data[p])
    );
    assign p2s_load[p]  = rpend_q[p];
    assign s2p_ready[p] = chgnt[p];
  end

  // Candidates: write channel p is index p, read channel p is NPORTS + p
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      cand[p] = s2p_valid[p] && st_active[s2p_stream[p]] &&
                (st_dir[s2p_stream[p]] == DIR_TO_MEM) &&
                (st_fill[s2p_stream[p]] < st_cap[s2p_stream[p]]);
      cand[NPORTS + p] = rd_req[p] && p2s_ready[p] && !rpend_q[p] &&
                st_active[rd_req_stream[p]] &&
                (st_dir[rd_req_stream[p]] == DIR_FROM_MEM) &&
                (st_fill[rd_req_stream[p]] != '0);
    end
  end

  // Round robin among the channels, starting at rr_q
  always_comb begin
    ch_any = 1'b0;
    ch_sel = '0;
    for (int k = NCH - 1; k >= 0; k--) begin
      automatic logic [CHW:0] c = CHW'(rr_q) + (CHW+1)'(k);
      if (c >= (CHW+1)'(NCH)) c = c - (CHW+1)'(NCH);
      if (cand[c[CHW-1:0]]) begin
        ch_any = 1'b1;
        ch_sel = c[CHW-1:0];
      end
    end
    chgnt = '0;
    if (!eng_acc && ch_any) chgnt[ch_sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        rpend_q[p]     <= 1'b0;
        rpend_sid_q[p] <= '0;
      end
    end else begin
      if (!eng_acc && ch_any)
        rr_q <= (ch_sel == CHW'(NCH - 1)) ? '0 : ch_sel + 1'b1;
      for (int p = 0; p < NPORTS; p++) begin
        rpend_q[p] <= chgnt[NPORTS + p];
        if (chgnt[NPORTS + p]) rpend_sid_q[p] <= rd_req_stream[p];
      end
    end
  end

  // ----------------------------------------------------------- cache memory
  logic               ram_we;
  logic [CWORD_W-1:0] ram_wdata;

  always_comb begin
    acc_valid  = eng_acc || ch_any;
    acc_stream = estream_q;
    acc_write  = (estate_q == E_WR_LINE);
    ram_we     = (estate_q == E_WR_LINE);
    ram_wdata  = eng_wdata;
    if (!eng_acc) begin
      if (ch_sel < CHW'(NPORTS)) begin
        acc_stream = s2p_stream[PW'(ch_sel)];
        acc_write  = 1'b1;
        ram_we     = 1'b1;
        ram_wdata  = s2p_data[PW'(ch_sel)];
      end else begin
        acc_stream = rd_req_stream[PW'(ch_sel - CHW'(NPORTS))];
        acc_write  = 1'b0;
        ram_we     = 1'b0;
      end
    end
  end

  cache_ram #(.WIDTH(CWORD_W), .DEPTH(DEPTH)) u_ram (
    .clk, .en(acc_valid), .we(ram_we), .addr(acc_addr),
    .wdata(ram_wdata), .rdata(ram_rdata)
  );

  a_gnt_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_gnt |-> mem_req);
  a_rd_load_ok: assert property (@(posedge clk) disable iff (!rst_n)
    rpend_q[0] |-> p2s_ready[0]);

endmodule
