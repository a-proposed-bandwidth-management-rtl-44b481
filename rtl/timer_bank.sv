// timer_bank: time-ordered bank of idle timers for active virtual circuits.
//
// Each virtual circuit in the active state owns one timer; if no cell of that
// circuit arrives before the timer expires, the circuit is forced back to idle.
// The bank is a chain of NTIMER timer_slot cells kept in expiry order: the
// rightmost busy slot (position NTIMER-1) is the next to expire.  Because all
// timers of one bank run for the same duration, a timer that is started or
// restarted always expires last, so it goes into the rightmost idle slot and
// the order is kept without sorting.
//
// Operations, one per clock (op):
//   TB_ALLOC   start a timer for rmi, expiring at time exp_time;
//   TB_RESET   restart the timer of rmi: it is removed and re-allocated with
//              exp_time (if rmi had no timer, one is simply allocated);
//   TB_REMOVE  remove the timer of rmi, if any;
//   TB_POP     release the head timer (after it has expired).
// head_exp is high when the head timer has expired at time now.  Time is
// modular: a timer has expired once now - expiry, taken modulo 2^TIME_W, is
// below 2^(TIME_W-1), so durations must stay under 2^(TIME_W-1) ticks.  The
// "greater or equal" test (rather than equality only) lets a timer that could
// not be served in its own tick still expire a tick later.
module timer_bank #(
  parameter int unsigned NTIMER = 64,
  parameter int unsigned TIME_W = 8,
  parameter int unsigned RMI_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        op,
  input  logic [RMI_W-1:0]  rmi,
  input  logic [TIME_W-1:0] exp_time,
  input  logic [TIME_W-1:0] now,
  output logic              has_free,   // at least one timer is idle
  output logic              any_match,  // rmi currently owns a timer
  output logic              head_bi,
  output logic              head_exp,
  output logic [RMI_W-1:0]  head_rmi,
  output logic [TIME_W-1:0] head_time,
  output logic [NTIMER-1:0] bi_vec
);

  localparam logic [2:0] TB_ALLOC = 3'd1, TB_RESET = 3'd2, TB_REMOVE = 3'd3, TB_POP = 3'd4;

  logic ld1, ld2, ld3, mxs;
  logic [NTIMER-1:0] rbi, wbi;
  logic [NTIMER-1:0][TIME_W-1:0] wtim, etim;
  logic [NTIMER-1:0][RMI_W-1:0]  wrmi, ermi;
  logic [TIME_W-1:0] age;

  assign any_match = g_slot[NTIMER-1].rmatch;
  assign has_free  = ~bi_vec[0];

  assign ld3 = (op == TB_POP);
  assign ld2 = ((op == TB_RESET) || (op == TB_REMOVE)) && any_match;
  assign ld1 = (op == TB_ALLOC) || (op == TB_RESET);
  assign mxs = ld1;

  always_comb begin
    for (int p = 0; p < NTIMER; p++) begin
      if (p == 0) begin
        wbi[p]    = 1'b0;
        wtim[p]   = '0;
        wrmi[p]   = '0;
      end else begin
        wbi[p]    = bi_vec[p-1];
        wtim[p]   = etim[p-1];
        wrmi[p]   = ermi[p-1];
      end
      rbi[p] = (p == NTIMER-1) ? 1'b1 : bi_vec[p+1];
    end
  end

  for (genvar p = 0; p < NTIMER; p++) begin : g_slot
    // match chain: a slot tells its right neighbour about matches to its left
    logic lmatch, rmatch;
    if (p == 0) begin : g_first
      assign lmatch = 1'b0;
    end else begin : g_next
      assign lmatch = g_slot[p-1].rmatch;
    end
    timer_slot #(.TIME_W(TIME_W), .RMI_W(RMI_W)) u_slot (
      .clk    (clk),
      .rst_n  (rst_n),
      .ld1    (ld1),
      .ld2    (ld2),
      .ld3    (ld3),
      .mxs    (mxs),
      .rbi    (rbi[p]),
      .wbi    (wbi[p]),
      .wtim   (wtim[p]),
      .wrmi   (wrmi[p]),
      .btim   (exp_time),
      .brmi   (rmi),
      .lmatch (lmatch),
      .rmatch (rmatch),
      .ebi    (bi_vec[p]),
      .etim   (etim[p]),
      .ermi   (ermi[p])
    );
  end

  assign head_bi   = bi_vec[NTIMER-1];
  assign head_rmi  = ermi[NTIMER-1];
  assign head_time = etim[NTIMER-1];
  assign age       = now - head_time;
  assign head_exp  = head_bi && !age[TIME_W-1];

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
      (op == TB_ALLOC) |-> has_free);
  a_pop_busy  : assert property (@(posedge clk) disable iff (!rst_n)
      (op == TB_POP) |-> head_bi);

endmodule
