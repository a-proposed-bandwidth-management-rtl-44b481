// timer_slot: one slot of the time-ordered timer bank.
//
// Holds a busy/idle flip-flop, the time at which the timer expires and the RMI
// (resource management index) of the virtual circuit it guards.  Like the
// transmit buffer control slots, timer slots form a chain in which busy slots
// are packed to the right, the rightmost being the next to expire.  Strobes:
//   ld3  every slot loads from its west neighbour (the head timer is released);
//   ld2  slots whose lmatch input is low -- the slot whose RMI equals the RMI
//        bus brmi and every slot to its left -- load from their west neighbour,
//        which removes that timer (ld2 is only given when a match exists);
//   ld1  the allocation target loads bi=1, btim and brmi (mxs selects the
//        buses).  The target is the rightmost idle slot; when ld1 comes with
//        ld2 (a reset, done here in one clock) it is the leftmost busy slot,
//        which is the rightmost idle slot once the removal has taken effect.
// lmatch is high when a slot to the left holds the RMI on the bus; rmatch
// passes "a match lies at or left of this slot" to the right neighbour.
// Signal names follow the published slot circuit; the single-clock reset is
// this design's choice.
module timer_slot #(
  parameter int unsigned TIME_W = 8,
  parameter int unsigned RMI_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld1,
  input  logic              ld2,
  input  logic              ld3,
  input  logic              mxs,
  input  logic              rbi,     // right neighbour busy (1 at the right end)
  input  logic              wbi,     // west neighbour
  input  logic [TIME_W-1:0] wtim,
  input  logic [RMI_W-1:0]  wrmi,
  input  logic [TIME_W-1:0] btim,    // time bus
  input  logic [RMI_W-1:0]  brmi,    // RMI bus
  input  logic              lmatch,
  output logic              rmatch,
  output logic              ebi,
  output logic [TIME_W-1:0] etim,
  output logic [RMI_W-1:0]  ermi
);

  logic bi_q;
  logic [TIME_W-1:0] tim_q;
  logic [RMI_W-1:0]  rmi_q;

  logic match, tgt, shift_in, take_new;
  assign match    = bi_q && (rmi_q == brmi);
  assign rmatch   = lmatch || match;
  assign tgt      = ld2 ? (bi_q && !wbi) : (!bi_q && rbi);
  assign take_new = ld1 && mxs && tgt;
  assign shift_in = ld3 || (ld2 && !lmatch);

  assign ebi  = bi_q;
  assign etim = tim_q;
  assign ermi = rmi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bi_q  <= 1'b0;
      tim_q <= '0;
      rmi_q <= '0;
    end else if (take_new) begin
      bi_q  <= 1'b1;
      tim_q <= btim;
      rmi_q <= brmi;
    end else if (shift_in) begin
      bi_q  <= wbi;
      tim_q <= wtim;
      rmi_q <= wrmi;
    end
  end

endmodule
