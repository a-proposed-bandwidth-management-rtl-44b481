// xmbc_slot: one control slot of the transmit buffer controller.
//
// A control slot holds a busy/idle flip-flop (bi), an excess flip-flop (ex)
// and a slot-number register naming the cell-memory slot it stands for.  The
// slots form a chain kept in transmission order: the rightmost slot is the
// head of the queue, busy slots are packed to the right and idle ones to the
// left.  Three load strobes drive all operations, each completed in one clock:
//   ld3 (read)      every slot loads from its west (left) neighbour;
//   ld2 (overwrite) slots whose lex input is low, i.e. the leftmost excess slot
//                   and those to its left, load from their west neighbour;
//   ld1 (write)     the rightmost idle slot (own bi low, right neighbour busy)
//                   sets bi and loads ex from the bus excess line bex.
// mxs selects the bus inputs ("1" and bex) instead of the west inputs for the
// flip-flops, as in a write.  oe2 puts the rightmost idle slot's number on the
// slot bus (write), oe1 that of the leftmost excess slot (overwrite).  rex
// tells the right neighbour that an excess cell lies at or left of this slot.
// The bus is modelled as an AND-OR structure: dslot is zero unless this slot
// drives it.  The lds input, which loads the slot register from the bus during
// a write, is this design's addition for the integrated buffer controller,
// where slot numbers are exchanged with the resequencer; the stand-alone slot
// keeps its number on a write.  Signal names follow the published slot
// circuit; the gate-level structure inside is this design's own.
module xmbc_slot #(
  parameter int unsigned SLOT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLOT_W-1:0] rst_slot, // slot number held after reset
  // control strobes
  input  logic              oe1,
  input  logic              oe2,
  input  logic              ld1,
  input  logic              ld2,
  input  logic              ld3,
  input  logic              mxs,
  input  logic              lds,
  // neighbours
  input  logic              lex,      // an excess cell lies to the left
  output logic              rex,      // to the right neighbour's lex
  input  logic              rbi,      // right neighbour busy (1 at the right end)
  input  logic              wbi,      // west neighbour's busy/idle
  input  logic              wex,      // west neighbour's excess
  input  logic [SLOT_W-1:0] wslot,    // west neighbour's slot number
  // buses
  input  logic              bex,      // excess value of the cell being written
  input  logic [SLOT_W-1:0] bslot,    // slot bus (read back during a write)
  output logic [SLOT_W-1:0] dslot,    // this slot's drive onto the slot bus
  output logic              is_widle, // this is the rightmost idle slot
  output logic              is_lexc,  // this is the leftmost excess slot
  // state
  output logic              ebi,
  output logic              eex,
  output logic [SLOT_W-1:0] eslot
);

  logic bi_q, ex_q;
  logic [SLOT_W-1:0] slot_q;

  assign ebi   = bi_q;
  assign eex   = bi_q & ex_q;
  assign eslot = slot_q;

  assign is_widle = ~bi_q & rbi;
  assign is_lexc  = bi_q & ex_q & ~lex;
  assign rex      = lex | (bi_q & ex_q);

  assign dslot = ((oe1 && is_lexc) || (oe2 && is_widle)) ? slot_q : '0;

  logic shift_in, write_in, load_flags, load_slot;
  assign shift_in   = ld3 || (ld2 && !lex);
  assign write_in   = ld1 && is_widle;
  assign load_flags = shift_in || write_in;
  assign load_slot  = shift_in || (write_in && lds);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bi_q   <= 1'b0;
      ex_q   <= 1'b0;
      slot_q <= rst_slot;
    end else begin
      if (load_flags) begin
        bi_q <= mxs ? 1'b1 : wbi;
        ex_q <= mxs ? bex  : wex;
      end
      if (load_slot) slot_q <= mxs ? bslot : wslot;
    end
  end

endmodule
