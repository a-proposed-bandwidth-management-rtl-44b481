// xmbc: transmit buffer controller (XMBC).
//
// Keeps the order in which the cells of an output buffer are to leave, and
// lets a marked (excess) cell be overwritten by an unmarked one when the
// buffer is full, while the remaining cells stay in FIFO order.  It is a chain
// of NSLOT xmbc_slot control slots; position 0 is the leftmost slot, position
// NSLOT-1 the rightmost, which is the head of the queue.
//
// Operations, one per clock, selected by op:
//   XB_READ       the head leaves: all slots shift right, the head's slot
//                 number is recycled, idle, into the leftmost slot.
//   XB_WRITE      the rightmost idle slot becomes busy with excess flag wr_ex.
//   XB_OVERWRITE  the leftmost excess slot is removed, the slots to its left
//                 shift right, and the new cell (excess flag wr_ex) enters the
//                 leftmost slot, taking over the removed slot number.
// With wr_lds set, a write or overwrite stores wr_slot as the slot number
// instead of keeping the number already in the chain (used when slot numbers
// are traded with a resequencer).  bus_slot is the slot bus: during a write
// the number of the slot written, during an overwrite the number freed; with
// no operation it shows the rightmost idle slot, or if none the leftmost
// excess slot.  The caller must not read an empty buffer, write a full one or
// overwrite one without an excess cell; assertions check this.
//
// The strobe sequence of each operation (ld3 for a read; oe2, ld1 and mxs for
// a write; oe1 then ld2 for an overwrite) follows the published timing
// diagram, compressed here into a single clock per operation.
module xmbc #(
  parameter int unsigned NSLOT     = 192,
  parameter int unsigned SLOT_W    = 8,
  parameter int unsigned SLOT_BASE = 64   // slot numbers SLOT_BASE..+NSLOT-1 at reset
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        op,       // 0 none, 1 read, 2 write, 3 overwrite
  input  logic              wr_ex,
  input  logic [SLOT_W-1:0] wr_slot,
  input  logic              wr_lds,
  output logic              head_bi,  // a cell is waiting
  output logic              head_ex,
  output logic [SLOT_W-1:0] head_slot,
  output logic [SLOT_W-1:0] bus_slot,
  output logic              has_idle,
  output logic              has_excess,
  output logic [NSLOT-1:0]  bi_vec,   // per-position busy flags (observation)
  output logic [NSLOT-1:0]  ex_vec,
  output logic [NSLOT-1:0][SLOT_W-1:0] slot_vec
);

  localparam logic [1:0] XB_NONE = 2'd0, XB_READ = 2'd1, XB_WRITE = 2'd2,
                         XB_OVERWRITE = 2'd3;

  logic oe1, oe2, ld1, ld2, ld3, mxs;
  logic [NSLOT-1:0] rbi, wbi, wex, widle, lexc;
  logic [NSLOT-1:0][SLOT_W-1:0] wslot, dslot;
  logic [SLOT_W-1:0] bslot_in;

  assign has_idle   = ~bi_vec[0];
  assign has_excess = g_slot[NSLOT-1].rex;

  assign ld3 = (op == XB_READ);
  assign ld1 = (op == XB_WRITE);
  assign ld2 = (op == XB_OVERWRITE);
  assign mxs = (op == XB_WRITE);
  assign oe2 = (op == XB_WRITE) || ((op == XB_NONE) && has_idle);
  assign oe1 = (op == XB_OVERWRITE) || ((op == XB_NONE) && !has_idle);

  always_comb begin
    bus_slot = '0;
    for (int p = 0; p < NSLOT; p++) bus_slot |= dslot[p];
  end
  assign bslot_in = wr_lds ? wr_slot : bus_slot;

  // Neighbour wiring.  The leftmost slot is fed either with the recycled head
  // (read) or with the incoming cell (overwrite).
  // The busy chain is kept apart from the slot-number wiring below: rbi
  // reaches the bus through the slots, and the bus feeds wslot[0].
  always_comb begin
    for (int p = 0; p < NSLOT; p++) rbi[p] = (p == NSLOT-1) ? 1'b1 : bi_vec[p+1];
  end

  always_comb begin
    for (int p = 0; p < NSLOT; p++) begin
      if (p == 0) begin
        wbi[p]   = !ld3;
        wex[p]   = ld3 ? 1'b0 : wr_ex;
        wslot[p] = ld3 ? slot_vec[NSLOT-1] : bslot_in;
      end else begin
        wbi[p]   = bi_vec[p-1];
        wex[p]   = ex_vec[p-1];
        wslot[p] = slot_vec[p-1];
      end
    end
  end

  for (genvar p = 0; p < NSLOT; p++) begin : g_slot
    // excess chain: each slot tells its right neighbour about excess cells
    logic lex, rex;
    if (p == 0) begin : g_first
      assign lex = 1'b0;
    end else begin : g_next
      assign lex = g_slot[p-1].rex;
    end
    xmbc_slot #(.SLOT_W(SLOT_W)) u_slot (
      .clk      (clk),
      .rst_n    (rst_n),
      .rst_slot (SLOT_W'(SLOT_BASE + p)),
      .oe1      (oe1),
      .oe2      (oe2),
      .ld1      (ld1),
      .ld2      (ld2),
      .ld3      (ld3),
      .mxs      (mxs),
      .lds      (wr_lds),
      .lex      (lex),
      .rex      (rex),
      .rbi      (rbi[p]),
      .wbi      (wbi[p]),
      .wex      (wex[p]),
      .wslot    (wslot[p]),
      .bex      (wr_ex),
      .bslot    (bslot_in),
      .dslot    (dslot[p]),
      .is_widle (widle[p]),
      .is_lexc  (lexc[p]),
      .ebi      (bi_vec[p]),
      .eex      (ex_vec[p]),
      .eslot    (slot_vec[p])
    );
  end

  assign head_bi   = bi_vec[NSLOT-1];
  assign head_ex   = ex_vec[NSLOT-1];
  assign head_slot = slot_vec[NSLOT-1];

  // Operation preconditions.
  a_read_busy : assert property (@(posedge clk) disable iff (!rst_n)
                                 (op == XB_READ) |-> head_bi);
  a_write_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 (op == XB_WRITE) |-> has_idle);
  a_ow_excess : assert property (@(posedge clk) disable iff (!rst_n)
                                 (op == XB_OVERWRITE) |-> (has_excess && !has_idle));

endmodule
