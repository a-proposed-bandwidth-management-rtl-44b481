// reseq: resequencing buffer control for the integrated buffer controller.
//
// Cells leaving a switching network that may reorder them are held here until
// they are old enough to be released in age order.  Each of the NRQ slots
// records a busy/idle bit, the cell's age, the number of the cell-memory slot
// holding the cell, the cell's RMI and its cell type (pt).  The cell memory
// itself lives in the enclosing controller; this block only keeps the records.
//
// Per operation cycle the controller uses it in three steps:
//   take     (phase 1) the oldest busy record (largest age, lowest position on
//            a tie) is removed: its busy bit clears, its slot number stays;
//   age_inc  (phase 2) every busy record's age increases by one (saturating);
//   put/ins  (phase 3) put writes a new slot number into one position (the
//            slot traded with the transmit buffer); ins stores an arriving
//            cell in an idle position, preferring pref_idx (the position just
//            freed) and otherwise the lowest idle one.  ins_slot tells where
//            in the cell memory the arriving cell must be written, already
//            taking a same-clock put into account.
// The selection of the oldest cell is written as a plain priority search; its
// circuit is not part of this design's source and is this design's choice.
module reseq
  import atm_pkg::*;
#(
  parameter int unsigned NRQ       = 64,
  parameter int unsigned SLOT_W    = 8,
  parameter int unsigned RMI_W     = 8,
  parameter int unsigned AGE_W     = 8,
  parameter int unsigned SLOT_BASE = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // oldest record
  output logic                   old_bi,
  output logic [$clog2(NRQ)-1:0] old_idx,
  output logic [AGE_W-1:0]       old_age,
  output logic [SLOT_W-1:0]      old_slot,
  output logic [RMI_W-1:0]       old_rmi,
  output pt_e                    old_pt,
  input  logic                   take,
  // ageing
  input  logic                   age_inc,
  // slot exchange
  input  logic                   put,
  input  logic [$clog2(NRQ)-1:0] put_idx,
  input  logic [SLOT_W-1:0]      put_slot,
  // arriving cell
  input  logic                   ins,
  input  logic [$clog2(NRQ)-1:0] pref_idx,
  input  logic [AGE_W-1:0]       ins_age,
  input  logic [RMI_W-1:0]       ins_rmi,
  input  pt_e                    ins_pt,
  output logic                   ins_ok,   // an idle position exists
  output logic [$clog2(NRQ)-1:0] ins_idx,
  output logic [SLOT_W-1:0]      ins_slot,
  output logic [$clog2(NRQ+1)-1:0] n_busy
);

  localparam int unsigned IW = $clog2(NRQ);

  logic [NRQ-1:0]             bi_q;
  logic [NRQ-1:0][AGE_W-1:0]  age_q;
  logic [NRQ-1:0][SLOT_W-1:0] slot_q;
  logic [NRQ-1:0][RMI_W-1:0]  rmi_q;
  pt_e                        pt_q [NRQ];

  // Oldest busy record.
  always_comb begin
    old_bi  = 1'b0;
    old_idx = '0;
    old_age = '0;
    for (int j = 0; j < NRQ; j++) begin
      if (bi_q[j] && (!old_bi || age_q[j] > old_age)) begin
        old_bi  = 1'b1;
        old_idx = IW'(j);
        old_age = age_q[j];
      end
    end
  end
  assign old_slot = slot_q[old_idx];
  assign old_rmi  = rmi_q[old_idx];
  assign old_pt   = pt_q[old_idx];

  // Placement of an arriving cell.
  always_comb begin
    ins_ok  = 1'b0;
    ins_idx = '0;
    if (!bi_q[pref_idx]) begin
      ins_ok  = 1'b1;
      ins_idx = pref_idx;
    end else begin
      for (int j = NRQ-1; j >= 0; j--) begin
        if (!bi_q[j]) begin
          ins_ok  = 1'b1;
          ins_idx = IW'(j);
        end
      end
    end
  end
  assign ins_slot = (put && put_idx == ins_idx) ? put_slot : slot_q[ins_idx];

  always_comb begin
    n_busy = '0;
    for (int j = 0; j < NRQ; j++) n_busy += {{($clog2(NRQ+1)-1){1'b0}}, bi_q[j]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NRQ; j++) begin
        bi_q[j]   <= 1'b0;
        age_q[j]  <= '0;
        slot_q[j] <= SLOT_W'(SLOT_BASE + j);
        rmi_q[j]  <= '0;
        pt_q[j]   <= PT_LONER;
      end
    end else begin
      if (take && old_bi) bi_q[old_idx] <= 1'b0;
      if (age_inc) begin
        for (int j = 0; j < NRQ; j++)
          if (bi_q[j] && age_q[j] != '1) age_q[j] <= age_q[j] + 1'b1;
      end
      if (put) slot_q[put_idx] <= put_slot;
      if (ins && ins_ok) begin
        bi_q[ins_idx]  <= 1'b1;
        age_q[ins_idx] <= ins_age;
        rmi_q[ins_idx] <= ins_rmi;
        pt_q[ins_idx]  <= ins_pt;
      end
    end
  end

endmodule
