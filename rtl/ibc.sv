// ibc: integrated buffer controller -- the internal resource manager (IRM) at
// one switch output.
//
// One cell memory of NRQ+NXB slots is shared by a resequencing buffer (NRQ
// records) and a transmit buffer (NXB control slots).  Cells arrive from the
// switching network into the resequencer; once older than AGE_TH they pass the
// buffer allocation table and state machine (BAT/SM), which discards them,
// admits them unmarked, or admits them marked as excess; admitted cells enter
// the transmit buffer controller (XMBC), which sends them in order and lets an
// unmarked cell overwrite the leftmost excess cell when it is full.  Cells are
// never copied between the two buffers: only slot numbers are traded, so every
// memory slot is always named by exactly one resequencer record or XMBC slot.
// Registers: B (slots not allocated, inside bat_sm), ni (idle XMBC slots), nx
// (excess cells in the XMBC), holding registers X, Y, Z, and the clock tclk.
//
// One operation cycle takes three clocks (phase 0, 1, 2):
//   phase 0  if the oldest resequencer record is older than AGE_TH and the
//            XMBC has an idle or excess slot, move it into X.  The XMBC head,
//            if busy, is offered on out_*; with out_ack the slot goes back idle
//            to the end of the XMBC and ni, nx and the BAT bi are updated.
//   phase 1  the BAT/SM processes X (discard clears X.bi; otherwise Y gets the
//            slot number and the excess flag, and the circuit's timer is
//            started, restarted or removed).  Z takes the rightmost idle XMBC
//            slot number, or the leftmost excess one.  Ages are incremented.
//   phase 2  Y enters the XMBC (write if there is an idle slot, overwrite of
//            the leftmost excess cell if Y is unmarked, dropped if Y is marked)
//            and Z goes to the resequencer position X came from.  An arriving
//            cell (in_valid while in_ready) is stored in an idle resequencer
//            position, or dropped if there is none or its age exceeds AGE_TH.
//            An expired timer returns its circuit to idle.  tclk advances.
// The three phases and their steps follow the published description of the
// integrated controller; running each phase in one clock, the input/output
// handshake, the reset state, AGE_TH and TIMEOUT are this design's choices.
// Timers run in operation cycles.  A circuit with no timer free is refused
// like one finding too few slots.
module ibc
  import atm_pkg::*;
#(
  parameter int unsigned NRQ       = 64,
  parameter int unsigned NXB       = 192,
  parameter int unsigned NRMI      = 256,
  parameter int unsigned NTIMER    = 64,
  parameter int unsigned SLOT_W    = $clog2(NRQ + NXB),
  parameter int unsigned RMI_W     = $clog2(NRMI),
  parameter int unsigned BW        = 8,
  parameter int unsigned S_W       = 1,
  parameter int unsigned AGE_W     = 8,
  parameter int unsigned AGE_TH    = 8,
  parameter int unsigned TIME_W    = 8,
  parameter int unsigned TIMEOUT   = 100,
  parameter int unsigned CELL_W    = CELL_BITS,
  parameter bit          PRED_RMI0 = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration from call-setup software
  input  logic              cfg_we,
  input  logic [RMI_W-1:0]  cfg_rmi,
  input  logic [BW-1:0]     cfg_need,
  input  logic              cfg_b_we,
  input  logic [BW-1:0]     cfg_b,
  // cells from the switching network
  output logic              in_ready,
  input  logic              in_valid,
  input  logic [CELL_W-1:0] in_cell,
  input  logic [RMI_W-1:0]  in_rmi,
  input  pt_e               in_pt,
  input  logic [AGE_W-1:0]  in_age,
  // cells to the output link
  output logic              out_valid,
  output logic [CELL_W-1:0] out_cell,
  output logic [RMI_W-1:0]  out_rmi,
  output pt_e               out_pt,
  output logic              out_ex,
  input  logic              out_ack,
  // status
  output logic [1:0]        phase,
  output logic [TIME_W-1:0] tclk,
  output logic [BW-1:0]     b_avail,
  output logic [$clog2(NXB+1)-1:0] ni,
  output logic [$clog2(NXB+1)-1:0] nx,
  // one-clock event strobes
  output logic              ev_admit,      // X admitted unmarked
  output logic              ev_mark,       // X admitted marked
  output logic              ev_discard,    // X discarded by the BAT/SM
  output logic              ev_overwrite,  // excess cell overwritten
  output logic              ev_drop_ex,    // marked X dropped, buffer full
  output logic              ev_in_drop,    // arriving cell dropped
  output logic              ev_timeout     // timer expiry
);

  localparam int unsigned NSLOT = NRQ + NXB;
  localparam int unsigned QW    = $clog2(NRQ);
  localparam int unsigned CW    = $clog2(NXB+1);
  localparam logic [1:0] XB_NONE = 2'd0, XB_READ = 2'd1, XB_WRITE = 2'd2,
                         XB_OVERWRITE = 2'd3;
  localparam logic [2:0] TB_NONE = 3'd0, TB_POP = 3'd4;

  // Cell memory with the RMI and type of each stored cell.
  logic [CELL_W-1:0] ram_cell [NSLOT];
  logic [RMI_W-1:0]  ram_rmi  [NSLOT];
  pt_e               ram_pt   [NSLOT];

  logic [1:0] ph_q;
  assign phase = ph_q;
  wire p0 = (ph_q == 2'd0);
  wire p1 = (ph_q == 2'd1);
  wire p2 = (ph_q == 2'd2);

  // Holding registers.
  logic              x_bi;
  logic [SLOT_W-1:0] x_slot;
  logic [RMI_W-1:0]  x_rmi;
  pt_e               x_pt;
  logic [QW-1:0]     x_idx;
  logic              y_ex;
  logic [SLOT_W-1:0] y_slot;
  logic [SLOT_W-1:0] z_slot;
  logic [CW-1:0]     ni_q, nx_q;
  logic [TIME_W-1:0] t_q;
  assign ni   = ni_q;
  assign nx   = nx_q;
  assign tclk = t_q;

  // ---------------------------------------------------------------- resequencer
  logic              rq_old_bi;
  logic [QW-1:0]     rq_old_idx;
  logic [AGE_W-1:0]  rq_old_age;
  logic [SLOT_W-1:0] rq_old_slot;
  logic [RMI_W-1:0]  rq_old_rmi;
  pt_e               rq_old_pt;
  logic              rq_take, rq_put, rq_ins, rq_ins_ok;
  logic [SLOT_W-1:0] rq_put_slot, rq_ins_slot;
  logic [QW-1:0]     rq_ins_idx;
  logic [$clog2(NRQ+1)-1:0] rq_n_busy;

  reseq #(.NRQ(NRQ), .SLOT_W(SLOT_W), .RMI_W(RMI_W), .AGE_W(AGE_W),
          .SLOT_BASE(0)) u_reseq (
    .clk(clk), .rst_n(rst_n),
    .old_bi(rq_old_bi), .old_idx(rq_old_idx), .old_age(rq_old_age),
    .old_slot(rq_old_slot), .old_rmi(rq_old_rmi), .old_pt(rq_old_pt),
    .take(rq_take), .age_inc(p1),
    .put(rq_put), .put_idx(x_idx), .put_slot(rq_put_slot),
    .ins(rq_ins), .pref_idx(x_idx), .ins_age(in_age), .ins_rmi(in_rmi),
    .ins_pt(in_pt), .ins_ok(rq_ins_ok), .ins_idx(rq_ins_idx),
    .ins_slot(rq_ins_slot), .n_busy(rq_n_busy)
  );

  // ----------------------------------------------------------------------- XMBC
  logic [1:0]        xb_op;
  logic              xb_head_bi, xb_head_ex, xb_has_idle, xb_has_excess;
  logic [SLOT_W-1:0] xb_head_slot, xb_bus_slot;
  logic [NXB-1:0]    xb_bi_vec, xb_ex_vec;
  logic [NXB-1:0][SLOT_W-1:0] xb_slot_vec;

  xmbc #(.NSLOT(NXB), .SLOT_W(SLOT_W), .SLOT_BASE(NRQ)) u_xmbc (
    .clk(clk), .rst_n(rst_n), .op(xb_op), .wr_ex(y_ex), .wr_slot(y_slot),
    .wr_lds(1'b1), .head_bi(xb_head_bi), .head_ex(xb_head_ex),
    .head_slot(xb_head_slot), .bus_slot(xb_bus_slot), .has_idle(xb_has_idle),
    .has_excess(xb_has_excess), .bi_vec(xb_bi_vec), .ex_vec(xb_ex_vec),
    .slot_vec(xb_slot_vec)
  );

  // --------------------------------------------------------------------- BAT/SM
  act_e              bat_act;
  logic [2:0]        bat_timer_op;
  logic              tx_unmarked;
  logic [BW-1:0]     bat_rd_need, bat_rd_used;
  logic [S_W-1:0]    bat_rd_state;

  // --------------------------------------------------------------------- timers
  logic [2:0]        tm_op;
  logic              tm_free, tm_match, tm_head_bi, tm_head_exp;
  logic [RMI_W-1:0]  tm_head_rmi;
  logic [TIME_W-1:0] tm_head_time;
  logic [NTIMER-1:0] tm_bi_vec;
  logic              expire;

  assign expire = p2 && tm_head_exp;

  bat_sm #(.NRMI(NRMI), .RMI_W(RMI_W), .BW(BW), .S_W(S_W),
           .PRED_RMI0(PRED_RMI0)) u_bat (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_rmi(cfg_rmi), .cfg_bi_need(cfg_need),
    .cfg_b_we(cfg_b_we), .cfg_b_avail(cfg_b),
    .dec_en(p1 && x_bi), .dec_rmi(x_rmi), .dec_pt(x_pt), .timer_free(tm_free),
    .dec_act(bat_act), .dec_timer_op(bat_timer_op),
    .tx_en(tx_unmarked), .tx_rmi(ram_rmi[xb_head_slot]),
    .rel_en(expire), .rel_rmi(tm_head_rmi),
    .b_avail(b_avail), .rd_rmi(x_rmi), .rd_need(bat_rd_need),
    .rd_used(bat_rd_used), .rd_state(bat_rd_state)
  );

  assign tm_op = (p1 && x_bi) ? bat_timer_op : (expire ? TB_POP : TB_NONE);

  timer_bank #(.NTIMER(NTIMER), .TIME_W(TIME_W), .RMI_W(RMI_W)) u_timers (
    .clk(clk), .rst_n(rst_n), .op(tm_op),
    .rmi(x_rmi), .exp_time(t_q + TIME_W'(TIMEOUT)), .now(t_q),
    .has_free(tm_free), .any_match(tm_match), .head_bi(tm_head_bi),
    .head_exp(tm_head_exp), .head_rmi(tm_head_rmi), .head_time(tm_head_time),
    .bi_vec(tm_bi_vec)
  );

  // ------------------------------------------------------------------- phase 0
  logic load_x, tx_go;
  assign load_x = p0 && rq_old_bi && (rq_old_age > AGE_W'(AGE_TH)) &&
                  (ni_q != '0 || nx_q != '0);
  assign rq_take = load_x;

  assign out_valid   = p0 && xb_head_bi;
  assign out_cell    = ram_cell[xb_head_slot];
  assign out_rmi     = ram_rmi[xb_head_slot];
  assign out_pt      = ram_pt[xb_head_slot];
  assign out_ex      = xb_head_ex;
  assign tx_go       = out_valid && out_ack;
  assign tx_unmarked = tx_go && !xb_head_ex;

  // ------------------------------------------------------------------- phase 2
  logic wr_y, ow_y, drop_y, in_take;
  assign wr_y   = p2 && x_bi && (ni_q != '0);
  assign ow_y   = p2 && x_bi && (ni_q == '0) && !y_ex;
  assign drop_y = p2 && x_bi && (ni_q == '0) && y_ex;

  assign xb_op = tx_go ? XB_READ : (wr_y ? XB_WRITE : (ow_y ? XB_OVERWRITE : XB_NONE));

  assign rq_put      = wr_y || ow_y;
  assign rq_put_slot = z_slot;

  assign in_ready = p2;
  assign in_take  = p2 && in_valid && (in_age <= AGE_W'(AGE_TH));
  assign rq_ins   = in_take;

  always_ff @(posedge clk) begin
    if (in_take && rq_ins_ok) begin
      ram_cell[rq_ins_slot] <= in_cell;
      ram_rmi[rq_ins_slot]  <= in_rmi;
      ram_pt[rq_ins_slot]   <= in_pt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q   <= 2'd0;
      x_bi   <= 1'b0;
      x_slot <= '0;
      x_rmi  <= '0;
      x_pt   <= PT_LONER;
      x_idx  <= '0;
      y_ex   <= 1'b0;
      y_slot <= '0;
      z_slot <= '0;
      ni_q   <= CW'(NXB);
      nx_q   <= '0;
      t_q    <= '0;
    end else begin
      ph_q <= p2 ? 2'd0 : ph_q + 2'd1;
      if (p0) begin
        x_bi <= load_x;
        if (load_x) begin
          x_slot <= rq_old_slot;
          x_rmi  <= rq_old_rmi;
          x_pt   <= rq_old_pt;
          x_idx  <= rq_old_idx;
        end
        if (tx_go) begin
          if (xb_head_ex) nx_q <= nx_q - 1'b1;
          ni_q <= ni_q + 1'b1;
        end
      end
      if (p1) begin
        z_slot <= xb_bus_slot;
        if (x_bi) begin
          if (bat_act == ACT_DISCARD) begin
            x_bi <= 1'b0;
          end else begin
            y_slot <= x_slot;
            y_ex   <= (bat_act == ACT_MARK);
          end
        end
      end
      if (p2) begin
        if (wr_y) begin
          ni_q <= ni_q - 1'b1;
          if (y_ex) nx_q <= nx_q + 1'b1;
        end
        if (ow_y) nx_q <= nx_q - 1'b1;
        t_q <= t_q + 1'b1;
      end
    end
  end

  // Event strobes.
  assign ev_admit     = p1 && x_bi && (bat_act == ACT_PASS);
  assign ev_mark      = p1 && x_bi && (bat_act == ACT_MARK);
  assign ev_discard   = p1 && x_bi && (bat_act == ACT_DISCARD);
  assign ev_overwrite = ow_y;
  assign ev_drop_ex   = drop_y;
  assign ev_in_drop   = p2 && in_valid && !(in_take && rq_ins_ok);
  assign ev_timeout   = expire;

  // The counters mirror the XMBC state.
  a_ni_idle: assert property (@(posedge clk) disable iff (!rst_n)
      xb_has_idle == (ni_q != '0));
  a_nx_exc : assert property (@(posedge clk) disable iff (!rst_n)
      xb_has_excess == (nx_q != '0));

endmodule
