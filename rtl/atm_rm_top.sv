// atm_rm_top: the resource management hardware of one reference connection.
//
// Two parts of the path a circuit's cells take through the network, each as
// it would sit in a real system:
//   * the access resource manager (arm) at the user-network interface, which
//     checks each cell the host sends against its circuit's token pool and
//     passes, marks, re-types or discards it, and which also charges cells
//     leaving the network towards the host to multi-source circuits;
//   * one switch output port: the virtual circuit translation table (vcxt) at
//     the switch input, which gives each cell its outgoing VCI and its
//     resource management index (RMI), and the integrated buffer controller
//     (ibc) of the output buffer, with fast buffer reservation per burst.
// Between them lies the switch fabric, which is not part of this design: the
// cells the ARM lets into the network leave on the acc_* ports, and cells
// arriving at the switch input enter on the sw_* ports (with the age the
// fabric has given them, in cell times, for the resequencer).  The host
// links, the control processor's configuration writes and the output link
// handshake are ports too.
// Timing: the ARM and the IBC each run a three-clock operation cycle, on the
// same clock but with their own phase counters.  A cell accepted on sw_* is
// looked up in the VCXT in the same clock and held in a one-cell input
// register until the IBC's arrival phase; sw_ready is low while that register
// is full and is not emptied in this clock.  A cell on an unknown VCI is
// dropped at the input register (ev_unknown_vci).  The outgoing VCI is placed
// in the low VCI_W bits of the cell the buffer stores.
// Following the source: the blocks, their placement in the reference
// connection and the VCI -> RMI translation ahead of the output buffer.  This
// design's own: the one-cell input register, the split of a cell into VCI and
// payload, the ports that stand for the fabric and the control processor.
module atm_rm_top
  import atm_pkg::*;
#(
  parameter int unsigned NVC     = 64,     // pools of each class at the ARM
  parameter int unsigned IW      = $clog2(NVC),
  parameter int unsigned NRQ     = 64,     // resequencer records
  parameter int unsigned NXB     = 192,    // transmit buffer slots
  parameter int unsigned NRMI    = 256,    // BAT entries
  parameter int unsigned NTIMER  = 64,
  parameter int unsigned RMI_W   = $clog2(NRMI),
  parameter int unsigned BW      = 8,
  parameter int unsigned VCI_W   = 10,
  parameter int unsigned AGE_W   = 8,
  parameter int unsigned AGE_TH  = 8,
  parameter int unsigned TIMEOUT = 100,
  parameter int unsigned CELL_W  = CELL_BITS,
  parameter int unsigned PAY_W   = CELL_W - VCI_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ---------------- ARM configuration (control processor)
  input  logic                 cfgp_we,
  input  logic [IW-1:0]        cfgp_idx,
  input  logic [31:0]          cfgp_p,
  input  logic [23:0]          cfgp_inc,
  input  logic [11:0]          cfgp_pp,
  input  logic [11:0]          cfgp_pinc,
  input  logic                 cfgp_mode,
  input  logic                 cfgp_msrc,
  input  logic                 cfgu_we,
  input  logic [IW-1:0]        cfgu_idx,
  input  logic [47:0]          cfgu_p,
  input  logic [23:0]          cfgu_inc,
  input  logic [3:0]           cfgu_z,
  input  logic signed [5:0]    cfgu_h,
  // ---------------- host -> ARM
  input  logic                 h_valid,
  output logic                 h_ready,
  input  logic                 h_cls,
  input  logic [IW-1:0]        h_idx,
  input  logic [VCI_W-1:0]     h_vci,
  input  pt_e                  h_pt,
  input  logic [PAY_W-1:0]     h_pay,
  output logic                 h_fc,       // flow-control request to the host
  // ---------------- ARM -> fabric
  output logic                 acc_valid,
  output logic [VCI_W-1:0]     acc_vci,
  output pt_e                  acc_pt,
  output logic                 acc_marked,
  output logic [PAY_W-1:0]     acc_pay,
  output logic                 acc_discard, // cell refused by the ARM
  // ---------------- network -> host, through the ARM
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic                 x_cls,
  input  logic [IW-1:0]        x_idx,
  input  pt_e                  x_pt,
  output act_e                 x_act,
  output logic                 arm_tmr_fire,
  output logic [IW-1:0]        arm_tmr_idx,
  // ---------------- switch configuration
  input  logic                 vx_we,
  input  logic [VCI_W-1:0]     vx_vci,
  input  logic                 vx_valid,
  input  logic [VCI_W-1:0]     vx_vci_out,
  input  logic [RMI_W-1:0]     vx_rmi,
  input  logic                 bat_we,
  input  logic [RMI_W-1:0]     bat_rmi,
  input  logic [BW-1:0]        bat_need,
  input  logic                 b_we,
  input  logic [BW-1:0]        b_val,
  // ---------------- fabric -> switch output port
  input  logic                 sw_valid,
  output logic                 sw_ready,
  input  logic [VCI_W-1:0]     sw_vci,
  input  pt_e                  sw_pt,
  input  logic [AGE_W-1:0]     sw_age,
  input  logic [PAY_W-1:0]     sw_pay,
  // ---------------- output link
  output logic                 out_valid,
  output logic [VCI_W-1:0]     out_vci,
  output logic [PAY_W-1:0]     out_pay,
  output pt_e                  out_pt,
  output logic                 out_ex,
  output logic [RMI_W-1:0]     out_rmi,
  input  logic                 out_ack,
  // ---------------- status and events
  output logic [BW-1:0]        b_avail,
  output logic                 ev_unknown_vci,
  output logic                 ev_admit,
  output logic                 ev_mark,
  output logic                 ev_discard,
  output logic                 ev_overwrite,
  output logic                 ev_drop_ex,
  output logic                 ev_in_drop,
  output logic                 ev_timeout
);

  // ------------------------------------------------------------- access side
  act_e       a_act;
  pt_e        a_pt;
  logic [1:0] a_phase;
  logic [23:0] a_now;

  arm #(.NVC(NVC), .IW(IW), .NTIMER(NTIMER), .TIMEOUT(TIMEOUT)) u_arm (
    .clk, .rst_n,
    .cfgp_we, .cfgp_idx, .cfgp_p, .cfgp_inc, .cfgp_pp, .cfgp_pinc, .cfgp_mode, .cfgp_msrc,
    .cfgu_we, .cfgu_idx, .cfgu_p, .cfgu_inc, .cfgu_z, .cfgu_h,
    .ent_valid(h_valid), .ent_ready(h_ready), .ent_cls(h_cls), .ent_idx(h_idx),
    .ent_pt(h_pt), .ent_act(a_act), .ent_pt_out(a_pt), .ent_fc(h_fc),
    .ext_valid(x_valid), .ext_ready(x_ready), .ext_cls(x_cls), .ext_idx(x_idx),
    .ext_pt(x_pt), .ext_act(x_act),
    .tmr_fire(arm_tmr_fire), .tmr_idx(arm_tmr_idx),
    .phase(a_phase), .now(a_now));

  assign acc_valid   = h_valid && h_ready && (a_act != ACT_DISCARD);
  assign acc_discard = h_valid && h_ready && (a_act == ACT_DISCARD);
  assign acc_vci     = h_vci;
  assign acc_pt      = a_pt;
  assign acc_marked  = (a_act == ACT_MARK);
  assign acc_pay     = h_pay;

  // ------------------------------------------------------ switch output port
  logic             lk_valid;
  logic [VCI_W-1:0] lk_vci_out;
  logic [RMI_W-1:0] lk_rmi;

  vcxt #(.VCI_W(VCI_W), .RMI_W(RMI_W)) u_vcxt (
    .clk, .rst_n,
    .wr_en(vx_we), .wr_vci(vx_vci), .wr_valid(vx_valid), .wr_vci_out(vx_vci_out),
    .wr_rmi(vx_rmi),
    .lk_vci(sw_vci), .lk_valid, .lk_vci_out, .lk_rmi);

  // one-cell input register between the translation and the buffer
  logic             r_v;
  logic [VCI_W-1:0] r_vci;
  logic [RMI_W-1:0] r_rmi;
  pt_e              r_pt;
  logic [AGE_W-1:0] r_age;
  logic [PAY_W-1:0] r_pay;
  logic             i_ready;

  assign sw_ready = !r_v || i_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v   <= 1'b0;
      r_vci <= '0;
      r_rmi <= '0;
      r_pt  <= PT_LONER;
      r_age <= '0;
      r_pay <= '0;
    end else begin
      if (i_ready) r_v <= 1'b0;
      if (sw_valid && sw_ready && lk_valid) begin
        r_v   <= 1'b1;
        r_vci <= lk_vci_out;
        r_rmi <= lk_rmi;
        r_pt  <= sw_pt;
        r_age <= sw_age;
        r_pay <= sw_pay;
      end
    end
  end
  assign ev_unknown_vci = sw_valid && sw_ready && !lk_valid;

  logic [CELL_W-1:0] o_cell;
  logic [1:0]        i_phase;
  logic [7:0]        i_tclk;
  logic [$clog2(NXB+1)-1:0] i_ni, i_nx;

  ibc #(.NRQ(NRQ), .NXB(NXB), .NRMI(NRMI), .NTIMER(NTIMER), .RMI_W(RMI_W), .BW(BW),
        .AGE_W(AGE_W), .AGE_TH(AGE_TH), .TIMEOUT(TIMEOUT), .CELL_W(CELL_W)) u_ibc (
    .clk, .rst_n,
    .cfg_we(bat_we), .cfg_rmi(bat_rmi), .cfg_need(bat_need), .cfg_b_we(b_we), .cfg_b(b_val),
    .in_ready(i_ready), .in_valid(r_v), .in_cell({r_pay, r_vci}), .in_rmi(r_rmi),
    .in_pt(r_pt), .in_age(r_age),
    .out_valid, .out_cell(o_cell), .out_rmi, .out_pt, .out_ex, .out_ack,
    .phase(i_phase), .tclk(i_tclk), .b_avail, .ni(i_ni), .nx(i_nx),
    .ev_admit, .ev_mark, .ev_discard, .ev_overwrite, .ev_drop_ex, .ev_in_drop, .ev_timeout);

  assign out_vci = o_cell[VCI_W-1:0];
  assign out_pay = o_cell[CELL_W-1:VCI_W];

endmodule
