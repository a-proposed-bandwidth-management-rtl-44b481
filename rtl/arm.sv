// arm: access resource manager at the user-network interface.
//
// Monitors the cells a user sends into the network against the rates the
// user declared, with one token pool per monitored circuit: tp_pred for
// predictable circuits (constant rate, or bursty with a low peak rate) and
// tp_unpred for unpredictable ones (bursty with a high peak rate, for which
// the switches reserve buffers burst by burst).  A class bit with each cell
// chooses the pool set and an index chooses the pool.
// The ARM runs an operation cycle of three clocks (phase 0, 1, 2); the cell
// time T counts operation cycles.
//   phase 0  one entering cell (ent_valid, accepted when ent_ready):
//            predictable -> pass or mark (and flow control);
//            unpredictable -> pass (perhaps re-typed as an end cell) or
//            discard (and flow control when out of tokens).  The decision is
//            on ent_act / ent_pt_out / ent_fc in the same clock.
//   phase 1  one exiting cell (ext_valid, accepted when ext_ready), charged
//            to multi-source circuits; ext_act says whether to deliver it.
//   phase 2  the unpredictable timer bank is served; tmr_fire/tmr_idx report
//            a circuit forced idle by its timer.
// Configuration writes are taken in any clock and hold off that clock's step.
// Following the source: the two pool mechanisms and their sizes (64 of each),
// the three steps per operation cycle.  This design's own: the class bit and
// index supplied with each cell, the phase order, the ready signals, and T
// counting operation cycles.
module arm
  import atm_pkg::*;
#(
  parameter int unsigned NVC     = 64,
  parameter int unsigned IW      = $clog2(NVC),
  parameter int unsigned TW      = 24,
  parameter int unsigned K       = 8,
  parameter int unsigned PPW     = 32,    // predictable P, Q
  parameter int unsigned UPW     = 48,    // unpredictable P, Q
  parameter int unsigned GW      = 24,
  parameter int unsigned KP      = 6,
  parameter int unsigned PKW     = 12,    // peak pool fields
  parameter int unsigned ZW      = 4,
  parameter int unsigned HW      = 6,
  parameter int unsigned NTIMER  = 64,
  parameter int unsigned TIMEOUT = 100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // predictable pool configuration
  input  logic                 cfgp_we,
  input  logic [IW-1:0]        cfgp_idx,
  input  logic [PPW-1:0]       cfgp_p,
  input  logic [GW-1:0]        cfgp_inc,
  input  logic [PKW-1:0]       cfgp_pp,
  input  logic [PKW-1:0]       cfgp_pinc,
  input  logic                 cfgp_mode,
  input  logic                 cfgp_msrc,
  // unpredictable pool configuration
  input  logic                 cfgu_we,
  input  logic [IW-1:0]        cfgu_idx,
  input  logic [UPW-1:0]       cfgu_p,
  input  logic [GW-1:0]        cfgu_inc,
  input  logic [ZW-1:0]        cfgu_z,
  input  logic signed [HW-1:0] cfgu_h,
  // entering cells
  input  logic                 ent_valid,
  output logic                 ent_ready,
  input  logic                 ent_cls,    // 0 predictable, 1 unpredictable
  input  logic [IW-1:0]        ent_idx,
  input  pt_e                  ent_pt,
  output act_e                 ent_act,
  output pt_e                  ent_pt_out,
  output logic                 ent_fc,
  // exiting cells
  input  logic                 ext_valid,
  output logic                 ext_ready,
  input  logic                 ext_cls,
  input  logic [IW-1:0]        ext_idx,
  input  pt_e                  ext_pt,
  output act_e                 ext_act,
  // timers
  output logic                 tmr_fire,
  output logic [IW-1:0]        tmr_idx,
  // status
  output logic [1:0]           phase,
  output logic [TW-1:0]        now
);

  logic cfg_any;
  assign cfg_any   = cfgp_we || cfgu_we;
  assign ent_ready = (phase == 2'd0) && !cfg_any;
  assign ext_ready = (phase == 2'd1) && !cfg_any;

  logic ent_go, ext_go, tmr_go;
  assign ent_go = ent_valid && ent_ready;
  assign ext_go = ext_valid && ext_ready;
  assign tmr_go = (phase == 2'd2) && !cfg_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 2'd0;
      now   <= '0;
    end else if (phase == 2'd2) begin
      phase <= 2'd0;
      now   <= now + 1'b1;
    end else begin
      phase <= phase + 2'd1;
    end
  end

  // predictable pools
  logic p_mark, p_fc;
  tp_pred #(.NVC(NVC), .IW(IW), .K(K), .PW(PPW), .GW(GW), .TW(TW), .KP(KP), .PPW(PKW)) u_pred (
    .clk, .rst_n, .now,
    .cfg_we(cfgp_we), .cfg_idx(cfgp_idx), .cfg_p(cfgp_p), .cfg_inc(cfgp_inc),
    .cfg_pp(cfgp_pp), .cfg_pinc(cfgp_pinc), .cfg_mode(cfgp_mode), .cfg_msrc(cfgp_msrc),
    .ent_en(ent_go && !ent_cls), .ent_idx, .ent_mark(p_mark), .ent_fc(p_fc),
    .ext_en(ext_go && !ext_cls), .ext_idx,
    .rd_idx(ent_idx), .rd_q(), .rd_pq());

  // unpredictable pools
  act_e u_ent_act, u_ext_act;
  pt_e  u_pt_out;
  logic u_fc;
  tp_unpred #(.NVC(NVC), .IW(IW), .K(K), .PW(UPW), .GW(GW), .TW(TW), .ZW(ZW), .HW(HW),
              .NTIMER(NTIMER), .TIMEOUT(TIMEOUT)) u_unpred (
    .clk, .rst_n, .now,
    .cfg_we(cfgu_we), .cfg_idx(cfgu_idx), .cfg_p(cfgu_p), .cfg_inc(cfgu_inc),
    .cfg_z(cfgu_z), .cfg_h(cfgu_h),
    .ent_en(ent_go && ent_cls), .ent_idx, .ent_pt, .ent_act(u_ent_act),
    .ent_pt_out(u_pt_out), .ent_fc(u_fc),
    .ext_en(ext_go && ext_cls), .ext_idx, .ext_pt, .ext_act(u_ext_act),
    .tmr_en(tmr_go), .tmr_fire, .tmr_idx,
    .rd_idx(ent_idx), .rd_q(), .rd_s(), .timers_free());

  always_comb begin
    if (ent_cls) begin
      ent_act    = u_ent_act;
      ent_pt_out = u_pt_out;
      ent_fc     = u_fc;
    end else begin
      ent_act    = p_mark ? ACT_MARK : ACT_PASS;
      ent_pt_out = ent_pt;
      ent_fc     = p_fc;
    end
    ext_act = ext_cls ? u_ext_act : ACT_PASS;
  end

  a_phase_range: assert property (@(posedge clk) disable iff (!rst_n) phase != 2'd3);

endmodule
