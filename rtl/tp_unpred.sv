// tp_unpred: token pool mechanism for unpredictable virtual circuits.
//
// Used at the user-network interface for bursty circuits whose peak rate is
// high enough that the switches reserve buffers for them burst by burst.  The
// pool gains 2^K minitokens per cell time (one token = INC = 2^K/mu minitokens,
// mu the normalised average rate) and, while the circuit is active, loses
// tokens at the peak rate lambda.  The ratio lambda/mu is held as z * 2^h (z a
// small unsigned integer, h a signed exponent), so the drain over dt cell
// times is (dt * z) shifted by h + K: a short multiply and a shift.  Each
// entry also carries the state s (0 idle, otherwise the number of unmatched
// begin cells), and an active circuit owns a timer in a time-ordered timer
// bank, so that a circuit whose end cell is lost still returns to idle.
//
// Three processing steps, one per clock, each in its own clock of the
// operation cycle (the caller sequences them):
//   ent_en  a cell entering the network.  After the pool update:
//           loner: pass.  Idle: start/begin with Q >= INC and a free timer
//           becomes active (s=1, timer started) and passes, anything else is
//           discarded.  Active: start/middle pass and restart the timer, begin
//           also counts s up, end with s > 1 counts s down; an end with s = 1,
//           or any cell when Q < INC, is passed as an end cell, s := 0,
//           Q := Q - INC and the timer is removed.  ent_fc requests a
//           flow-control cell to the user when Q < INC.
//   ext_en  a cell leaving the network (multi-source circuits): the same
//           state machine without the token test, so that the pool follows
//           the activity of all the circuit's sources.
//   tmr_en  the head timer, if expired, is released and its circuit made idle.
// Pool update on ent/ext: Q := min(P, Q + dt*2^K - [active] dt*z*2^(h+K)),
// t := T, with dt = T - t.  Q is signed and held at the most negative value
// rather than wrapping.
// The algorithms, the representation of lambda/mu and the field widths (K=8,
// 48-bit P and Q, 24-bit INC and t, 4-bit z, 6-bit h, 64 pools and 64 timers)
// follow the source.  This design's own choices: the timer restart on an end
// cell with s > 1 for entering cells as for leaving ones, a 4-bit s counter
// (saturating), an 8-bit timer time with a timeout of TIMEOUT cell times, the
// flow-control rule, the clamping, and the configuration port.
module tp_unpred
  import atm_pkg::*;
#(
  parameter int unsigned NVC     = 64,
  parameter int unsigned IW      = $clog2(NVC),
  parameter int unsigned K       = 8,
  parameter int unsigned PW      = 48,
  parameter int unsigned GW      = 24,
  parameter int unsigned TW      = 24,
  parameter int unsigned ZW      = 4,
  parameter int unsigned HW      = 6,
  parameter int unsigned S_W     = 4,
  parameter int unsigned NTIMER  = 64,
  parameter int unsigned TIME_W  = 8,
  parameter int unsigned TIMEOUT = 100
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [TW-1:0]         now,
  // configuration
  input  logic                  cfg_we,
  input  logic [IW-1:0]         cfg_idx,
  input  logic [PW-1:0]         cfg_p,
  input  logic [GW-1:0]         cfg_inc,
  input  logic [ZW-1:0]         cfg_z,
  input  logic signed [HW-1:0]  cfg_h,
  // entering cells
  input  logic                  ent_en,
  input  logic [IW-1:0]         ent_idx,
  input  pt_e                   ent_pt,
  output act_e                  ent_act,
  output pt_e                   ent_pt_out,
  output logic                  ent_fc,
  // exiting cells
  input  logic                  ext_en,
  input  logic [IW-1:0]         ext_idx,
  input  pt_e                   ext_pt,
  output act_e                  ext_act,
  // timers
  input  logic                  tmr_en,
  output logic                  tmr_fire,
  output logic [IW-1:0]         tmr_idx,
  // observation
  input  logic [IW-1:0]         rd_idx,
  output logic signed [PW-1:0]  rd_q,
  output logic [S_W-1:0]        rd_s,
  output logic                  timers_free
);

  localparam int unsigned WW = PW + TW + ZW + 48;
  localparam logic signed [WW-1:0] Q_MIN = -(WW'(1) <<< (PW-1));
  localparam logic [2:0] T_NONE = 3'd0, T_ALLOC = 3'd1, T_RESET = 3'd2,
                         T_REMOVE = 3'd3, T_POP = 3'd4;

  logic        [PW-1:0]  p_q   [NVC];
  logic signed [PW-1:0]  q_q   [NVC];
  logic        [GW-1:0]  inc_q [NVC];
  logic        [TW-1:0]  t_q   [NVC];
  logic        [ZW-1:0]  z_q   [NVC];
  logic signed [HW-1:0]  h_q   [NVC];
  logic        [S_W-1:0] s_q   [NVC];

  assign rd_q = q_q[rd_idx];
  assign rd_s = s_q[rd_idx];

  // ---------------------------------------------------------- pool update
  // One shared datapath: entering and leaving cells use different clocks.
  logic           u_en, u_ent;
  logic [IW-1:0]  u_idx;
  pt_e            u_pt;
  assign u_ent = ent_en;
  assign u_en  = ent_en || ext_en;
  assign u_idx = ent_en ? ent_idx : ext_idx;
  assign u_pt  = ent_en ? ent_pt : ext_pt;

  logic [TW-1:0]        u_dt;
  logic signed [WW-1:0] u_gain, u_prod, u_drain, u_sum, u_q1, u_inc, u_qc;
  logic signed [HW:0]   u_sh;
  always_comb begin
    u_dt    = now - t_q[u_idx];
    u_gain  = $signed({{(WW-TW){1'b0}}, u_dt}) <<< K;
    u_prod  = $signed({{(WW-TW){1'b0}}, u_dt}) * $signed({{(WW-ZW){1'b0}}, z_q[u_idx]});
    u_sh    = (HW+1)'(h_q[u_idx]) + (HW+1)'(K);
    u_drain = (u_sh >= 0) ? (u_prod <<< u_sh) : (u_prod >>> (-u_sh));
    u_sum   = WW'(q_q[u_idx]) + u_gain - ((s_q[u_idx] != '0) ? u_drain : '0);
    u_q1    = (u_sum > $signed({{(WW-PW){1'b0}}, p_q[u_idx]}))
              ? $signed({{(WW-PW){1'b0}}, p_q[u_idx]}) : u_sum;
    u_inc   = $signed({{(WW-GW){1'b0}}, inc_q[u_idx]});
  end

  // ---------------------------------------------------------- state machine
  logic           tb_has_free, tb_match, tb_head_bi, tb_head_exp;
  logic [IW-1:0]  tb_head_rmi;
  logic [TIME_W-1:0] tb_head_time;
  logic [NTIMER-1:0] tb_bi;
  logic [2:0]     t_op;

  act_e           u_act;
  pt_e            u_pt_out;
  logic [S_W-1:0] u_s1;
  logic           u_charge, u_low;
  logic [2:0]     u_top;

  always_comb begin
    u_act    = ACT_PASS;
    u_pt_out = u_pt;
    u_s1     = s_q[u_idx];
    u_charge = 1'b0;
    u_top    = T_NONE;
    u_low    = u_ent && (u_q1 < u_inc);     // only entering cells test tokens
    if (u_pt == PT_LONER) begin
      u_act = ACT_PASS;
    end else if (s_q[u_idx] == '0) begin
      if ((u_pt == PT_START || u_pt == PT_BEGIN) && !u_low && tb_has_free) begin
        u_s1 = S_W'(1);
        u_top = T_ALLOC;
      end else begin
        u_act = ACT_DISCARD;
      end
    end else if (u_low || (u_pt == PT_END && s_q[u_idx] == S_W'(1))) begin
      u_pt_out = PT_END;
      u_s1     = '0;
      u_charge = 1'b1;
      u_top    = T_REMOVE;
    end else begin
      u_top = T_RESET;
      if (u_pt == PT_BEGIN && s_q[u_idx] != '1) u_s1 = s_q[u_idx] + 1'b1;
      if (u_pt == PT_END) u_s1 = s_q[u_idx] - 1'b1;
    end
    u_qc = u_charge ? u_q1 - u_inc : u_q1;
    if (u_qc < Q_MIN) u_qc = Q_MIN;
  end

  assign ent_act    = u_act;
  assign ent_pt_out = u_pt_out;
  assign ent_fc     = ent_en && u_low && (u_pt != PT_LONER);
  assign ext_act    = u_act;

  assign tmr_fire = tmr_en && tb_head_exp;
  assign tmr_idx  = tb_head_rmi;
  assign t_op     = u_en ? u_top : (tmr_fire ? T_POP : T_NONE);
  assign timers_free = tb_has_free;

  timer_bank #(.NTIMER(NTIMER), .TIME_W(TIME_W), .RMI_W(IW)) u_timers (
    .clk, .rst_n, .op(t_op), .rmi(u_idx),
    .exp_time(TIME_W'(now) + TIME_W'(TIMEOUT)), .now(TIME_W'(now)),
    .has_free(tb_has_free), .any_match(tb_match), .head_bi(tb_head_bi),
    .head_exp(tb_head_exp), .head_rmi(tb_head_rmi), .head_time(tb_head_time),
    .bi_vec(tb_bi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NVC; i++) begin
        p_q[i] <= '0; q_q[i] <= '0; inc_q[i] <= '0; t_q[i] <= '0;
        z_q[i] <= '0; h_q[i] <= '0; s_q[i] <= '0;
      end
    end else if (cfg_we) begin
      p_q[cfg_idx]   <= cfg_p;
      q_q[cfg_idx]   <= $signed(cfg_p);
      inc_q[cfg_idx] <= cfg_inc;
      t_q[cfg_idx]   <= now;
      z_q[cfg_idx]   <= cfg_z;
      h_q[cfg_idx]   <= cfg_h;
      s_q[cfg_idx]   <= '0;
    end else if (u_en) begin
      t_q[u_idx] <= now;
      q_q[u_idx] <= PW'(u_qc);
      s_q[u_idx] <= u_s1;
    end else if (tmr_fire) begin
      s_q[tb_head_rmi] <= '0;
    end
  end

  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0({ent_en, ext_en, tmr_en}));
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               !(cfg_we && (ent_en || ext_en || tmr_en)));
  // An active circuit always owns a timer; an idle one never does.
  a_timer_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                  u_en |-> (tb_match == (s_q[u_idx] != '0)));

endmodule
