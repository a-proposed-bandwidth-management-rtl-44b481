// tp_pred: token pool mechanism for predictable virtual circuits.
//
// Used at the user-network interface to check that constant-rate and low-peak
// bursty circuits keep to the peak and average rates they declared.  Tokens
// are counted in minitokens: one token (the right to send one cell) is INC =
// 2^K/gamma minitokens, where gamma is the circuit's normalised average rate,
// and every cell time adds 2^K minitokens.  Rather than adding tokens
// continuously, the pool is brought up to date when a cell is seen, from the
// time t of the previous update:
//     Q := min(P, Q + (T - t) * 2^K);  t := T;
//     Q >= INC:  Q := Q - INC, pass the cell;
//     Q <  INC:  mark the cell and request a flow-control cell to the user.
// The multiplication by 2^K is a shift.  The peak rate is checked alongside,
// per circuit, in one of two ways (mode bit): by a second, small token pool
// (KP = 6, PPW-bit fields) whose rate is the peak rate, or by the simple
// spacing monitor, which requires T - t >= d (d stored in the PINC field) and
// limits peak rates to the link rate divided by an integer.  A cell is marked
// if either check fails; each pool is charged only when it passes.
// For multi-source circuits (msrc bit) cells leaving the network towards the
// user are charged too, so that all sources share one average-rate budget:
//     Q := min(P, Q + (T - t) * 2^K);  t := T;  Q := Q - INC;
// which may make Q negative, so Q is signed.  Only the average pool is charged
// by leaving cells; the peak rate of a shared circuit is held by the buffer
// reservation in the switches.
// Interface: ent_en and ext_en each process one cell in one clock against the
// entry selected by their index (they are used in different clocks by the
// access resource manager).  T is the cell-time clock.  The algorithms and the
// field widths (K=8, 32-bit P and Q, 24-bit INC and t; K=6 and 12 bits for
// the peak pool) follow the source; the choice between the two peak checks
// per entry, updating t on every cell, and the configuration port (which
// fills both pools) are this design's.
module tp_pred
  import atm_pkg::*;
#(
  parameter int unsigned NVC = 64,
  parameter int unsigned IW  = $clog2(NVC),
  parameter int unsigned K   = 8,
  parameter int unsigned PW  = 32,
  parameter int unsigned GW  = 24,
  parameter int unsigned TW  = 24,
  parameter int unsigned KP  = 6,
  parameter int unsigned PPW = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [TW-1:0]  now,
  // configuration
  input  logic           cfg_we,
  input  logic [IW-1:0]  cfg_idx,
  input  logic [PW-1:0]  cfg_p,      // P: pool bound, minitokens
  input  logic [GW-1:0]  cfg_inc,    // 2^K / gamma
  input  logic [PPW-1:0] cfg_pp,     // peak pool bound
  input  logic [PPW-1:0] cfg_pinc,   // peak 2^KP / gamma_peak, or spacing d
  input  logic           cfg_mode,   // 0 peak token pool, 1 spacing monitor
  input  logic           cfg_msrc,   // multi-source: charge leaving cells
  // cells entering the network
  input  logic           ent_en,
  input  logic [IW-1:0]  ent_idx,
  output logic           ent_mark,   // mark the cell discardable
  output logic           ent_fc,     // send a flow-control cell to the user
  // cells leaving the network
  input  logic           ext_en,
  input  logic [IW-1:0]  ext_idx,
  // observation
  input  logic [IW-1:0]  rd_idx,
  output logic signed [PW-1:0]  rd_q,
  output logic signed [PPW-1:0] rd_pq
);

  localparam int unsigned WW = PW + TW + K + 2;   // wide enough for any sum
  localparam logic signed [WW-1:0] Q_MIN = -(WW'(1) <<< (PW-1));

  logic        [PW-1:0]  p_q    [NVC];
  logic signed [PW-1:0]  q_q    [NVC];
  logic        [GW-1:0]  inc_q  [NVC];
  logic        [TW-1:0]  t_q    [NVC];
  logic        [PPW-1:0] pp_q   [NVC];
  logic signed [PPW-1:0] pq_q   [NVC];
  logic        [PPW-1:0] pinc_q [NVC];
  logic                  mode_q [NVC];
  logic                  msrc_q [NVC];

  assign rd_q  = q_q[rd_idx];
  assign rd_pq = pq_q[rd_idx];

  // Pool refill: min(bound, q + dt * 2^k), in a wide signed width.
  function automatic logic signed [WW-1:0] refill(input logic signed [WW-1:0] q,
                                                   input logic [TW-1:0] dt,
                                                   input int unsigned k,
                                                   input logic signed [WW-1:0] bound);
    logic signed [WW-1:0] s;
    s = q + ($signed({{(WW-TW){1'b0}}, dt}) <<< k);
    return (s > bound) ? bound : s;
  endfunction

  // Entering cell.
  logic [TW-1:0]        e_dt;
  logic signed [WW-1:0] e_q1, e_pq1, e_inc, e_pinc;
  logic                 e_ok_avg, e_ok_pk;
  always_comb begin
    e_dt     = now - t_q[ent_idx];
    e_inc    = $signed({{(WW-GW){1'b0}}, inc_q[ent_idx]});
    e_pinc   = $signed({{(WW-PPW){1'b0}}, pinc_q[ent_idx]});
    e_q1     = refill(WW'(q_q[ent_idx]), e_dt, K, $signed({{(WW-PW){1'b0}}, p_q[ent_idx]}));
    e_pq1    = refill(WW'(pq_q[ent_idx]), e_dt, KP, $signed({{(WW-PPW){1'b0}}, pp_q[ent_idx]}));
    e_ok_avg = (e_q1 >= e_inc);
    e_ok_pk  = mode_q[ent_idx] ? ($signed({{(WW-TW){1'b0}}, e_dt}) >= e_pinc)
                               : (e_pq1 >= e_pinc);
  end
  assign ent_mark = ent_en && !(e_ok_avg && e_ok_pk);
  assign ent_fc   = ent_mark;

  // Leaving cell.
  logic [TW-1:0]        x_dt;
  logic signed [WW-1:0] x_q1;
  always_comb begin
    x_dt = now - t_q[ext_idx];
    x_q1 = refill(WW'(q_q[ext_idx]), x_dt, K, $signed({{(WW-PW){1'b0}}, p_q[ext_idx]}))
           - $signed({{(WW-GW){1'b0}}, inc_q[ext_idx]});
    if (x_q1 < Q_MIN) x_q1 = Q_MIN;   // a pool never wraps from negative to positive
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NVC; i++) begin
        p_q[i] <= '0; q_q[i] <= '0; inc_q[i] <= '0; t_q[i] <= '0;
        pp_q[i] <= '0; pq_q[i] <= '0; pinc_q[i] <= '0;
        mode_q[i] <= 1'b0; msrc_q[i] <= 1'b0;
      end
    end else begin
      if (cfg_we) begin
        p_q[cfg_idx]    <= cfg_p;
        q_q[cfg_idx]    <= $signed(cfg_p);
        inc_q[cfg_idx]  <= cfg_inc;
        t_q[cfg_idx]    <= now;
        pp_q[cfg_idx]   <= cfg_pp;
        pq_q[cfg_idx]   <= $signed(cfg_pp);
        pinc_q[cfg_idx] <= cfg_pinc;
        mode_q[cfg_idx] <= cfg_mode;
        msrc_q[cfg_idx] <= cfg_msrc;
      end else if (ent_en) begin
        t_q[ent_idx]  <= now;
        q_q[ent_idx]  <= PW'(e_ok_avg ? e_q1 - e_inc : e_q1);
        if (!mode_q[ent_idx])
          pq_q[ent_idx] <= PPW'(e_ok_pk ? e_pq1 - e_pinc : e_pq1);
      end else if (ext_en && msrc_q[ext_idx]) begin
        t_q[ext_idx] <= now;
        q_q[ext_idx] <= PW'(x_q1);
      end
    end
  end

  a_one_cell: assert property (@(posedge clk) disable iff (!rst_n) !(ent_en && ext_en));

endmodule
