// bat_sm: buffer allocation table and fast buffer reservation state machine.
//
// For every unpredictable virtual circuit, selected by its resource management
// index (RMI), the table holds the number of buffer slots it needs while
// active (Bi), the number of its unmarked cells now in the transmit buffer (bi)
// and its state (si: 0 idle, otherwise active).  Register B counts the buffer
// slots not allocated to any circuit.  On each arriving cell (dec_en) the
// state machine decides, combinationally, whether the cell is discarded,
// queued unmarked or queued marked as excess, and which timer operation goes
// with it; the table is updated at the clock edge:
//   loner                    queued marked, nothing else changes;
//   start/begin, idle        discarded if B < Bi (or no timer is free);
//                            otherwise si=1, B -= Bi, a timer is started;
//   start/middle, active     timer restarted;
//   begin, active            si incremented (saturating), timer restarted;
//   end, active, si>1        si decremented, timer restarted;
//   end, active, si=1        si=0, B += Bi, timer removed;
//   middle/end, idle         discarded.
// Every queued non-loner cell is unmarked if bi < Bi (bi is then incremented)
// and marked otherwise.  tx_en reports an unmarked cell leaving the buffer
// (bi decremented); rel_en reports a timer expiry (si=0, B += Bi).
// With S_W=1 the state is the single active bit of the basic scheme and a
// begin cell acts as a start; a wider si gives the source counter of the
// multi-source extension.  With PRED_RMI0 set, RMI 0 stands for all
// predictable circuits: their cells are queued unmarked without touching the
// table.  The configuration port is written by call-setup software.
// dec_en, tx_en and rel_en are meant for different clocks (the phases of the
// integrated controller); an assertion checks this.
module bat_sm
  import atm_pkg::*;
#(
  parameter int unsigned NRMI      = 256,
  parameter int unsigned RMI_W     = 8,
  parameter int unsigned BW        = 8,
  parameter int unsigned S_W       = 1,
  parameter bit          PRED_RMI0 = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             cfg_we,
  input  logic [RMI_W-1:0] cfg_rmi,
  input  logic [BW-1:0]    cfg_bi_need,  // Bi
  input  logic             cfg_b_we,
  input  logic [BW-1:0]    cfg_b_avail,  // initial B (L - Bp)
  // decision on an arriving cell
  input  logic             dec_en,
  input  logic [RMI_W-1:0] dec_rmi,
  input  pt_e              dec_pt,
  input  logic             timer_free,
  output act_e             dec_act,
  output logic [2:0]       dec_timer_op, // timer_bank op code
  // an unmarked cell left the transmit buffer
  input  logic             tx_en,
  input  logic [RMI_W-1:0] tx_rmi,
  // a timer expired
  input  logic             rel_en,
  input  logic [RMI_W-1:0] rel_rmi,
  // observation
  output logic [BW-1:0]    b_avail,
  input  logic [RMI_W-1:0] rd_rmi,
  output logic [BW-1:0]    rd_need,
  output logic [BW-1:0]    rd_used,
  output logic [S_W-1:0]   rd_state
);

  localparam logic [2:0] TB_NONE = 3'd0, TB_ALLOC = 3'd1, TB_RESET = 3'd2,
                         TB_REMOVE = 3'd3;
  localparam logic [S_W-1:0] S_MAX = '1;

  logic [BW-1:0]  need_q [NRMI];
  logic [BW-1:0]  used_q [NRMI];
  logic [S_W-1:0] st_q   [NRMI];
  logic [BW-1:0]  b_q;

  assign b_avail  = b_q;
  assign rd_need  = need_q[rd_rmi];
  assign rd_used  = used_q[rd_rmi];
  assign rd_state = st_q[rd_rmi];

  // Decision.
  logic [BW-1:0]  d_need, d_used;
  logic [S_W-1:0] d_st, n_st;
  logic           n_claim, n_free, n_inc, pred;
  assign d_need = need_q[dec_rmi];
  assign d_used = used_q[dec_rmi];
  assign d_st   = st_q[dec_rmi];
  assign pred   = PRED_RMI0 && (dec_rmi == '0);

  always_comb begin
    dec_act      = ACT_DISCARD;
    dec_timer_op = TB_NONE;
    n_st         = d_st;
    n_claim      = 1'b0;   // B -= Bi
    n_free       = 1'b0;   // B += Bi
    if (dec_pt == PT_LONER) begin
      dec_act = ACT_MARK;
    end else if (pred) begin
      dec_act = ACT_PASS;
    end else if (d_st == '0) begin
      if ((dec_pt == PT_START || dec_pt == PT_BEGIN) && b_q >= d_need && timer_free) begin
        n_st         = S_W'(1);
        n_claim      = 1'b1;
        dec_timer_op = TB_ALLOC;
        dec_act      = ACT_PASS;
      end
    end else begin
      dec_act      = ACT_PASS;
      dec_timer_op = TB_RESET;
      unique case (dec_pt)
        PT_BEGIN: if (d_st != S_MAX) n_st = d_st + 1'b1;
        PT_END: begin
          if (d_st == S_W'(1)) begin
            n_st         = '0;
            n_free       = 1'b1;
            dec_timer_op = TB_REMOVE;
          end else begin
            n_st = d_st - 1'b1;
          end
        end
        default: ;
      endcase
    end
    // Marking rule for queued burst cells.
    n_inc = 1'b0;
    if (dec_act == ACT_PASS && !pred) begin
      if (d_used < d_need) n_inc = 1'b1;
      else                 dec_act = ACT_MARK;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q <= '0;
      for (int i = 0; i < NRMI; i++) begin
        need_q[i] <= '0;
        used_q[i] <= '0;
        st_q[i]   <= '0;
      end
    end else begin
      if (cfg_we) need_q[cfg_rmi] <= cfg_bi_need;
      if (cfg_b_we) b_q <= cfg_b_avail;
      else if (dec_en && n_claim) b_q <= b_q - d_need;
      else if (dec_en && n_free)  b_q <= b_q + d_need;
      else if (rel_en && st_q[rel_rmi] != '0) b_q <= b_q + need_q[rel_rmi];
      if (dec_en) begin
        st_q[dec_rmi] <= n_st;
        if (n_inc) used_q[dec_rmi] <= d_used + 1'b1;
      end
      if (tx_en && used_q[tx_rmi] != '0) used_q[tx_rmi] <= used_q[tx_rmi] - 1'b1;
      if (rel_en) st_q[rel_rmi] <= '0;
    end
  end

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({dec_en, tx_en, rel_en}));

endmodule
