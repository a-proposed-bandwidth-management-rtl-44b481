// tb_tp_pred: self-checking testbench for the predictable-circuit token pools.
//
// Four pools are configured with random bounds and rates, some with the peak
// token pool and some with the spacing monitor, some multi-source.  Each
// clock the cell-time clock advances by a random amount (often zero or one,
// sometimes a long idle gap) and one entering or leaving cell is applied to a
// random pool.  A reference model in 64-bit integers, written from the
// minitoken rules (refill by dt * 2^K up to the bound, charge one token of
// 2^K/gamma minitokens, mark when short, charge leaving cells of multi-source
// circuits), predicts every mark and the average and peak pool contents.
// Every mechanism (average-rate mark, peak-pool mark, spacing mark, a negative
// pool from leaving cells, a pool refilled to its bound) must occur.
module tb_tp_pred;
  import atm_pkg::*;

  localparam int N = 4, IW = 2, K = 8, KP = 6, PW = 32, PPW = 12, TW = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [TW-1:0] now = '0;
  logic cfg_we = 0, cfg_mode = 0, cfg_msrc = 0;
  logic [IW-1:0] cfg_idx = 0, ent_idx = 0, ext_idx = 0, rd_idx = 0;
  logic [PW-1:0] cfg_p = 0;
  logic [23:0] cfg_inc = 0;
  logic [PPW-1:0] cfg_pp = 0, cfg_pinc = 0;
  logic ent_en = 0, ext_en = 0, ent_mark, ent_fc;
  logic signed [PW-1:0] rd_q;
  logic signed [PPW-1:0] rd_pq;

  tp_pred #(.NVC(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mark_avg = 0, n_mark_pk = 0, n_mark_sp = 0, n_neg = 0, n_full = 0, n_pass = 0;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  longint m_p[N], m_q[N], m_inc[N], m_pp[N], m_pq[N], m_pinc[N], m_t[N];
  bit m_mode[N], m_msrc[N];

  function automatic longint fill(longint q, longint dt, int k, longint b);
    longint s;
    s = q + (dt << k);
    return (s > b) ? b : s;
  endfunction

  task automatic configure(int i);
    @(negedge clk);
    m_p[i] = $urandom_range(1000, 40000);
    m_inc[i] = $urandom_range(200, 4000);
    m_pp[i] = $urandom_range(64, 1500);
    m_mode[i] = 1'(i % 2);
    m_pinc[i] = m_mode[i] ? $urandom_range(1, 4) : $urandom_range(32, 200);
    m_msrc[i] = (i < 2);
    m_q[i] = m_p[i]; m_pq[i] = m_pp[i]; m_t[i] = now;
    cfg_we = 1; cfg_idx = IW'(i); cfg_p = PW'(m_p[i]); cfg_inc = 24'(m_inc[i]);
    cfg_pp = PPW'(m_pp[i]); cfg_pinc = PPW'(m_pinc[i]); cfg_mode = m_mode[i];
    cfg_msrc = m_msrc[i];
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) configure(i);
    for (int n = 0; n < 20000; n++) begin
      int i, g;
      bit ent;
      longint dt, q1, pq1;
      bit oka, okp, mk;
      @(negedge clk);
      g = $urandom_range(0, 99);
      now = now + TW'((g < 50) ? 0 : (g < 90) ? 1 : (g < 98) ? $urandom_range(2, 20)
                                                             : $urandom_range(100, 3000));
      i = $urandom_range(0, N-1);
      ent = ($urandom_range(0, 99) < 60);
      if (n % 5000 == 4999) configure($urandom_range(0, N-1));
      dt = (longint'(now) - m_t[i]) & 64'hffffff;
      if (ent) begin
        ent_en = 1; ent_idx = IW'(i);
        q1 = fill(m_q[i], dt, K, m_p[i]);
        pq1 = fill(m_pq[i], dt, KP, m_pp[i]);
        oka = (q1 >= m_inc[i]);
        okp = m_mode[i] ? (dt >= m_pinc[i]) : (pq1 >= m_pinc[i]);
        mk = !(oka && okp);
        #1;
        check(ent_mark == mk, $sformatf("mark pool %0d: dut %0d model %0d", i, ent_mark, mk));
        check(ent_fc == mk, "flow control with mark");
        if (!oka) n_mark_avg++;
        else if (!okp && m_mode[i]) n_mark_sp++;
        else if (!okp) n_mark_pk++;
        else n_pass++;
        if (q1 == m_p[i]) n_full++;
        m_q[i] = oka ? q1 - m_inc[i] : q1;
        if (!m_mode[i]) m_pq[i] = okp ? pq1 - m_pinc[i] : pq1;
        m_t[i] = now;
      end else begin
        ext_en = 1; ext_idx = IW'(i);
        if (m_msrc[i]) begin
          q1 = fill(m_q[i], dt, K, m_p[i]) - m_inc[i];
          if (q1 < -(64'sd1 <<< 31)) q1 = -(64'sd1 <<< 31);
          m_q[i] = q1; m_t[i] = now;
          if (q1 < 0) n_neg++;
        end
      end
      @(negedge clk);
      ent_en = 0; ext_en = 0;
      for (int j = 0; j < N; j++) begin
        rd_idx = IW'(j);
        #1;
        check(longint'(rd_q) == m_q[j], $sformatf("Q[%0d] %0d vs %0d", j, rd_q, m_q[j]));
        if (!m_mode[j]) check(longint'(rd_pq) == m_pq[j], $sformatf("PQ[%0d]", j));
      end
    end
    $display("pass=%0d avg_mark=%0d peak_mark=%0d spacing_mark=%0d negative=%0d full=%0d",
             n_pass, n_mark_avg, n_mark_pk, n_mark_sp, n_neg, n_full);
    check(n_pass > 0 && n_mark_avg > 0 && n_mark_pk > 0 && n_mark_sp > 0 && n_neg > 0 &&
          n_full > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
