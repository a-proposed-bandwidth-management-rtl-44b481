// tb_tp_unpred: self-checking testbench for the unpredictable-circuit token pools.
//
// Four pools share a bank of only three timers, so that "no timer free" occurs.
// Each clock applies one of the three processing steps -- an entering cell, a
// leaving cell or the timer step -- to a random pool with a random cell type,
// while the cell-time clock advances by random amounts.  A reference model in
// 64-bit integers follows the published algorithms: the pool gains dt*2^K,
// loses dt*z*2^(h+K) while active, is capped at P; the state machine admits a
// burst on start/begin with tokens and a free timer, counts begins and ends,
// converts the cell to an end cell and charges one token when the pool runs
// short, and the time-ordered timers return a silent circuit to idle.  The
// decision, the re-typed cell type, flow control, the timer outputs and every
// pool's Q and s are compared each clock.  Each mechanism must occur.
module tb_tp_unpred;
  import atm_pkg::*;

  localparam int N = 4, IW = 2, K = 8, TW = 24, NT = 3, TO = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [TW-1:0] now = '0;
  logic cfg_we = 0;
  logic [IW-1:0] cfg_idx = 0, ent_idx = 0, ext_idx = 0, rd_idx = 0;
  logic [47:0] cfg_p = 0;
  logic [23:0] cfg_inc = 0;
  logic [3:0] cfg_z = 0;
  logic signed [5:0] cfg_h = 0;
  logic ent_en = 0, ext_en = 0, tmr_en = 0;
  pt_e ent_pt = PT_LONER, ext_pt = PT_LONER, ent_pt_out;
  act_e ent_act, ext_act;
  logic ent_fc, tmr_fire, timers_free;
  logic [IW-1:0] tmr_idx;
  logic signed [47:0] rd_q;
  logic [3:0] rd_s;

  tp_unpred #(.NVC(N), .NTIMER(NT), .TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_admit = 0, n_disc_idle = 0, n_notimer = 0, n_begin = 0, n_endcnt = 0,
      n_end = 0, n_short = 0, n_tmo = 0, n_drain = 0, n_ext = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  longint m_p[N], m_q[N], m_inc[N], m_t[N];
  int m_z[N], m_h[N], m_s[N];
  int t_idx[$], t_exp[$];

  function automatic int tfind(int i);
    foreach (t_idx[j]) if (t_idx[j] == i) return j;
    return -1;
  endfunction
  task automatic tdel(int i);
    int j;
    j = tfind(i);
    if (j >= 0) begin t_idx.delete(j); t_exp.delete(j); end
  endtask
  task automatic tadd(int i);
    t_idx.push_back(i); t_exp.push_back((int'(now) + TO) & 255);
  endtask

  // one cell through the model: returns decision, outgoing type, flow control
  task automatic m_cell(input bit ent, input int i, input pt_e pt,
                        output act_e act, output pt_e pto, output bit fc);
    longint dt, q, prod, drain;
    int sh;
    bit low;
    dt = (longint'(now) - m_t[i]) & 64'hffffff;
    q = m_q[i] + (dt << K);
    if (m_s[i] != 0) begin
      prod = dt * m_z[i];
      sh = m_h[i] + K;
      drain = (sh >= 0) ? (prod << sh) : (prod >>> (-sh));
      q -= drain;
      if (drain > 0) n_drain++;
    end
    if (q > m_p[i]) q = m_p[i];
    m_t[i] = now;
    low = ent && (q < m_inc[i]);
    act = ACT_PASS; pto = pt;
    fc = ent && low && (pt != PT_LONER);
    if (pt == PT_LONER) begin
    end else if (m_s[i] == 0) begin
      if ((pt == PT_START || pt == PT_BEGIN) && !low && t_idx.size() < NT) begin
        m_s[i] = 1; tadd(i); n_admit++;
      end else begin
        act = ACT_DISCARD;
        if ((pt == PT_START || pt == PT_BEGIN) && !low) n_notimer++; else n_disc_idle++;
      end
    end else if (low || (pt == PT_END && m_s[i] == 1)) begin
      pto = PT_END; m_s[i] = 0; q -= m_inc[i]; tdel(i);
      if (low) n_short++; else n_end++;
    end else begin
      tdel(i); tadd(i);
      if (pt == PT_BEGIN) begin if (m_s[i] < 15) m_s[i]++; n_begin++; end
      if (pt == PT_END) begin m_s[i]--; n_endcnt++; end
    end
    if (q < -(64'sd1 <<< 47)) q = -(64'sd1 <<< 47);
    m_q[i] = q;
  endtask

  task automatic configure(int i);
    @(negedge clk);
    m_p[i] = $urandom_range(4000, 60000);
    m_inc[i] = $urandom_range(300, 3000);
    m_z[i] = $urandom_range(1, 15);
    m_h[i] = $urandom_range(0, 6) - 8;       // lambda/mu = z * 2^h, h in -8..-2
    m_q[i] = m_p[i]; m_t[i] = now; m_s[i] = 0;
    cfg_we = 1; cfg_idx = IW'(i); cfg_p = 48'(m_p[i]); cfg_inc = 24'(m_inc[i]);
    cfg_z = 4'(m_z[i]); cfg_h = 6'(m_h[i]);
    @(negedge clk);
    cfg_we = 0;
  endtask

  pt_e types [5] = '{PT_LONER, PT_START, PT_MIDDLE, PT_END, PT_BEGIN};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) configure(i);
    for (int n = 0; n < 30000; n++) begin
      int i, g, k, pti;
      act_e a; pt_e po; bit fc;
      @(negedge clk);
      g = $urandom_range(0, 99);
      now = now + TW'((g < 40) ? 0 : (g < 95) ? 1 : $urandom_range(2, 12));
      i = $urandom_range(0, N-1);
      k = $urandom_range(0, 2);
      pti = $urandom_range(0, 9);
      pti = (pti < 1) ? 0 : (pti < 3) ? 1 : (pti < 7) ? 2 : (pti < 9) ? 3 : 4;
      if (k == 0) begin
        ent_en = 1; ent_idx = IW'(i); ent_pt = types[pti];
        #1;
        m_cell(1, i, types[pti], a, po, fc);
        check(ent_act == a, $sformatf("entering act pool %0d: %0d vs %0d", i, ent_act, a));
        check(ent_pt_out == po, "entering type");
        check(ent_fc == fc, "flow control");
      end else if (k == 1) begin
        ext_en = 1; ext_idx = IW'(i); ext_pt = types[pti];
        #1;
        m_cell(0, i, types[pti], a, po, fc);
        check(ext_act == a, $sformatf("leaving act pool %0d", i));
        n_ext++;
      end else begin
        bit f;
        tmr_en = 1;
        #1;
        f = (t_idx.size() > 0) && (((int'(now) - t_exp[0]) & 255) < 128);
        check(tmr_fire == f, "timer fire");
        if (f) begin
          check(int'(tmr_idx) == t_idx[0], "timer idx");
          m_s[t_idx[0]] = 0;
          void'(t_idx.pop_front()); void'(t_exp.pop_front());
          n_tmo++;
        end
      end
      @(negedge clk);
      ent_en = 0; ext_en = 0; tmr_en = 0;
      for (int j = 0; j < N; j++) begin
        rd_idx = IW'(j);
        #1;
        check(longint'(rd_q) == m_q[j], $sformatf("Q[%0d] %0d vs %0d", j, rd_q, m_q[j]));
        check(int'(rd_s) == m_s[j], $sformatf("s[%0d] %0d vs %0d", j, rd_s, m_s[j]));
      end
      check(timers_free == (t_idx.size() < NT), "timers free");
    end
    $display("admit=%0d idle_discard=%0d no_timer=%0d begin=%0d end_count=%0d end=%0d short=%0d timeout=%0d drain=%0d ext=%0d",
             n_admit, n_disc_idle, n_notimer, n_begin, n_endcnt, n_end, n_short, n_tmo, n_drain, n_ext);
    check(n_admit > 0 && n_disc_idle > 0 && n_notimer > 0 && n_begin > 0 && n_endcnt > 0 &&
          n_end > 0 && n_short > 0 && n_tmo > 0 && n_drain > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
