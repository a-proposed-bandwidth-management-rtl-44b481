// tb_ibc: self-checking testbench for the integrated buffer controller.
//
// A small controller (4 resequencer records, 6 transmit slots, 8 RMIs, 4
// timers) is driven with random cells of random circuits and types and a
// random output acknowledge.  A transaction-level reference model written from
// the published rules -- resequencer release by age, the fast buffer
// reservation state machine, FIFO transmit buffer with overwrite of the most
// recently queued excess cell, time-ordered timers -- runs beside it, one
// operation cycle (three clocks) at a time.  Every transmitted cell, its
// excess flag, the free-slot register B and the ni/nx counters are compared.
// The operation-cycle length of three clocks is checked, and each mechanism
// (admit, mark, discard, overwrite, excess drop, input drop, timeout,
// predictable bypass) must occur at least once.
module tb_ibc;
  import atm_pkg::*;

  localparam int NRQ = 4, NXB = 6, NRMI = 8, NT = 4, TO = 12, TH = 1;
  localparam int CW = 32;
  localparam int RW = 3, BW = 8, SW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 0, cfg_b_we = 0;
  logic [RW-1:0] cfg_rmi = 0;
  logic [BW-1:0] cfg_need = 0, cfg_b = 0;
  logic in_ready, in_valid = 0;
  logic [CW-1:0] in_cell = 0;
  logic [RW-1:0] in_rmi = 0;
  pt_e in_pt = PT_LONER;
  logic [7:0] in_age = 0;
  logic out_valid, out_ex, out_ack = 0;
  logic [CW-1:0] out_cell;
  logic [RW-1:0] out_rmi;
  pt_e out_pt;
  logic [1:0] phase;
  logic [7:0] tclk;
  logic [BW-1:0] b_avail;
  logic [$clog2(NXB+1)-1:0] ni, nx;
  logic ev_admit, ev_mark, ev_discard, ev_overwrite, ev_drop_ex, ev_in_drop, ev_timeout;

  ibc #(.NRQ(NRQ), .NXB(NXB), .NRMI(NRMI), .NTIMER(NT), .SLOT_W(SW), .RMI_W(RW),
        .BW(BW), .AGE_TH(TH), .TIMEOUT(TO), .CELL_W(CW), .PRED_RMI0(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mark = 0, n_disc = 0, n_ow = 0, n_dropx = 0, n_indrop = 0,
      n_to = 0, n_pred = 0, n_tx = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  // ------------------------------------------------------------ reference model
  typedef struct {int data; int rmi; pt_e pt; bit ex;} qcell_t;
  bit     r_bi [NRQ];
  int     r_age[NRQ];
  int     r_rmi[NRQ];
  pt_e    r_pt [NRQ];
  int     r_dat[NRQ];
  qcell_t q[$];
  int     need[NRMI], used[NRMI], st[NRMI];
  int     B;
  int     t_rmi[$], t_tim[$];
  int     mclk;
  bit     x_bi; int x_pos; int last_pos; bit y_ex;
  int     nx_m;

  function automatic int tfind(int r);
    foreach (t_rmi[i]) if (t_rmi[i] == r) return i;
    return -1;
  endfunction

  task automatic t_remove(int r);
    int i;
    i = tfind(r);
    if (i >= 0) begin t_rmi.delete(i); t_tim.delete(i); end
  endtask

  task automatic t_add(int r);
    t_rmi.push_back(r); t_tim.push_back((mclk + TO) & 255);
  endtask

  // Phase 0: X selection and transmission; returns through checks.
  task automatic m_phase0(bit ack);
    int best;
    best = -1;
    for (int j = 0; j < NRQ; j++)
      if (r_bi[j] && (best < 0 || r_age[j] > r_age[best])) best = j;
    x_bi = 0;
    if (best >= 0 && r_age[best] > TH && (q.size() < NXB || nx_m > 0)) begin
      x_bi = 1; x_pos = best; last_pos = best; r_bi[best] = 0;
    end
    check(out_valid == (q.size() > 0), "out_valid");
    if (q.size() > 0) begin
      check(int'(out_cell) == q[0].data, $sformatf("out cell %0h vs %0h", out_cell, q[0].data));
      check(out_ex == q[0].ex, "out ex");
      check(int'(out_rmi) == q[0].rmi, "out rmi");
      if (ack) begin
        if (q[0].ex) nx_m--;
        else if (used[q[0].rmi] > 0) used[q[0].rmi]--;
        void'(q.pop_front());
        n_tx++;
      end
    end
  endtask

  // Phase 1: the reservation state machine on X.
  task automatic m_phase1();
    if (x_bi) begin
      int r; pt_e pt; bit pass;
      r = r_rmi[x_pos]; pt = r_pt[x_pos];
      pass = 0; y_ex = 0;
      if (pt == PT_LONER) begin
        pass = 1; y_ex = 1;
      end else if (r == 0) begin
        pass = 1; y_ex = 0; n_pred++;
      end else if (st[r] == 0) begin
        if ((pt == PT_START || pt == PT_BEGIN) && B >= need[r] && t_rmi.size() < NT) begin
          st[r] = 1; B -= need[r]; t_add(r); pass = 1;
        end
      end else begin
        pass = 1;
        t_remove(r);
        if (pt == PT_END) begin st[r] = 0; B += need[r]; end
        else t_add(r);
      end
      if (pass && pt != PT_LONER && r != 0) begin
        if (used[r] < need[r]) used[r]++;
        else y_ex = 1;
      end
      check(ev_discard == !pass, "discard event");
      check(ev_mark == (pass && y_ex), "mark event");
      if (!pass) x_bi = 0;
    end
    for (int j = 0; j < NRQ; j++) if (r_bi[j]) r_age[j]++;
  endtask

  // Phase 2: transfer into the transmit buffer, arrival, timeouts.
  task automatic m_phase2(bit iv, int dat, int rmi, pt_e pt, int age);
    if (x_bi) begin
      qcell_t c;
      c.data = r_dat[x_pos]; c.rmi = r_rmi[x_pos]; c.pt = r_pt[x_pos]; c.ex = y_ex;
      if (q.size() < NXB) begin
        q.push_back(c); if (y_ex) nx_m++;
        check(!ev_overwrite && !ev_drop_ex, "plain write");
      end else if (!y_ex) begin
        int k;
        k = -1;
        for (int i = 0; i < q.size(); i++) if (q[i].ex) k = i;
        q.delete(k); q.push_back(c); nx_m--;
        check(ev_overwrite, "overwrite event");
      end else begin
        check(ev_drop_ex, "drop excess event");
      end
    end
    if (iv) begin
      int p;
      p = -1;
      if (age <= TH) begin
        if (!r_bi[last_pos]) p = last_pos;
        else for (int j = NRQ-1; j >= 0; j--) if (!r_bi[j]) p = j;
      end
      check(ev_in_drop == (p < 0), "input drop event");
      if (p >= 0) begin
        r_bi[p] = 1; r_age[p] = age; r_rmi[p] = rmi; r_pt[p] = pt; r_dat[p] = dat;
      end
    end
    if (t_rmi.size() > 0 && ((mclk - t_tim[0]) & 255) < 128) begin
      check(ev_timeout, "timeout event");
      if (st[t_rmi[0]] != 0) B += need[t_rmi[0]];
      st[t_rmi[0]] = 0;
      void'(t_rmi.pop_front()); void'(t_tim.pop_front());
    end else check(!ev_timeout, "no timeout");
    mclk++;
  endtask

  // ------------------------------------------------------------------ stimulus
  int seq = 0;
  int cyc_start, cyc_len;
  pt_e types [5] = '{PT_LONER, PT_START, PT_MIDDLE, PT_END, PT_BEGIN};

  initial begin
    for (int j = 0; j < NRQ; j++) begin r_bi[j] = 0; r_age[j] = 0; end
    for (int i = 0; i < NRMI; i++) begin need[i] = 0; used[i] = 0; st[i] = 0; end
    B = 0; mclk = 0; x_bi = 0; x_pos = 0; last_pos = 0; nx_m = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration: Bi = 1..3, B = 5
    for (int i = 1; i < NRMI; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_rmi = RW'(i); cfg_need = BW'(1 + (i % 3)); need[i] = 1 + (i % 3);
    end
    @(negedge clk);
    cfg_we = 0; cfg_b_we = 1; cfg_b = 8'd5; B = 5;
    @(negedge clk);
    cfg_b_we = 0;
    // align to phase 0
    while (phase != 2'd0) @(negedge clk);
    cyc_start = $time;
    mclk = int'(tclk);

    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit ack, iv;
      int rmi, age, pti;
      // phase 0
      check(phase == 2'd0, "phase 0");
      ack = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 35 : 80));
      out_ack = ack;
      #1;
      m_phase0(ack);
      @(negedge clk);
      out_ack = 0;
      // phase 1
      check(phase == 2'd1, "phase 1");
      #1;
      m_phase1();
      @(negedge clk);
      // phase 2
      check(phase == 2'd2 && in_ready, "phase 2");
      iv = ($urandom_range(0, 99) < 85);
      rmi = $urandom_range(0, NRMI-1);
      pti = $urandom_range(0, 9);
      pti = (pti < 1) ? 0 : (pti < 3) ? 1 : (pti < 8) ? 2 : (pti < 9) ? 3 : 4;
      age = ($urandom_range(0, 19) == 0) ? 2 : $urandom_range(0, 1);
      seq++;
      in_valid = iv; in_cell = CW'(seq); in_rmi = RW'(rmi); in_pt = types[pti];
      in_age = 8'(age);
      #1;
      m_phase2(iv, seq, rmi, types[pti], age);
      @(negedge clk);
      in_valid = 0;
      #1;
      check(int'(b_avail) == B, $sformatf("B %0d vs %0d", b_avail, B));
      check(int'(ni) == NXB - q.size(), "ni");
      check(int'(nx) == nx_m, "nx");
      check(int'(tclk) == (mclk & 255), "clock");
    end
    // three clocks per operation cycle
    cyc_len = ($time - cyc_start) / 6000;
    check(cyc_len == 30, $sformatf("operation cycle %0d time units", cyc_len));

    $display("tx=%0d pred=%0d", n_tx, n_pred);
    check(n_tx > 100 && n_pred > 0 && n_mark > 0 && n_disc > 0 && n_ow > 0 &&
          n_dropx > 0 && n_indrop > 0 && n_to > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters (must all happen)
  always @(posedge clk) begin
    if (ev_mark) n_mark++;
    if (ev_discard) n_disc++;
    if (ev_overwrite) n_ow++;
    if (ev_drop_ex) n_dropx++;
    if (ev_in_drop) n_indrop++;
    if (ev_timeout) n_to++;
  end

  final begin
    $display("mark=%0d discard=%0d overwrite=%0d drop_ex=%0d in_drop=%0d timeout=%0d",
             n_mark, n_disc, n_ow, n_dropx, n_indrop, n_to);
  end
endmodule
