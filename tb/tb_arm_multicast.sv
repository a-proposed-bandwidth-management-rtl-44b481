// tb_arm_multicast: workload testbench -- the access resource manager of one
// site on a multicast circuit that joins 20 Ethernets.
//
// The ARM runs at its default size (64 pools of each class, 64 timers,
// timeout 100) with no parameter overrides.  The circuit uses unpredictable
// pool 5.  Its average rate is 1 Mb/s and its peak rate 10 Mb/s on a
// 150 Mb/s link, so one token is 2^8 * 150 = 38400 minitokens and
// lambda/mu = 10 = 5 * 2^1 (z = 5, h = 1).  Bursts are 325 cells long and a
// burst cell follows every 15 cell times.  Each burst opens with a begin cell
// and closes with an end cell.  Source 0 is this site's own host, whose cells
// enter the network.  The cells of sources 1..19 reach this site as cells
// leaving the network.
// Part A (conforming): in each of several epochs one to four sources send a
// burst each, starting within 2000 cell times of each other, so bursts
// overlap.  A quiet period then refills the pool.  Every cell at both ends
// must pass unchanged, with no flow control and no timer expiry, which
// requires the ARM to count the overlapping bursts.  Once the last end cell
// of the epoch has passed, a probe middle cell from the host must be
// discarded, because the circuit must be idle again.
// Part B (non-conforming): the host alone sends a burst of 1000 cells, far
// longer than the pool allows.  A cell must be re-typed to an end cell, with
// flow control, and the host's later cells of that burst must be discarded.
// Timing: one operation cycle is three clocks: entering cells in phase 0,
// leaving cells in phase 1.  The epoch scheme and the pool bound of 500
// tokens are this testbench's own choices.
module tb_arm_multicast;
  import atm_pkg::*;

  localparam int IW = 6, IDX = 5, NS = 20, BURST = 325, SPACING = 15;
  localparam longint INC = 38400, PBOUND = 500 * INC;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfgp_we = 0, cfgp_mode = 0, cfgp_msrc = 0, cfgu_we = 0;
  logic [IW-1:0] cfgp_idx = 0, cfgu_idx = 0, ent_idx = 0, ext_idx = 0, tmr_idx;
  logic [31:0] cfgp_p = 0;
  logic [23:0] cfgp_inc = 0, cfgu_inc = 0;
  logic [11:0] cfgp_pp = 0, cfgp_pinc = 0;
  logic [47:0] cfgu_p = 0;
  logic [3:0] cfgu_z = 0;
  logic signed [5:0] cfgu_h = 0;
  logic ent_valid = 0, ent_ready, ent_cls = 0, ent_fc;
  logic ext_valid = 0, ext_ready, ext_cls = 0;
  pt_e ent_pt = PT_LONER, ext_pt = PT_LONER, ent_pt_out;
  act_e ent_act, ext_act;
  logic tmr_fire;
  logic [1:0] phase;
  logic [23:0] now;

  arm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ent = 0, n_ext = 0, n_overlap = 0, max_conc = 0, n_epochs = 0, n_tmo = 0;
  int n_retype = 0, n_after = 0;

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n && tmr_fire) n_tmo++;

  // source schedules (in operation cycles)
  int s_next[NS], s_left[NS];
  pt_e lq[$];

  function automatic pt_e cell_type(int left);
    if (left == BURST) return PT_BEGIN;
    if (left == 1) return PT_END;
    return PT_MIDDLE;
  endfunction

  // one operation cycle, starting at the negedge of phase 0
  task automatic op_cycle(input bit have_ent, input pt_e ept, input bit have_ext, input pt_e xpt,
                          output act_e ea, output pt_e eo, output bit efc, output act_e xa);
    check(phase == 2'd0 && ent_ready, "phase 0 takes entering cells");
    ent_valid = have_ent; ent_cls = 1; ent_idx = IW'(IDX); ent_pt = ept;
    #1;
    ea = ent_act; eo = ent_pt_out; efc = ent_fc;
    @(negedge clk);
    ent_valid = 0;
    check(phase == 2'd1 && ext_ready, "phase 1 takes leaving cells");
    ext_valid = have_ext; ext_cls = 1; ext_idx = IW'(IDX); ext_pt = xpt;
    #1;
    xa = ext_act;
    @(negedge clk);
    ext_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    act_e ea, xa; pt_e eo; bit efc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfgu_we = 1; cfgu_idx = IW'(IDX); cfgu_p = 48'(PBOUND); cfgu_inc = 24'(INC);
    cfgu_z = 4'd5; cfgu_h = 6'sd1;
    @(negedge clk);
    cfgu_we = 0;
    while (phase != 2'd0) @(negedge clk);

    // ---------------------------------------------------------------- part A
    for (int ep = 0; ep < 6; ep++) begin
      int k, busy, cyc;
      for (int s = 0; s < NS; s++) begin s_left[s] = 0; s_next[s] = 0; end
      k = $urandom_range(1, 4);
      if (ep == 0) k = 4;
      for (int j = 0; j < k; j++) begin
        int s;
        s = (ep == 1 && j == 0) ? 0 : $urandom_range(0, NS-1);
        if (s_left[s] == 0) begin s_left[s] = BURST; s_next[s] = $urandom_range(0, 2000); end
      end
      n_epochs++;
      cyc = 0;
      busy = 1;
      while (busy || lq.size() > 0) begin
        bit he, hx;
        pt_e et, xt;
        int conc;
        he = 0; et = PT_LONER; conc = 0;
        for (int s = 0; s < NS; s++) begin
          if (s_left[s] > 0 && s_left[s] < BURST) conc++;
          if (s_left[s] > 0 && cyc >= s_next[s]) begin
            if (s == 0) begin he = 1; et = cell_type(s_left[s]); end
            else lq.push_back(cell_type(s_left[s]));
            s_left[s]--;
            s_next[s] = cyc + SPACING;
          end
        end
        if (conc > max_conc) max_conc = conc;
        if (conc > 1) n_overlap++;
        hx = (lq.size() > 0);
        xt = hx ? lq.pop_front() : PT_LONER;
        op_cycle(he, et, hx, xt, ea, eo, efc, xa);
        if (he) begin
          n_ent++;
          check(ea == ACT_PASS && eo == et && !efc,
                $sformatf("epoch %0d: host cell %0d passes unchanged (act %0d type %0d fc %0d)",
                          ep, et, ea, eo, efc));
        end
        if (hx) begin
          n_ext++;
          check(xa == ACT_PASS, $sformatf("epoch %0d: leaving cell %0d passes", ep, xt));
        end
        busy = 0;
        for (int s = 0; s < NS; s++) if (s_left[s] > 0) busy = 1;
        cyc++;
      end
      // the circuit must be idle now: a stray middle cell is discarded
      op_cycle(1, PT_MIDDLE, 0, PT_LONER, ea, eo, efc, xa);
      check(ea == ACT_DISCARD, $sformatf("epoch %0d: circuit idle after the last end", ep));
      // quiet period long enough to refill the pool
      repeat (70000) op_cycle(0, PT_LONER, 0, PT_LONER, ea, eo, efc, xa);
    end
    check(n_tmo == 0, "no timer expired for conforming traffic");

    // ---------------------------------------------------------------- part B
    begin
      bit closed;
      closed = 0;
      for (int c = 0; c < 1000; c++) begin
        pt_e t;
        t = (c == 0) ? PT_BEGIN : (c == 999) ? PT_END : PT_MIDDLE;
        op_cycle(1, t, 0, PT_LONER, ea, eo, efc, xa);
        if (!closed) begin
          if (eo == PT_END && t != PT_END) begin
            closed = 1; n_retype++;
            check(ea == ACT_PASS && efc, "re-typed end cell passes with flow control");
            check(c > 300 && c < 800, $sformatf("burst cut after %0d cells", c));
          end else begin
            check(ea == ACT_PASS, "cells before the cut pass");
          end
        end else begin
          n_after++;
          check(ea == ACT_DISCARD, "cells after the cut are discarded");
        end
        repeat (SPACING - 1) op_cycle(0, PT_LONER, 0, PT_LONER, ea, eo, efc, xa);
      end
    end

    $display("epochs=%0d host_cells=%0d leaving_cells=%0d overlap_cycles=%0d max_concurrent=%0d timeouts=%0d retyped=%0d discarded_after=%0d",
             n_epochs, n_ent, n_ext, n_overlap, max_conc, n_tmo, n_retype, n_after);
    check(n_ent > 0 && n_ext > 0, "cells at both ends");
    check(max_conc >= 3, "three or more sources overlapped");
    check(n_retype == 1 && n_after > 0, "non-conforming burst cut off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
