// tb_atm_rm_top: end-to-end testbench of the reference connection, at the
// design's default sizes (64+64 token pools, 64 resequencer records, 192
// transmit slots, 256 BAT entries, 64 timers at each end).
//
// The testbench plays the parts around the design:
//   host      eight circuits send cells into the ARM whenever it is ready:
//             VCIs 1 and 2 predictable (average-rate pools, VCI 2 shared by
//             several sources), VCIs 3..8 unpredictable, in bursts of start,
//             middles and end, some loners, one circuit using begin cells,
//             and now and then a burst abandoned without its end cell;
//   fabric    a FIFO that carries the cells the ARM lets in to the switch
//             input, turning cells the ARM marked into loners (discardable),
//             giving a few cells an age beyond the resequencer's limit and
//             injecting cells on an unknown VCI;
//   control   writes the translation table (VCI v -> VCI v+100, RMI 0 for the
//             predictable circuits and RMI v otherwise), the BAT and B, and
//             the ARM's pools;
//   link      acknowledges the output at a rate that alternates between
//             faster and slower than the arrivals, so the buffer fills and
//             empties; delivered cells of VCIs 2 and 8 come back to the ARM as
//             cells leaving the network.
// Checks: every delivered cell was sent, carries the translated VCI and the
// circuit's RMI, and each circuit's cells leave in order; after a quiet drain
// every cell the switch accepted is accounted for as delivered, refused by
// the BAT, dropped on arrival, dropped as excess or overwritten, and every
// reservation has been returned (B back to its configured value).  Each
// mechanism of both ends must have happened at least once.
module tb_atm_rm_top;
  import atm_pkg::*;

  localparam int VW = 10, PAYW = CELL_BITS - VW;
  localparam int B0 = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  // ARM configuration
  logic cfgp_we = 0, cfgp_mode = 0, cfgp_msrc = 0, cfgu_we = 0;
  logic [5:0] cfgp_idx = 0, cfgu_idx = 0;
  logic [31:0] cfgp_p = 0;
  logic [23:0] cfgp_inc = 0, cfgu_inc = 0;
  logic [11:0] cfgp_pp = 0, cfgp_pinc = 0;
  logic [47:0] cfgu_p = 0;
  logic [3:0] cfgu_z = 0;
  logic signed [5:0] cfgu_h = 0;
  // host
  logic h_valid = 0, h_ready, h_cls = 0, h_fc;
  logic [5:0] h_idx = 0;
  logic [VW-1:0] h_vci = 0;
  pt_e h_pt = PT_LONER;
  logic [PAYW-1:0] h_pay = 0;
  logic acc_valid, acc_marked, acc_discard;
  logic [VW-1:0] acc_vci;
  pt_e acc_pt;
  logic [PAYW-1:0] acc_pay;
  logic x_valid = 0, x_ready, x_cls = 0;
  logic [5:0] x_idx = 0;
  pt_e x_pt = PT_LONER;
  act_e x_act;
  logic arm_tmr_fire;
  logic [5:0] arm_tmr_idx;
  // switch configuration
  logic vx_we = 0, vx_valid = 0, bat_we = 0, b_we = 0;
  logic [VW-1:0] vx_vci = 0, vx_vci_out = 0;
  logic [7:0] vx_rmi = 0, bat_rmi = 0, bat_need = 0, b_val = 0;
  // fabric -> switch
  logic sw_valid = 0, sw_ready;
  logic [VW-1:0] sw_vci = 0;
  pt_e sw_pt = PT_LONER;
  logic [7:0] sw_age = 0;
  logic [PAYW-1:0] sw_pay = 0;
  // output link
  logic out_valid, out_ex, out_ack = 0;
  logic [VW-1:0] out_vci;
  logic [PAYW-1:0] out_pay;
  pt_e out_pt;
  logic [7:0] out_rmi, b_avail;
  logic ev_unknown_vci, ev_admit, ev_mark, ev_discard, ev_overwrite, ev_drop_ex,
        ev_in_drop, ev_timeout;

  atm_rm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  // mechanism counters
  int a_pass = 0, a_mark = 0, a_disc = 0, a_fc = 0, a_retype = 0, a_tmo = 0, a_xdisc = 0,
      a_x = 0;
  int s_acc = 0, s_unknown = 0, s_admit = 0, s_mark = 0, s_disc = 0, s_ow = 0,
      s_dropx = 0, s_indrop = 0, s_tmo = 0, s_deliv = 0, s_pred = 0, s_ex_out = 0;
  int s_old = 0;

  // ------------------------------------------------------------ host traffic
  localparam int NV = 8;
  bit in_burst [NV+1];
  int remain   [NV+1];
  int quiet    [NV+1];
  int seq      [NV+1];
  int last_out [NV+1];
  bit traffic = 1;
  int cyc = 0;

  function automatic bit is_cls1(int v); return v >= 3; endfunction
  function automatic int pool_of(int v); return is_cls1(v) ? v - 3 : v - 1; endfunction

  // next cell type of circuit v (or -1 if it stays silent)
  function automatic int next_type(int v);
    if (quiet[v] > cyc) return -1;
    if (!in_burst[v]) begin
      if ($urandom_range(0, 9) < 3) return PT_LONER;
      in_burst[v] = 1; remain[v] = $urandom_range(2, 30);
      return (v == 7) ? PT_BEGIN : PT_START;
    end
    if (remain[v] > 0) begin remain[v]--; return PT_MIDDLE; end
    in_burst[v] = 0;
    if ($urandom_range(0, 11) == 0) begin quiet[v] = cyc + 250; return -1; end  // end lost
    return PT_END;
  endfunction

  always @(negedge clk) begin
    h_valid <= 0;
    if (rst_n && traffic && h_ready && $urandom_range(0, 9) < 9) begin
      int v, t;
      v = $urandom_range(1, NV);
      t = next_type(v);
      if (t >= 0) begin
        seq[v]++;
        h_valid <= 1; h_cls <= is_cls1(v); h_idx <= 6'(pool_of(v)); h_vci <= VW'(v);
        h_pt <= pt_e'(t); h_pay <= PAYW'({32'(v), 32'(seq[v])});
      end
    end
  end

  // ARM decisions
  typedef struct { logic [VW-1:0] vci; pt_e pt; logic [7:0] age; logic [PAYW-1:0] pay; } fcell_t;
  fcell_t fifo[$];

  always @(posedge clk) if (rst_n) begin
    if (h_valid && h_ready) begin
      if (acc_discard) a_disc++;
      else if (acc_marked) a_mark++;
      else a_pass++;
      if (h_fc) a_fc++;
      if (acc_valid && acc_pt != h_pt) a_retype++;
      check(acc_valid != acc_discard, "ARM: each cell passed or discarded");
      if (acc_valid) begin
        fcell_t c;
        c.vci = acc_vci; c.pt = acc_marked ? PT_LONER : acc_pt; c.age = 8'd0; c.pay = acc_pay;
        if ($urandom_range(0, 49) == 0) begin c.age = 8'd30; s_old++; end
        fifo.push_back(c);
        if ($urandom_range(0, 99) == 0) begin
          c.vci = VW'(50); c.age = 8'd0; fifo.push_back(c);
        end
      end
    end
    if (arm_tmr_fire) a_tmo++;
    if (x_valid && x_ready) begin
      a_x++;
      if (x_act == ACT_DISCARD) a_xdisc++;
    end
  end

  // ------------------------------------------------------------------ fabric
  always @(negedge clk) begin
    if (rst_n && fifo.size() > 0) begin
      sw_valid <= 1; sw_vci <= fifo[0].vci; sw_pt <= fifo[0].pt; sw_age <= fifo[0].age;
      sw_pay <= fifo[0].pay;
    end else sw_valid <= 0;
  end
  always @(posedge clk) if (rst_n && sw_valid && sw_ready) begin
    void'(fifo.pop_front());
    if (ev_unknown_vci) s_unknown++;
    else s_acc++;
    check(ev_unknown_vci == (sw_vci == VW'(50)), "unknown VCI detected");
  end

  // -------------------------------------------------------------- switch events
  always @(posedge clk) if (rst_n) begin
    if (ev_admit) s_admit++;
    if (ev_mark) s_mark++;
    if (ev_discard) s_disc++;
    if (ev_overwrite) s_ow++;
    if (ev_drop_ex) s_dropx++;
    if (ev_in_drop) s_indrop++;
    if (ev_timeout) s_tmo++;
  end

  // ------------------------------------------------------------- output link
  typedef struct { logic [VW-1:0] vci; pt_e pt; } xcell_t;
  xcell_t xq[$];
  always @(negedge clk) out_ack <= ($urandom_range(0, 99) < (((cyc / 1500) % 2) ? 95 : 30));
  always @(posedge clk) if (rst_n && out_valid && out_ack) begin
    int v, s;
    v = int'(out_pay[63:32]); s = int'(out_pay[31:0]);
    s_deliv++;
    if (out_ex) s_ex_out++;
    check(v >= 1 && v <= NV && s <= seq[v], "delivered cell was sent");
    check(int'(out_vci) == v + 100, "translated VCI");
    check(int'(out_rmi) == (v <= 2 ? 0 : v), "RMI");
    check(s > last_out[v], $sformatf("circuit %0d in order (%0d after %0d)", v, s, last_out[v]));
    last_out[v] = s;
    if (v <= 2 && !out_ex) s_pred++;
    if (v == 2 || v == 8) begin xcell_t x; x.vci = VW'(v); x.pt = out_pt; xq.push_back(x); end
  end
  always @(negedge clk) begin
    x_valid <= 0;
    if (rst_n && xq.size() > 0 && x_ready) begin
      xcell_t x;
      x = xq.pop_front();
      x_valid <= 1; x_cls <= is_cls1(int'(x.vci)); x_idx <= 6'(pool_of(int'(x.vci)));
      x_pt <= x.pt;
    end
  end

  // ------------------------------------------------------------------ control
  task automatic cpu_write_switch();
    for (int v = 1; v <= NV; v++) begin
      @(negedge clk);
      vx_we = 1; vx_vci = VW'(v); vx_valid = 1; vx_vci_out = VW'(v + 100);
      vx_rmi = (v <= 2) ? 8'd0 : 8'(v);
      bat_we = (v > 2); bat_rmi = 8'(v); bat_need = 8'(12 + 2 * v);
    end
    @(negedge clk);
    vx_we = 0; bat_we = 0; b_we = 1; b_val = 8'(B0);
    @(negedge clk);
    b_we = 0;
  endtask

  task automatic cpu_write_arm();
    for (int v = 1; v <= 2; v++) begin
      @(negedge clk);
      cfgp_we = 1; cfgp_idx = 6'(pool_of(v)); cfgp_p = 32'd6000;
      cfgp_inc = (v == 1) ? 24'd1200 : 24'd900;          // rates 0.21 and 0.28
      cfgp_pp = 12'd1000; cfgp_pinc = 12'd100; cfgp_mode = 0; cfgp_msrc = (v == 2);
    end
    @(negedge clk);
    cfgp_we = 0;
    for (int v = 3; v <= NV; v++) begin
      @(negedge clk);
      cfgu_we = 1; cfgu_idx = 6'(pool_of(v)); cfgu_p = 48'd40000;
      cfgu_inc = (v == 4) ? 24'd6000 : 24'd1500;
      cfgu_z = (v == 4) ? 4'd15 : 4'd3;                 // lambda/mu = 15 or 3/8
      cfgu_h = (v == 4) ? 6'sd0 : -6'sd3;
    end
    @(negedge clk);
    cfgu_we = 0;
  endtask

  initial begin
    for (int v = 0; v <= NV; v++) begin
      in_burst[v] = 0; remain[v] = 0; quiet[v] = 0; seq[v] = 0; last_out[v] = 0;
    end
    traffic = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    cpu_write_switch();
    cpu_write_arm();
    check(int'(b_avail) == B0, "B configured");
    traffic = 1;
    for (cyc = 0; cyc < 12000; cyc++) repeat (3) @(posedge clk);
    traffic = 0;
    // drain: no new cells; let the buffer empty and every timer run out
    out_ack = 1;
    for (int i = 0; i < 400; i++) repeat (3) @(posedge clk);
    #1;
    check(fifo.size() == 0 && !out_valid, "drained");
    check(s_acc == s_deliv + s_disc + s_indrop + s_dropx + s_ow,
          $sformatf("cells accounted for: accepted %0d delivered %0d refused %0d in-drop %0d excess-drop %0d overwritten %0d",
                    s_acc, s_deliv, s_disc, s_indrop, s_dropx, s_ow));
    check(int'(b_avail) == B0, $sformatf("reservations returned: B=%0d", b_avail));
    check(s_indrop >= s_old, "too-old cells dropped on arrival");

    $display("ARM: pass=%0d mark=%0d discard=%0d fc=%0d retyped=%0d timeouts=%0d leaving=%0d leaving_discard=%0d",
             a_pass, a_mark, a_disc, a_fc, a_retype, a_tmo, a_x, a_xdisc);
    $display("IRM: accepted=%0d unknown=%0d admit=%0d mark=%0d discard=%0d overwrite=%0d excess_drop=%0d in_drop=%0d timeout=%0d delivered=%0d predictable=%0d excess_out=%0d",
             s_acc, s_unknown, s_admit, s_mark, s_disc, s_ow, s_dropx, s_indrop, s_tmo,
             s_deliv, s_pred, s_ex_out);
    check(a_pass > 0, "ARM pass");           check(a_mark > 0, "ARM mark");
    check(a_disc > 0, "ARM discard");        check(a_fc > 0, "ARM flow control");
    check(a_retype > 0, "ARM end conversion"); check(a_tmo > 0, "ARM timeout");
    check(a_x > 0, "ARM leaving cells");     check(a_xdisc > 0, "ARM leaving discard");
    check(s_unknown > 0, "unknown VCI");     check(s_admit > 0, "IRM admit");
    check(s_mark > 0, "IRM mark");           check(s_disc > 0, "IRM discard");
    check(s_ow > 0, "IRM overwrite");        check(s_dropx > 0, "IRM excess drop");
    check(s_indrop > 0, "IRM arrival drop"); check(s_tmo > 0, "IRM timeout");
    check(s_pred > 0, "predictable bypass"); check(s_ex_out > 0, "excess cells sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
