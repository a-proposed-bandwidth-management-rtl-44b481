// tb_arm: self-checking testbench for the access resource manager.
//
// Directed scenarios on a small ARM (four pools of each class, two timers,
// timeout of 10 cell times), with expected values worked out by hand from the
// token pool rules:
//   * the operation cycle is three clocks and the cell time T advances once
//     per cycle; entering cells are taken in phase 0, leaving ones in phase 1;
//   * a predictable circuit with average rate 1/2 sending a cell every cell
//     time gets about half its cells through unmarked, the rest marked with a
//     flow-control request;
//   * leaving cells of a multi-source predictable circuit drain its pool, so
//     that its next entering cell is marked;
//   * an unpredictable circuit: a middle cell while idle is discarded, a start
//     cell opens the burst, middles pass, a silent circuit is returned to idle
//     by its timer in phase 2 TIMEOUT cell times later, after which a middle
//     cell is discarded again; with both timers busy a third circuit's start
//     cell is refused;
//   * a configuration write holds off the cell step of its clock.
module tb_arm;
  import atm_pkg::*;

  localparam int N = 4, IW = 2, NT = 2, TO = 10;

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

  arm #(.NVC(N), .NTIMER(NT), .TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pass = 0, n_mark = 0, n_fc = 0, n_disc = 0, n_tmo = 0, n_ext = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic to_phase(input int p);
    @(negedge clk);
    while (phase != 2'(p)) @(negedge clk);
  endtask

  // one entering cell in the next phase 0; returns the decision
  task automatic enter(input bit cls, input int idx, input pt_e pt,
                       output act_e a, output pt_e po, output bit fc);
    to_phase(0);
    ent_valid = 1; ent_cls = cls; ent_idx = IW'(idx); ent_pt = pt;
    #1;
    check(ent_ready, "entering cell taken in phase 0");
    a = ent_act; po = ent_pt_out; fc = ent_fc;
    @(negedge clk);
    ent_valid = 0;
  endtask

  task automatic leave(input bit cls, input int idx, input pt_e pt, output act_e a);
    to_phase(1);
    ext_valid = 1; ext_cls = cls; ext_idx = IW'(idx); ext_pt = pt;
    #1;
    check(ext_ready, "leaving cell taken in phase 1");
    a = ext_act;
    @(negedge clk);
    ext_valid = 0;
    n_ext++;
  endtask

  task automatic cfg_pred(input int idx, input int p, input int inc, input bit msrc);
    @(negedge clk);
    cfgp_we = 1; cfgp_idx = IW'(idx); cfgp_p = 32'(p); cfgp_inc = 24'(inc);
    cfgp_pp = 12'd2000; cfgp_pinc = 12'd64; cfgp_mode = 0; cfgp_msrc = msrc;
    #1;
    check(!ent_ready && !ext_ready, "configuration holds off the cell steps");
    @(negedge clk);
    cfgp_we = 0;
  endtask

  task automatic cfg_unpred(input int idx);
    @(negedge clk);
    cfgu_we = 1; cfgu_idx = IW'(idx); cfgu_p = 48'd100000; cfgu_inc = 24'd1024;
    cfgu_z = 4'd1; cfgu_h = -6'sd6;             // lambda/mu = 1/64: slow drain
    @(negedge clk);
    cfgu_we = 0;
  endtask

  // watch the timer step
  int fired_idx = -1;
  always @(posedge clk) if (rst_n && tmr_fire) begin
    n_tmo++; fired_idx = int'(tmr_idx);
    check(phase == 2'd2, "timer step in phase 2");
  end

  initial begin
    act_e a; pt_e po; bit fc;
    int t0, c0, p0, passes;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // operation cycle and cell time
    @(negedge clk);
    t0 = int'(now); c0 = 0; p0 = int'(phase);
    for (int i = 0; i < 30; i++) begin
      check(int'(phase) == ((p0 + i) % 3), "phase sequence");
      check(ent_ready == (phase == 0) && ext_ready == (phase == 1), "ready by phase");
      @(negedge clk);
    end
    check(int'(now) == t0 + 10, $sformatf("cell time advanced %0d in 30 clocks", int'(now) - t0));

    // predictable pool, average rate 1/2, one cell per cell time for 100 cycles
    cfg_pred(0, 1024, 512, 0);
    passes = 0;
    for (int i = 0; i < 100; i++) begin
      enter(0, 0, PT_LONER, a, po, fc);
      if (a == ACT_PASS) begin passes++; n_pass++; end
      else begin check(a == ACT_MARK && fc, "marked with flow control"); n_mark++; n_fc++; end
    end
    check(passes >= 49 && passes <= 53, $sformatf("half the cells unmarked: %0d", passes));

    // multi-source predictable circuit drained by leaving cells
    cfg_pred(2, 2048, 512, 1);
    enter(0, 2, PT_LONER, a, po, fc);
    check(a == ACT_PASS, "full pool passes");
    for (int i = 0; i < 12; i++) begin
      leave(0, 2, PT_MIDDLE, a);
      check(a == ACT_PASS, "predictable leaving cell delivered");
    end
    enter(0, 2, PT_LONER, a, po, fc);
    check(a == ACT_MARK, "pool drained by leaving cells");

    // unpredictable circuit state machine and timer
    cfg_unpred(1);
    enter(1, 1, PT_MIDDLE, a, po, fc);
    check(a == ACT_DISCARD, "idle middle discarded"); n_disc++;
    enter(1, 1, PT_START, a, po, fc);
    check(a == ACT_PASS && po == PT_START, "start opens the burst");
    for (int i = 0; i < 3; i++) begin
      enter(1, 1, PT_MIDDLE, a, po, fc);
      check(a == ACT_PASS && po == PT_MIDDLE, "middle passes while active");
    end
    fired_idx = -1;
    t0 = int'(now);
    while (fired_idx < 0 && int'(now) < t0 + 3 * TO) @(negedge clk);
    check(fired_idx == 1, "timer returned the circuit to idle");
    check(int'(now) - t0 >= TO - 1 && int'(now) - t0 <= TO + 1,
          $sformatf("timeout after %0d cell times", int'(now) - t0));
    enter(1, 1, PT_MIDDLE, a, po, fc);
    check(a == ACT_DISCARD, "middle after timeout discarded"); n_disc++;

    // leaving cells of an unpredictable circuit follow the state machine
    cfg_unpred(3);
    leave(1, 3, PT_MIDDLE, a);
    check(a == ACT_DISCARD, "idle leaving middle discarded");
    leave(1, 3, PT_START, a);
    check(a == ACT_PASS, "leaving start opens the burst");

    // both timers busy (circuit 3 and now circuit 1): circuit 0 is refused
    cfg_unpred(0);
    enter(1, 1, PT_START, a, po, fc);
    check(a == ACT_PASS, "second burst");
    enter(1, 0, PT_START, a, po, fc);
    check(a == ACT_DISCARD, "no timer free: refused"); n_disc++;
    enter(1, 1, PT_END, a, po, fc);
    check(a == ACT_PASS && po == PT_END, "end closes the burst");
    enter(1, 0, PT_START, a, po, fc);
    check(a == ACT_PASS, "timer freed by the end cell");

    $display("pass=%0d mark=%0d fc=%0d discard=%0d timeouts=%0d leaving=%0d",
             n_pass, n_mark, n_fc, n_disc, n_tmo, n_ext);
    check(n_pass > 0 && n_mark > 0 && n_fc > 0 && n_disc > 0 && n_tmo > 0 && n_ext > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
