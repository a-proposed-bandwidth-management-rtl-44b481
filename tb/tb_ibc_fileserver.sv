// tb_ibc_fileserver: workload testbench -- the switch output port in front of a
// file server that many workstations send bursts to.
//
// The integrated buffer controller runs at its default size (64 resequencer
// records, 192 transmit slots, 256 BAT entries, 64 timers) with no parameter
// overrides.  Fifty unpredictable circuits (RMIs 1..50) share the port.
// Each one needs Bi = 12 slots while its burst is active, so at most 16 bursts
// can hold a reservation at the same time.  A circuit stays idle for a random
// time, then sends a burst: a start cell, middles and an end cell.  Cells go
// out at its peak rate, exactly one every 19 operation cycles, which is the
// ratio of an 8 Mb/s burst to a 150 Mb/s link.  One burst in ten is
// abandoned without its end cell, so that its timer has to return the
// reservation.  Bursts are scaled down to 40..120 cells so that many of them
// fit in one run.  On average about fifteen circuits are bursting, so
// reservations are often all taken and some bursts are refused.  The output
// link acknowledges 60% of the operation cycles, so the transmit buffer fills
// and excess cells are marked, overwritten and dropped.
// Each cell carries its circuit, burst number and sequence number.
// Checks:
//   * every cell admitted unmarked is transmitted (unmarked cells are never
//     lost);
//   * each circuit's cells leave in order;
//   * no cell of a burst is transmitted unless its start cell was;
//   * every cell handed to the port is transmitted, refused, dropped on
//     arrival, dropped as excess or overwritten;
//   * B always holds a whole number of reservations, reaches zero (all
//     reservations taken), and is back at 192 after the drain.
// Timing: one operation cycle is three clocks.  The link acknowledge is set in
// phase 0 and a cell is offered in phase 2, as in the controller's
// description.  The burst sizes, the counts and the link rate are this
// testbench's own scaling of the file-server example.
module tb_ibc_fileserver;
  import atm_pkg::*;

  localparam int NC = 50, NEED = 12, B0 = 192, SPACING = 19;
  localparam int GEN_CYC = 30000, DRAIN_CYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 0, cfg_b_we = 0;
  logic [7:0] cfg_rmi = 0, cfg_need = 0, cfg_b = 0;
  logic in_ready, in_valid = 0;
  logic [CELL_BITS-1:0] in_cell = '0;
  logic [7:0] in_rmi = 0, in_age = 0;
  pt_e in_pt = PT_LONER;
  logic out_valid, out_ex, out_ack = 0;
  logic [CELL_BITS-1:0] out_cell;
  logic [7:0] out_rmi;
  pt_e out_pt;
  logic [1:0] phase;
  logic [7:0] tclk, b_avail, ni, nx;
  logic ev_admit, ev_mark, ev_discard, ev_overwrite, ev_drop_ex, ev_in_drop, ev_timeout;

  ibc dut (.*);

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

  // circuit generators
  int st[NC+1], rem[NC+1], nxt[NC+1], burst[NC+1], seq[NC+1];
  bit abandon[NC+1];

  typedef struct packed {
    logic [7:0]  rmi;
    logic [2:0]  pt;
    logic [15:0] burst;
    logic [15:0] seq;
  } fcell_t;
  fcell_t fifo[$];

  // delivery bookkeeping
  bit start_seen[int];
  bit any_seen[int];
  longint last_key[NC+1];
  int n_in = 0, n_deliv = 0, n_deliv_un = 0, n_admit = 0, n_mark = 0, n_disc = 0,
      n_ow = 0, n_dropx = 0, n_indrop = 0, n_tmo = 0, n_bursts = 0, n_aband = 0,
      n_refused = 0, min_b = B0;

  task automatic emit(int c, pt_e pt);
    fcell_t f;
    f.rmi = 8'(c); f.pt = 3'(pt); f.burst = 16'(burst[c]); f.seq = 16'(seq[c]);
    seq[c]++;
    fifo.push_back(f);
  endtask

  task automatic generate_cells(int cyc);
    for (int c = 1; c <= NC; c++) begin
      if (cyc < nxt[c]) continue;
      if (st[c] == 0) begin
        if (cyc >= GEN_CYC) continue;
        burst[c]++; seq[c] = 0; n_bursts++;
        rem[c] = $urandom_range(40, 120);
        abandon[c] = ($urandom_range(0, 9) == 0);
        if (abandon[c]) n_aband++;
        st[c] = 1;
        emit(c, PT_START);
        rem[c]--;
        nxt[c] = cyc + SPACING;
      end else if (rem[c] > 1) begin
        emit(c, PT_MIDDLE);
        rem[c]--;
        nxt[c] = cyc + SPACING;
      end else begin
        if (!abandon[c]) emit(c, PT_END);
        st[c] = 0;
        nxt[c] = cyc + $urandom_range(1500, 6000);
      end
    end
  endtask

  task automatic deliver();
    int c, b, s, key;
    longint k2;
    c = int'(out_cell[7:0]); b = int'(out_cell[23:8]); s = int'(out_cell[39:24]);
    key = c * 65536 + b;
    k2 = longint'(b) * 65536 + s;
    n_deliv++;
    if (!out_ex) n_deliv_un++;
    check(c >= 1 && c <= NC && int'(out_rmi) == c, "cell of a known circuit");
    check(k2 > last_key[c], $sformatf("circuit %0d in order", c));
    last_key[c] = k2;
    if (out_pt == PT_START) start_seen[key] = 1;
    else check(start_seen.exists(key), $sformatf("circuit %0d burst %0d sent without its start", c, b));
    any_seen[key] = 1;
  endtask

  always @(posedge clk) begin
    if (ev_admit) n_admit++;
    if (ev_mark) n_mark++;
    if (ev_discard) n_disc++;
    if (ev_overwrite) n_ow++;
    if (ev_drop_ex) n_dropx++;
    if (ev_in_drop) n_indrop++;
    if (ev_timeout) n_tmo++;
  end

  initial begin
    for (int c = 0; c <= NC; c++) begin
      st[c] = 0; rem[c] = 0; burst[c] = 0; seq[c] = 0; abandon[c] = 0; last_key[c] = -1;
      nxt[c] = $urandom_range(0, 5000);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 1; c <= NC; c++) begin
      @(negedge clk);
      cfg_we = 1; cfg_rmi = 8'(c); cfg_need = 8'(NEED);
    end
    @(negedge clk);
    cfg_we = 0; cfg_b_we = 1; cfg_b = 8'(B0);
    @(negedge clk);
    cfg_b_we = 0;
    while (phase != 2'd0) @(negedge clk);

    for (int cyc = 0; cyc < GEN_CYC + DRAIN_CYC; cyc++) begin
      // phase 0: the link
      out_ack = (cyc >= GEN_CYC) || ($urandom_range(0, 99) < 60);
      #1;
      if (out_valid && out_ack) deliver();
      @(negedge clk);
      out_ack = 0;
      // phase 1
      @(negedge clk);
      // phase 2: one cell from the fabric
      generate_cells(cyc);
      check(phase == 2'd2 && in_ready, "phase 2 takes a cell");
      if (fifo.size() > 0) begin
        fcell_t f;
        f = fifo.pop_front();
        in_valid = 1; in_rmi = f.rmi; in_pt = pt_e'(f.pt); in_age = 8'd0;
        in_cell = '0;
        in_cell[7:0] = f.rmi; in_cell[23:8] = f.burst; in_cell[39:24] = f.seq;
        n_in++;
      end
      @(negedge clk);
      in_valid = 0;
      check(int'(b_avail) <= B0 && (B0 - int'(b_avail)) % NEED == 0,
            $sformatf("B=%0d is a whole number of reservations", b_avail));
      if (int'(b_avail) < min_b) min_b = int'(b_avail);
    end

    for (int c = 1; c <= NC; c++)
      for (int b = 1; b <= burst[c]; b++)
        if (!any_seen.exists(c * 65536 + b)) n_refused++;

    $display("bursts=%0d abandoned=%0d refused=%0d cells_in=%0d delivered=%0d unmarked_out=%0d",
             n_bursts, n_aband, n_refused, n_in, n_deliv, n_deliv_un);
    $display("admit=%0d mark=%0d discard=%0d overwrite=%0d excess_drop=%0d in_drop=%0d timeout=%0d min_B=%0d",
             n_admit, n_mark, n_disc, n_ow, n_dropx, n_indrop, n_tmo, min_b);
    check(fifo.size() == 0 && !out_valid && int'(ni) == 192, "drained");
    check(n_admit == n_deliv_un, $sformatf("unmarked cells never lost: admitted %0d sent %0d",
                                           n_admit, n_deliv_un));
    check(n_in == n_deliv + n_disc + n_indrop + n_dropx + n_ow, "every cell accounted for");
    check(int'(b_avail) == B0, $sformatf("reservations returned: B=%0d", b_avail));
    check(min_b < NEED, "all reservations taken at some point");
    check(n_refused > 0, "bursts refused");
    check(n_tmo > 0 && n_tmo <= n_aband, "abandoned bursts timed out");
    check(n_mark > 0, "excess cells marked");
    check(n_ow > 0, "excess cells overwritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
