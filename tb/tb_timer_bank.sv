// tb_timer_bank: self-checking testbench for the time-ordered timer bank.
//
// A reference model keeps the busy timers as an ordered list (head = next to
// expire).  The testbench advances the time every clock and, each clock,
// applies one operation: pop an expired head, start a timer for a circuit
// without one, restart or remove the timer of a circuit that has one.  After
// every clock it compares the busy flags, the head's RMI and time, the free
// and match flags and the expiry flag with the model.  A short directed part
// checks that a restarted timer moves behind the others.
module tb_timer_bank;
  localparam int NT = 8, TW = 8, RW = 4, TO = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] op;
  logic [RW-1:0] rmi;
  logic [TW-1:0] exp_time, now;
  logic has_free, any_match, head_bi, head_exp;
  logic [RW-1:0] head_rmi;
  logic [TW-1:0] head_time;
  logic [NT-1:0] bi_vec;

  int checks = 0, failures = 0;
  int popped = 0, resets = 0, allocs = 0, removes = 0;

  timer_bank #(.NTIMER(NT), .TIME_W(TW), .RMI_W(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q_rmi[$];
  int q_tim[$];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int find(int r);
    foreach (q_rmi[i]) if (q_rmi[i] == r) return i;
    return -1;
  endfunction

  task automatic compare();
    int n = q_rmi.size();
    for (int p = 0; p < NT; p++) check(bi_vec[p] == (p >= NT - n), $sformatf("bi[%0d]", p));
    check(has_free == (n < NT), "has_free");
    if (n > 0) begin
      check(int'(head_rmi) == q_rmi[0], "head rmi");
      check(int'(head_time) == q_tim[0], "head time");
      check(head_exp == (((int'(now) - q_tim[0]) & 8'hff) < 128), "head_exp");
    end
    // internal order: position NT-1-i holds the i-th timer of the list
    for (int i = 0; i < n; i++) begin
      check(int'(dut.ermi[NT-1-i]) == q_rmi[i], $sformatf("order rmi %0d", i));
      check(int'(dut.etim[NT-1-i]) == q_tim[i], $sformatf("order time %0d", i));
    end
  endtask

  task automatic step(input logic [2:0] o, input int r, input bit m);
    @(negedge clk);
    op = o; rmi = RW'(r); exp_time = now + TW'(TO);
    #1;
    check(any_match == m, "any_match");
    @(posedge clk); #1;
    op = 3'd0;
    now = now + 1'b1;
    #1;
  endtask

  initial begin
    op = 0; rmi = 0; now = 8'd250; exp_time = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();

    // directed: timers for 1, 2, 3; restart 1; it must end up last
    for (int r = 1; r <= 3; r++) begin
      q_rmi.push_back(r); q_tim.push_back((int'(now) + TO) & 8'hff);
      step(3'd1, r, 0); compare();
    end
    begin
      int i;
      i = find(1);
      q_rmi.delete(i); q_tim.delete(i);
      q_rmi.push_back(1); q_tim.push_back((int'(now) + TO) & 8'hff);
      step(3'd2, 1, 1); compare();
      check(int'(head_rmi) == 2, "restart moved timer 1 behind");
    end

    for (int k = 0; k < 4000; k++) begin
      int r, c, i;
      r = $urandom_range(0, 15);
      c = $urandom_range(0, 3);
      i = find(r);
      if (head_exp) begin
        bit m0;
        m0 = (find(0) >= 0);
        q_rmi.pop_front(); q_tim.pop_front();
        step(3'd4, 0, m0); popped++;
      end else if (c == 0 && i < 0 && q_rmi.size() < NT) begin
        q_rmi.push_back(r); q_tim.push_back((int'(now) + TO) & 8'hff);
        step(3'd1, r, 0); allocs++;
      end else if (c == 1 && (i >= 0 || q_rmi.size() < NT)) begin
        if (i >= 0) begin q_rmi.delete(i); q_tim.delete(i); end
        q_rmi.push_back(r); q_tim.push_back((int'(now) + TO) & 8'hff);
        step(3'd2, r, i >= 0); resets++;
      end else if (c == 2) begin
        if (i >= 0) begin q_rmi.delete(i); q_tim.delete(i); end
        step(3'd3, r, i >= 0); removes++;
      end else begin
        step(3'd0, r, i >= 0);
      end
      compare();
    end
    check(popped > 10 && resets > 10 && allocs > 10 && removes > 10, "all operations used");
    $display("pops=%0d allocs=%0d resets=%0d removes=%0d", popped, allocs, resets, removes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
