// tb_xmbc: self-checking testbench for the transmit buffer controller.
//
// Part 1 replays the worked example of an eight-slot controller: it first
// builds the example's starting state (five cells in slots 2, 5, 1, 3, 7 in
// transmission order, 5 and 3 marked, idle slots 4, 6, 0), then applies read,
// write(ex=1), three write(ex=0), overwrite and read, checking the slot number
// each operation reports and the full final state.  Part 2 applies random
// legal operations and compares every position against a reference model kept
// in the testbench.  Each operation takes one clock.
module tb_xmbc;
  localparam int N = 8;
  localparam int SW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] op;
  logic wr_ex, wr_lds;
  logic [SW-1:0] wr_slot;
  logic head_bi, head_ex, has_idle, has_excess;
  logic [SW-1:0] head_slot, bus_slot;
  logic [N-1:0] bi_vec, ex_vec;
  logic [N-1:0][SW-1:0] slot_vec;

  int checks = 0, failures = 0;

  xmbc #(.NSLOT(N), .SLOT_W(SW), .SLOT_BASE(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit m_bi [N];
  bit m_ex [N];
  int m_sl [N];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare_all();
    for (int p = 0; p < N; p++) begin
      check(bi_vec[p] == m_bi[p], $sformatf("bi[%0d]", p));
      if (m_bi[p]) check(ex_vec[p] == m_ex[p], $sformatf("ex[%0d]", p));
      check(int'(slot_vec[p]) == m_sl[p], $sformatf("slot[%0d] %0d vs %0d", p, slot_vec[p], m_sl[p]));
    end
  endtask

  // Model operations; each returns the slot number involved.
  function automatic int m_read();
    int s = m_sl[N-1];
    for (int p = N-1; p > 0; p--) begin
      m_bi[p] = m_bi[p-1]; m_ex[p] = m_ex[p-1]; m_sl[p] = m_sl[p-1];
    end
    m_bi[0] = 0; m_ex[0] = 0; m_sl[0] = s;
    return s;
  endfunction

  function automatic int m_write(bit ex, bit lds, int ns);
    int p = -1;
    for (int q = 0; q < N; q++) if (!m_bi[q]) p = q;
    m_bi[p] = 1; m_ex[p] = ex;
    if (lds) m_sl[p] = ns;
    return m_sl[p];
  endfunction

  function automatic int m_overwrite(bit ex, bit lds, int ns);
    int p = -1, s;
    for (int q = N-1; q >= 0; q--) if (m_bi[q] && m_ex[q]) p = q;
    s = m_sl[p];
    for (int q = p; q > 0; q--) begin
      m_bi[q] = m_bi[q-1]; m_ex[q] = m_ex[q-1]; m_sl[q] = m_sl[q-1];
    end
    m_bi[0] = 1; m_ex[0] = ex; m_sl[0] = lds ? ns : s;
    return s;
  endfunction

  task automatic do_op(input logic [1:0] o, input bit ex, input bit lds, input int ns,
                       output int bus);
    @(negedge clk);
    op = o; wr_ex = ex; wr_lds = lds; wr_slot = SW'(ns);
    #1;
    bus = (o == 2'd1) ? int'(head_slot) : int'(bus_slot);
    @(posedge clk);
    #1;
    op = 2'd0;
  endtask

  int r, e;
  int order [8] = '{0, 6, 4, 2, 5, 1, 3, 7};
  bit oex  [8]  = '{0, 0, 0, 0, 1, 0, 1, 0};
  int fin_sl [8] = '{5, 0, 2, 4, 6, 7, 3, 1};
  bit fin_bi [8] = '{0, 1, 1, 1, 1, 1, 1, 1};
  bit fin_ex [8] = '{0, 0, 0, 0, 0, 0, 1, 0};

  initial begin
    op = 0; wr_ex = 0; wr_lds = 0; wr_slot = 0;
    for (int p = 0; p < N; p++) begin m_bi[p] = 0; m_ex[p] = 0; m_sl[p] = p; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    compare_all();

    // Build the example's starting state.
    for (int i = 0; i < 8; i++) begin
      do_op(2'd2, oex[i], 1'b1, order[i], r);
      void'(m_write(oex[i], 1'b1, order[i]));
    end
    for (int i = 0; i < 3; i++) begin
      do_op(2'd1, 0, 0, 0, r);
      e = m_read();
      check(r == e, "setup read");
    end
    compare_all();
    check(int'(slot_vec[0]) == 4 && int'(slot_vec[1]) == 6 && int'(slot_vec[2]) == 0 &&
          int'(slot_vec[7]) == 2 && ex_vec[4] && ex_vec[6], "example start state");

    // The example sequence.
    do_op(2'd1, 0, 0, 0, r); void'(m_read());            check(r == 2, "read => slot 2");
    do_op(2'd2, 1, 0, 0, r); void'(m_write(1, 0, 0));    check(r == 0, "write(ex=1) => slot 0");
    do_op(2'd2, 0, 0, 0, r); void'(m_write(0, 0, 0));    check(r == 6, "write(ex=0) => slot 6");
    do_op(2'd2, 0, 0, 0, r); void'(m_write(0, 0, 0));    check(r == 4, "write(ex=0) => slot 4");
    do_op(2'd2, 0, 0, 0, r); void'(m_write(0, 0, 0));    check(r == 2, "write(ex=0) => slot 2");
    check(!has_idle && has_excess, "full with excess");
    do_op(2'd3, 0, 0, 0, r); void'(m_overwrite(0, 0, 0)); check(r == 0, "overwrite => slot 0");
    do_op(2'd1, 0, 0, 0, r); void'(m_read());            check(r == 5, "read => slot 5");
    for (int p = 0; p < N; p++) begin
      check(int'(slot_vec[p]) == fin_sl[p], $sformatf("final slot[%0d]", p));
      check(bi_vec[p] == fin_bi[p], $sformatf("final bi[%0d]", p));
      if (fin_bi[p]) check(ex_vec[p] == fin_ex[p], $sformatf("final ex[%0d]", p));
    end
    compare_all();

    // Random legal operations against the model.
    for (int i = 0; i < 3000; i++) begin
      int k, ns;
      bit ex, lds;
      k = $urandom_range(0, 2);
      ex = 1'($urandom_range(0, 1));
      lds = 1'($urandom_range(0, 1));
      ns = $urandom_range(0, N-1);
      if (k == 0 && m_bi[N-1]) begin
        do_op(2'd1, 0, 0, 0, r); e = m_read();
        check(r == e, "random read slot");
      end else if (k == 1 && !m_bi[0]) begin
        do_op(2'd2, ex, lds, ns, r); e = m_write(ex, lds, ns);
        if (!lds) check(r == e, "random write slot");
      end else if (m_bi[0] && has_excess) begin
        do_op(2'd3, 0, lds, ns, r); e = m_overwrite(0, lds, ns);
        check(r == e, "random overwrite slot");
      end else if (m_bi[N-1]) begin
        do_op(2'd1, 0, 0, 0, r); e = m_read();
        check(r == e, "random read slot");
      end
      compare_all();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
