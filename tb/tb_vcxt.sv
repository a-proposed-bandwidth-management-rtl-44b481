// tb_vcxt: self-checking testbench for the virtual circuit translation table.
//
// After reset every entry must read invalid.  Random entries are then written,
// some of them invalidated again, and random VCIs are looked up and compared
// with a model kept in an associative array: the valid bit, the outgoing VCI
// and the RMI, including the reserved RMI 0 of predictable circuits.  The
// lookup is combinational, so each result is checked in the clock of its VCI.
module tb_vcxt;
  localparam int VW = 10, RW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, wr_valid = 0;
  logic [VW-1:0] wr_vci = 0, wr_vci_out = 0, lk_vci = 0, lk_vci_out;
  logic [RW-1:0] wr_rmi = 0, lk_rmi;
  logic lk_valid;

  vcxt dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_pred = 0;

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

  bit m_v [int];
  int m_o [int], m_r [int];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < (1 << VW); v++) begin
      @(negedge clk); lk_vci = VW'(v); #1;
      check(!lk_valid, "invalid after reset");
    end
    for (int n = 0; n < 6000; n++) begin
      int v;
      @(negedge clk);
      v = $urandom_range(0, (1 << VW) - 1);
      if ($urandom_range(0, 2) == 0) begin
        wr_en = 1; wr_vci = VW'(v);
        wr_valid = ($urandom_range(0, 4) != 0);
        wr_vci_out = VW'($urandom);
        wr_rmi = ($urandom_range(0, 5) == 0) ? '0 : RW'($urandom);
        m_v[v] = wr_valid; m_o[v] = int'(wr_vci_out); m_r[v] = int'(wr_rmi);
      end else begin
        wr_en = 0;
        if (m_v.num() > 0 && $urandom_range(0, 1)) begin
          int k, j;
          k = $urandom_range(0, m_v.num() - 1);
          j = 0;
          foreach (m_v[key]) begin if (j == k) v = key; j++; end
        end
        lk_vci = VW'(v);
        #1;
        if (m_v.exists(v) && m_v[v]) begin
          check(lk_valid, "valid");
          check(int'(lk_vci_out) == m_o[v], "outgoing VCI");
          check(int'(lk_rmi) == m_r[v], "RMI");
          n_hit++;
          if (m_r[v] == 0) n_pred++;
        end else begin
          check(!lk_valid, "unknown VCI");
          n_miss++;
        end
      end
    end
    @(negedge clk); wr_en = 0;
    $display("hits=%0d misses=%0d predictable=%0d", n_hit, n_miss, n_pred);
    check(n_hit > 100 && n_miss > 100 && n_pred > 0, "hits, misses and RMI 0 seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
