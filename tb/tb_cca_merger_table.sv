// Self-checking test of cca_merger_table at its default size (320 labels):
// for several rows, allocates labels in CM, applies random chains of merger
// pairs (big, small) in reverse order as the merger stack does, swaps, and
// checks every PM lookup against a model that resolves each label to the
// smallest label of its equivalence set. Address 0 must read 0.
module tb_cca_merger_table;
  localparam int N = 320, LW = 9;
  logic clk = 0, rst_n, swap, cm_init_en, res_en;
  logic [LW-1:0] pm_raddr, pm_rdata, cm_init_label, res_big, res_small;
  int checks = 0, failures = 0;
  int repr [N+1];
  int pairs_big [$], pairs_small [$];
  always #5 clk = ~clk;

  cca_merger_table dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 0; swap = 0; cm_init_en = 0; res_en = 0;
    pm_raddr = 0; cm_init_label = 0; res_big = 0; res_small = 0;
    @(negedge clk) rst_n = 1;
    for (int row = 0; row < 6; row++) begin
      int nl;
      nl = 1 + $urandom % N;
      for (int l = 1; l <= nl; l++) begin
        cm_init_en = 1; cm_init_label = LW'(l); repr[l] = l;
        @(negedge clk);
      end
      cm_init_en = 0;
      // Random mergers along a row: each pair joins a label to a smaller
      // one further right; recorded in row order, resolved in reverse.
      pairs_big.delete(); pairs_small.delete();
      for (int k = 0; k < nl / 3; k++) begin
        int b, s;
        b = 2 + $urandom % (nl > 1 ? nl - 1 : 1);
        s = 1 + $urandom % (b - 1);
        if (b > nl) continue;
        pairs_big.push_back(b); pairs_small.push_back(s);
      end
      for (int k = pairs_big.size() - 1; k >= 0; k--) begin
        res_en = 1; res_big = LW'(pairs_big[k]); res_small = LW'(pairs_small[k]);
        repr[pairs_big[k]] = repr[pairs_small[k]];
        @(negedge clk);
      end
      res_en = 0;
      swap = 1;
      @(negedge clk) swap = 0;
      for (int l = 0; l <= nl; l++) begin
        pm_raddr = LW'(l);
        #1;
        checks++;
        if (pm_rdata !== LW'(l == 0 ? 0 : repr[l])) begin
          failures++;
          if (failures < 10) $display("row %0d: PM[%0d] = %0d, expected %0d", row, l, pm_rdata, repr[l]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
