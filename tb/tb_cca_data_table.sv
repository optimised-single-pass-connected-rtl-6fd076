// Self-checking test of cca_data_table with 16 labels: random CD writes and
// kills, PD reads and kills, swaps and clears against a model of both banks,
// then checks that the scan port hands out every valid PD entry once, in
// increasing label order, and nothing else.
module tb_cca_data_table;
  localparam int N = 16, LW = 5, DW = 19;
  logic clk = 0, rst_n, swap, clear_all, cd_we, cd_kill, pd_kill0, pd_kill1, scan_valid, scan_take;
  logic [LW-1:0] cd_raddr0, cd_raddr1, cd_waddr, cd_kill_addr, pd_raddr0, pd_raddr1;
  logic [DW-1:0] cd_rdata0, cd_rdata1, cd_wdata, pd_rdata0, pd_rdata1, scan_data;
  int  cdv [N+1], pdv [N+1];   // value, or -1 when not valid
  int checks = 0, failures = 0, scanned = 0;
  always #5 clk = ~clk;

  cca_data_table #(.N(N), .LW(LW), .DW(DW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s", what);
    end
  endtask

  task automatic idle();
    cd_we = 0; cd_kill = 0; pd_kill0 = 0; pd_kill1 = 0; swap = 0; clear_all = 0; scan_take = 0;
  endtask

  initial begin
    rst_n = 0; idle();
    cd_raddr0 = 0; cd_raddr1 = 0; cd_waddr = 0; cd_kill_addr = 0; pd_raddr0 = 0; pd_raddr1 = 0; cd_wdata = 0;
    for (int i = 0; i <= N; i++) begin cdv[i] = -1; pdv[i] = -1; end
    @(negedge clk) rst_n = 1;
    for (int row = 0; row < 300; row++) begin
      // A row of random table traffic.
      for (int i = 0; i < 40; i++) begin
        idle();
        cd_we = $urandom % 2;        cd_waddr = LW'(1 + $urandom % N); cd_wdata = DW'($urandom);
        cd_kill = ($urandom % 5) == 0; cd_kill_addr = LW'(1 + $urandom % N);
        if (cd_kill_addr == cd_waddr) cd_kill = 0;
        cd_raddr0 = LW'(1 + $urandom % N); cd_raddr1 = LW'(1 + $urandom % N);
        pd_raddr0 = LW'($urandom % (N + 1)); pd_raddr1 = LW'($urandom % (N + 1));
        pd_kill0 = $urandom % 2; pd_kill1 = $urandom % 2;
        #1;
        if (cdv[cd_raddr0] >= 0) chk(cd_rdata0 == DW'(cdv[cd_raddr0]), "CD read 0");
        if (cdv[cd_raddr1] >= 0) chk(cd_rdata1 == DW'(cdv[cd_raddr1]), "CD read 1");
        chk(pd_rdata0 == ((pd_raddr0 != 0 && pdv[pd_raddr0] >= 0) ? DW'(pdv[pd_raddr0]) : '0), "PD read 0");
        chk(pd_rdata1 == ((pd_raddr1 != 0 && pdv[pd_raddr1] >= 0) ? DW'(pdv[pd_raddr1]) : '0), "PD read 1");
        @(negedge clk);
        if (cd_we) cdv[cd_waddr] = int'(cd_wdata);
        if (cd_kill) cdv[cd_kill_addr] = -1;
        if (pd_kill0) pdv[pd_raddr0] = -1;
        if (pd_kill1) pdv[pd_raddr1] = -1;
      end
      // End of row: read out what is left of PD, lowest label first.
      idle();
      scan_take = 1;
      for (int l = 1; l <= N; l++)
        if (pdv[l] >= 0) begin
          #1 chk(scan_valid && scan_data == DW'(pdv[l]), $sformatf("scan of PD[%0d]", l));
          scanned++;
          @(negedge clk);
        end
      #1 chk(!scan_valid, "scan not finished");
      scan_take = 0;
      swap = ($urandom % 10) != 0;
      clear_all = !swap;
      @(negedge clk);
      for (int l = 0; l <= N; l++) begin
        pdv[l] = swap ? cdv[l] : -1;
        cdv[l] = -1;
      end
      idle();
    end
    chk(scanned > 0, "scan never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
