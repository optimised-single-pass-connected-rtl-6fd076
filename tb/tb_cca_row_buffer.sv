// Self-checking test of cca_row_buffer at its default size (640 x 9 bits):
// writes a whole row of random labels, then reads every column back while
// the next row is written two columns behind the read, as the core does,
// and checks that a read of the address being written returns the old word.
module tb_cca_row_buffer;
  localparam int DEPTH = 640, LW = 9, AW = $clog2(DEPTH);
  logic clk = 0, we;
  logic [AW-1:0] waddr, raddr;
  logic [LW-1:0] wdata, rdata;
  logic [LW-1:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cca_row_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(logic [LW-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("%s: addr %0d read %0d expected %0d", what, raddr, rdata, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = AW'(i); wdata = LW'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    for (int row = 0; row < 3; row++) begin
      for (int i = 0; i < DEPTH; i++) begin
        raddr = AW'(i);
        we    = (i >= 2);
        waddr = AW'(i - 2);
        wdata = LW'($urandom);
        #1 check(model[i], "read ahead");
        @(negedge clk);
        if (we) model[i - 2] = wdata;
      end
    end
    // Same-address read during write returns the stored word.
    raddr = 5; waddr = 5; we = 1; wdata = ~model[5];
    #1 check(model[5], "read during write");
    @(negedge clk);
    model[5] = wdata; we = 0;
    #1 check(model[5], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
