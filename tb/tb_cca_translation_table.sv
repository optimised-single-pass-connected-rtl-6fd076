// Self-checking test of cca_translation_table at its default size: random
// single and double writes, reads and whole-table clears against a model in
// which an entry not written since the last clear reads 0.
module tb_cca_translation_table;
  localparam int N = 320, LW = 9;
  logic clk = 0, rst_n, clear, wr0_en, wr1_en;
  logic [LW-1:0] rd_addr, rd_label, wr0_addr, wr1_addr, wr_label;
  int model [N+1];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cca_translation_table dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; wr0_en = 0; wr1_en = 0;
    rd_addr = 0; wr0_addr = 0; wr1_addr = 0; wr_label = 0;
    for (int i = 0; i <= N; i++) model[i] = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      clear    = ($urandom % 500) == 0;
      wr0_en   = ($urandom % 3) == 0;
      wr1_en   = ($urandom % 6) == 0;
      wr0_addr = LW'(1 + $urandom % N);
      wr1_addr = LW'(1 + $urandom % N);
      wr_label = LW'(1 + $urandom % N);
      rd_addr  = LW'($urandom % (N + 1));
      #1;
      checks++;
      if (rd_label !== LW'(model[rd_addr])) begin
        failures++;
        if (failures < 10) $display("T[%0d] = %0d, expected %0d", rd_addr, rd_label, model[rd_addr]);
      end
      @(negedge clk);
      if (clear) for (int k = 0; k <= N; k++) model[k] = 0;
      else begin
        if (wr0_en) model[wr0_addr] = wr_label;
        if (wr1_en) model[wr1_addr] = wr_label;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
