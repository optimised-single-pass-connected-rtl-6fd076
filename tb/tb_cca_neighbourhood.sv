// Self-checking test of cca_neighbourhood: random shifts, clears and
// translation updates against a model of the A, B, C, D window, including
// the forwarding of a translation to an incoming entry of the same region.
module tb_cca_neighbourhood;
  localparam int LW = 9;
  logic clk = 0, rst_n, shift, clear, upd_en;
  logic [LW-1:0] in_p, in_t, upd_label, d_in;
  logic [LW-1:0] a_p, a_t, b_p, b_t, c_p, c_t, d;
  int mp [3], mt [3], md;
  int checks = 0, failures = 0, forwards = 0;
  always #5 clk = ~clk;

  cca_neighbourhood dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 0; shift = 0; clear = 0; upd_en = 0;
    in_p = 0; in_t = 0; upd_label = 0; d_in = 0;
    mp = '{0, 0, 0}; mt = '{0, 0, 0}; md = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int np, nt;
      clear     = ($urandom % 50) == 0;
      shift     = ($urandom % 4) != 0;
      upd_en    = shift && ($urandom % 2);
      in_p      = LW'($urandom % 4);
      in_t      = (in_p != 0 && ($urandom % 2)) ? LW'(1 + $urandom % 4) : '0;
      upd_label = LW'(1 + $urandom % 8);
      d_in      = LW'($urandom % 8);
      @(negedge clk);
      np = in_p; nt = in_t;
      if (clear) begin
        mp = '{0, 0, np}; mt = '{0, 0, nt}; md = 0;
      end else if (shift) begin
        if (upd_en && np != 0 && nt == 0)
          for (int k = 0; k < 3; k++)
            if (mp[k] == np && mt[k] == 0) begin nt = upd_label; end
        if (upd_en && nt != in_t) forwards++;
        for (int k = 1; k < 3; k++)
          if (upd_en && mp[k] != 0 && mt[k] == 0) mt[k] = upd_label;
        mp = '{mp[1], mp[2], np}; mt = '{mt[1], mt[2], nt}; md = d_in;
      end
      checks++;
      if ({a_p, a_t, b_p, b_t, c_p, c_t, d} !==
          {LW'(mp[0]), LW'(mt[0]), LW'(mp[1]), LW'(mt[1]), LW'(mp[2]), LW'(mt[2]), LW'(md)}) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: window %0d/%0d %0d/%0d %0d/%0d %0d, expected %0d/%0d %0d/%0d %0d/%0d %0d",
                   i, a_p, a_t, b_p, b_t, c_p, c_t, d, mp[0], mt[0], mp[1], mt[1], mp[2], mt[2], md);
      end
    end
    checks++;
    if (forwards == 0) begin failures++; $display("forwarding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
