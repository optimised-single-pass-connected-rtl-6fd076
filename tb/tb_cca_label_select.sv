// Exhaustive test of cca_label_select over every combination of object
// flags and of current-row labels 0..3 for A'', B'', C'', D'' (a translated
// label only on an object neighbour, as in the core). The expected outcome is
// written as a priority list of rules rather than as the tree itself:
// background -> 0; with a left neighbour, C'' wins (merging D'') else D'';
// with B an object, B'' or new; else C'' (merging A''), else A'', else new.
module tb_cca_label_select;
  import cca_pkg::*;
  localparam int LW = 9;
  logic          pix, a_obj, b_obj, c_obj, merge;
  logic [LW-1:0] a_t, b_t, c_t, d_t, new_label, label, other;
  sel_e          sel;
  int checks = 0, failures = 0;

  cca_label_select dut (.*);

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    new_label = 9'd7;
    for (int v = 0; v < 16 * 256; v++) begin
      logic [LW-1:0] e_label, e_other;
      logic          e_merge, e_new;
      {pix, a_obj, b_obj, c_obj} = 4'(v >> 8);
      a_t = a_obj ? LW'((v >> 0) & 3) : '0;
      b_t = b_obj ? LW'((v >> 2) & 3) : '0;
      c_t = c_obj ? LW'((v >> 4) & 3) : '0;
      d_t = pix   ? LW'((v >> 6) & 3) : '0;
      e_merge = 0; e_other = 0; e_new = 0;
      if (!pix)                        e_label = 0;
      else if (d_t != 0) begin
        if (c_t != 0) begin
          e_label = c_t;
          if (c_t != d_t) begin e_merge = 1; e_other = d_t; end
        end else e_label = d_t;
      end
      else if (b_obj)                  begin e_new = (b_t == 0); e_label = e_new ? new_label : b_t; end
      else if (c_t != 0) begin
        e_label = c_t;
        if (a_t != 0 && a_t != c_t) begin e_merge = 1; e_other = a_t; end
      end
      else if (a_t != 0)               e_label = a_t;
      else begin                       e_label = new_label; e_new = 1; end
      #1;
      checks++;
      if (label !== e_label || merge !== e_merge || (e_merge && other !== e_other)) begin
        failures++;
        if (failures < 10)
          $display("pix%0d obj %b%b%b A''%0d B''%0d C''%0d D''%0d: got %0d m%0d o%0d, expected %0d m%0d o%0d",
                   pix, a_obj, b_obj, c_obj, a_t, b_t, c_t, d_t, label, merge, other,
                   e_label, e_merge, e_other);
      end
      checks++;
      if ((sel == SEL_NEW) !== e_new) begin
        failures++;
        if (failures < 10) $display("new-label flag wrong for vector %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
