// Label selection: the decision tree that picks the label of the current
// pixel from its neighbourhood. Inputs are the object flags of the previous-
// row neighbours A, B, C (their label is non-zero), their current-row labels
// A'', B'', C'' (0 when not yet translated) and D'' (current-row label of the
// left neighbour, 0 for background). The tree is followed node by node:
//   background pixel                     -> 0
//   D'' = 0, B = 0, C = 0                -> A'' if A is an object with a
//                                           current label, else a new label
//   D'' = 0, B = 0, C /= 0, C'' = 0      -> A'' if non-zero, else new
//   D'' = 0, B = 0, C /= 0, C'' /= 0     -> C''
//   D'' = 0, B /= 0                      -> B'' if non-zero, else new
//   D'' /= 0, C = 0 or C'' = 0           -> D''
//   D'' /= 0, C /= 0, C'' /= 0           -> C''
// Whenever C'' is chosen while D'' or A'' holds a different current label,
// two current-row labels meet: `merge` is raised with `other` the label
// given up. C'' is always the older, smaller, label of the pair, so no
// comparator is needed. Purely combinational.
// The tree and the no-comparator argument follow the published scheme; the
// single-cycle combinational form is this design's choice.
module cca_label_select
  import cca_pkg::*;
#(
  parameter int LW = 9
) (
  input  logic          pix,
  input  logic          a_obj, b_obj, c_obj,
  input  logic [LW-1:0] a_t, b_t, c_t, d_t,
  input  logic [LW-1:0] new_label,
  output sel_e          sel,
  output logic [LW-1:0] label,
  output logic          merge,
  output logic [LW-1:0] other
);
  always_comb begin
    sel   = SEL_ZERO;
    merge = 1'b0;
    other = '0;
    if (pix) begin
      if (d_t == '0) begin
        if (!b_obj) begin
          if (!c_obj) begin
            if (!a_obj)         sel = SEL_NEW;
            else if (a_t == '0) sel = SEL_NEW;
            else                sel = SEL_A;
          end else if (c_t == '0) begin
            if (a_t == '0) sel = SEL_NEW;
            else           sel = SEL_A;
          end else begin
            sel = SEL_C;
            if (a_t != '0 && a_t != c_t) begin
              merge = 1'b1;
              other = a_t;
            end
          end
        end else begin
          sel = (b_t == '0) ? SEL_NEW : SEL_B;
        end
      end else begin
        if (!c_obj)          sel = SEL_D;
        else if (c_t == '0)  sel = SEL_D;
        else begin
          sel = SEL_C;
          if (c_t != d_t) begin
            merge = 1'b1;
            other = d_t;
          end
        end
      end
    end
  end

  always_comb begin
    unique case (sel)
      SEL_NEW: label = new_label;
      SEL_A:   label = a_t;
      SEL_B:   label = b_t;
      SEL_C:   label = c_t;
      SEL_D:   label = d_t;
      default: label = '0;
    endcase
  end
endmodule
