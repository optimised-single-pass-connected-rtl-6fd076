// Neighbourhood context. Holds the four already-processed neighbours of the
// current pixel (8-connectivity): A, B, C on the previous row at columns
// x-1, x, x+1, and D on the current row at x-1. For A, B and C two labels
// are kept: p, the previous-row label already resolved through PM (0 for
// background), and t, the label that region has on the current row (0 when
// it has not been met on this row yet). D holds only its current-row label.
//
// Every `shift` the window moves one column: A <= B, B <= C, C <= the entry
// read from the row buffer / PM / T for column x+2, D <= d_in. When upd_en is
// set (the current pixel is an object pixel labelled upd_label), every
// neighbour in the window that is an untranslated object pixel takes
// upd_label as its t, and so does the incoming entry if it belongs to one of
// those regions: this is the same-cycle forwarding of the translation table
// write. `clear` empties the window and loads the incoming entry into C
// (first column of a row). Outputs are registered.
// The four registers, holding both the old and the current-row label of
// A, B, C, follow the published scheme; storing the old label already
// resolved through PM, and the forwarding, are this design's choices.
module cca_neighbourhood #(
  parameter int LW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          clear,
  input  logic [LW-1:0] in_p,
  input  logic [LW-1:0] in_t,
  input  logic          upd_en,
  input  logic [LW-1:0] upd_label,
  input  logic [LW-1:0] d_in,
  output logic [LW-1:0] a_p, a_t,
  output logic [LW-1:0] b_p, b_t,
  output logic [LW-1:0] c_p, c_t,
  output logic [LW-1:0] d
);
  typedef struct packed {
    logic [LW-1:0] p;
    logic [LW-1:0] t;
  } ctx_t;

  ctx_t a_q, b_q, c_q;
  logic [LW-1:0] d_q;
  ctx_t b_n, c_n, in_n;

  // Give the current label to an untranslated object neighbour.
  function automatic ctx_t translate(ctx_t e, logic en, logic [LW-1:0] l);
    ctx_t r = e;
    if (en && e.p != '0 && e.t == '0) r.t = l;
    return r;
  endfunction

  function automatic logic untranslated(ctx_t e, logic [LW-1:0] p);
    return e.p == p && e.t == '0;
  endfunction

  always_comb begin
    b_n  = translate(b_q, upd_en, upd_label);
    c_n  = translate(c_q, upd_en, upd_label);
    in_n = '{p: in_p, t: in_t};
    if (upd_en && in_p != '0 && in_t == '0 &&
        (untranslated(a_q, in_p) || untranslated(b_q, in_p) || untranslated(c_q, in_p)))
      in_n.t = upd_label;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      d_q <= '0;
    end else if (clear) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '{p: in_p, t: in_t};
      d_q <= '0;
    end else if (shift) begin
      a_q <= b_n;
      b_q <= c_n;
      c_q <= in_n;
      d_q <= d_in;
    end
  end

  assign a_p = a_q.p;
  assign a_t = a_q.t;
  assign b_p = b_q.p;
  assign b_t = b_q.t;
  assign c_p = c_q.p;
  assign c_t = c_q.t;
  assign d   = d_q;
endmodule
