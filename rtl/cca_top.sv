// Single-pass connected components analysis of a streamed binary image,
// measuring the area of every 8-connected region. No labelled image is kept:
// labels are reassigned from 1 on every row, so every table has only
// LABELS (by default IMG_W/2) entries, and a region's area is emitted at the end of the first
// row that no longer touches it.
//
// Blocks: the row buffer holds the previous row's labels; the neighbourhood
// context presents A, B, C (previous row) and D (left) with previous-row
// labels resolved through the merger table PM and translated to this row by
// the translation table T; label selection picks the current label; the data
// table accumulates area in CD, taking over the PD data of continued
// previous-row regions; mergers of two current-row labels are pushed on the
// merger stack and unwound into CM at the end of the row.
//
// Interface: pixels arrive in raster order on pix/pix_valid and are taken
// when pix_ready is high, one per clock during a row. Between rows the core
// holds pix_ready low for 4 + (stack pairs) + (completed regions) cycles,
// and after the last row for (open regions) + 1 more; this is the
// horizontal blanking it needs. Each completed region appears as a one-cycle
// region_valid with its area. frame_done pulses once the last region of a
// frame has been emitted. stack_overflow (a merger pair was dropped) and
// label_overflow (a row needed more than LABELS labels) are sticky until the
// next frame starts; the results of that frame are then wrong. With the
// defaults (LABELS = IMG_W/2, STACK_DEPTH = IMG_W/4) neither can happen;
// smaller values trade that guarantee for memory.
//
// The area of the run being scanned is kept in a data cache register (DC)
// and written to CD only when the run ends, so CD sees one write per run.
// Every table is a register array with asynchronous reads, so one pixel is
// labelled and all tables are updated in a single cycle; the published
// three-stage pipeline is not reproduced.
// The block structure, the decision tree, per-row label reuse, the stack
// unwinding and the completion test follow the published scheme; the
// valid/ready input, the end-of-frame flush, the overflow flags and the
// one-cycle datapath are this design's choices.
module cca_top
  import cca_pkg::*;
#(
  parameter int IMG_W       = 640,
  parameter int IMG_H       = 480,
  parameter int DW          = 19,
  parameter int LABELS      = IMG_W / 2,
  parameter int STACK_DEPTH = IMG_W / 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic          pix,
  output logic          pix_ready,
  output logic          region_valid,
  output logic [DW-1:0] region_area,
  output logic          frame_done,
  output logic          stack_overflow,
  output logic          label_overflow
);
  localparam int N  = LABELS;             // labels per row
  localparam int LW = $clog2(N + 1);      // label width (0 = background)
  localparam int XW = $clog2(IMG_W + 2);
  localparam int YW = $clog2(IMG_H);
  localparam int AW = $clog2(IMG_W);

  state_e        state;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          first_row;
  logic [LW-1:0] next_label;

  // ---------------- incoming previous-row column (x+2) ----------------
  logic [XW-1:0] rd_col;
  logic [LW-1:0] rb_rdata, raw, in_p, in_t;

  always_comb begin
    unique case (state)
      ST_LOAD0: rd_col = '0;
      ST_LOAD1: rd_col = XW'(1);
      default:  rd_col = x + XW'(2);
    endcase
  end
  assign raw = (first_row || rd_col >= XW'(IMG_W)) ? '0 : rb_rdata;

  // ---------------- neighbourhood and label selection ----------------
  logic [LW-1:0] a_p, a_t, b_p, b_t, c_p, c_t, d_t;
  sel_e          sel;
  logic [LW-1:0] label, other;
  logic          merge;
  logic          go, obj;

  assign pix_ready = (state == ST_ROW);
  assign go        = pix_ready && pix_valid;
  assign obj       = go && pix;

  cca_label_select #(.LW(LW)) u_sel (
    .pix(pix), .a_obj(a_p != '0), .b_obj(b_p != '0), .c_obj(c_p != '0),
    .a_t(a_t), .b_t(b_t), .c_t(c_t), .d_t(d_t), .new_label(next_label),
    .sel(sel), .label(label), .merge(merge), .other(other)
  );

  // Previous-row regions met on this row for the first time: at most two
  // distinct ones (A and C with B background).
  logic          ua, ub, uc;
  logic [LW-1:0] s0, s1;
  assign ua = (a_p != '0) && (a_t == '0);
  assign ub = (b_p != '0) && (b_t == '0);
  assign uc = (c_p != '0) && (c_t == '0);
  always_comb begin
    s0 = ua ? a_p : ub ? b_p : uc ? c_p : '0;
    s1 = (uc && c_p != s0) ? c_p : (ub && b_p != s0) ? b_p : '0;
  end

  cca_neighbourhood #(.LW(LW)) u_nb (
    .clk(clk), .rst_n(rst_n),
    .shift((state == ST_LOAD1) || go), .clear(state == ST_LOAD0),
    .in_p(in_p), .in_t(in_t),
    .upd_en(obj), .upd_label(label), .d_in(obj ? label : '0),
    .a_p(a_p), .a_t(a_t), .b_p(b_p), .b_t(b_t), .c_p(c_p), .c_t(c_t), .d(d_t)
  );

  cca_row_buffer #(.DEPTH(IMG_W), .LW(LW)) u_rb (
    .clk(clk), .we(go), .waddr(AW'(x)), .wdata(obj ? label : '0),
    .raddr(rd_col < XW'(IMG_W) ? AW'(rd_col) : '0), .rdata(rb_rdata)
  );

  // ---------------- merger control ----------------
  logic          st_empty, st_pop, mt_swap, st_overflow;
  logic [LW-1:0] st_big, st_small;

  assign st_pop = (state == ST_POP) && !st_empty;

  cca_merger_table #(.N(N), .LW(LW)) u_mt (
    .clk(clk), .rst_n(rst_n), .swap(mt_swap),
    .pm_raddr(raw), .pm_rdata(in_p),
    .cm_init_en(obj && sel == SEL_NEW), .cm_init_label(next_label),
    .res_en(st_pop), .res_big(st_big), .res_small(st_small)
  );

  logic row_end, frame_end;

  cca_merger_stack #(.DEPTH(STACK_DEPTH), .LW(LW)) u_stack (
    .clk(clk), .rst_n(rst_n), .clear(row_end || frame_end),
    .push(obj && merge), .push_big(other), .push_small(label),
    .pop(st_pop), .top_big(st_big), .top_small(st_small),
    .empty(st_empty), .overflow(st_overflow)
  );

  cca_translation_table #(.N(N), .LW(LW)) u_tt (
    .clk(clk), .rst_n(rst_n), .clear(row_end || frame_end),
    .rd_addr(in_p), .rd_label(in_t),
    .wr0_en(obj && s0 != '0), .wr0_addr(s0),
    .wr1_en(obj && s1 != '0), .wr1_addr(s1),
    .wr_label(label)
  );

  // ---------------- data table ----------------
  logic [DW-1:0] cd0, cd1, pd0, pd1, new_data, scan_data;
  logic          scan_valid, scanning;
  logic [DW-1:0] dc, base, mdat;
  logic          dc_hit, cd_we;
  logic [LW-1:0] cd_waddr;
  logic [DW-1:0] cd_wdata;
  logic          last_col;

  assign scanning = (state == ST_SCAN) || (state == ST_FLUSH);

  cca_data_table #(.N(N), .LW(LW), .DW(DW)) u_dt (
    .clk(clk), .rst_n(rst_n), .swap(row_end), .clear_all(frame_end),
    .cd_raddr0(label), .cd_rdata0(cd0), .cd_raddr1(other), .cd_rdata1(cd1),
    .cd_we(cd_we), .cd_waddr(cd_waddr), .cd_wdata(cd_wdata),
    .cd_kill(obj && merge), .cd_kill_addr(other),
    .pd_raddr0(s0), .pd_rdata0(pd0), .pd_raddr1(s1), .pd_rdata1(pd1),
    .pd_kill0(obj && s0 != '0), .pd_kill1(obj && s1 != '0),
    .scan_valid(scan_valid), .scan_data(scan_data), .scan_take(scanning)
  );

  // Data cache: the running area of the run that ends at D, label d_t. It
  // stands in for CD[d_t], which is written only when the run ends (at the
  // next background pixel, or at the last column of the row).

  assign last_col = (x == XW'(IMG_W - 1));
  assign dc_hit   = (d_t != '0) && (label == d_t);
  assign base     = (sel == SEL_NEW) ? '0 : dc_hit ? dc : cd0;
  assign mdat     = !merge ? '0 : (other == d_t) ? dc : cd1;
  // The data combination operation for area is addition.
  assign new_data = base + mdat + DW'(1) + pd0 + pd1;

  assign cd_we    = (obj && last_col) || (go && !pix && d_t != '0);
  assign cd_waddr = obj ? label : d_t;
  assign cd_wdata = obj ? new_data : dc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   dc <= '0;
    else if (obj) dc <= new_data;
  end

  // ---------------- row sequencer ----------------
  assign row_end   = (state == ST_SCAN)  && !scan_valid;
  assign frame_end = (state == ST_FLUSH) && !scan_valid;
  assign mt_swap   = row_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_LOAD0;
      x          <= '0;
      y          <= '0;
      first_row  <= 1'b1;
      next_label <= LW'(1);
    end else begin
      unique case (state)
        ST_LOAD0: begin
          x          <= '0;
          next_label <= LW'(1);
          state      <= ST_LOAD1;
        end
        ST_LOAD1: state <= ST_ROW;
        ST_ROW: if (go) begin
          x <= x + 1'b1;
          if (obj && sel == SEL_NEW && next_label <= LW'(N)) next_label <= next_label + 1'b1;
          if (x == XW'(IMG_W - 1)) state <= ST_POP;
        end
        ST_POP: if (st_empty) state <= ST_SCAN;
        ST_SCAN: if (!scan_valid) begin
          first_row <= 1'b0;
          if (y == YW'(IMG_H - 1)) state <= ST_FLUSH;
          else begin
            y     <= y + 1'b1;
            state <= ST_LOAD0;
          end
        end
        ST_FLUSH: if (!scan_valid) begin
          y         <= '0;
          first_row <= 1'b1;
          state     <= ST_LOAD0;
        end
        default: state <= ST_LOAD0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region_valid <= 1'b0;
      region_area  <= '0;
      frame_done   <= 1'b0;
      label_overflow <= 1'b0;
      stack_overflow <= 1'b0;
    end else begin
      if (st_overflow)                         stack_overflow <= 1'b1;
      else if (state == ST_LOAD0 && first_row) stack_overflow <= 1'b0;
      if (obj && sel == SEL_NEW && next_label > LW'(N)) label_overflow <= 1'b1;
      else if (state == ST_LOAD0 && first_row)           label_overflow <= 1'b0;
      region_valid <= scanning && scan_valid;
      region_area  <= scan_data;
      frame_done   <= frame_end;
    end
  end

  // The kept label of a current-row merger is always the smaller one.
  assert property (@(posedge clk) disable iff (!rst_n) (obj && merge) |-> (other > label));
endmodule
