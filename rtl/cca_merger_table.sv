// Merger tables. Two banks of N+1 labels (entry 0 is the background): one
// acts as CM, recording equivalences between labels of the current row, the
// other as PM, resolving a previous-row label to its region's representative
// (the smallest equivalent label). At the end of a row, after the merger
// stack has been unwound into CM, `swap` exchanges the roles: the resolved CM
// becomes PM and the old PM is reused as CM.
//  - Lookup (asynchronous): pm_rdata = PM[pm_raddr], 0 for address 0.
//  - Init (synchronous): CM[cm_init_label] <= cm_init_label when a new label
//    is allocated, so CM needs no bulk reset.
//  - Resolve (synchronous): CM[res_big] <= CM[res_small], one stack pair per
//    cycle, the pairs taken in reverse order of the row.
// Two tables swapped every row, the CM[l] = l initialisation and the
// CM[big] = CM[small] rule follow the published scheme; the bank-select swap
// and the one-cycle read-modify-write (instead of a pipelined dual-port
// update) are this design's choices.
module cca_merger_table #(
  parameter int N  = 320,
  parameter int LW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic [LW-1:0] pm_raddr,
  output logic [LW-1:0] pm_rdata,
  input  logic          cm_init_en,
  input  logic [LW-1:0] cm_init_label,
  input  logic          res_en,
  input  logic [LW-1:0] res_big,
  input  logic [LW-1:0] res_small
);
  logic [LW-1:0] mem [2][N+1];
  logic          cm_bank;  // bank acting as CM; the other is PM

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cm_bank <= 1'b0;
    else if (swap) cm_bank <= ~cm_bank;
  end

  always_ff @(posedge clk) begin
    if (cm_init_en) mem[cm_bank][cm_init_label] <= cm_init_label;
    if (res_en)     mem[cm_bank][res_big]       <= mem[cm_bank][res_small];
  end

  assign pm_rdata = (pm_raddr == '0) ? '0 : mem[~cm_bank][pm_raddr];
endmodule
