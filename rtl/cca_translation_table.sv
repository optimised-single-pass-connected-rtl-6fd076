// Translation table T: maps a previous-row region (its representative label
// from PM) to the label the same region has been given on the current row.
// Each entry has a valid bit; `clear` drops them all in one cycle at the end
// of a row, which is how the table is reset between rows. An entry that is
// not valid reads as 0, meaning "not yet seen on this row".
// Up to two entries can be written in one cycle (a pixel can connect two
// distinct untranslated previous-row regions, neighbours A and C), both with
// the same label. Reads are asynchronous and see the state before this
// cycle's writes; the neighbourhood context forwards same-cycle writes.
// A single table indexed by the previous-row representative and reset every
// row follows the published scheme; valid bits for a one-cycle reset and the
// second write port are this design's choices.
module cca_translation_table #(
  parameter int N  = 320,
  parameter int LW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [LW-1:0] rd_addr,
  output logic [LW-1:0] rd_label,
  input  logic          wr0_en,
  input  logic [LW-1:0] wr0_addr,
  input  logic          wr1_en,
  input  logic [LW-1:0] wr1_addr,
  input  logic [LW-1:0] wr_label
);
  logic [LW-1:0] lab [N+1];
  logic [N:0]    valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (clear) valid <= '0;
    else begin
      if (wr0_en) valid[wr0_addr] <= 1'b1;
      if (wr1_en) valid[wr1_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr0_en) lab[wr0_addr] <= wr_label;
    if (wr1_en) lab[wr1_addr] <= wr_label;
  end

  assign rd_label = (rd_addr != '0 && valid[rd_addr]) ? lab[rd_addr] : '0;
endmodule
