// Data tables. Two banks of N+1 entries (entry 0 unused), each an
// accumulated feature word (here the region area, DW bits) with a valid bit.
// One bank is CD, indexed by current-row labels; the other is PD, indexed by
// previous-row representative labels.
//  - CD reads (two, asynchronous): the entry of the selected label and of a
//    label being merged into it.
//  - CD write: cd_we stores cd_wdata at cd_waddr and marks it valid. A
//    newly allocated label is written, never accumulated, so CD needs no
//    reset of its data words.
//  - CD kill: a current-row label merged into a smaller one is deleted.
//  - PD reads (two, asynchronous, 0 when the entry is not valid) and PD kills:
//    a previous-row region continued on this row hands its data over and is
//    deleted, so any PD entry still valid at the end of the row belongs to a
//    completed region.
//  - Scan: scan_valid/scan_data present the lowest-indexed valid PD entry;
//    scan_take deletes it. One completed region per cycle.
//  - swap: the CD bank becomes PD; the old PD bank becomes CD with all its
//    valid bits cleared. clear_all empties both banks (start of a frame).
// Two tables, the hand-over and deletion of continued PD entries and the
// read-out of what is left follow the published scheme; valid bits instead of
// zero tests, the priority-encoder read-out and the deletion of merged CD
// entries are this design's choices.
module cca_data_table #(
  parameter int N  = 320,
  parameter int LW = 9,
  parameter int DW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic          clear_all,
  input  logic [LW-1:0] cd_raddr0,
  output logic [DW-1:0] cd_rdata0,
  input  logic [LW-1:0] cd_raddr1,
  output logic [DW-1:0] cd_rdata1,
  input  logic          cd_we,
  input  logic [LW-1:0] cd_waddr,
  input  logic [DW-1:0] cd_wdata,
  input  logic          cd_kill,
  input  logic [LW-1:0] cd_kill_addr,
  input  logic [LW-1:0] pd_raddr0,
  output logic [DW-1:0] pd_rdata0,
  input  logic [LW-1:0] pd_raddr1,
  output logic [DW-1:0] pd_rdata1,
  input  logic          pd_kill0,
  input  logic          pd_kill1,
  output logic          scan_valid,
  output logic [DW-1:0] scan_data,
  input  logic          scan_take
);
  localparam int IW = $clog2(N + 1);

  logic [DW-1:0] data  [2][N+1];
  logic [N:0]    valid [2];
  logic          cd_bank;
  logic          pd_bank;
  logic [IW-1:0] scan_idx;

  assign pd_bank = ~cd_bank;

  // Lowest valid PD entry.
  always_comb begin
    scan_valid = 1'b0;
    scan_idx   = '0;
    for (int i = N; i >= 1; i--) begin
      if (valid[pd_bank][i]) begin
        scan_valid = 1'b1;
        scan_idx   = IW'(i);
      end
    end
  end
  assign scan_data = data[pd_bank][scan_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cd_bank  <= 1'b0;
      valid[0] <= '0;
      valid[1] <= '0;
    end else if (clear_all) begin
      valid[0] <= '0;
      valid[1] <= '0;
    end else if (swap) begin
      cd_bank         <= ~cd_bank;
      valid[pd_bank]  <= '0;
    end else begin
      if (cd_we)     valid[cd_bank][cd_waddr]     <= 1'b1;
      if (cd_kill)   valid[cd_bank][cd_kill_addr] <= 1'b0;
      if (pd_kill0)  valid[pd_bank][pd_raddr0]    <= 1'b0;
      if (pd_kill1)  valid[pd_bank][pd_raddr1]    <= 1'b0;
      if (scan_take && scan_valid) valid[pd_bank][scan_idx] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (cd_we) data[cd_bank][cd_waddr] <= cd_wdata;
  end

  assign cd_rdata0 = data[cd_bank][cd_raddr0];
  assign cd_rdata1 = data[cd_bank][cd_raddr1];
  assign pd_rdata0 = (pd_raddr0 != '0 && valid[pd_bank][pd_raddr0]) ? data[pd_bank][pd_raddr0] : '0;
  assign pd_rdata1 = (pd_raddr1 != '0 && valid[pd_bank][pd_raddr1]) ? data[pd_bank][pd_raddr1] : '0;
endmodule
