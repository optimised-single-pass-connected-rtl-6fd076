// Merger stack: a LIFO of current-row label pairs (big, small) found equal
// during the row. At the end of the row the pairs are popped, last first,
// and each one copies CM[small] into CM[big]; because the smaller label of
// every pair lies to the right of the larger, one pass resolves all chains.
// push and pop are synchronous; top_big/top_small show the newest entry.
// A push to a full stack is dropped and sets the sticky `overflow` flag
// (cleared by `clear`, which also empties the stack). The default depth is
// a quarter of the image width, the worst case for the label-reuse scheme.
// LIFO order and depth follow the published scheme; the overflow handling is
// this design's choice.
module cca_merger_stack #(
  parameter int DEPTH = 160,
  parameter int LW    = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [LW-1:0] push_big,
  input  logic [LW-1:0] push_small,
  input  logic          pop,
  output logic [LW-1:0] top_big,
  output logic [LW-1:0] top_small,
  output logic          empty,
  output logic          overflow
);
  typedef struct packed {
    logic [LW-1:0] hi;
    logic [LW-1:0] lo;
  } pair_t;

  localparam int CW = $clog2(DEPTH + 1);

  pair_t          mem [DEPTH];
  logic [CW-1:0]  count;
  logic           full;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (push) begin
      if (full) overflow <= 1'b1;
      else      count    <= count + 1'b1;
    end else if (pop && !empty) begin
      count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full && !clear) mem[count] <= '{hi: push_big, lo: push_small};
  end

  pair_t top;
  assign top       = empty ? '0 : mem[count - 1'b1];
  assign top_big   = top.hi;
  assign top_small = top.lo;

  // Pushing and popping in the same cycle is not part of the protocol.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
endmodule
