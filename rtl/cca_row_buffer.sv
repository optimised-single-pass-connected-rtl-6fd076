// Row buffer: caches the label given to every pixel of the previous row so
// that the neighbourhood context can present A, B and C (the three pixels
// above and beside the current one) without a labelled image being stored.
// It is a simple dual-port memory, DEPTH words of LW bits: one port writes
// the label of the current column, the other reads ahead on the previous
// row. The write is synchronous; the read is asynchronous (a distributed
// RAM), so rdata shows mem[raddr] in the same cycle. A read and a write of
// the same address in one cycle returns the old word. The memory has no
// reset; the user ignores it on the first row of a frame.
// The dual-port organisation and its size (image width x label width) follow
// the published scheme; the asynchronous read port is this design's choice.
module cca_row_buffer #(
  parameter int DEPTH = 640,
  parameter int LW    = 9
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [LW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [LW-1:0]            rdata
);
  logic [LW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
