// Typical-image workload: cca_top on 640x480 frames built with 128 labels
// per row and a 16-pair merger stack, the reduced configuration sized for
// ordinary images rather than the worst case. A frame of about 1200 blobs
// must be analysed exactly with no overflow; a frame of isolated dots (320
// regions on every other row) must raise label_overflow.
module tb_cca_typical;
  localparam int W = 640, H = 480, FRAMES = 2, DW = 19, MODE = 1;
  logic clk = 0, rst_n, pix_valid, pix, pix_ready, region_valid, frame_done, stack_overflow, label_overflow;
  logic [DW-1:0] region_area;
  always #5 clk = ~clk;

  cca_top #(.IMG_W(W), .IMG_H(H), .DW(DW), .LABELS(128), .STACK_DEPTH(16)) dut (.*);

  initial begin
    #200_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  `include "cca_top_check.svh"
endmodule
