// End-to-end test of cca_top on reduced 24x16 images: many frames, back to
// back without reset, checked region by region against a flood-fill
// reference (see cca_top_check.svh). Also counts that every mechanism of the
// core (new labels, translation, joins, stack pushes and pops, completion
// within the frame, end-of-frame flush, back-pressure) occurred.
module tb_cca_top;
  localparam int W = 24, H = 16, FRAMES = 200, DW = 19, MODE = 0;
  logic clk = 0, rst_n, pix_valid, pix, pix_ready, region_valid, frame_done, stack_overflow, label_overflow;
  logic [DW-1:0] region_area;
  always #5 clk = ~clk;

  cca_top #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (.*);

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  `include "cca_top_check.svh"
endmodule
