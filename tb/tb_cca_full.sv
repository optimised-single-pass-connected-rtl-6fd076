// Full-size test of cca_top with its default parameters (640x480 image,
// 320 labels per row, 19-bit area): four complete frames (random pixels,
// nested U shapes, comb, isolated dots), checked region by region against a flood-fill
// reference (see cca_top_check.svh).
module tb_cca_full;
  localparam int W = 640, H = 480, FRAMES = 4, DW = 19, MODE = 0;
  logic clk = 0, rst_n, pix_valid, pix, pix_ready, region_valid, frame_done, stack_overflow, label_overflow;
  logic [DW-1:0] region_area;
  always #5 clk = ~clk;

  cca_top dut (.*);

  initial begin
    #200_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  `include "cca_top_check.svh"
endmodule
