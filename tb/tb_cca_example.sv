// Directed test: an 18x6 example image whose last two rows show every kind
// of event - two previous-row regions joined by one new label, plain
// translation, new labels, two current-row mergers chained through the
// stack, and a region that completes on the last row.
// Checked against values worked out by hand for this image:
//  - labels given on row 4: 1 2 3 4 5 4 4 3, and PM[1..5] = 1 2 3 4 4 at
//    the start of row 5 (labels 4 and 5 merged on row 4);
//  - labels given on row 5: 1 2 3 2 4 1;
//  - stack pairs popped at the end of row 5: (2,1) then (3,2), leaving
//    CM[1..4] = 1 1 1 4;
//  - the run labelled 3 on row 5 merges into 2 on the next pixel, so its
//    area stays in the data cache and CD[3] is never written on that row;
//  - regions out: area 1 (the isolated pixel of row 4) at the end of row 5,
//    then in the flush area 44 (everything else joined) and area 1.
module tb_cca_example;
  localparam int W = 18, H = 6, DW = 19;
  logic clk = 0, rst_n, pix_valid, pix, pix_ready, region_valid, frame_done, stack_overflow, label_overflow;
  logic [DW-1:0] region_area;
  always #5 clk = ~clk;

  cca_top #(.IMG_W(W), .IMG_H(H), .DW(DW)) dut (.*);

  string img [H] = '{
    "....##############",
    "....#............#",
    "....#.########...#",
    "....#.#.....###..#",
    "#.#.#.#...##...#.#",
    "...#..#.##...#..#."};
  int exp_row4 [$] = '{1, 2, 3, 4, 5, 4, 4, 3};
  int exp_row5 [$] = '{1, 2, 3, 2, 4, 1};
  int exp_pops [$] = '{2, 1, 3, 2};
  int exp_area [$] = '{1, 44, 1};
  bit exp_flush [$] = '{0, 1, 1};
  int got_row4 [$], got_row5 [$], got_pops [$], got_area [$];
  bit got_flush [$];
  int checks = 0, failures = 0;
  bit flush_q;
  int cd3_writes = 0;

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.obj && dut.y == 4) got_row4.push_back(int'(dut.label));
    if (dut.obj && dut.y == 5) got_row5.push_back(int'(dut.label));
    if (dut.st_pop && dut.y == 5) begin
      got_pops.push_back(int'(dut.st_big));
      got_pops.push_back(int'(dut.st_small));
    end
    if (dut.y == 5 && dut.cd_we && dut.cd_waddr == 3) cd3_writes++;
    flush_q <= (dut.state == cca_pkg::ST_FLUSH);
    if (region_valid) begin
      got_area.push_back(int'(region_area));
      got_flush.push_back(flush_q);
    end
  end

  task automatic cmp(string what, int got [$], int exp [$]);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %p, expected %p", what, got, exp);
    end
  endtask

  initial begin
    int pm [$], cm [$], fl [$], efl [$];
    pix_valid = 0; pix = 0; rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        pix_valid <= 1;
        pix       <= (img[y][x] == "#");
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
        if (y == 5 && x == 0)
          for (int l = 1; l <= 5; l++) pm.push_back(int'(dut.u_mt.mem[~dut.u_mt.cm_bank][l]));
      end
    pix_valid <= 0;
    while (dut.state != cca_pkg::ST_SCAN) @(posedge clk);
    for (int l = 1; l <= 4; l++) cm.push_back(int'(dut.u_mt.mem[dut.u_mt.cm_bank][l]));
    while (!frame_done) @(posedge clk);
    cmp("row 4 labels", got_row4, exp_row4);
    cmp("PM at start of row 5", pm, '{1, 2, 3, 4, 4});
    cmp("row 5 labels", got_row5, exp_row5);
    cmp("stack pops at end of row 5", got_pops, exp_pops);
    cmp("CM after unwinding", cm, '{1, 1, 1, 4});
    cmp("region areas", got_area, exp_area);
    cmp("CD writes to label 3 on row 5", '{cd3_writes}, '{0});
    foreach (got_flush[i]) fl.push_back(int'(got_flush[i]));
    foreach (exp_flush[i]) efl.push_back(int'(exp_flush[i]));
    cmp("regions emitted in the flush", fl, efl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
