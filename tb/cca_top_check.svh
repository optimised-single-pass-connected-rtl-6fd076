// Body shared by the end-to-end testbenches of cca_top. The including module
// declares localparams W, H (image size), FRAMES, DW, MODE, and instantiates cca_top
// as `dut` on clk, rst_n, pix_valid, pix, pix_ready, region_valid,
// region_area, frame_done, stack_overflow, label_overflow.
//
// Each frame is a generated binary image (random pixels of varying density,
// nested U shapes, combs that force chains of mergers, or isolated dots
// that need the most labels per row). An independent reference labels the whole stored image by flood
// fill (8-connectivity) and lists every region with its area and last row.
// A region must be reported once, with its area, during the end-of-row work
// that follows the first row below it (or in the end-of-frame flush when it
// touches the last row). Pixels are offered with random gaps.
// MODE 1 replaces the mixed images by the typical-image workload: even
// frames hold about 1200 scattered blobs (solid, speckled or crossed
// rectangles),
// odd frames are isolated dots that need W/2 labels per row; for a core
// built with fewer labels the label_overflow flag must then be raised, and
// the region list of that frame is not checked.

logic img [H][W];
int   ref_lab [H][W];
int   exp_area [W*H];
int   exp_last [W*H];
bit   exp_seen [W*H];
int   n_regions;
int   fill_stk [W*H];

int checks = 0, failures = 0;
int cnt_new = 0, cnt_trans = 0, cnt_join_prev = 0, cnt_push = 0, cnt_pop = 0;
int cnt_dc = 0, cnt_mid = 0, cnt_flush = 0, cnt_stall = 0, cnt_bubble = 0, cnt_frames = 0;
int rows_done = 0;
int cnt_label_ovf = 0;
// Rate: pixels are taken one per clock within a row; outside a row the core
// spends 4 cycles per row plus one per merger pair popped and one per region
// emitted, plus 1 at the end of the frame.
int f_idle = 0, f_pops = 0, f_regions = 0, rate_checks = 0;
bit lenient = 0;   // frame expected to overflow: region list not checked

task automatic gen_blobs();
  for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 0;
  for (int k = 0; k < 1200; k++) begin
    int x0 = $urandom % W, y0 = $urandom % H, w = 1 + $urandom % 10, h = 1 + $urandom % 10;
    int kind = $urandom % 4;   // 0: bar cross, 1: speckled, else solid
    for (int dy = 0; dy < h; dy++)
      for (int dx = 0; dx < w; dx++)
        if (y0 + dy < H && x0 + dx < W &&
            (kind > 1 || (kind == 0 && (dx == dy || dx == w - 1 - dy)) ||
             (kind == 1 && ($urandom % 100) < 55)))
          img[y0 + dy][x0 + dx] = 1;
  end
endtask

task automatic gen_image(int f);
  int dens = 5 + (f * 37) % 75;
  if (MODE == 1) begin
    if (f % 2 == 0) gen_blobs();
    else
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = (x % 2 == 0) && (y % 2 == 0);
    return;
  end
  for (int y = 0; y < H; y++)
    for (int x = 0; x < W; x++)
      img[y][x] = (($urandom % 100) < dens);
  if (f % 4 == 1) begin
    // Nested U shapes: arms meet only at the bottom.
    for (int k = 0; 4*k+3 < W/2 && 2*k+2 < H; k++) begin
      int l = 2*k, r = W - 1 - 2*k, bot = H - 1 - 2*k;
      for (int y = 0; y <= bot; y++) begin img[y][l] = 1; img[y][r] = 1; end
      for (int x = l; x <= r; x++) img[bot][x] = 1;
      for (int y = 0; y < bot; y++) for (int x = l+1; x < r; x++)
        if (x == l+1 || x == r-1) img[y][x] = 0;
    end
  end else if (f % 4 == 2) begin
    // Comb: vertical teeth joined by a bar on the last row.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (y == H-1) ? 1'b1 : ((x % 2) == 0 ? 1'b1 : 1'b0);
    if (f % 8 == 6) for (int x = 0; x < W; x++) img[H/2][x] = (x % 4 == 3);
  end else if (f % 4 == 3) begin
    // Isolated dots on every other row and column: the most labels a row
    // can need (W/2), and the most completed regions per row.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (x % 2 == 0) && (y % 2 == 0);
  end
endtask

task automatic reference();
  n_regions = 0;
  for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) ref_lab[y][x] = -1;
  for (int y0 = 0; y0 < H; y0++)
    for (int x0 = 0; x0 < W; x0++)
      if (img[y0][x0] && ref_lab[y0][x0] < 0) begin
        int sp = 0, r = n_regions++;
        exp_area[r] = 0; exp_last[r] = y0; exp_seen[r] = 0;
        ref_lab[y0][x0] = r;
        fill_stk[sp++] = y0 * W + x0;
        while (sp > 0) begin
          int cy, cx;
          sp--;
          cy = fill_stk[sp] / W; cx = fill_stk[sp] % W;
          exp_area[r]++;
          if (cy > exp_last[r]) exp_last[r] = cy;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++) begin
              int ny = cy + dy, nx = cx + dx;
              if (ny >= 0 && ny < H && nx >= 0 && nx < W)
                if (img[ny][nx] && ref_lab[ny][nx] < 0) begin
                  ref_lab[ny][nx] = r;
                  fill_stk[sp++] = ny * W + nx;
                end
            end
        end
      end
endtask

// Row in which the region being read out completed, registered like the
// region outputs of the core.
int tag_q;
always_ff @(posedge clk) begin
  tag_q <= (dut.state == cca_pkg::ST_FLUSH) ? H - 1 : rows_done - 2;
end

always @(posedge clk) if (rst_n) begin
  if (frame_done) begin
    checks++;
    rate_checks++;
    if (f_idle != 4 * H + 1 + f_pops + f_regions) begin
      failures++;
      $display("frame overhead %0d cycles, expected %0d", f_idle, 4 * H + 1 + f_pops + f_regions);
    end
    f_idle = 0; f_pops = 0; f_regions = 0;
  end
  if (dut.state != cca_pkg::ST_ROW) f_idle++;
  if (dut.st_pop) f_pops++;
  if (dut.scanning && dut.scan_valid) f_regions++;
  if (dut.obj && dut.sel == cca_pkg::SEL_NEW) cnt_new++;
  if (dut.obj && dut.s0 != '0 && dut.sel != cca_pkg::SEL_NEW) cnt_trans++;
  if (dut.obj && dut.s1 != '0) cnt_join_prev++;
  if (dut.obj && dut.merge) cnt_push++;
  if (dut.obj && dut.dc_hit) cnt_dc++;
  if (dut.st_pop) cnt_pop++;
  if (pix_valid && !pix_ready) cnt_stall++;
  if (dut.state == cca_pkg::ST_ROW && !pix_valid) cnt_bubble++;
  if (pix_valid && pix_ready && dut.x == (W - 1)) rows_done++;
  if (region_valid) begin
    bit found;
    found = 0;
    checks++;
    if (tag_q == H - 1) cnt_flush++; else cnt_mid++;
    for (int r = 0; r < n_regions && !found; r++)
      if (!exp_seen[r] && exp_area[r] == int'(region_area) && exp_last[r] == tag_q) begin
        exp_seen[r] = 1;
        found = 1;
      end
    if (!found && !lenient) begin
      failures++;
      if (failures < 10)
        $display("unexpected region: area %0d completed in row %0d", region_area, tag_q);
    end
  end
end

task automatic run_frame(int f);
  int x = 0, y = 0;
  gen_image(f);
  reference();
  lenient = (MODE == 1) && (f % 2 == 1) && (W / 2 > int'(dut.N));
  rows_done = 0;
  while (y < H) begin
    pix_valid <= (($urandom % 8) != 0);
    pix       <= img[y][x];
    @(posedge clk);
    if (pix_valid && pix_ready) begin
      x++;
      if (x == W) begin x = 0; y++; end
    end
  end
  pix_valid <= 1'b0;
  while (!frame_done) @(posedge clk);
  cnt_frames++;
  for (int r = 0; r < n_regions; r++) begin
    checks++;
    if (!exp_seen[r] && !lenient) begin
      failures++;
      if (failures < 10)
        $display("frame %0d: region of area %0d ending in row %0d not reported",
                 f, exp_area[r], exp_last[r]);
    end
  end
  checks++;
  if (label_overflow) cnt_label_ovf++;
  if (label_overflow != lenient) begin
    failures++;
    $display("frame %0d: label overflow flag %0d, expected %0d", f, label_overflow, lenient);
  end
  if (MODE == 1 && f % 2 == 0)
    $display("frame %0d: %0d regions", f, n_regions);
  checks++;
  if (stack_overflow) begin
    failures++;
    $display("frame %0d: merger stack overflow", f);
  end
endtask

task automatic mechanism(string name, int n);
  checks++;
  $display("  %-34s %0d", name, n);
  if (n == 0) begin
    failures++;
    $display("mechanism never exercised: %s", name);
  end
endtask

initial begin
  pix_valid = 0;
  pix = 0;
  rst_n = 0;
  repeat (3) @(posedge clk);
  rst_n <= 1;
  for (int f = 0; f < FRAMES; f++) run_frame(f);
  $display("mechanisms:");
  if (MODE == 1) mechanism("label overflow flagged", cnt_label_ovf);
  mechanism("new label", cnt_new);
  mechanism("translation of a previous-row label", cnt_trans);
  mechanism("two previous-row regions joined", cnt_join_prev);
  mechanism("current-row merger pushed", cnt_push);
  mechanism("area taken from the data cache", cnt_dc);
  mechanism("merger popped at end of row", cnt_pop);
  mechanism("region completed within frame", cnt_mid);
  mechanism("region flushed at end of frame", cnt_flush);
  mechanism("input held off (ready low)", cnt_stall);
  mechanism("input gap (valid low)", cnt_bubble);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
