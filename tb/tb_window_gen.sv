// tb_window_gen: checks the neighbourhood former on a small 9 x 6 frame.
// It sends a partial frame that is abandoned by an in_sof restart, then three
// full frames of random pixels with random idle clocks, back to back. Every
// neighbourhood must match the 3x3 block of the frame around its centre, in
// raster order, one clock after the pixel that completes it; there must be
// (H-2) x (W-2) of them per frame, and win_last only on the last one. idle
// must be high exactly between frames.
module tb_window_gen;
  import ehw_pkg::*;

  localparam int W = 9, H = 6;

  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0, in_sof = 0;
  pixel_t             in_pix = '0;
  logic               win_valid, win_last, idle;
  pixel_t [N_WIN-1:0] win;

  int img[H][W];
  int frame_wins;
  int checks = 0, failures = 0, n_restart = 0, n_gaps = 0;

  window_gen #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sof(in_sof), .in_pix(in_pix),
    .win_valid(win_valid), .win_last(win_last), .win(win), .idle(idle));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // Sends pixel (r, c) of img, possibly after idle clocks; checks the
  // neighbourhood that the previous pixel completed.
  task automatic send(int r, int c, bit sof);
    if ($urandom_range(0, 4) == 0) begin
      in_valid = 0;
      in_sof   = 0;
      n_gaps++;
      @(negedge clk);
      checks++;
      if (win_valid) fail("neighbourhood without a pixel");
    end
    in_valid = 1;
    in_sof   = sof;
    in_pix   = 8'(img[r][c]);
    @(negedge clk);
    checks++;
    if (win_valid != (r >= 2 && c >= 2)) fail($sformatf("win_valid=%0d at (%0d,%0d)", win_valid, r, c));
    if (win_valid) begin
      frame_wins++;
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (int'(win[i]) != img[r - 2 + i / 3][c - 2 + i % 3])
          fail($sformatf("pixel %0d of the neighbourhood centred on (%0d,%0d)", i, r - 1, c - 1));
      end
    end
    checks++;
    if (win_last != (r == H - 1 && c == W - 1)) fail("win_last");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!idle) fail("not idle after reset");
    // partial frame, abandoned
    foreach (img[r, c]) img[r][c] = $urandom_range(0, 255);
    for (int p = 0; p < W * 3 + 4; p++) send(p / W, p % W, p == 0);
    checks++;
    if (idle) fail("idle in the middle of a frame");
    n_restart++;
    for (int f = 0; f < 3; f++) begin
      foreach (img[r, c]) img[r][c] = $urandom_range(0, 255);
      frame_wins = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) send(r, c, f == 0 && r == 0 && c == 0);
      in_valid = 0;
      in_sof   = 0;
      checks += 2;
      if (frame_wins != (H - 2) * (W - 2)) fail($sformatf("%0d neighbourhoods in frame", frame_wins));
      if (!idle) fail("not idle between frames");
    end
    checks++;
    if (n_gaps == 0) fail("no idle clock was exercised");
    $display("restarts %0d, idle clocks %0d", n_restart, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
