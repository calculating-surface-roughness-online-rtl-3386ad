// Shared body of the end-to-end testbenches of ehw_top. The including module
// defines W and H (frame size, matching the instance), N_FRAMES (full frames
// to filter) and WATCHDOG (clock limit), declares the checker counters and
// instantiates the top as `dut` on the signals below.
//
// Scenario: after reset a configuration that uses every function code is
// written and committed while the chip is idle (immediate commit). Frames of
// random pixels are then streamed, the first with random idle clocks. In the
// middle of each frame but the last, a new random configuration is written
// and committed: it must stay pending until the frame has left the array, and
// the next frame must be filtered by it. A partial frame abandoned by an
// in_sof restart precedes the last frame. Every output pixel is compared with
// the reference model applied to the frame, must appear LATENCY clocks after
// the pixel that completes its neighbourhood, and out_last must mark the last
// pixel of each frame. Each mechanism is counted; one that never happened
// counts as a failure.

  localparam int NPE     = N_COLS * N_ROWS + 1;
  localparam int AW      = $clog2(NPE);
  localparam int LATENCY = N_COLS + 2;

  logic     clk = 0, rst_n = 0;
  logic     pix_valid = 0, pix_sof = 0;
  pixel_t   pix_in = '0;
  logic     cfg_we = 0, cfg_commit = 0;
  logic [AW-1:0] cfg_addr = '0;
  triplet_t cfg_wdata = '0;
  logic     cfg_pending, cfg_done, out_valid, out_last;
  pixel_t   out_pix;

  int       checks = 0, failures = 0;
  longint   cycle = 0;
  int       exp_q[$], last_q[$];
  longint   time_q[$];
  int       img[H][W];
  triplet_t cur_cfg[], next_cfg[];
  int       n_immediate = 0, n_deferred = 0, n_gaps = 0, n_restart = 0;
  int       n_frames_out = 0, n_wrap = 0, n_outputs = 0;
  bit       func_used[16];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    n_outputs++;
    checks++;
    if (exp_q.size() == 0) fail("output pixel nobody expected");
    else begin
      int e, l;
      longint t0;
      e  = exp_q.pop_front();
      l  = last_q.pop_front();
      t0 = time_q.pop_front();
      if (int'(out_pix) != e || int'(out_last) != l || cycle - t0 != longint'(LATENCY))
        fail($sformatf("got %02h/%0d after %0d clocks, exp %02h/%0d after %0d",
                       out_pix, out_last, cycle - t0, e, l, LATENCY));
      if (out_last) n_frames_out++;
    end
  end

  // Counts what a configuration exercises: function codes, and selects that
  // exceed their PE's number of candidates (served by the repeated lines).
  task automatic note_cfg(triplet_t c[]);
    for (int i = 0; i < NPE; i++) begin
      int col, nc;
      col = i / N_ROWS + 1;
      nc  = (col == 1) ? N_WIN : (col == 2) ? N_ROWS + N_WIN : 2 * N_ROWS;
      func_used[int'(c[i].cfg3)] = 1;
      if (int'(c[i].cfg1) >= nc || int'(c[i].cfg2) >= nc) n_wrap++;
    end
  endtask

  task automatic write_cfg(triplet_t c[]);
    for (int i = 0; i < NPE; i++) begin
      cfg_we    = 1;
      cfg_addr  = AW'(i);
      cfg_wdata = c[i];
      @(negedge clk);
    end
    cfg_we = 0;
  endtask

  task automatic commit();
    cfg_commit = 1;
    @(negedge clk);
    cfg_commit = 0;
  endtask

  // Sends pixel (r, c) of img and queues the result it completes.
  task automatic send(int r, int c, bit sof, bit gaps);
    if (gaps && $urandom_range(0, 5) == 0) begin
      pix_valid = 0;
      pix_sof   = 0;
      n_gaps++;
      @(negedge clk);
    end
    pix_valid = 1;
    pix_sof   = sof;
    pix_in    = 8'(img[r][c]);
    if (r >= 2 && c >= 2) begin
      int w[9];
      for (int i = 0; i < 9; i++) w[i] = img[r - 2 + i / 3][c - 2 + i % 3];
      exp_q.push_back(ref_vrc(w, cur_cfg, N_ROWS, N_COLS));
      last_q.push_back(int'(r == H - 1 && c == W - 1));
      time_q.push_back(cycle);
    end
    @(negedge clk);
    pix_valid = 0;
    pix_sof   = 0;
  endtask

  task automatic new_image();
    foreach (img[r, c]) img[r][c] = $urandom_range(0, 255);
  endtask

  initial begin
    int frames_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // first configuration, committed while idle
    rand_cfg(cur_cfg, NPE, 1);
    note_cfg(cur_cfg);
    write_cfg(cur_cfg);
    commit();
    checks++;
    if (!cfg_done || cfg_pending) fail("commit while idle did not act at once");
    else n_immediate++;

    for (int f = 0; f < N_FRAMES; f++) begin
      if (f == N_FRAMES - 1 && f > 0) begin
        // partial frame abandoned by a restart
        new_image();
        for (int p = 0; p < 3 * W + 2; p++) send(p / W, p % W, p == 0, 0);
        n_restart++;
      end
      new_image();
      frames_before = n_frames_out;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          send(r, c, r == 0 && c == 0, f == 0);
          if (r == H / 2 && c == 0 && f < N_FRAMES - 1) begin
            // reconfigure in the middle of the frame
            rand_cfg(next_cfg, NPE, 0);
            note_cfg(next_cfg);
            write_cfg(next_cfg);
            commit();
          end
          if (r == H / 2 && c == W - 1 && f < N_FRAMES - 1) begin
            checks++;
            if (!cfg_pending) fail("commit not held pending during a frame");
          end
        end
      // wait for the frame to leave the array
      repeat (LATENCY + 2) @(negedge clk);
      checks++;
      if (n_frames_out != frames_before + 1) fail("frame end not seen");
      if (f < N_FRAMES - 1) begin
        checks++;
        if (cfg_pending) fail("commit still pending after the frame");
        else n_deferred++;
        cur_cfg = next_cfg;
      end
    end
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d output pixels missing", exp_q.size()));
    checks += 3;
    if (n_immediate == 0) fail("no immediate commit");
    if (N_FRAMES > 1 && n_deferred == 0) fail("no deferred commit");
    if (N_FRAMES > 1 && n_restart == 0) fail("no frame restart");
    checks += 2;
    if (n_gaps == 0) fail("no idle input clock");
    if (n_wrap == 0) fail("no select beyond a PE's candidates");
    foreach (func_used[i]) begin
      checks++;
      if (!func_used[i]) fail($sformatf("function F%0d never configured", i));
    end
    $display("outputs %0d, frames %0d, immediate commits %0d, deferred commits %0d",
             n_outputs, n_frames_out, n_immediate, n_deferred);
    $display("idle input clocks %0d, restarts %0d, wrapped selects %0d",
             n_gaps, n_restart, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
