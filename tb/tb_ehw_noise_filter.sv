// tb_ehw_noise_filter: the image operator on the kind of input it is meant
// for: a surface image whose brightness falls linearly across the frame, with
// impulse (salt-and-pepper) noise on about 6% of the pixels. The array is
// configured by hand as a weighted 3x3 smoothing filter built from the
// average function (code 7):
//   a = avg(I1, I7)  b = avg(I3, I5)  c = avg(I0, I8)  d = avg(I2, I6)  (column 1)
//   e = avg(a, b)    f = avg(c, d)    I4 passed on by I4 | I4           (column 2)
//   g = avg(e, I4)   h = avg(f, I4)                                     (column 3)
//   out = avg(g, h), then passed through columns 5, 6 and the output PE
// Every output pixel is checked against this formula written directly. It
// does not use the array reference model. The filtered image must also be
// closer to the noise-free ramp than the noisy input is (mean absolute error
// over the interior).
module tb_ehw_noise_filter;
  import ehw_pkg::*;

  localparam int W = 64, H = 48, NPE = N_COLS * N_ROWS + 1, AW = $clog2(NPE);

  logic     clk = 0, rst_n = 0;
  logic     pix_valid = 0, pix_sof = 0;
  pixel_t   pix_in = '0;
  logic     cfg_we = 0, cfg_commit = 0;
  logic [AW-1:0] cfg_addr = '0;
  triplet_t cfg_wdata = '0;
  logic     cfg_pending, cfg_done, out_valid, out_last;
  pixel_t   out_pix;

  int clean[H][W], noisy[H][W];
  int exp_q[$], ctr_q[$];
  int checks = 0, failures = 0, n_out = 0, n_noise = 0;
  longint err_in = 0, err_out = 0;

  ehw_top #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_sof(pix_sof), .pix_in(pix_in),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_commit(cfg_commit),
    .cfg_pending(cfg_pending), .cfg_done(cfg_done),
    .out_valid(out_valid), .out_last(out_last), .out_pix(out_pix));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int avg(int x, int y);
    return (x + y) / 2;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int e, ctr;
    checks++;
    n_out++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e   = exp_q.pop_front();
      ctr = ctr_q.pop_front();
      if (int'(out_pix) != e) begin
        failures++;
        $display("FAIL got %0d exp %0d", out_pix, e);
      end
      err_out += (int'(out_pix) > ctr) ? int'(out_pix) - ctr : ctr - int'(out_pix);
    end
  end

  task automatic put(int idx, int s1, int s2, func_e f);
    cfg_we    = 1;
    cfg_addr  = AW'(idx);
    cfg_wdata = '{cfg1: 4'(s1), cfg2: 4'(s2), cfg3: f};
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // column 1 (lines = I0..I8)
    put(0, 1, 7, F_AVG);
    put(1, 3, 5, F_AVG);
    put(2, 0, 8, F_AVG);
    put(3, 2, 6, F_AVG);
    // column 2 (lines 0..3 = column 1, 4..12 = I0..I8)
    put(4, 0, 1, F_AVG);
    put(5, 2, 3, F_AVG);
    put(6, 8, 8, F_OR);
    put(7, 8, 8, F_OR);
    // column 3 (lines 0..3 = column 2, 4..7 = column 1)
    put(8, 0, 2, F_AVG);
    put(9, 1, 3, F_AVG);
    put(10, 0, 0, F_OR);
    put(11, 0, 0, F_OR);
    // column 4: average of g and h; columns 5, 6 and the output PE pass it on
    put(12, 0, 1, F_AVG);
    for (int i = 13; i < 16; i++) put(i, 0, 0, F_OR);
    for (int i = 16; i < 25; i++) put(i, 0, 0, F_OR);
    cfg_we = 0;
    cfg_commit = 1;
    @(negedge clk);
    cfg_commit = 0;
    checks++;
    if (!cfg_done) begin
      failures++;
      $display("FAIL configuration not committed");
    end

    // ramp image with impulse noise
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        clean[r][c] = 220 - (160 * c) / (W - 1);
        noisy[r][c] = clean[r][c];
        if ($urandom_range(0, 15) == 0) begin
          noisy[r][c] = $urandom_range(0, 1) ? 255 : 0;
          n_noise++;
        end
      end

    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        pix_valid = 1;
        pix_sof   = (r == 0 && c == 0);
        pix_in    = 8'(noisy[r][c]);
        if (r >= 2 && c >= 2) begin
          int i[9], a, b, cc, d, e, f, g, h, cr, cc0;
          for (int k = 0; k < 9; k++) i[k] = noisy[r - 2 + k / 3][c - 2 + k % 3];
          a = avg(i[1], i[7]); b = avg(i[3], i[5]); cc = avg(i[0], i[8]); d = avg(i[2], i[6]);
          e = avg(a, b); f = avg(cc, d);
          g = avg(e, i[4]); h = avg(f, i[4]);
          exp_q.push_back(avg(g, h));
          cr = clean[r - 1][c - 1];
          ctr_q.push_back(cr);
          cc0 = noisy[r - 1][c - 1];
          err_in += (cc0 > cr) ? cc0 - cr : cr - cc0;
        end
        @(negedge clk);
      end
    pix_valid = 0;
    pix_sof   = 0;
    repeat (12) @(negedge clk);

    checks += 3;
    if (n_out != (H - 2) * (W - 2)) begin
      failures++;
      $display("FAIL %0d output pixels, exp %0d", n_out, (H - 2) * (W - 2));
    end
    if (n_noise == 0) begin
      failures++;
      $display("FAIL no noise was injected");
    end
    if (!(err_out < err_in)) begin
      failures++;
      $display("FAIL filtering did not reduce the error");
    end
    $display("noisy pixels %0d; mean absolute error against the clean ramp: input %0.2f, output %0.2f",
             n_noise, real'(err_in) / n_out, real'(err_out) / n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
