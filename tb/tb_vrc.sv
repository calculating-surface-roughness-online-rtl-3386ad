// tb_vrc: checks the 25-PE array at its default size (6 columns of 4 PEs plus
// the output PE). For each of 30 random configurations (the first ones use
// every function code) it streams 300 random 3x3 neighbourhoods with random
// idle clocks in between, then lets the pipeline drain. Every output pixel is
// compared with the reference model, out_last must follow in_last, and every
// result must appear exactly COLS+1 = 7 clocks after its neighbourhood.
module tb_vrc;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;

  localparam int ROWS = N_ROWS, COLS = N_COLS, NPE = COLS * ROWS + 1;
  localparam int LATENCY = COLS + 1;

  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0, in_last = 0;
  pixel_t [N_WIN-1:0] win;
  triplet_t [NPE-1:0] cfg;
  logic               out_valid, out_last;
  pixel_t             out_pix;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  int     exp_q[$], last_q[$];
  longint time_q[$];

  vrc dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_last(in_last),
           .win(win), .cfg(cfg), .out_valid(out_valid), .out_last(out_last),
           .out_pix(out_pix));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker, sampled away from the clock edge.
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output %02h", out_pix);
    end else begin
      int     e, l;
      longint t0;
      e  = exp_q.pop_front();
      l  = last_q.pop_front();
      t0 = time_q.pop_front();
      if (int'(out_pix) != e || int'(out_last) != l || cycle - t0 != longint'(LATENCY)) begin
        failures++;
        $display("FAIL got %02h/%0d after %0d clocks, exp %02h/%0d after %0d",
                 out_pix, out_last, cycle - t0, e, l, LATENCY);
      end
    end
  end

  initial begin
    triplet_t c[];
    int w[9];
    win = '0;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      rand_cfg(c, NPE, n < 4);
      foreach (c[i]) cfg[i] = c[i];
      for (int p = 0; p < 300; p++) begin
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          in_last  = 1'($urandom_range(0, 1));
        end else begin
          foreach (w[i]) begin
            w[i]   = $urandom_range(0, 255);
            win[i] = 8'(w[i]);
          end
          in_valid = 1;
          in_last  = ($urandom_range(0, 9) == 0);
          exp_q.push_back(ref_vrc(w, c, ROWS, COLS));
          last_q.push_back(int'(in_last));
          time_q.push_back(cycle);
        end
      end
      @(negedge clk);
      in_valid = 0;
      repeat (LATENCY + 2) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
