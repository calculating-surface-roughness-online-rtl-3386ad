// tb_vrc_cfg: checks the double-buffered configuration store. Random triplets
// are written to the shadow bank; the active bank must not change until a
// commit. A commit requested while busy must stay pending (active unchanged)
// until idle rises, then copy the whole shadow bank in one clock with a
// one-clock commit_done. Writes to addresses past the last PE must be
// ignored, and a commit while already idle must take effect at once.
module tb_vrc_cfg;
  import ehw_pkg::*;

  localparam int NPE = N_COLS * N_ROWS + 1;
  localparam int AW  = $clog2(NPE);

  logic               clk = 0, rst_n = 0;
  logic               wr_en = 0, commit_req = 0, idle = 0;
  logic [AW-1:0]      wr_addr = '0;
  triplet_t           wr_data = '0;
  logic               commit_pending, commit_done;
  triplet_t [NPE-1:0] active;

  triplet_t model_shadow[NPE], model_active[NPE];
  int checks = 0, failures = 0;
  int n_deferred = 0, n_immediate = 0;

  vrc_cfg dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
               .wr_data(wr_data), .commit_req(commit_req), .idle(idle),
               .commit_pending(commit_pending), .commit_done(commit_done),
               .active(active));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_active(string what);
    checks++;
    for (int i = 0; i < NPE; i++)
      if (active[i] != model_active[i]) begin
        failures++;
        $display("FAIL %s: active[%0d]=%03h exp %03h", what, i, active[i], model_active[i]);
        return;
      end
  endtask

  task automatic write_all();
    for (int i = 0; i < NPE + 4; i++) begin
      @(negedge clk);
      wr_en   = 1;
      wr_addr = AW'(i);
      wr_data = triplet_t'($urandom_range(0, 4095));
      if (i < NPE) model_shadow[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    foreach (model_active[i]) begin
      model_active[i] = '0;
      model_shadow[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_active("after reset");
    for (int round = 0; round < 20; round++) begin
      idle = 0;
      write_all();
      check_active("writes without commit");
      // request while busy
      commit_req = 1;
      @(negedge clk);
      commit_req = 0;
      repeat ($urandom_range(1, 10)) begin
        checks++;
        if (!commit_pending || commit_done) begin
          failures++;
          $display("FAIL commit not held pending while busy");
        end
        check_active("commit pending");
        @(negedge clk);
      end
      idle = 1;
      @(negedge clk);
      foreach (model_active[i]) model_active[i] = model_shadow[i];
      checks++;
      if (commit_pending || !commit_done) begin
        failures++;
        $display("FAIL deferred commit did not complete");
      end
      check_active("deferred commit");
      n_deferred++;
      @(negedge clk);
      checks++;
      if (commit_done) begin
        failures++;
        $display("FAIL commit_done longer than one clock");
      end
      // immediate commit while idle
      write_all();
      commit_req = 1;
      @(negedge clk);
      commit_req = 0;
      foreach (model_active[i]) model_active[i] = model_shadow[i];
      checks++;
      if (!commit_done || commit_pending) begin
        failures++;
        $display("FAIL immediate commit");
      end
      check_active("immediate commit");
      n_immediate++;
    end
    $display("deferred commits %0d, immediate commits %0d", n_deferred, n_immediate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
