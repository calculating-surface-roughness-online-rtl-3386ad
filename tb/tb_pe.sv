// tb_pe: checks one processing element. Random 16-line buses and random
// triplets are applied; one clock later the registered output must equal the
// reference function of the two selected lines. The output must not change
// prev_z the clock edge (one clock of latency).
module tb_pe;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;

  logic               clk = 0;
  pixel_t [MUX_N-1:0] bus;
  triplet_t           cfg;
  pixel_t             z;
  int                 checks = 0, failures = 0;

  pe dut (.clk(clk), .bus(bus), .cfg(cfg), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    pixel_t prev_z;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      foreach (bus[k]) bus[k] = 8'($urandom_range(0, 255));
      cfg.cfg1 = 4'($urandom_range(0, 15));
      cfg.cfg2 = 4'($urandom_range(0, 15));
      cfg.cfg3 = func_e'(n % 16);
      exp = ref_func(int'(bus[cfg.cfg1]), int'(bus[cfg.cfg2]), int'(cfg.cfg3));
      prev_z = z;
      #1;
      if (n > 0) begin
        checks++;
        if (z != prev_z) begin
          failures++;
          $display("FAIL output changed prev_z the clock edge");
        end
      end
      @(negedge clk);
      checks++;
      if (int'(z) != exp) begin
        failures++;
        $display("FAIL n=%0d sel=%0d,%0d f=%0d got %02h exp %02h",
                 n, cfg.cfg1, cfg.cfg2, cfg.cfg3, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
