// tb_pe_func: checks the PE function unit against the integer reference model.
// Every function code is tried with the corner operands 0, 0x0F, 0xF0, 0xFF
// and with 400 random operand pairs; the unit is combinational, so each
// result is sampled 1 ns after the inputs change.
module tb_pe_func;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;

  pixel_t x, y, z;
  func_e  f;
  int     checks = 0, failures = 0;

  pe_func dut (.x(x), .y(y), .f(f), .z(z));

  task automatic try(int xi, int yi, int fi);
    int exp;
    x = 8'(xi); y = 8'(yi); f = func_e'(fi);
    #1;
    exp = ref_func(xi, yi, fi);
    checks++;
    if (int'(z) != exp) begin
      failures++;
      $display("FAIL f=%0d x=%02h y=%02h got %02h exp %02h", fi, xi, yi, z, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners[4];
    corners = '{0, 15, 240, 255};
    for (int fi = 0; fi < 16; fi++) begin
      foreach (corners[i]) foreach (corners[j]) try(corners[i], corners[j], fi);
      repeat (400) try($urandom_range(0, 255), $urandom_range(0, 255), fi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
