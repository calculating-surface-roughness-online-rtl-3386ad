// tb_ehw_top_full: the image operator at its default size, 640 x 512 pixel
// frames. Two full frames are filtered, with a reconfiguration requested in
// the middle of the first and a restarted partial frame before the second,
// as described in ehw_top_tb_body.svh.
module tb_ehw_top_full;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;

  localparam int W = 640, H = 512, N_FRAMES = 2, WATCHDOG = 1000000;

  `include "ehw_top_tb_body.svh"

  ehw_top dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_sof(pix_sof), .pix_in(pix_in),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_commit(cfg_commit),
    .cfg_pending(cfg_pending), .cfg_done(cfg_done),
    .out_valid(out_valid), .out_last(out_last), .out_pix(out_pix));
endmodule
