// tb_ehw_top: end-to-end test of the image operator on small 12 x 8 frames:
// four frames, three mid-frame reconfigurations, idle input clocks and a
// restarted frame. The scenario and its checks are described in
// ehw_top_tb_body.svh.
module tb_ehw_top;
  import ehw_pkg::*;
  import ehw_ref_pkg::*;

  localparam int W = 12, H = 8, N_FRAMES = 4, WATCHDOG = 20000;

  `include "ehw_top_tb_body.svh"

  ehw_top #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_sof(pix_sof), .pix_in(pix_in),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_commit(cfg_commit),
    .cfg_pending(cfg_pending), .cfg_done(cfg_done),
    .out_valid(out_valid), .out_last(out_last), .out_pix(out_pix));
endmodule
