// ehw_top: the evolvable-hardware image operator that cleans up camera images
// of machined surfaces before their roughness is estimated.
//
// A grey-level pixel stream from the camera (one 8-bit pixel per clock at
// most, raster order) enters window_gen, which forms the 3x3 neighbourhood of
// every interior pixel. The virtual reconfigurable circuit (vrc, 25 PEs)
// turns each neighbourhood into one output pixel according to the
// configuration word held in vrc_cfg: 25 triplets {cfg1, cfg2, cfg3}, i.e.
// the chromosome chosen by the genetic processor outside this block. The
// output image O has (HEIGHT-2) x (WIDTH-2) pixels, delivered in raster order
// with out_valid, the last one flagged by out_last.
//
// Configuration: the host writes triplets with cfg_we / cfg_addr / cfg_wdata
// and pulses cfg_commit. The new word takes effect when no frame is being
// received and the array pipeline is empty (cfg_pending is high until then,
// cfg_done pulses when it happens), so each frame is filtered by a single
// configuration.
//
// Timing: throughput is one pixel per clock (the published card samples at
// 30 MS/s, so a 30 MHz clock keeps up); an output pixel appears COLS+2 = 8
// clocks after the pixel that completes its neighbourhood (1 clock in
// window_gen, 7 in the array). The neighbourhood size, the interior-only
// output, the pipelining and the commit rule are this design's choices; the
// array shape, the PE and its function set follow the published design.
module ehw_top
  import ehw_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 512,
  parameter int unsigned ROWS   = N_ROWS,
  parameter int unsigned COLS   = N_COLS,
  parameter int unsigned NPE    = COLS * ROWS + 1,
  parameter int unsigned ADDR_W = $clog2(NPE)
)(
  input  logic              clk,
  input  logic              rst_n,
  // camera pixel stream
  input  logic              pix_valid,
  input  logic              pix_sof,
  input  pixel_t            pix_in,
  // configuration port (from the genetic processor)
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  triplet_t          cfg_wdata,
  input  logic              cfg_commit,
  output logic              cfg_pending,
  output logic              cfg_done,
  // filtered image stream
  output logic              out_valid,
  output logic              out_last,
  output pixel_t            out_pix
);

  logic               win_valid, win_last, frame_idle;
  pixel_t [N_WIN-1:0] win;
  triplet_t [NPE-1:0] active_cfg;
  logic [COLS+1:0]    busy_pipe;   // a neighbourhood is somewhere in flight
  logic               idle;

  window_gen #(
    .WIDTH  (WIDTH),
    .HEIGHT (HEIGHT)
  ) u_win (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pix_valid),
    .in_sof    (pix_sof),
    .in_pix    (pix_in),
    .win_valid (win_valid),
    .win_last  (win_last),
    .win       (win),
    .idle      (frame_idle)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_pipe <= '0;
    else        busy_pipe <= {busy_pipe[COLS:0], win_valid};
  end

  // Idle: between frames, no pixel arriving, nothing in the array.
  assign idle = frame_idle && !pix_valid && !win_valid && (busy_pipe == '0);

  vrc_cfg #(
    .NPE    (NPE),
    .ADDR_W (ADDR_W)
  ) u_cfg (
    .clk            (clk),
    .rst_n          (rst_n),
    .wr_en          (cfg_we),
    .wr_addr        (cfg_addr),
    .wr_data        (cfg_wdata),
    .commit_req     (cfg_commit),
    .idle           (idle),
    .commit_pending (cfg_pending),
    .commit_done    (cfg_done),
    .active         (active_cfg)
  );

  vrc #(
    .ROWS (ROWS),
    .COLS (COLS),
    .NPE  (NPE)
  ) u_vrc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (win_valid),
    .in_last   (win_last),
    .win       (win),
    .cfg       (active_cfg),
    .out_valid (out_valid),
    .out_last  (out_last),
    .out_pix   (out_pix)
  );

endmodule
