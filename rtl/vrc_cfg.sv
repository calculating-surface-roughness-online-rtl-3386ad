// vrc_cfg: configuration store for the VRC (the chromosome currently in use).
//
// Holds one 12-bit triplet {cfg1, cfg2, cfg3} per PE in two banks. A host
// (the genetic processor) writes triplets one at a time into the shadow bank
// with wr_en / wr_addr / wr_data. A pulse on commit_req asks for the shadow
// bank to become the active bank that drives the array. The copy happens on
// the first clock edge at which idle is high, so a new configuration never
// takes effect while a frame is in the pipeline; commit_pending stays high
// from the request until that edge, and commit_done pulses for one clock at
// the edge itself. Writes to an address outside 0..NPE-1 are ignored. Reset
// clears both banks (every PE then computes I0 >> 1 chains). The
// double-buffered bank and the deferred commit are this design's choices;
// the published design only says that the chosen chromosome sets the VRC.
module vrc_cfg
  import ehw_pkg::*;
#(
  parameter int unsigned NPE    = N_COLS * N_ROWS + 1,
  parameter int unsigned ADDR_W = $clog2(NPE)
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  triplet_t           wr_data,
  input  logic               commit_req,
  input  logic               idle,
  output logic               commit_pending,
  output logic               commit_done,
  output triplet_t [NPE-1:0] active
);

  triplet_t [NPE-1:0] shadow;
  logic               pend;
  logic               fire;

  assign fire           = (pend | commit_req) & idle;
  assign commit_pending = pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow      <= '0;
      active      <= '0;
      pend        <= 1'b0;
      commit_done <= 1'b0;
    end else begin
      if (wr_en && wr_addr < ADDR_W'(NPE)) shadow[wr_addr] <= wr_data;
      commit_done <= fire;
      if (fire) begin
        active <= shadow;
        pend   <= 1'b0;
      end else if (commit_req) begin
        pend <= 1'b1;
      end
    end
  end

endmodule
