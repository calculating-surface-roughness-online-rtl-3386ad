// vrc: the virtual reconfigurable circuit, the evolvable part of the image
// operator.
//
// The array has COLS columns of ROWS processing elements followed by one
// output PE (6 x 4 + 1 = 25 PEs by default, as published). The first column
// chooses its operands among the N_WIN pixels of the input neighbourhood.
// Every later PE, the output PE included, may take its operands from either of
// the two preceding stages, where the neighbourhood itself counts as the stage
// before column 1. A PE's 16-line input bus is filled as follows:
//   lines 0 .. NA-1       outputs of the stage just before it (NA lines)
//   lines NA .. NA+NB-1   outputs of the stage two before it (NB lines)
// and the remaining lines repeat these cyclically (line k carries candidate
// k mod (NA+NB)), so every 4-bit select names a real signal. For column 1
// the candidates are pixels I0..I8; for column 2 they are column 1's four
// PEs followed by I0..I8; for column c > 2 and for the output PE they are
// column c-1's PEs followed by column c-2's PEs.
//
// Timing: every PE registers its result, so each column is one pipeline
// stage. Values taken from two stages back pass through a one-clock delay
// register so that all operands of a PE belong to the same pixel. The array
// accepts one neighbourhood per clock, never stalls, and delivers the result
// COLS+1 clocks later (7 clocks by default) with out_valid; in_last travels
// alongside as out_last. cfg holds the triplets of all PEs, PE (c, r) at
// index c*ROWS + r (c, r from 0) and the output PE at index COLS*ROWS. The
// pipelining and the cyclic filling of spare bus lines are this design's
// choices.
module vrc
  import ehw_pkg::*;
#(
  parameter int unsigned ROWS = N_ROWS,
  parameter int unsigned COLS = N_COLS,
  parameter int unsigned NPE  = COLS * ROWS + 1
)(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_last,
  input  pixel_t [N_WIN-1:0]  win,
  input  triplet_t [NPE-1:0]  cfg,
  output logic                out_valid,
  output logic                out_last,
  output pixel_t              out_pix
);

  localparam int unsigned SW = (N_WIN > ROWS) ? N_WIN : ROWS;  // widest stage

  // Number of outputs of stage s (stage 0 is the neighbourhood).
  function automatic int unsigned stage_w(int unsigned s);
    return (s == 0) ? N_WIN : ROWS;
  endfunction

  // cur[s]: stage s as seen now; dly[s]: the same stage one clock earlier.
  pixel_t cur [COLS+1][SW];
  pixel_t dly [COLS][SW];

  for (genvar i = 0; i < SW; i++) begin : g_stage0
    if (i < N_WIN) begin : g_pix
      assign cur[0][i] = win[i];
    end else begin : g_pad
      assign cur[0][i] = '0;
    end
  end

  for (genvar s = 0; s < COLS; s++) begin : g_dly
    always_ff @(posedge clk) dly[s] <= cur[s];
  end

  // Columns 1..COLS (index c from 1) and the output PE (c = COLS+1).
  for (genvar c = 1; c <= COLS + 1; c++) begin : g_col
    localparam int unsigned NR = (c == COLS + 1) ? 1 : ROWS;
    localparam int unsigned NA = stage_w(c - 1);
    localparam int unsigned NB = (c >= 2) ? stage_w(c - 2) : 0;
    localparam int unsigned NC = NA + NB;

    pixel_t [MUX_N-1:0] bus;
    for (genvar k = 0; k < MUX_N; k++) begin : g_line
      localparam int unsigned IDX = k % NC;
      if (IDX < NA) begin : g_near
        assign bus[k] = cur[c-1][IDX];
      end else begin : g_far
        assign bus[k] = dly[c-2][IDX-NA];
      end
    end

    for (genvar r = 0; r < NR; r++) begin : g_row
      pixel_t z;
      pe u_pe (
        .clk (clk),
        .bus (bus),
        .cfg (cfg[(c-1)*ROWS + r]),
        .z   (z)
      );
      if (c <= COLS) begin : g_to_stage
        assign cur[c][r] = z;
      end else begin : g_to_out
        assign out_pix = z;
      end
    end

    if (c <= COLS) begin : g_pad
      for (genvar r = NR; r < SW; r++) begin : g_zero
        assign cur[c][r] = '0;
      end
    end
  end

  // Validity and end-of-frame marker travel beside the data.
  logic [COLS:0] v_pipe, l_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe <= '0;
      l_pipe <= '0;
    end else begin
      v_pipe <= {v_pipe[COLS-1:0], in_valid};
      l_pipe <= {l_pipe[COLS-1:0], in_valid & in_last};
    end
  end
  assign out_valid = v_pipe[COLS];
  assign out_last  = l_pipe[COLS];

  // Elaboration checks: every candidate list must fit on the 16-line bus.
  if (ROWS + N_WIN > MUX_N || 2 * ROWS > MUX_N) begin : g_bad_size
    $error("vrc: ROWS=%0d gives more candidates than the %0d-line PE bus", ROWS, MUX_N);
  end
  if (NPE != COLS * ROWS + 1) begin : g_bad_npe
    $error("vrc: NPE must equal COLS*ROWS+1");
  end

endmodule
