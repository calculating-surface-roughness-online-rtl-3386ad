// pe: one processing element of the virtual reconfigurable circuit.
//
// Two 16-to-1 multiplexers take the PE's operands from its 128-bit input bus
// (sixteen 8-bit lines): cfg1 selects X and cfg2 selects Y. The function unit
// then applies the operation chosen by cfg3, so the PE computes
// F{mux(cfg1), mux(cfg2), cfg3} as in the published PE diagram. The result
// is registered on every clock edge, which makes each PE column one pipeline
// stage (one clock of latency per PE); the register is this design's choice,
// the published PE shows only the combinational path. Data are not reset:
// the surrounding array tracks validity separately.
module pe
  import ehw_pkg::*;
(
  input  logic                 clk,
  input  pixel_t [MUX_N-1:0]   bus,   // line k is bus[k]
  input  triplet_t             cfg,
  output pixel_t               z      // registered result
);

  pixel_t x, y, f_out;

  assign x = bus[cfg.cfg1];
  assign y = bus[cfg.cfg2];

  pe_func u_func (
    .x (x),
    .y (y),
    .f (cfg.cfg3),
    .z (f_out)
  );

  always_ff @(posedge clk) z <= f_out;

endmodule
