// pe_func: the function unit inside a processing element.
//
// Combinational. Applies the operation chosen by the 4-bit code f to the two
// 8-bit operands x and y and returns an 8-bit result z. The sixteen
// operations are the published function table (shifts, inversion, bitwise
// logic, addition, two averages and nibble masks). Sums are formed on 9 bits:
// the plain sum F6 keeps the low 8 bits (wraps modulo 256), the averages F7
// and F8 keep bits 8..1, so they never overflow. Wrapping rather than
// saturating F6 is this design's reading of "X + Y" on an 8-bit datapath.
module pe_func
  import ehw_pkg::*;
(
  input  pixel_t x,
  input  pixel_t y,
  input  func_e  f,
  output pixel_t z
);

  logic [PIX_W:0] sum;

  always_comb begin
    sum   = {1'b0, x} + {1'b0, y};
    unique case (f)
      F_SHR1:   z = x >> 1;
      F_SHR2:   z = x >> 2;
      F_NOT:    z = ~x;
      F_AND:    z = x & y;
      F_OR:     z = x | y;
      F_XOR:    z = x ^ y;
      F_ADD:    z = sum[PIX_W-1:0];
      F_AVG:    z = sum[PIX_W:1];
      F_AVGR:   z = PIX_W'((sum + 9'd1) >> 1);
      F_LO:     z = x & 8'h0F;
      F_HI:     z = x & 8'hF0;
      F_ORLO:   z = x | 8'h0F;
      F_ORHI:   z = x | 8'hF0;
      F_MIXOR:  z = (x & 8'h0F) | (y & 8'hF0);
      F_MIXXOR: z = (x & 8'h0F) ^ (y & 8'hF0);
      F_MIXAND: z = (x & 8'h0F) & (y & 8'hF0);
      default:  z = '0;
    endcase
  end

endmodule
