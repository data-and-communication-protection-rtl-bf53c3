// gf128_mul: the GHASH multiplier of GCM, X * H in GF(2^128), one clock.
//
// A fully parallel (combinational) field multiplication followed by a
// register: the product of the operands presented with `en` appears on `z`
// on the next cycle, with `z_valid` high for that cycle. This matches the
// one-cycle multiplication stage of the design's GCM datapath. The field and
// bit order are those of GCM: bit 127 of a vector is the coefficient of x^0,
// and the reduction polynomial is x^128 + x^7 + x^2 + x + 1.
module gf128_mul
  import hsc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  block_t x,
  input  block_t h,
  output logic   z_valid,
  output block_t z
);

  block_t prod;

  always_comb prod = gf128_mult(x, h);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z_valid <= 1'b0;
      z       <= '0;
    end else begin
      z_valid <= en;
      if (en) z <= prod;
    end
  end

endmodule
