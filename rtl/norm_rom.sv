// norm_rom: the normalisation-factor ROM N1..N4.
// Entry r is the factor added to working register r each time a sample falls
// into bin r (bins r and 8-r share a register and a factor, since the ideal
// Gaussian histogram is symmetric about mid-scale). A factor is the inverse of the
// probability p of a sample landing in that bin, scaled so that every bin of an
// ideal converter sums to 2**(LOG2_SAMPLES+3) after 2**LOG2_SAMPLES samples:
//     N_r = round(8 / p_r),
//     p_r = Phi((hi_r + 0.5 - mu)/sigma) - Phi((lo_r - 0.5 - mu)/sigma),
// with mu = 2048, sigma = 1024 output codes, bin r covering codes lo_r..hi_r
// (64 codes, centred on the expected segment boundary of an ADC whose front-end
// gain is 3.9 instead of 4: lo = 518, 1018, 1517, 2016). This gives 936, 516,
// 361 and 321, all below 2**10. The Gaussian table and its use are as described;
// the scaling by 8 (it makes the largest factor fit 10 bits) is this design's.
// Combinational read.
module norm_rom
  import selfcal_pkg::*;
#(
  parameter int    N = NCODES,
  parameter norm_t NORM [N] = '{10'd936, 10'd516, 10'd361, 10'd321}
) (
  input  logic [$clog2(N)-1:0] idx,
  output norm_t                value
);

  assign value = NORM[idx];

endmodule
