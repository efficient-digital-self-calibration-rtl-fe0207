// code_adder: the 12-bit adder/subtractor that applies the calibrating codes in
// normal conversion. The front-end coarse code (segment s = 0..7) selects one of
// the four code registers; because a fully differential stage has symmetric code
// errors, segment s and segment 7-s share a register, so the register index is
// s[1:0] in the lower half and ~s[1:0] in the upper half. The MSB of the ADC word
// decides the sign: in the lower half the code is added, in the upper half it is
// subtracted. The sum is clipped to 0..4095. One word per clock, one cycle of
// latency (out_valid follows in_valid by one cycle).
// Described: 12-bit adder/subtractor, four registers addressed by the coarse code,
// MSB chooses add or subtract. This design's choices: which sign goes with which
// half (codes are positive for the lower segments of a reduced-gain stage),
// clipping, and the output register.
module code_adder
  import selfcal_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  adc_word_t y,
  input  coarse_t   coarse,
  input  ccode_t    codes [NCODES],
  output logic      out_valid,
  output adc_word_t y_corr
);

  localparam int YMAX = 2 ** ADC_BITS - 1;

  ridx_t                    idx;
  ccode_t                   c;
  logic signed [ADC_BITS+1:0] sum;

  always_comb begin
    idx = coarse[COARSE_BITS-1] ? ~coarse[1:0] : coarse[1:0];
    c   = codes[idx];
    if (!y[ADC_BITS-1]) sum = $signed({2'b00, y}) + (ADC_BITS+2)'(c);
    else                sum = $signed({2'b00, y}) - (ADC_BITS+2)'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_corr    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (sum < 0)          y_corr <= '0;
        else if (sum > (ADC_BITS+2)'(YMAX))  y_corr <= adc_word_t'(YMAX);
        else                  y_corr <= sum[ADC_BITS-1:0];
      end
    end
  end

endmodule
