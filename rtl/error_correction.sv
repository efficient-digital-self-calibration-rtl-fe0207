// error_correction: digital error correction of the two-stage pipeline.
// The 3-bit flash code of a sample is available one clock before the 10-bit
// back-end code of the same sample, so it is delayed by one register (the clocked
// box on the 3-bit path) and then combined with overlap:
//     y = 512*flash + backend - 256,
// clipped to 0..4095. The back end spans twice the nominal residue range, which
// is what lets comparator offsets of the flash and a front-end gain below 4 be
// absorbed. The aligned coarse code is passed on with the word, since the code
// correction needs it. in_valid marks a flash code; out_valid follows it by two
// clocks, together with y and coarse_out. The block is only named in the source;
// its arithmetic here is the usual one for a 3-bit stage with a 10-bit back end.
module error_correction
  import selfcal_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  coarse_t              flash,
  input  logic [BACK_BITS-1:0] backend,
  output logic                 out_valid,
  output adc_word_t            y,
  output coarse_t              coarse_out
);

  localparam int YMAX = 2 ** ADC_BITS - 1;

  coarse_t flash_d;
  logic    valid_d;
  logic signed [ADC_BITS+1:0] sum;

  assign sum = $signed({2'b00, flash_d, 9'd0}) + $signed({4'b0000, backend}) - 14'sd256;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flash_d    <= '0;
      valid_d    <= 1'b0;
      out_valid  <= 1'b0;
      y          <= '0;
      coarse_out <= '0;
    end else begin
      flash_d   <= flash;
      valid_d   <= in_valid;
      out_valid <= valid_d;
      if (valid_d) begin
        coarse_out <= flash_d;
        if (sum < 0)         y <= '0;
        else if (sum > (ADC_BITS+2)'(YMAX)) y <= adc_word_t'(YMAX);
        else                 y <= sum[ADC_BITS-1:0];
      end
    end
  end

endmodule
