// setup_regs: the offset register OFF and the gain adjustment register sigma.
// Both are written once the noise generator has been set up: OFF holds the
// measured offset in output LSBs (7-bit two's complement, the width printed for
// its bus) and is subtracted from the calibrating codes before the next
// histogram; sigma holds a trim word for the gain of the noise source (its width
// is not given; 7 bits, two's complement, is this design's choice). Each register
// has its own load strobe and takes the new value at the next clock edge; reset
// clears both. How the setup measurement arrives at the two values is not part of
// this block: they are loaded from outside.
module setup_regs
  import selfcal_pkg::*;
#(
  parameter int OFF_W   = CODE_W,
  parameter int SIGMA_W = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               off_ld,
  input  logic [OFF_W-1:0]   off_in,
  input  logic               sigma_ld,
  input  logic [SIGMA_W-1:0] sigma_in,
  output logic [OFF_W-1:0]   off,
  output logic [SIGMA_W-1:0] sigma
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off   <= '0;
      sigma <= '0;
    end else begin
      if (off_ld)   off   <= off_in;
      if (sigma_ld) sigma <= sigma_in;
    end
  end

endmodule
