// wgn_model: behavioural model of the wide-band Gaussian noise source (noise
// amplifier followed by a programmable-gain stage), for simulation only. Every
// rising clock edge it draws a new independent Gaussian sample (Box-Muller from
// $urandom) and presents it on `v`, expressed in converter input LSBs around
// MEAN. The standard deviation is SIGMA_NOM scaled by the gain trim word:
// sigma = SIGMA_NOM * (1 + sigma_code/512), sigma_code two's complement.
module wgn_model #(
  parameter real SIGMA_NOM = 1050.26,
  parameter real MEAN      = 2048.0
) (
  input  logic       clk,
  input  logic [6:0] sigma_code,
  output real        v
);

  real u1, u2, z;

  initial v = MEAN;

  always @(posedge clk) begin
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    z  = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
    v <= MEAN + SIGMA_NOM * (1.0 + real'($signed(sigma_code)) / 512.0) * z;
  end

endmodule
