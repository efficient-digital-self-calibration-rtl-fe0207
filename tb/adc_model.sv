// adc_model: behavioural model of the analog part of a 12-bit two-stage pipeline
// converter, for simulation only: sample-and-hold, 3-bit flash with comparator
// offsets, 3-bit MDAC with gain G (nominally 3.9 instead of 4) and DAC level
// errors, and an ideal 10-bit back-end ADC that spans twice the nominal residue
// range. The input `vin` is in LSBs of the 12-bit range (0..4096).
// Per sample x: d = flash decision (threshold 512*j + comparator offset),
//   backend = round(G/4 * (x - 512*d - E_d - 256) + 512 + noise), 0..1023,
// so that after error correction y = 512*d + backend - 256.
// The DAC level errors E_d are symmetric as in a fully differential stage:
// E_{7-d} = -E_d, with E_0..E_3 given by parameters. The flash code of a sample
// appears after the rising edge that samples it, the back-end code one clock
// later. NOISE_RMS adds input-referred thermal noise in LSBs.
module adc_model #(
  parameter real G         = 3.9,
  parameter real E0        = 3.0,
  parameter real E1        = -2.5,
  parameter real E2        = 4.0,
  parameter real E3        = -1.5,
  parameter real NOISE_RMS = 0.2
) (
  input  logic       clk,
  input  real        vin,
  output logic [2:0] flash,
  output logic [9:0] backend
);

  real err [8];
  real thr_off [7];
  real resid_next;
  logic [9:0] be_next;

  initial begin
    err[0] = E0;  err[1] = E1;  err[2] = E2;  err[3] = E3;
    err[7] = -E0; err[6] = -E1; err[5] = -E2; err[4] = -E3;
    thr_off = '{2.5, -3.0, 1.5, -2.0, 3.0, -1.0, 2.0};
    flash   = '0;
    backend = 10'd512;
    be_next = 10'd512;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  always @(posedge clk) begin
    int  d;
    real x, b;
    x = vin + NOISE_RMS * gauss();
    d = 0;
    for (int j = 1; j < 8; j++)
      if (x >= 512.0 * j + thr_off[j-1]) d = j;
    b = G / 4.0 * (x - 512.0 * d - err[d] - 256.0) + 512.0;
    if (b < 0.0) b = 0.0;
    if (b > 1023.0) b = 1023.0;
    flash   <= 3'(d);
    backend <= be_next;
    be_next <= 10'($rtoi(b + 0.5));
  end

endmodule
