// cal_code_regs: the four calibrating-code registers C1..C4 (7 bits each, two's
// complement). C(k) corrects segment k of the lower half of the transfer curve
// and, with opposite sign, segment 9-k of the upper half.
// After reset they hold the codes of an ideal converter whose front-end stage has
// the reduced inter-stage gain g = 3.9/4: C(k) = round((1792 - 512*(k-1))*(1-g)),
// i.e. 45, 32, 19 and 6. When `wr` is high all four are loaded at once from the
// working registers. The scaling of a calibration cycle is a division by a power
// of two, done purely by wiring: bits [SHIFT+6:SHIFT] of a working register are
// the code. With the default sizes SHIFT+6 is the top bit, so the field is taken
// as is; for smaller SHIFT (fewer histogram samples) the value is saturated to
// the 7-bit range instead of wrapping. The register set, its width, the initial
// values and the wired shift are as described; the saturation is this design's.
module cal_code_regs
  import selfcal_pkg::*;
#(
  parameter int     N     = NCODES,
  parameter int     W     = WORK_W,
  parameter int     SHIFT = 22,
  parameter ccode_t INIT [N] = '{7'sd45, 7'sd32, 7'sd19, 7'sd6}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [W-1:0] work [N],
  output ccode_t       codes [N]
);

  localparam int CMAX = 2 ** (CODE_W - 1) - 1;
  localparam int CMIN = -(2 ** (CODE_W - 1));

  // Arithmetic shift of each working register, saturated to the code range
  ccode_t field [N];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [W-1:0] q;
      q = $signed(work[i]) >>> SHIFT;
      if (q > W'(CMAX))      field[i] = ccode_t'(CMAX);
      else if (q < W'(CMIN)) field[i] = ccode_t'(CMIN);
      else               field[i] = q[CODE_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) codes[i] <= INIT[i];
    end else if (wr) begin
      for (int i = 0; i < N; i++) codes[i] <= field[i];
    end
  end

endmodule
