// selfcal_top: digital back end of a 12-bit, 40 MS/s pipeline ADC with
// histogram-based self-calibration from a Gaussian noise input.
// Data path in normal conversion (one word per clock):
//   flash[2:0], backend[9:0] -> error_correction (2 clocks) -> code_adder
//   (1 clock) -> out_code.
// out_valid therefore follows in_valid by three clocks.
// Calibration (cal_start pulse, with the converter input switched to the noise
// source): cal_control bins the corrected words and, through the shared 29-bit
// adder, accumulates normalisation factors (norm_rom) in the working registers,
// then turns them into new calibrating codes which are loaded into the code
// registers in one clock; conversion continues with the old codes meanwhile.
// A cycle takes 2**LOG2_SAMPLES + 14 clocks (+5 with cal_sub_offset, which first
// subtracts the OFF register from the codes). OFF and sigma are loaded from
// outside; sigma_out drives the gain trim of the noise source.
// Operand multiplexers of the shared adder: the left operand is a working
// register or OFF, the right one a working register, a normalisation factor, a
// calibrating code or a constant of the control unit. OFF and the codes enter
// the 29-bit bus sign-extended and shifted left by SHIFT = LOG2_SAMPLES - 2, so
// that code registers read the same bit field back without a shifter.
// The structure follows the described circuit; the port list, the handshake and
// the shift alignment of OFF are this design's.
module selfcal_top
  import selfcal_pkg::*;
#(
  parameter int LOG2_SAMPLES = 24,
  parameter int BIN_LO [NBINS] = '{518, 1018, 1517, 2016, 2515, 3014, 3514},
  parameter norm_t NORM [NCODES] = '{10'd936, 10'd516, 10'd361, 10'd321},
  parameter ccode_t CODE_INIT [NCODES] = '{7'sd45, 7'sd32, 7'sd19, 7'sd6},
  parameter int SIGMA_W = 7
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // converter stages
  input  logic                            in_valid,
  input  logic [COARSE_BITS-1:0]          flash,
  input  logic [BACK_BITS-1:0]            backend,
  // calibrated output
  output logic                            out_valid,
  output logic [ADC_BITS-1:0]             out_code,
  // calibration control
  input  logic                            cal_start,
  input  logic                            cal_sub_offset,
  output logic                            cal_busy,
  output logic                            cal_done,
  output logic                            cal_bin_hit,
  // noise generator setup registers
  input  logic                            off_ld,
  input  logic [CODE_W-1:0]               off_in,
  input  logic                            sigma_ld,
  input  logic [SIGMA_W-1:0]              sigma_in,
  output logic [SIGMA_W-1:0]              sigma_out,
  // current calibrating codes C1..C4
  output logic [NCODES-1:0][CODE_W-1:0]   codes_out
);

  localparam int SHIFT = LOG2_SAMPLES - 2;

  // Error correction
  logic      ec_valid;
  adc_word_t ec_y;
  coarse_t   ec_coarse;

  error_correction u_ec (
    .clk, .rst_n, .in_valid, .flash, .backend,
    .out_valid(ec_valid), .y(ec_y), .coarse_out(ec_coarse)
  );

  // Code correction
  ccode_t codes [NCODES];

  code_adder u_cadd (
    .clk, .rst_n, .in_valid(ec_valid), .y(ec_y), .coarse(ec_coarse),
    .codes, .out_valid, .y_corr(out_code)
  );

  // Control unit
  ctrl_t ctrl;

  cal_control #(.LOG2_SAMPLES(LOG2_SAMPLES), .BIN_LO(BIN_LO)) u_ctrl (
    .clk, .rst_n, .start(cal_start), .sub_offset(cal_sub_offset),
    .y_valid(out_valid), .y(out_code), .ctrl,
    .busy(cal_busy), .done(cal_done), .sample_hit(cal_bin_hit)
  );

  // Setup registers
  logic [CODE_W-1:0] off;

  setup_regs #(.OFF_W(CODE_W), .SIGMA_W(SIGMA_W)) u_setup (
    .clk, .rst_n, .off_ld, .off_in, .sigma_ld, .sigma_in,
    .off, .sigma(sigma_out)
  );

  // Working registers, ROM, shared adder
  work_t work [NCODES];
  work_t rd_a, rd_b, op_a, op_b, sum;
  norm_t nval;

  working_regs u_wregs (
    .clk, .rst_n, .clr(ctrl.clr), .wr_en(ctrl.wr_en), .wr_idx(ctrl.wr_idx),
    .wr_data(sum), .rd_a_idx(ctrl.a_idx), .rd_b_idx(ctrl.b_idx),
    .rd_a, .rd_b, .regs(work)
  );

  norm_rom #(.NORM(NORM)) u_rom (.idx(ctrl.b_idx), .value(nval));

  always_comb begin
    unique case (ctrl.a_sel)
      A_REG:   op_a = rd_a;
      A_OFF:   op_a = work_t'($signed(off)) << SHIFT;
      default: op_a = '0;
    endcase
    unique case (ctrl.b_sel)
      B_REG:   op_b = rd_b;
      B_NORM:  op_b = work_t'(nval);
      B_CODE:  op_b = work_t'(codes[ctrl.b_idx]) << SHIFT;
      B_CONST: op_b = ctrl.konst;
      default: op_b = '0;
    endcase
  end

  add29 u_add (.a(op_a), .b(op_b), .op(ctrl.op), .y(sum));

  cal_code_regs #(.SHIFT(SHIFT), .INIT(CODE_INIT)) u_codes (
    .clk, .rst_n, .wr(ctrl.code_wr), .work, .codes
  );

  always_comb
    for (int i = 0; i < NCODES; i++) codes_out[i] = codes[i];

endmodule
