// selfcal_pkg: sizes, types and operation encodings shared by the digital
// self-calibration circuitry of a 12-bit pipeline ADC (3-bit front-end stage,
// 10-bit back end). The sizes are those of the described converter: 12-bit output
// word, four 7-bit calibrating-code registers, four 29-bit working registers,
// four 10-bit normalisation factors and seven 64-code histogram bins. The
// operand-select and operation encodings of the shared 29-bit adder are this
// design's own.
package selfcal_pkg;

  // Converter word sizes
  localparam int ADC_BITS    = 12;  // output word of the converter
  localparam int COARSE_BITS = 3;   // front-end flash quantiser
  localparam int BACK_BITS   = 10;  // back-end ADC
  // Calibration datapath sizes
  localparam int CODE_W      = 7;   // calibrating-code registers C1..C4
  localparam int WORK_W      = 29;  // working registers and shared adder
  localparam int NORM_W      = 10;  // normalisation factors N1..N4
  localparam int NCODES      = 4;   // 2**(COARSE_BITS-1) codes / folded bins
  localparam int NBINS       = 7;   // bins, one per segment boundary
  localparam int LOG2_BIN_W  = 6;   // bin width 64 output codes

  typedef logic [ADC_BITS-1:0]      adc_word_t;
  typedef logic [COARSE_BITS-1:0]   coarse_t;
  typedef logic signed [CODE_W-1:0] ccode_t;
  typedef logic [WORK_W-1:0]        work_t;
  typedef logic [NORM_W-1:0]        norm_t;
  typedef logic [1:0]               ridx_t;   // index of C, N and working registers

  // Operation of the shared adder
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,   // a + b
    OP_SUB  = 2'd1,   // a - b
    OP_RSUB = 2'd2    // b - a
  } add_op_e;

  // Left operand of the shared adder
  typedef enum logic [1:0] {
    A_ZERO = 2'd0,
    A_REG  = 2'd1,    // working register selected by a_idx
    A_OFF  = 2'd2     // offset register, aligned with the code field
  } a_sel_e;

  // Right operand of the shared adder
  typedef enum logic [2:0] {
    B_ZERO  = 3'd0,
    B_REG   = 3'd1,   // working register selected by b_idx
    B_NORM  = 3'd2,   // normalisation factor selected by b_idx
    B_CODE  = 3'd3,   // calibrating code selected by b_idx, aligned with the code field
    B_CONST = 3'd4    // constant supplied by the control unit
  } b_sel_e;

  // Control word issued by the control unit each cycle
  typedef struct packed {
    a_sel_e  a_sel;
    ridx_t   a_idx;
    b_sel_e  b_sel;
    ridx_t   b_idx;
    add_op_e op;
    work_t   konst;    // value for B_CONST
    logic    wr_en;    // write adder result into working register wr_idx
    ridx_t   wr_idx;
    logic    clr;      // clear all working registers
    logic    code_wr;  // load all code registers from the working registers
  } ctrl_t;

endpackage
