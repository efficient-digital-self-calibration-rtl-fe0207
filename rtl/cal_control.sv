// cal_control: control unit of the self-calibration circuitry.
// It watches the corrected output words, decides which histogram bin a word falls
// into and sequences the shared 29-bit adder through one calibration cycle,
// issuing one control word (operand selects, operation, register writes) per
// clock:
//   OFFSET  (only if sub_offset was set with start, 4 clocks + 1 load)
//           Reg[r] <- C[r] - OFF, then all code registers are loaded back.
//   CLEAR   (1 clock) working registers <- 0.
//   SAMPLE  (2**LOG2_SAMPLES valid words, one per clock at full rate)
//           a word in bin j adds N[r] to Reg[r], r = j for the lower bins,
//           r = 6-j for the upper ones (folding), r = 3 for the centre bin.
//   SUBEXP  (4 clocks) Reg[r] <- Reg[r] - expected, where expected is
//           2**NT for the centre bin and 2*2**NT for a folded pair
//           (NT = LOG2_SAMPLES+3, the normalised content of one ideal bin).
//           Reg[r] is now the deviation Dev of the segment boundary, scaled so
//           that one output LSB is 2**(SHIFT-1).
//   CODES   (4 clocks) Reg4 <- -Reg4, Reg3 <- Reg4 - Reg3, Reg2 <- Reg3 - Reg2,
//           Reg1 <- Reg2 - Reg1. This is C(1) = -0.5*sum(Dev),
//           C(k) = C(k-1) + 0.5*Dev[k-1], with the factor 0.5 left to the shift.
//   ADDOLD  (4 clocks) Reg[r] <- Reg[r] + C[r]: the histogram was taken on
//           words already corrected with C, so the result is a correction of C.
//   WRITE   (1 clock) all code registers load Reg[r] >> SHIFT.
// busy is high from the clock after start until the clock after WRITE; done
// pulses for one clock after the WRITE clock. A full cycle thus takes
// 2**LOG2_SAMPLES + 14 clocks at full input rate (+5 with the offset step).
// The phases and their arithmetic follow the described algorithm; the bin
// edges, the expected values, the order of the in-place code computation and the
// start/busy/done handshake are this design's. Assertions at the end state the
// rules of the sequence; a start while busy is ignored.
module cal_control
  import selfcal_pkg::*;
#(
  parameter int LOG2_SAMPLES = 24,
  parameter int BIN_W        = 2 ** LOG2_BIN_W,
  // lowest code of each bin, centred on the expected segment boundaries
  parameter int BIN_LO [NBINS] = '{518, 1018, 1517, 2016, 2515, 3014, 3514}
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      sub_offset,
  input  logic      y_valid,
  input  adc_word_t y,
  output ctrl_t     ctrl,
  output logic      busy,
  output logic      done,
  output logic      sample_hit    // a sample fell into a bin this clock
);

  localparam int NT = LOG2_SAMPLES + 3;

  typedef enum logic [3:0] {
    S_IDLE, S_OFFSET, S_OFFWR, S_CLEAR, S_SAMPLE, S_SUBEXP, S_CODES, S_ADDOLD,
    S_WRITE
  } state_e;

  state_e                state;
  logic [1:0]            step;
  logic [LOG2_SAMPLES:0] count;

  // Bin lookup on the current word
  logic  in_bin;
  ridx_t bin_r;
  always_comb begin
    in_bin = 1'b0;
    bin_r  = '0;
    for (int j = 0; j < NBINS; j++) begin
      if (int'(y) >= BIN_LO[j] && int'(y) < BIN_LO[j] + BIN_W) begin
        in_bin = 1'b1;
        bin_r  = (j <= NBINS / 2) ? ridx_t'(j) : ridx_t'(NBINS - 1 - j);
      end
    end
  end

  assign sample_hit = (state == S_SAMPLE) && y_valid && in_bin;

  // Control word
  always_comb begin
    ctrl        = '0;
    ctrl.a_sel  = A_ZERO;
    ctrl.b_sel  = B_ZERO;
    ctrl.op     = OP_ADD;
    unique case (state)
      S_OFFSET: begin
        ctrl.a_sel  = A_OFF;
        ctrl.b_sel  = B_CODE;
        ctrl.b_idx  = step;
        ctrl.op     = OP_RSUB;
        ctrl.wr_en  = 1'b1;
        ctrl.wr_idx = step;
      end
      S_OFFWR: ctrl.code_wr = 1'b1;
      S_CLEAR: ctrl.clr = 1'b1;
      S_SAMPLE: begin
        ctrl.a_sel  = A_REG;
        ctrl.a_idx  = bin_r;
        ctrl.b_sel  = B_NORM;
        ctrl.b_idx  = bin_r;
        ctrl.op     = OP_ADD;
        ctrl.wr_en  = y_valid && in_bin;
        ctrl.wr_idx = bin_r;
      end
      S_SUBEXP: begin
        ctrl.a_sel  = A_REG;
        ctrl.a_idx  = step;
        ctrl.b_sel  = B_CONST;
        ctrl.konst  = (step == 2'd3) ? work_t'(1) << NT : work_t'(1) << (NT + 1);
        ctrl.op     = OP_SUB;
        ctrl.wr_en  = 1'b1;
        ctrl.wr_idx = step;
      end
      S_CODES: begin
        ctrl.a_sel  = (step == 2'd0) ? A_ZERO : A_REG;
        ctrl.a_idx  = 2'd3 - step + 2'd1;
        ctrl.b_sel  = B_REG;
        ctrl.b_idx  = 2'd3 - step;
        ctrl.op     = OP_SUB;
        ctrl.wr_en  = 1'b1;
        ctrl.wr_idx = 2'd3 - step;
      end
      S_ADDOLD: begin
        ctrl.a_sel  = A_REG;
        ctrl.a_idx  = step;
        ctrl.b_sel  = B_CODE;
        ctrl.b_idx  = step;
        ctrl.op     = OP_ADD;
        ctrl.wr_en  = 1'b1;
        ctrl.wr_idx = step;
      end
      S_WRITE: ctrl.code_wr = 1'b1;
      default: ;
    endcase
  end

  // Sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      step   <= '0;
      count  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          step  <= '0;
          state <= sub_offset ? S_OFFSET : S_CLEAR;
        end
        S_OFFSET: begin
          step <= step + 2'd1;
          if (step == 2'd3) state <= S_OFFWR;
        end
        S_OFFWR: state <= S_CLEAR;
        S_CLEAR: begin
          count <= '0;
          state <= S_SAMPLE;
        end
        S_SAMPLE: if (y_valid) begin
          count <= count + 1'b1;
          if (count == (LOG2_SAMPLES + 1)'(2 ** LOG2_SAMPLES - 1)) begin
            step  <= '0;
            state <= S_SUBEXP;
          end
        end
        S_SUBEXP: begin
          step <= step + 2'd1;
          if (step == 2'd3) state <= S_CODES;
        end
        S_CODES: begin
          step <= step + 2'd1;
          if (step == 2'd3) state <= S_ADDOLD;
        end
        S_ADDOLD: begin
          step <= step + 2'd1;
          if (step == 2'd3) state <= S_WRITE;
        end
        S_WRITE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Rules of the sequence: one operation on the working registers per clock,
  // register writes only inside a cycle, and done exactly one clock after the
  // code registers are loaded at the end of a cycle.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    !(ctrl.clr && (ctrl.wr_en || ctrl.code_wr)));
  a_writes_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.wr_en || ctrl.code_wr || ctrl.clr) |-> busy);
  a_done_after_write: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WRITE) |=> (done && !busy));
  a_done_only_after_write: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_WRITE) |=> !done);

endmodule
