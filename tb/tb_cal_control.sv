// tb_cal_control: runs the control unit with 2**6 samples per histogram, once
// without and once with the offset step, on a random word stream with gaps in
// y_valid. Checks every control word against the expected sequence: bin folding
// and register selection during sampling, the expected-value constants, the
// operand order of the in-place code computation, the code-register loads, the
// done pulse, and the busy time (samples needed + 14 clocks, +5 with offset).
module tb_cal_control;
  import selfcal_pkg::*;

  localparam int S  = 6;
  localparam int NT = S + 3;
  localparam int LO [NBINS] = '{518, 1018, 1517, 2016, 2515, 3014, 3514};

  logic clk = 0, rst_n = 0, start = 0, sub_offset = 0, y_valid = 0;
  adc_word_t y = 0;
  ctrl_t ctrl;
  logic busy, done, hit;
  int checks = 0, failures = 0;

  cal_control #(.LOG2_SAMPLES(S)) dut (.clk, .rst_n, .start, .sub_offset, .y_valid, .y,
                                       .ctrl, .busy, .done, .sample_hit(hit));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp_v);
    end
  endtask

  function automatic int bin_of(int v);
    for (int j = 0; j < NBINS; j++)
      if (v >= LO[j] && v < LO[j] + 64) return (j <= 3) ? j : 6 - j;
    return -1;
  endfunction

  task automatic run(bit with_off);
    int n_valid, cycles, b, hits, sc;
    @(negedge clk);
    start = 1;
    sub_offset = with_off;
    @(negedge clk);
    start = 0;
    sub_offset = 0;
    cycles = 1;
    expect_eq("busy", busy, 1);
    if (with_off) begin
      for (int k = 0; k < 4; k++) begin
        expect_eq("off a_sel", ctrl.a_sel, A_OFF);
        expect_eq("off b_sel", ctrl.b_sel, B_CODE);
        expect_eq("off b_idx", ctrl.b_idx, k);
        expect_eq("off op", ctrl.op, OP_RSUB);
        expect_eq("off wr", ctrl.wr_en, 1);
        expect_eq("off wr_idx", ctrl.wr_idx, k);
        @(negedge clk); cycles++;
      end
      expect_eq("off load", ctrl.code_wr, 1);
      @(negedge clk); cycles++;
    end
    expect_eq("clear", ctrl.clr, 1);
    @(negedge clk); cycles++;
    n_valid = 0;
    hits = 0;
    sc = 0;
    while (n_valid < 2 ** S) begin
      y_valid = ($urandom_range(0, 4) != 0);
      // favour words inside the bins
      if ($urandom_range(0, 1)) y = adc_word_t'(LO[$urandom_range(0, 6)] + $urandom_range(0, 63));
      else y = adc_word_t'($urandom_range(0, 4095));
      if ($urandom_range(0, 9) == 0) y = adc_word_t'(LO[$urandom_range(0, 6)] + (($urandom_range(0, 1)) ? 64 : -1));
      #1;
      b = bin_of(int'(y));
      expect_eq("hit", hit, y_valid && b >= 0);
      expect_eq("sample wr", ctrl.wr_en, y_valid && b >= 0);
      if (y_valid && b >= 0) begin
        hits++;
        expect_eq("sample a_sel", ctrl.a_sel, A_REG);
        expect_eq("sample b_sel", ctrl.b_sel, B_NORM);
        expect_eq("sample op", ctrl.op, OP_ADD);
        expect_eq("sample a_idx", ctrl.a_idx, b);
        expect_eq("sample b_idx", ctrl.b_idx, b);
        expect_eq("sample wr_idx", ctrl.wr_idx, b);
      end
      if (y_valid) n_valid++;
      sc++;
      @(negedge clk); cycles++;
    end
    y_valid = 0;
    for (int k = 0; k < 4; k++) begin
      expect_eq("subexp a_sel", ctrl.a_sel, A_REG);
      expect_eq("subexp a_idx", ctrl.a_idx, k);
      expect_eq("subexp b_sel", ctrl.b_sel, B_CONST);
      expect_eq("subexp op", ctrl.op, OP_SUB);
      expect_eq("subexp const", longint'(ctrl.konst), (k == 3) ? (64'd1 << NT) : (64'd1 << (NT + 1)));
      expect_eq("subexp wr_idx", ctrl.wr_idx, k);
      expect_eq("subexp wr", ctrl.wr_en, 1);
      @(negedge clk); cycles++;
    end
    for (int k = 0; k < 4; k++) begin
      expect_eq("codes a_sel", ctrl.a_sel, (k == 0) ? A_ZERO : A_REG);
      if (k > 0) expect_eq("codes a_idx", ctrl.a_idx, 4 - k);
      expect_eq("codes b_sel", ctrl.b_sel, B_REG);
      expect_eq("codes b_idx", ctrl.b_idx, 3 - k);
      expect_eq("codes op", ctrl.op, OP_SUB);
      expect_eq("codes wr_idx", ctrl.wr_idx, 3 - k);
      expect_eq("codes wr", ctrl.wr_en, 1);
      @(negedge clk); cycles++;
    end
    for (int k = 0; k < 4; k++) begin
      expect_eq("addold a_sel", ctrl.a_sel, A_REG);
      expect_eq("addold b_sel", ctrl.b_sel, B_CODE);
      expect_eq("addold idx", ctrl.b_idx, k);
      expect_eq("addold op", ctrl.op, OP_ADD);
      expect_eq("addold wr_idx", ctrl.wr_idx, k);
      expect_eq("addold code_wr", ctrl.code_wr, 0);
      @(negedge clk); cycles++;
    end
    // busy clocks: from the clock after start up to and including WRITE
    expect_eq("busy clocks", cycles, (with_off ? 5 : 0) + sc + 14);
    expect_eq("write", ctrl.code_wr, 1);
    expect_eq("write no wr", ctrl.wr_en, 0);
    expect_eq("done early", done, 0);
    @(negedge clk);
    expect_eq("done", done, 1);
    expect_eq("idle", busy, 0);
    expect_eq("idle ctrl", ctrl.wr_en | ctrl.code_wr | ctrl.clr, 0);
    $display("run offset=%0b: %0d busy clocks, %0d bin hits", with_off, cycles, hits);
    expect_eq("some hits", hits > 0, 1);
  endtask

  // Busy time at full input rate
  task automatic run_full_rate();
    int cycles;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    y_valid = 1;
    y = 12'd2040;
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
    y_valid = 0;
    expect_eq("full-rate busy clocks", cycles, 2 ** S + 14);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("reset idle", busy, 0);
    run(0);
    run(1);
    run_full_rate();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
