// tb_cal_code_regs: checks the reset codes (45, 32, 19, 6), that a load takes bits
// [SHIFT+6:SHIFT] of every working register at once, that without a load the
// codes hold, and, at a smaller SHIFT, that out-of-range values saturate.
module tb_cal_code_regs;
  import selfcal_pkg::*;

  logic clk = 0, rst_n = 0, wr = 0, wr_s = 0;
  logic [WORK_W-1:0] work [NCODES];
  ccode_t codes [NCODES], codes_s [NCODES];
  int checks = 0, failures = 0;

  cal_code_regs dut (.clk, .rst_n, .wr, .work, .codes);
  cal_code_regs #(.SHIFT(10)) dut_s (.clk, .rst_n, .wr(wr_s), .work, .codes(codes_s));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int exp_c [NCODES];
    int init_c [NCODES] = '{45, 32, 19, 6};
    longint v;
    for (int i = 0; i < NCODES; i++) work[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NCODES; i++) check("reset", int'(codes[i]), init_c[i]);
    for (int i = 0; i < NCODES; i++) exp_c[i] = init_c[i];
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      wr = $urandom_range(0, 1);
      for (int i = 0; i < NCODES; i++) begin
        v = longint'($signed(7'($urandom))) * 64'sd4194304 + longint'($urandom_range(0, 4194303));
        work[i] = WORK_W'(v);
      end
      @(posedge clk);
      if (wr) for (int i = 0; i < NCODES; i++)
        exp_c[i] = int'($signed(work[i][WORK_W-1:22]));
      @(negedge clk);
      for (int i = 0; i < NCODES; i++) check("load", int'(codes[i]), exp_c[i]);
    end
    // saturation at SHIFT = 10: field is bits [16:10]
    @(negedge clk);
    wr = 0;
    wr_s = 1;
    work[0] = WORK_W'(64'sd100 << 10);    // above 63
    work[1] = WORK_W'(-64'sd100 <<< 10);  // below -64
    work[2] = WORK_W'(64'sd17 << 10) + 29'd1023;
    work[3] = WORK_W'(-64'sd5 <<< 10);
    @(negedge clk);
    wr_s = 0;
    check("sat hi", int'(codes_s[0]), 63);
    check("sat lo", int'(codes_s[1]), -64);
    check("in range", int'(codes_s[2]), 17);
    check("negative", int'(codes_s[3]), -5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
