// tb_code_adder: random words, coarse codes and code sets. The reference picks
// the register of the segment (s in the lower half, 7-s in the upper half), adds
// it below mid-scale and subtracts it above, clips to 0..4095 and expects the
// result one clock later.
module tb_code_adder;
  import selfcal_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  adc_word_t y = 0, y_corr;
  coarse_t coarse = 0;
  ccode_t codes [NCODES];
  int checks = 0, failures = 0;

  code_adder dut (.clk, .rst_n, .in_valid, .y, .coarse, .codes, .out_valid, .y_corr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seg, c, r, exp_v;
    for (int i = 0; i < NCODES; i++) codes[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NCODES; i++) codes[i] = ccode_t'($urandom);
      seg = $urandom_range(0, 7);
      coarse = coarse_t'(seg);
      // words mostly inside the segment, sometimes at the range ends
      if (t % 50 == 0)      y = 12'd3;
      else if (t % 50 == 1) y = 12'd4093;
      else y = adc_word_t'(seg * 512 + $urandom_range(0, 511));
      in_valid = 1;
      r = (seg < 4) ? seg : 7 - seg;
      c = int'(codes[r]);
      exp_v = (y < 2048) ? int'(y) + c : int'(y) - c;
      if (exp_v < 0) exp_v = 0;
      if (exp_v > 4095) exp_v = 4095;
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(y_corr) != exp_v) begin
        failures++;
        if (failures < 10) $display("y=%0d seg=%0d c=%0d got %0d (v=%0b) expected %0d",
                                    y, seg, c, y_corr, out_valid, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
