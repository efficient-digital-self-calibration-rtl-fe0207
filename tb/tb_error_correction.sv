// tb_error_correction: a stream of flash codes, with the back-end code of each
// sample one clock later. Checks y = 512*flash + backend - 256 (clipped to
// 0..4095), the passed-on coarse code and the two-clock latency from in_valid.
module tb_error_correction;
  import selfcal_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  coarse_t flash = 0, coarse_out;
  logic [BACK_BITS-1:0] backend = 0;
  adc_word_t y;
  int checks = 0, failures = 0;

  error_correction dut (.clk, .rst_n, .in_valid, .flash, .backend, .out_valid, .y, .coarse_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference pipeline: expected outputs two clocks after the flash code
  int      q_y [$];
  coarse_t q_c [$];
  logic    vq [3] = '{0, 0, 0};
  int      fl_prev;
  logic [BACK_BITS-1:0] be_next;

  initial begin
    int e;
    fl_prev = 0;
    be_next = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // back end of the previous sample arrives now
      backend  = be_next;
      in_valid = ($urandom_range(0, 3) != 0);
      flash    = coarse_t'($urandom);
      be_next  = (t % 97 == 0) ? 10'd0 : (t % 89 == 0) ? 10'd1023 : 10'($urandom_range(0, 1023));
      // the sample whose flash code is presented now completes next clock
      if (in_valid) begin
        e = int'(flash) * 512 + int'(be_next) - 256;
        if (e < 0) e = 0;
        if (e > 4095) e = 4095;
        q_y.push_back(e);
        q_c.push_back(flash);
      end
      vq[2] = vq[1]; vq[1] = vq[0]; vq[0] = in_valid;
      #1;
      checks++;
      if (out_valid !== vq[2]) begin
        failures++;
        if (failures < 10) $display("t=%0d out_valid %0b expected %0b", t, out_valid, vq[2]);
      end
      if (out_valid && q_y.size() > 0) begin
        checks++;
        if (int'(y) != q_y[0] || coarse_out != q_c[0]) begin
          failures++;
          if (failures < 10) $display("t=%0d y=%0d coarse=%0d expected %0d %0d", t, y, coarse_out, q_y[0], q_c[0]);
        end
        void'(q_y.pop_front());
        void'(q_c.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
