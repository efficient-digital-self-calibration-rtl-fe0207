// tb_selfcal_full: one complete calibration of the back end at its default size,
// 2**24 noise samples per histogram (0.42 s of conversion at 40 MS/s), with the
// same behavioural models of the analog pipeline stage and noise source as the
// end-to-end test. Checks INL above 3 LSB with the reset codes, the busy time of
// 2**24 + 14 clocks, the new codes within 2 LSB of the values the model implies
// (C(k) = (1792-512(k-1))(1-g) + g*E_{k-1}), and INL within 2.5 LSB afterwards.
module tb_selfcal_full;
  import selfcal_pkg::*;

  localparam int  S = 24;   // the default histogram size of selfcal_top
  localparam real G = 3.9;
  localparam real E [4] = '{3.0, -2.5, 4.0, -1.5};

  logic clk = 0, rst_n = 0;
  logic drive = 0, in_valid = 0;
  logic use_noise = 0;
  real  ramp_x = 0.0, vin, vnoise;
  logic [2:0] flash;
  logic [9:0] backend;
  logic out_valid;
  logic [11:0] out_code;
  logic cal_start = 0, cal_sub_offset = 0, cal_busy, cal_done, cal_bin_hit;
  logic off_ld = 0, sigma_ld = 0;
  logic [6:0] off_in = 0, sigma_in = 0, sigma_out;
  logic [NCODES-1:0][CODE_W-1:0] codes_out;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_add = 0, n_sub = 0, n_cal = 0;

  assign vin = use_noise ? vnoise : ramp_x;

  wgn_model #(.SIGMA_NOM(1024.0 * 4.0 / G)) u_wgn (.clk, .sigma_code(sigma_out), .v(vnoise));
  adc_model #(.G(G), .E0(E[0]), .E1(E[1]), .E2(E[2]), .E3(E[3])) u_adc (.clk, .vin, .flash, .backend);

  selfcal_top dut (
    .clk, .rst_n, .in_valid, .flash, .backend, .out_valid, .out_code,
    .cal_start, .cal_sub_offset, .cal_busy, .cal_done, .cal_bin_hit,
    .off_ld, .off_in, .sigma_ld, .sigma_in, .sigma_out, .codes_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) in_valid <= drive;

  initial begin
    repeat ((2 ** S) + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (cal_bin_hit) n_hit++;
    if (cal_busy && out_valid && !cal_bin_hit) n_miss++;
    if (out_valid && codes_out != '0) begin
      if (dut.u_cadd.y_corr < 12'd2048) n_add++; else n_sub++;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real expected_code(int k);
    return (1792.0 - 512.0 * k) * (1.0 - G / 4.0) + (G / 4.0) * E[k];
  endfunction

  // Static ramp through the whole chain; returns the largest |INL|
  task automatic ramp_inl(output real worst);
    real q [$];
    real x, err;
    worst = 0.0;
    use_noise = 0;
    x = 24.0;
    while (x < 4072.0 || q.size() > 0) begin
      @(negedge clk);
      if (out_valid && q.size() > 0) begin
        err = real'(out_code) - (2048.0 + G / 4.0 * (q.pop_front() - 2048.0));
        if (err < 0.0) err = -err;
        if (err > worst) worst = err;
      end
      if (x < 4072.0) begin
        drive  = 1;
        ramp_x = x;
        q.push_back(x);
        x += 0.5;
      end else drive = 0;
    end
    drive = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic calibrate(bit with_off, output int busy_clocks);
    use_noise = 1;
    drive = 1;
    repeat (5) @(negedge clk);
    cal_start = 1;
    cal_sub_offset = with_off;
    @(negedge clk);
    cal_start = 0;
    cal_sub_offset = 0;
    busy_clocks = 0;
    while (!cal_done) begin
      if (cal_busy) busy_clocks++;
      @(negedge clk);
    end
    n_cal++;
    drive = 0;
    use_noise = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic check_codes(string what);
    real e;
    ccode_t c;
    for (int k = 0; k < NCODES; k++) begin
      e = expected_code(k);
      c = ccode_t'(codes_out[k]);
      $display("%s C%0d = %0d (model %f)", what, k + 1, c, e);
      check($sformatf("%s C%0d = %0d, model %f", what, k + 1, c, e),
            real'(c) > e - 2.0 && real'(c) < e + 2.0);
    end
  endtask

  initial begin
    real inl0, inl1;
    int  busy_clocks;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset codes", codes_out == {7'd6, 7'd19, 7'd32, 7'd45});

    ramp_inl(inl0);
    $display("INL before calibration: %f LSB", inl0);
    check("INL before calibration above 3 LSB", inl0 > 3.0);

    calibrate(0, busy_clocks);
    $display("calibration cycle: %0d busy clocks", busy_clocks);
    check("busy clocks = 2**S + 14", busy_clocks == 2 ** S + 14);
    check_codes("first");

    ramp_inl(inl1);
    $display("INL after calibration: %f LSB", inl1);
    check("INL after calibration within 2.5 LSB", inl1 <= 2.5);

    $display("bin hits %0d, samples outside the bins %0d", n_hit, n_miss);
    check("bin hits occurred", n_hit > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
