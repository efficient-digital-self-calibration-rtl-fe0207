// tb_stimulus_errors: calibration with an offset noise source. The mean of the
// Gaussian input is moved away from mid-scale by -14, -7, +7 and +14 LSB (about
// +-8 mV and +-4 mV if the noise source's 600 mV sigma is mapped onto
// 1024 LSB), and the back end is reset and calibrated once for each (2**20
// samples per histogram). Because bins on both sides of mid-scale are summed,
// an offset only changes the result to second order: after each calibration the
// INL, measured with a 0.5-LSB ramp, must be within 2.5 LSB and every code
// within 2 LSB of the value the converter model implies.
module tb_stimulus_errors;
  import selfcal_pkg::*;

  localparam int  S = 20;
  localparam real G = 3.9;
  localparam real E [4] = '{3.0, -2.5, 4.0, -1.5};
  localparam int  RUNS = 6;
  localparam real SHIFTS [RUNS] = '{-14.0, -7.0, 7.0, 14.0, 0.0, 0.0};
  localparam int  SIGMAS [RUNS] = '{0, 0, 0, 0, -1, 1};

  logic clk = 0, rst_n = 0;
  logic drive = 0, in_valid = 0;
  logic use_noise = 0;
  real  ramp_x = 0.0, vin, vnoise, noise_shift = 0.0;
  logic [2:0] flash;
  logic [9:0] backend;
  logic out_valid;
  logic [11:0] out_code;
  logic cal_start = 0, cal_busy, cal_done, cal_bin_hit;
  logic sigma_ld = 0;
  logic [6:0] sigma_in = 0, sigma_out;
  logic [NCODES-1:0][CODE_W-1:0] codes_out;
  int checks = 0, failures = 0;

  assign vin = use_noise ? vnoise + noise_shift : ramp_x;

  wgn_model #(.SIGMA_NOM(1024.0 * 4.0 / G)) u_wgn (.clk, .sigma_code(sigma_out), .v(vnoise));
  adc_model #(.G(G), .E0(E[0]), .E1(E[1]), .E2(E[2]), .E3(E[3])) u_adc (.clk, .vin, .flash, .backend);

  selfcal_top #(.LOG2_SAMPLES(S)) dut (
    .clk, .rst_n, .in_valid, .flash, .backend, .out_valid, .out_code,
    .cal_start, .cal_sub_offset(1'b0), .cal_busy, .cal_done, .cal_bin_hit,
    .off_ld(1'b0), .off_in(7'd0), .sigma_ld, .sigma_in, .sigma_out, .codes_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) in_valid <= drive;

  initial begin
    repeat (RUNS * (2 ** S) + 300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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

  initial begin
    real inl, e;
    ccode_t c;
    for (int i = 0; i < RUNS; i++) begin
      rst_n = 0;
      noise_shift = SHIFTS[i];
      repeat (3) @(negedge clk);
      rst_n = 1;
      sigma_in = 7'(SIGMAS[i]);
      sigma_ld = 1;
      @(negedge clk);
      sigma_ld = 0;
      use_noise = 1;
      drive = 1;
      repeat (5) @(negedge clk);
      cal_start = 1;
      @(negedge clk);
      cal_start = 0;
      while (!cal_done) @(negedge clk);
      drive = 0;
      repeat (4) @(negedge clk);
      for (int k = 0; k < NCODES; k++) begin
        e = (1792.0 - 512.0 * k) * (1.0 - G / 4.0) + (G / 4.0) * E[k];
        c = ccode_t'(codes_out[k]);
        check($sformatf("run %0d: C%0d = %0d, model %f", i + 1, k + 1, c, e),
              real'(c) > e - 2.0 && real'(c) < e + 2.0);
      end
      ramp_inl(inl);
      $display("noise offset %f LSB, sigma trim %0d: codes %0d %0d %0d %0d, INL after calibration %f LSB",
               SHIFTS[i], SIGMAS[i], ccode_t'(codes_out[0]), ccode_t'(codes_out[1]),
               ccode_t'(codes_out[2]), ccode_t'(codes_out[3]), inl);
      check($sformatf("run %0d: INL within 2.5 LSB", i + 1), inl <= 2.5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
