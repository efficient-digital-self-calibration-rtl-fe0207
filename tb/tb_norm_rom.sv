// tb_norm_rom: recomputes each normalisation factor from the Gaussian model
// (mu = 2048, sigma = 1024 output codes, 64-code bins starting at 518, 1018,
// 1517, 2016) by summing the density over the codes of the bin, and checks
// N_r = round(8/p_r) within one unit, and that every factor fits 10 bits.
module tb_norm_rom;
  import selfcal_pkg::*;

  logic [1:0] idx;
  norm_t value;
  int checks = 0, failures = 0;
  int lo [NCODES] = '{518, 1018, 1517, 2016};

  norm_rom dut (.idx, .value);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p, x, pi, nexp;
    int  n;
    pi = 3.14159265358979;
    for (int r = 0; r < NCODES; r++) begin
      p = 0.0;
      for (int c = lo[r]; c < lo[r] + 64; c++) begin
        x = (real'(c) - 2048.0) / 1024.0;
        p += $exp(-0.5 * x * x) / (1024.0 * $sqrt(2.0 * pi));
      end
      nexp = 8.0 / p;
      n    = int'(nexp);
      idx  = 2'(r);
      #1;
      checks++;
      if (int'(value) < n - 1 || int'(value) > n + 1) begin
        failures++;
        $display("N%0d = %0d, expected about %0d", r + 1, value, n);
      end
      checks++;
      if (nexp >= 1024.0) begin
        failures++;
        $display("N%0d does not fit 10 bits", r + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
