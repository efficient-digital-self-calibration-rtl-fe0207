// tb_setup_regs: reset values, independent load strobes and hold behaviour of the
// OFF and sigma registers against a reference model.
module tb_setup_regs;
  logic clk = 0, rst_n = 0, off_ld = 0, sigma_ld = 0;
  logic [6:0] off_in = 0, sigma_in = 0, off, sigma;
  logic [6:0] m_off, m_sigma;
  int checks = 0, failures = 0;

  setup_regs dut (.clk, .rst_n, .off_ld, .off_in, .sigma_ld, .sigma_in, .off, .sigma);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_off = 0; m_sigma = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks += 2;
      if (off !== m_off)     begin failures++; $display("off %h exp %h", off, m_off); end
      if (sigma !== m_sigma) begin failures++; $display("sigma %h exp %h", sigma, m_sigma); end
      off_ld   = $urandom_range(0, 3) == 0;
      sigma_ld = $urandom_range(0, 3) == 0;
      off_in   = 7'($urandom);
      sigma_in = 7'($urandom);
      @(posedge clk);
      if (off_ld)   m_off   = off_in;
      if (sigma_ld) m_sigma = sigma_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
