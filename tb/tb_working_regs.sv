// tb_working_regs: random clears, writes and reads of the four working
// registers, compared with a reference array kept in the testbench. Reads are
// combinational and see a write from the next clock on.
module tb_working_regs;
  import selfcal_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0;
  logic [1:0] wr_idx = 0, rd_a_idx = 0, rd_b_idx = 0;
  logic [WORK_W-1:0] wr_data = 0, rd_a, rd_b;
  logic [WORK_W-1:0] regs [NCODES];
  logic [WORK_W-1:0] model [NCODES];
  int checks = 0, failures = 0;

  working_regs dut (.clk, .rst_n, .clr, .wr_en, .wr_idx, .wr_data,
                    .rd_a_idx, .rd_b_idx, .rd_a, .rd_b, .regs);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [WORK_W-1:0] got, logic [WORK_W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < NCODES; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      rd_a_idx = 2'($urandom);
      rd_b_idx = 2'($urandom);
      #1;
      check("rd_a", rd_a, model[rd_a_idx]);
      check("rd_b", rd_b, model[rd_b_idx]);
      for (int i = 0; i < NCODES; i++) check("regs", regs[i], model[i]);
      clr     = ($urandom_range(0, 19) == 0);
      wr_en   = $urandom_range(0, 1);
      wr_idx  = 2'($urandom);
      wr_data = WORK_W'($urandom);
      @(posedge clk);
      if (clr) for (int i = 0; i < NCODES; i++) model[i] = '0;
      else if (wr_en) model[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
