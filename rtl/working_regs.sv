// working_regs: the four 29-bit working registers Reg1..Reg4 of the calibration
// datapath. While the histogram is taken each register accumulates the
// normalisation factor of its (folded) bin; afterwards the same registers hold
// the deviations and finally the new calibrating codes, so no other storage is
// needed. Two combinational read ports feed the two operands of the shared adder,
// one synchronous write port takes the adder result, and `clr` zeroes all four
// registers (it wins over a write). All four values are also brought out for the
// parallel load of the code registers. Reset clears them.
module working_regs
  import selfcal_pkg::*;
#(
  parameter int W = WORK_W,
  parameter int N = NCODES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  logic [W-1:0]         wr_data,
  input  logic [$clog2(N)-1:0] rd_a_idx,
  input  logic [$clog2(N)-1:0] rd_b_idx,
  output logic [W-1:0]         rd_a,
  output logic [W-1:0]         rd_b,
  output logic [W-1:0]         regs [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_idx] <= wr_data;
    end
  end

  assign rd_a = regs[rd_a_idx];
  assign rd_b = regs[rd_b_idx];

endmodule
