// add29: the shared 29-bit adder/subtractor of the calibration datapath.
// Every arithmetic step of a calibration cycle passes through it, one operation
// per clock: accumulating normalisation factors into the working registers while
// the histogram is taken, subtracting the expected bin contents, forming the
// calibrating codes, adding the codes already in use, and subtracting the offset
// register from the codes. The width and the role of the adder are as described;
// the three operations (a+b, a-b, b-a) are this design's choice so that both
// operand orders of a subtraction are available without an extra multiplexer.
// Purely combinational; results wrap modulo 2**W.
module add29
  import selfcal_pkg::*;
#(
  parameter int W = WORK_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  add_op_e      op,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_RSUB: y = b - a;
      default: y = a + b;
    endcase
  end

endmodule
