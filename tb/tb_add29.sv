// tb_add29: random operands and operations on the shared 29-bit adder, compared
// with a reference computed in 64-bit arithmetic and reduced modulo 2**29.
module tb_add29;
  import selfcal_pkg::*;

  logic [WORK_W-1:0] a, b, y;
  add_op_e op;
  int checks = 0, failures = 0;

  add29 dut (.a, .b, .op, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ra, rb, exp_v;
    for (int i = 0; i < 3000; i++) begin
      ra = longint'($urandom) & ((64'd1 << WORK_W) - 1);
      rb = longint'($urandom) & ((64'd1 << WORK_W) - 1);
      if (i % 7 == 0) ra = (64'd1 << WORK_W) - 1;     // carry across the full width
      a  = WORK_W'(ra);
      b  = WORK_W'(rb);
      op = add_op_e'($urandom_range(0, 2));
      #1;
      case (op)
        OP_ADD:  exp_v = ra + rb;
        OP_SUB:  exp_v = ra - rb;
        default: exp_v = rb - ra;
      endcase
      exp_v &= (64'd1 << WORK_W) - 1;
      checks++;
      if (64'(y) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
