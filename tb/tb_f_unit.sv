// tb_f_unit: exhaustive test of the combinational f-function.
// Every operand pair is compared with the reference model, and the result is
// checked to lie within one index step of the exact box-plus value.
module tb_f_unit;
  import ldpc_ref_pkg::*;

  logic [4:0] a, b, y;
  int checks = 0, failures = 0;

  f_unit dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        real ex;
        a = 5'(i); b = 5'(j);
        #1;
        checks++;
        if (from_sm(y) != f(from_sm(a), from_sm(b))) begin
          failures++;
          if (failures < 10) $display("f(%0d,%0d) = %0d, expected %0d",
            from_sm(a), from_sm(b), from_sm(y), f(from_sm(a), from_sm(b)));
        end
        checks++;
        ex = boxplus(from_sm(a), from_sm(b));
        if (real'(from_sm(y)) - ex > 1.0 || ex - real'(from_sm(y)) > 1.0) begin
          failures++;
          $display("f(%0d,%0d) = %0d too far from %f", from_sm(a), from_sm(b), from_sm(y), ex);
        end
        checks++;
        if (y == 5'b10000) begin
          failures++;
          $display("negative zero from f(%0d,%0d)", from_sm(a), from_sm(b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
