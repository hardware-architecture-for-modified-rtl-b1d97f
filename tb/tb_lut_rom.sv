// tb_lut_rom: exhaustive test of all 4096 look-up entries (f-function, addition,
// clipped addition, subtraction) against integer reference arithmetic.
module tb_lut_rom;
  import ldpc_ref_pkg::*;

  logic [1:0] op;
  logic [4:0] a, b, y;
  int checks = 0, failures = 0;

  lut_rom dut (.addr({op, a, b}), .data(y));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      int ia, ib, ex;
      {op, a, b} = 12'(i);
      #1;
      ia = from_sm(a);
      ib = from_sm(b);
      case (op)
        2'd0: ex = f(ia, ib);
        2'd1: ex = add(ia, ib);
        2'd2: ex = cadd(ia, ib);
        default: ex = sub(ia, ib);
      endcase
      checks++;
      if (y !== to_sm(ex)) begin
        failures++;
        if (failures < 10) $display("op %0d (%0d,%0d): got %0d expected %0d", op, ia, ib, from_sm(y), ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
