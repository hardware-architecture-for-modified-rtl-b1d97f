// tb_interleaver_rom: every entry of the interleaver ROM must name the
// previous dimension and a position there that holds the same natural data
// bit; each dimension's table must be a permutation.
module tb_interleaver_rom;
  import ldpc_ref_pkg::*;

  logic [11:0] addr, data;
  int checks = 0, failures = 0;
  bit seen [4][1024];

  interleaver_rom dut (.addr(addr), .data(data));

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 1024; i++) begin
        int kp, j;
        addr = {2'(k), 2'(i % 4), 8'(i / 4)};
        #1;
        kp = int'(data[11:10]);
        j  = 4 * int'(data[7:0]) + int'(data[9:8]);
        checks++;
        if (kp != (k + 3) % 4 || P(kp, j) != P(k, i)) begin
          failures++;
          if (failures < 10) $display("dim %0d pos %0d -> dim %0d pos %0d wrong", k, i, kp, j);
        end
        checks++;
        if (seen[k][j]) begin
          failures++;
          $display("dim %0d: position %0d of dim %0d hit twice", k, j, kp);
        end
        seen[k][j] = 1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
