// tb_control_unit: the control unit alone, with the RAM, the arithmetic unit
// and the interleaver ROM replaced by testbench models built from the
// reference package. Runs two blocks with ITERS = 3 (two decoding
// iterations) and checks: no output before the first block, the decisions of
// the first block against the reference decoder, output order, the length of
// the initialisation and processing phases, in_ready only in the input
// phase, and the first/last iteration flags.
module tb_control_unit;
  import ldpc_ref_pkg::*;

  localparam int ITERS = 3;
  localparam int PROC_CYCLES = (ITERS - 1) * 4 * 256 * (19 + 29);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_bit, first_iter, last_iter, block_done;
  logic [4:0] in_llr, ram_wdata, ram_rdata, lut_a, lut_b, lut_y;
  logic [9:0] out_idx;
  logic [13:0] ram_addr;
  logic ram_we;
  logic [1:0] lut_op, dim;
  logic [3:0] iter;
  logic [11:0] il_addr, il_data;

  int checks = 0, failures = 0;

  control_unit #(.ITERS(ITERS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_bit, .out_idx,
    .ram_addr(ram_addr), .ram_we, .ram_wdata, .ram_rdata,
    .lut_op(lut_op), .lut_a, .lut_b, .lut_y,
    .il_addr(il_addr), .il_data(il_data),
    .first_iter, .last_iter, .iter, .dim, .block_done
  );

  always #5 clk = ~clk;

  // model RAM: registered read
  logic [4:0] mem [16384];
  always @(posedge clk) begin
    if (ram_we) mem[ram_addr] <= ram_wdata;
    ram_rdata <= mem[ram_addr];
  end

  // model arithmetic unit
  always_comb begin
    case (lut_op)
      2'd0: lut_y = to_sm(f(from_sm(lut_a), from_sm(lut_b)));
      2'd1: lut_y = to_sm(add(from_sm(lut_a), from_sm(lut_b)));
      2'd2: lut_y = to_sm(cadd(from_sm(lut_a), from_sm(lut_b)));
      default: lut_y = to_sm(sub(from_sm(lut_a), from_sm(lut_b)));
    endcase
  end

  // model interleaver ROM
  int inv [4][1024];
  initial for (int k = 0; k < 4; k++) for (int i = 0; i < 1024; i++) inv[k][P(k, i)] = i;
  always_comb begin
    int k, kp, i, j;
    k  = int'(il_addr[11:10]);
    i  = 4 * int'(il_addr[7:0]) + int'(il_addr[9:8]);
    kp = (k + 3) % 4;
    j  = inv[kp][P(k, i)];
    il_data = {2'(kp), 2'(j % 4), 8'(j / 4)};
  end

  initial begin
    repeat (3 * PROC_CYCLES + 100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  bits_t  data;
  pbits_t par;
  soft_t  ch;
  par_t   pch;
  bits_t  expd;
  stats_t st;
  bit     got [1024];
  int     nout, ndone, last_in_cyc, cyc, init_start, nready_bad;

  always @(posedge clk) cyc <= cyc + 1;

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (ndone == 0) begin failures++; $display("output before any block was decoded"); end
      if (int'(out_idx) != nout % 1024) begin
        failures++; $display("out_idx %0d expected %0d", out_idx, nout % 1024);
      end
      got[out_idx] = out_bit;
      nout++;
    end
    if (in_ready && !first_iter) nready_bad++;
    if (last_iter && iter != 4'(ITERS - 1)) nready_bad++;
    if (block_done) begin
      ndone++;
      checks++;
      if (cyc - last_in_cyc != 4096 + PROC_CYCLES + 1) begin
        failures++;
        $display("block took %0d cycles after its input, expected %0d",
                 cyc - last_in_cyc, 4096 + PROC_CYCLES + 1);
      end
    end
  end

  task automatic send_block();
    for (int n = 0; n < 2048; n++) begin
      in_valid = 1;
      in_llr = (n < 1024) ? to_sm(ch[n]) : to_sm(pch[(n - 1024) / 256][(n - 1024) % 256]);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    last_in_cyc = cyc - 1;
    in_valid = 0;
  endtask

  initial begin
    cyc = 0; nout = 0; ndone = 0; nready_bad = 0; in_valid = 0; in_llr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      for (int n = 0; n < 1024; n++) data[n] = bit'($urandom_range(0, 1));
      par = encode(data);
      for (int n = 0; n < 1024; n++) ch[n] = channel(data[n], 6.0, 4.5);
      for (int k = 0; k < 4; k++) for (int r = 0; r < 256; r++) pch[k][r] = channel(par[k][r], 6.0, 4.5);
      expd = decode(ch, pch, ITERS - 1, st);
      send_block();
      wait (ndone == b + 1);
      // the block's decisions come out before the next input is taken
      wait (nout == 1024 * (b + 1));
      @(posedge clk); #1;
      for (int n = 0; n < 1024; n++) begin
        checks++;
        if (got[n] != expd[n]) begin
          failures++;
          if (failures < 10) $display("block %0d bit %0d: got %0d expected %0d", b, n, got[n], expd[n]);
        end
      end
    end
    checks++;
    if (nready_bad != 0) begin failures++; $display("%0d status flag errors", nready_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
