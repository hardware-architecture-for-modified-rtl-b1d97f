// tb_ldpc_seq_decoder: end-to-end test of the whole decoder at its default
// size (1024 data bits, 4 dimensions, 16 iterations).
//
// Three encoded blocks pass through a noisy channel model and are streamed in
// with random input stalls. Each block's hard decisions are compared bit for
// bit with the reference decoder and with the transmitted data: the
// low-noise block must decode without error and the noisy blocks must
// end with fewer errors than the channel made. The time from a block's last
// input to its block_done is checked against the schedule. The test also
// counts how often each mechanism occurs (input stall, skipped output before
// the first block, extrinsic clipping, saturation, dimension and iteration
// changes, output of one block before the next one's input) and fails if one
// never does.
module tb_ldpc_seq_decoder;
  import ldpc_ref_pkg::*;

  localparam int PROC_CYCLES = 15 * 4 * 256 * (19 + 29);
  localparam int NBLK = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_bit, first_iter, last_iter, block_done;
  logic [4:0] in_llr;
  logic [9:0] out_idx;
  logic [3:0] iter;
  logic [1:0] dim;

  int checks = 0, failures = 0;

  ldpc_seq_decoder dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_bit, .out_idx,
    .first_iter, .last_iter, .iter, .dim, .block_done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NBLK * (PROC_CYCLES + 20000) + 50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bits_t  data [NBLK];
  bits_t  expd [NBLK];
  soft_t  ch;
  par_t   pch;
  pbits_t par;
  stats_t st;
  bit     got [1024];
  int     nout, ndone, last_in_cyc, cyc;
  int     n_stall, n_clip, n_sat, n_dimchg, n_iterchg, n_out_before_in, n_skip;
  logic [1:0] dim_q;
  logic [3:0] iter_q;
  bit     first_out_phase;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters, observed inside the decoder
  always @(posedge clk) if (rst_n) begin
    if (in_ready && !in_valid) n_stall++;
    if (dut.lut_op == ldpc_pkg::OP_CADD && dut.u_ctrl.ft[3:0] > 4'd7) n_clip++;
    if (dut.lut_op == ldpc_pkg::OP_ADD && !first_iter &&
        (from_sm(dut.lut_a) + from_sm(dut.lut_b) > 15 || from_sm(dut.lut_a) + from_sm(dut.lut_b) < -15))
      n_sat++;
    if (!first_iter && dim != dim_q) n_dimchg++;
    if (!first_iter && iter != iter_q && iter_q != 0) n_iterchg++;
    dim_q  <= dim;
    iter_q <= iter;
    // before the first block, the output phase must pass without output
    if (first_out_phase && in_ready) begin
      first_out_phase <= 0;
      if (nout == 0) n_skip++;
    end
    if (out_valid) begin
      checks++;
      if (int'(out_idx) != nout % 1024) begin
        failures++; $display("out_idx %0d expected %0d", out_idx, nout % 1024);
      end
      got[out_idx] = out_bit;
      nout++;
      if (out_idx == 10'd1023 && ndone < NBLK) n_out_before_in++;
    end
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
      // occasional stall of the input stream
      while ($urandom_range(0, 63) == 0) begin
        in_valid = 0;
        @(posedge clk); #1;
      end
      in_valid = 1;
      in_llr = (n < 1024) ? to_sm(ch[n]) : to_sm(pch[(n - 1024) / 256][(n - 1024) % 256]);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    last_in_cyc = cyc - 1;
    in_valid = 0;
  endtask

  real mu [NBLK]    = '{6.0, 10.0, 5.0};
  real sigma [NBLK] = '{4.5, 3.0, 4.5};

  initial begin
    int ch_err, dec_err, ref_err, clips, sats;
    cyc = 0; nout = 0; ndone = 0; in_valid = 0; in_llr = 0;
    n_stall = 0; n_clip = 0; n_sat = 0; n_dimchg = 0; n_iterchg = 0;
    n_out_before_in = 0; n_skip = 0; first_out_phase = 1;
    clips = 0; sats = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      ch_err = 0;
      for (int n = 0; n < 1024; n++) data[b][n] = bit'($urandom_range(0, 1));
      par = encode(data[b]);
      for (int n = 0; n < 1024; n++) begin
        ch[n] = channel(data[b][n], mu[b], sigma[b]);
        if ((ch[n] < 0) != data[b][n]) ch_err++;
      end
      for (int k = 0; k < 4; k++) for (int r = 0; r < 256; r++) pch[k][r] = channel(par[k][r], mu[b], sigma[b]);
      expd[b] = decode(ch, pch, 15, st);
      clips += st.clips;
      sats  += st.sats;
      send_block();
      wait (ndone == b + 1);
      wait (nout == 1024 * (b + 1));
      @(posedge clk); #1;
      dec_err = 0; ref_err = 0;
      for (int n = 0; n < 1024; n++) begin
        checks++;
        if (got[n] != expd[b][n]) begin
          failures++;
          if (ref_err < 5) $display("block %0d bit %0d: got %0d, reference %0d", b, n, got[n], expd[b][n]);
          ref_err++;
        end
        if (got[n] != data[b][n]) dec_err++;
      end
      $display("block %0d: channel errors %0d, decoded errors %0d, mismatches with reference %0d",
               b, ch_err, dec_err, ref_err);
      checks++;
      if (b == 1 && dec_err != 0) begin failures++; $display("low-noise block not decoded"); end
      checks++;
      if (ch_err > 0 && dec_err >= ch_err) begin failures++; $display("decoder did not reduce the errors"); end
    end
    $display("stalls %0d, skipped first output %0d, clips %0d (reference %0d), saturations %0d (reference at least %0d), dimension changes %0d, iteration changes %0d, outputs before next input %0d",
             n_stall, n_skip, n_clip, clips, n_sat, sats, n_dimchg, n_iterchg, n_out_before_in);
    checks++; if (n_stall == 0)  begin failures++; $display("no input stall"); end
    checks++; if (n_skip == 0)   begin failures++; $display("first output phase not skipped"); end
    checks++; if (n_clip == 0 || n_clip != clips) begin failures++; $display("clip count wrong"); end
    checks++; if (n_sat == 0)    begin failures++; $display("no saturation"); end
    checks++; if (n_dimchg != NBLK * 15 * 4 - NBLK) begin failures++; $display("dimension changes %0d", n_dimchg); end
    checks++; if (n_iterchg != NBLK * 14) begin failures++; $display("iteration changes %0d", n_iterchg); end
    checks++; if (n_out_before_in < NBLK - 1) begin failures++; $display("no block output before next input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
