// control_unit: the single finite state machine of the modified sequential
// LDPC decoder.
//
// One FSM takes the place of the timing, iteration and dimension controllers.
// A block takes ITERS iterations. The first is the input/output iteration:
//   OUTPUT  read the previous block's final values (dimension 3) through the
//           deinterleaver and send out their sign bits, natural order,
//           one per cycle (skipped before the first block);
//   INPUT   accept 1024 data values, then 1024 parity values (dimension by
//           dimension, row by row), overwriting the previous block;
//   INIT    clear the extrinsic information of all four dimensions.
// Each further iteration runs the four dimensions one after the other, and
// each dimension makes two passes over its 256 rows:
//   FWD (rows 0..255, 19 cycles per row)  updating step merged with the
//       horizontal forward step. For each column the data value of the
//       previous dimension is read through the interleaver ROM and this
//       dimension's old extrinsic value is subtracted; the row's f of all
//       four values (D), the f of the other three for each column (TMP)
//       and the forward metric F_r = P_r + f(D_r, F_{r-1}) (F_0 = P_0 + D_0)
//       are written back.
//   BWD (rows 255..0, 29 cycles per row)  horizontal backward step merged with
//       the extrinsic calculation. The backward metric A_r (A_255 = P_255,
//       A_r = P_r + f(D_{r+1}, A_{r+1})) lives only in a register; the new
//       extrinsic value of each data bit is clip7(f(TMP, f(F_{r-1}, A_r)))
//       (f(TMP, A_0) in row 0) and the new data value is
//       q = sat15(prior + extrinsic). What is stored as this dimension's
//       extrinsic information is q - prior, the change actually applied, so
//       that the next iteration's subtraction restores the prior exactly even
//       when q saturated.
// After the last dimension of the last iteration the FSM returns to OUTPUT.
// The two-pass schedule, the per-row cycle schedules and the stream interface
// are this design's choices; the step order, the merging of the backward
// step into the extrinsic calculation, the clipping to +/-7 and the ITERS = 16
// iterations (one of them for input/output) follow the architecture.
//
// Interfaces (all synchronous to clk, active-low synchronous reset):
//   in_valid/in_ready/in_llr   input stream, a value is taken when both are high
//   out_valid/out_bit/out_idx  hard decisions, one per cycle, no back-pressure;
//                              out_bit is the sign bit of the RAM read data
//                              itself, valid while out_valid is high
//   ram_*   single-port RAM, read data one cycle after the address
//   lut_*   arithmetic unit, combinational
//   il_*    interleaver ROM, combinational
//   first_iter, last_iter, iter, dim, block_done  status
// Block timing: 1024 output + 2048 input (when the stream never stalls) +
// 4096 initialisation cycles, then (ITERS-1) * 4 * 256 * 48 processing cycles.
module control_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned ITERS = N_ITER
) (
  input  logic      clk,
  input  logic      rst_n,
  // input stream
  input  logic      in_valid,
  output logic      in_ready,
  input  sm5_t      in_llr,
  // decoded output
  output logic      out_valid,
  output logic      out_bit,
  output logic [9:0] out_idx,
  // RAM
  output ram_addr_t ram_addr,
  output logic      ram_we,
  output sm5_t      ram_wdata,
  input  sm5_t      ram_rdata,
  // arithmetic unit
  output op_e       lut_op,
  output sm5_t      lut_a,
  output sm5_t      lut_b,
  input  sm5_t      lut_y,
  // interleaver ROM
  output pos_t      il_addr,
  input  pos_t      il_data,
  // status
  output logic      first_iter,
  output logic      last_iter,
  output logic [3:0] iter,
  output logic [1:0] dim,
  output logic      block_done
);

  typedef enum logic [2:0] {ST_OUTPUT, ST_INPUT, ST_INIT, ST_FWD, ST_BWD} state_e;

  state_e      state;
  logic [11:0] cnt;         // word counter of the I/O iteration
  logic [7:0]  row;
  logic [4:0]  step;
  logic        have_block;  // a decoded block is waiting to be sent out

  // datapath registers
  sm5_t qv, par, dv, t, fprev, a_reg, v, tq, xq, ft, e, qn, p01, p23;
  sm5_t x [4];

  localparam sm5_t ZERO = 5'd0;

  // column handled in a BWD column step, and the step within it
  logic [1:0] bcol;
  logic [2:0] bsub;
  always_comb begin
    bcol = 2'((step - 5'd4) / 5'd6);
    bsub = 3'((step - 5'd4) % 5'd6);
  end

  // ---------------------------------------------------------------------
  // address, write and look-up generation
  // ---------------------------------------------------------------------
  always_comb begin
    ram_addr  = '{dim: dim, vsel: VAR_Q, col: 2'd0, row: row};
    ram_we    = 1'b0;
    ram_wdata = ZERO;
    lut_op    = OP_F;
    lut_a     = ZERO;
    lut_b     = ZERO;
    il_addr   = '{dim: dim, col: step[2:1], row: row};
    in_ready  = 1'b0;

    unique case (state)
      ST_OUTPUT: begin
        il_addr  = '{dim: 2'd0, col: cnt[1:0], row: cnt[9:2]};
        ram_addr = '{dim: il_data.dim, vsel: VAR_Q, col: il_data.col, row: il_data.row};
      end

      ST_INPUT: begin
        in_ready  = 1'b1;
        ram_we    = in_valid;
        ram_wdata = in_llr;
        il_addr   = '{dim: 2'd0, col: cnt[1:0], row: cnt[9:2]};
        if (!cnt[10])
          ram_addr = '{dim: il_data.dim, vsel: VAR_Q, col: il_data.col, row: il_data.row};
        else
          ram_addr = '{dim: cnt[9:8], vsel: VAR_MISC, col: MISC_PAR, row: cnt[7:0]};
      end

      ST_INIT: begin
        ram_we   = 1'b1;
        ram_addr = '{dim: cnt[11:10], vsel: VAR_EXT, col: cnt[9:8], row: cnt[7:0]};
      end

      ST_FWD: begin
        // even steps 0..6: previous dimension's value; odd steps 1..7: extrinsic
        if (step < 5'd8) begin
          if (!step[0])
            ram_addr = '{dim: il_data.dim, vsel: VAR_Q, col: il_data.col, row: il_data.row};
          else
            ram_addr = '{dim: dim, vsel: VAR_EXT, col: step[2:1], row: row};
        end
        lut_op = OP_SUB;
        lut_a  = qv;
        lut_b  = ram_rdata;
        case (step)
          5'd8:  ram_addr = '{dim: dim, vsel: VAR_MISC, col: MISC_PAR, row: row};
          5'd9:  begin lut_op = OP_F; lut_a = x[0]; lut_b = x[1]; end
          5'd10: begin lut_op = OP_F; lut_a = x[2]; lut_b = x[3]; end
          5'd11: begin lut_op = OP_F; lut_a = p01;  lut_b = p23;  end
          5'd12: begin lut_op = OP_F; lut_a = dv;   lut_b = fprev; end
          5'd13: begin lut_op = OP_F; lut_a = x[1]; lut_b = p23;  end
          5'd14: begin lut_op = OP_F; lut_a = x[0]; lut_b = p23;  end
          5'd15: begin lut_op = OP_F; lut_a = p01;  lut_b = x[3]; end
          5'd16: begin lut_op = OP_F; lut_a = p01;  lut_b = x[2]; end
          5'd18: begin lut_op = OP_ADD; lut_a = par; lut_b = (row == 8'd0) ? dv : t; end
          default: ;
        endcase
        if (step >= 5'd9 && step <= 5'd12) begin
          ram_we    = 1'b1;
          ram_addr  = '{dim: dim, vsel: VAR_Q, col: 2'(step - 5'd9), row: row};
          ram_wdata = x[2'(step - 5'd9)];
        end
        if (step >= 5'd13 && step <= 5'd16) begin
          ram_we    = 1'b1;
          ram_addr  = '{dim: dim, vsel: VAR_TMP, col: 2'(step - 5'd13), row: row};
          ram_wdata = lut_y;
        end
        if (step == 5'd17) begin
          ram_we    = 1'b1;
          ram_addr  = '{dim: dim, vsel: VAR_MISC, col: MISC_D, row: row};
          ram_wdata = dv;
        end
        if (step == 5'd18) begin
          ram_we    = 1'b1;
          ram_addr  = '{dim: dim, vsel: VAR_MISC, col: MISC_FWD, row: row};
          ram_wdata = lut_y;
        end
      end

      ST_BWD: begin
        case (step)
          5'd0: ram_addr = '{dim: dim, vsel: VAR_MISC, col: MISC_PAR, row: row};
          5'd1: ram_addr = '{dim: dim, vsel: VAR_MISC, col: MISC_FWD, row: row - 8'd1};
          5'd2: begin
            ram_addr = '{dim: dim, vsel: VAR_MISC, col: MISC_D, row: row};
            lut_op = OP_ADD; lut_a = par; lut_b = t;
          end
          5'd3: begin lut_op = OP_F; lut_a = fprev; lut_b = a_reg; end
          5'd28: begin lut_op = OP_F; lut_a = dv; lut_b = a_reg; end
          default: begin
            unique case (bsub)
              3'd0: ram_addr = '{dim: dim, vsel: VAR_TMP, col: bcol, row: row};
              3'd1: ram_addr = '{dim: dim, vsel: VAR_Q,   col: bcol, row: row};
              3'd2: begin lut_op = OP_F; lut_a = tq; lut_b = v; end
              3'd3: begin lut_op = OP_CADD; lut_a = ft; lut_b = ZERO; end
              3'd4: begin
                lut_op = OP_ADD; lut_a = xq; lut_b = e;
                ram_we = 1'b1; ram_wdata = lut_y;
                ram_addr = '{dim: dim, vsel: VAR_Q, col: bcol, row: row};
              end
              default: begin
                lut_op = OP_SUB; lut_a = qn; lut_b = xq;
                ram_we = 1'b1; ram_wdata = lut_y;
                ram_addr = '{dim: dim, vsel: VAR_EXT, col: bcol, row: row};
              end
            endcase
          end
        endcase
      end

      default: ;
    endcase
  end

  // ---------------------------------------------------------------------
  // sequencing and datapath registers
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_OUTPUT;
      cnt        <= '0;
      row        <= '0;
      step       <= '0;
      dim        <= '0;
      iter       <= '0;
      have_block <= 1'b0;
      out_valid  <= 1'b0;
      out_idx    <= '0;
      block_done <= 1'b0;
      {qv, par, dv, t, fprev, a_reg, v, tq, xq, ft, e, qn, p01, p23} <= '0;
      x <= '{default: ZERO};
    end else begin
      out_valid  <= 1'b0;
      block_done <= 1'b0;
      unique case (state)
        ST_OUTPUT: begin
          if (!have_block) begin
            state <= ST_INPUT;
          end else begin
            out_valid <= 1'b1;
            out_idx   <= cnt[9:0];
            if (cnt == 12'd1023) begin
              cnt   <= '0;
              state <= ST_INPUT;
            end else begin
              cnt <= cnt + 12'd1;
            end
          end
        end

        ST_INPUT: if (in_valid) begin
          if (cnt == 12'd2047) begin
            cnt   <= '0;
            state <= ST_INIT;
          end else begin
            cnt <= cnt + 12'd1;
          end
        end

        ST_INIT: begin
          if (cnt == 12'd4095) begin
            cnt   <= '0;
            state <= ST_FWD;
            iter  <= 4'd1;
            dim   <= '0;
            row   <= '0;
            step  <= '0;
          end else begin
            cnt <= cnt + 12'd1;
          end
        end

        ST_FWD: begin
          case (step)
            5'd1, 5'd3, 5'd5, 5'd7: qv <= ram_rdata;
            5'd2, 5'd4, 5'd6, 5'd8: x[2'(step[2:1] - 2'd1)] <= lut_y;
            5'd9:  begin par <= ram_rdata; p01 <= lut_y; end
            5'd10: p23 <= lut_y;
            5'd11: dv  <= lut_y;
            5'd12: t   <= lut_y;
            5'd18: fprev <= lut_y;
            default: ;
          endcase
          if (step == 5'd18) begin
            step <= '0;
            if (row == 8'd255) state <= ST_BWD;
            else               row   <= row + 8'd1;
          end else begin
            step <= step + 5'd1;
          end
        end

        ST_BWD: begin
          case (step)
            5'd1: par   <= ram_rdata;
            5'd2: begin
              fprev <= ram_rdata;
              a_reg <= (row == 8'd255) ? par : lut_y;
            end
            5'd3: begin
              dv <= ram_rdata;
              v  <= (row == 8'd0) ? a_reg : lut_y;
            end
            5'd28: t <= lut_y;
            default: begin
              unique case (bsub)
                3'd1: tq <= ram_rdata;
                3'd2: begin xq <= ram_rdata; ft <= lut_y; end
                3'd3: e  <= lut_y;
                3'd4: qn <= lut_y;
                default: ;
              endcase
            end
          endcase
          if (step == 5'd28) begin
            step <= '0;
            if (row != 8'd0) begin
              row <= row - 8'd1;
            end else if (dim != 2'd3) begin
              dim   <= dim + 2'd1;
              state <= ST_FWD;
            end else if (iter == 4'(ITERS - 1)) begin
              iter       <= '0;
              dim        <= '0;
              have_block <= 1'b1;
              block_done <= 1'b1;
              state      <= ST_OUTPUT;
            end else begin
              iter  <= iter + 4'd1;
              dim   <= '0;
              state <= ST_FWD;
            end
          end else begin
            step <= step + 5'd1;
          end
        end

        default: state <= ST_OUTPUT;
      endcase
    end
  end

  assign out_bit    = ram_rdata[4];
  assign first_iter = (state == ST_OUTPUT) || (state == ST_INPUT) || (state == ST_INIT);
  assign last_iter  = !first_iter && (iter == 4'(ITERS - 1));

  // the RAM is never written while results are being read out
  a_no_write_in_output: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_OUTPUT) |-> !ram_we);
  // row schedules stay within their lengths
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    ((state == ST_FWD) |-> (step <= 5'd18)) and ((state == ST_BWD) |-> (step <= 5'd28)));

  initial begin
    assert (ITERS >= 2 && ITERS <= 16) else $error("ITERS must be 2..16");
  end

endmodule
