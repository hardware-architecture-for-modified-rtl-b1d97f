// ldpc_seq_decoder: modified sequential decoder for a four-dimensional
// LDPC code of 1024 data bits and 4 x 256 parity bits (rate 1/2).
//
// The decoder works on log-domain soft values, 5-bit sign-magnitude indices
// (see ldpc_pkg). Its four units are connected as in a classic sequential
// decoder: the control unit (one FSM for the whole decoding schedule) drives
// a single-port RAM that holds every value of the block, one arithmetic unit
// built from a look-up ROM and a combinational f-function, and the
// interleaver ROM that turns a position in the current dimension into the
// RAM address of the same data bit in the previous dimension.
//
// Use: stream in 1024 data values (natural order), then 1024 parity values
// (dimension 0 rows 0..255, then dimensions 1, 2, 3), with in_valid/in_ready.
// The block is decoded with ITERS-1 iterations over the four dimensions.
// Its 1024 hard decisions (the sign of each final value) come out on
// out_valid/out_bit/out_idx, one per cycle and in natural order, in the
// input/output iteration that starts the next block; after them the decoder
// asks for the next block's input.
// Timing per block: 1024 + 2048 + 4096 cycles of input/output iteration (no
// input stalls) plus (ITERS-1) * 49152 processing cycles: 744 448 cycles at
// the default ITERS = 16.
module ldpc_seq_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned ITERS = N_ITER
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  sm5_t       in_llr,
  output logic       out_valid,
  output logic       out_bit,
  output logic [9:0] out_idx,
  output logic       first_iter,
  output logic       last_iter,
  output logic [3:0] iter,
  output logic [1:0] dim,
  output logic       block_done
);

  ram_addr_t ram_addr;
  logic      ram_we;
  sm5_t      ram_wdata, ram_rdata;
  op_e       lut_op;
  sm5_t      lut_a, lut_b, lut_y;
  pos_t      il_addr, il_data;

  control_unit #(.ITERS(ITERS)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_llr,
    .out_valid, .out_bit, .out_idx,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .lut_op, .lut_a, .lut_b, .lut_y,
    .il_addr, .il_data,
    .first_iter, .last_iter, .iter, .dim, .block_done
  );

  decoder_ram u_ram (
    .clk, .addr(ram_addr), .we(ram_we), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  lut_unit u_lut (.op(lut_op), .a(lut_a), .b(lut_b), .y(lut_y));

  interleaver_rom u_il (.addr(il_addr), .data(il_data));

endmodule
