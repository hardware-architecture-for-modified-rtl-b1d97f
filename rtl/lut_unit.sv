// lut_unit: the decoder's single arithmetic unit.
//
// One look-up per cycle: the opcode and two 5-bit operands form the ROM
// address. For the f-function (opcode 00) the result comes from the
// combinational f_unit instead of the ROM; the opcode drives the output
// multiplexer, as the architecture describes. Addition, clipped addition and
// subtraction come from the ROM.
//
// Interface: op, a, b in, y out. Combinational, no clock.
module lut_unit
  import ldpc_pkg::*;
(
  input  op_e  op,
  input  sm5_t a,
  input  sm5_t b,
  output sm5_t y
);

  sm5_t rom_y, f_y;

  lut_rom u_rom (.addr({op, a, b}), .data(rom_y));
  f_unit  u_f   (.a(a), .b(b), .y(f_y));

  assign y = (op == OP_F) ? f_y : rom_y;

endmodule
