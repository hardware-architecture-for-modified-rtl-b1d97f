// lut_rom: 4096 x 5-bit look-up table ROM of the decoder's log-domain
// arithmetic.
//
// The address is {opcode[1:0], operand1[4:0], operand2[4:0]}; operands and
// result are sign-magnitude indices. Regions, as the architecture lays them
// out: 000h f-function, 400h saturating addition, 800h clipped addition
// (result limited to +/-7, used to clip extrinsic information), C00h
// saturating subtraction. The contents are computed at elaboration from the
// formulas in ldpc_pkg::lut_value (no data file). The read is asynchronous,
// so the ROM behaves like combinational logic; a registered ROM would add one
// cycle per look-up and is not needed by the controller schedule.
//
// Interface: addr in, data out. No clock.
module lut_rom
  import ldpc_pkg::*;
(
  input  logic [11:0] addr,
  output sm5_t        data
);

  sm5_t rom [4096];

  initial begin
    for (int i = 0; i < 4096; i++)
      rom[i] = lut_value(op_e'(i[11:10]), sm5_t'(i[9:5]), sm5_t'(i[4:0]));
  end

  assign data = rom[addr];

endmodule
