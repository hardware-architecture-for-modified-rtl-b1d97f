// decoder_ram: the decoder's single-port data RAM, 16384 x 5 bits.
//
// It holds everything the decoder keeps between steps: the received data and
// parity values, the extrinsic information of each dimension and the
// intermediate variables. The 14-bit address is {dim[13:12], var[11:10],
// col[9:8], row[7:0]} (ldpc_pkg::ram_addr_t); there is no iteration field, so
// all iterations share the same locations.
//
// Timing: one access per cycle. With we high, wdata is written at the rising
// edge. rdata is registered: it shows the word at the address presented in
// the previous cycle (the old contents on a write cycle). No reset; the
// controller writes every location before it reads it.
module decoder_ram
  import ldpc_pkg::*;
(
  input  logic      clk,
  input  ram_addr_t addr,
  input  logic      we,
  input  sm5_t      wdata,
  output sm5_t      rdata
);

  sm5_t mem [16384];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
