// interleaver_rom: interleavers and deinterleaver of the four-dimensional
// code, as one 4096 x 12-bit ROM.
//
// Address: a data position in the current dimension, {dim, col, row}. Data:
// the position of the same data bit in the previous dimension, again
// {dim, col, row}; the previous dimension of dimension 0 is dimension 3 of
// the previous iteration. The controller reads the previous dimension's data
// value through this ROM, so no separate shuffle pass over the block is
// needed.
//
// Position i = 4*row + col of dimension k holds natural data bit
// P_k(i) (ldpc_pkg::perm; P_0 is the identity). Entry (k, i) therefore holds
// P_{k-1}^-1(P_k(i)). Since P_0 is the identity, the dimension-0 table maps a
// natural bit index to its place in dimension 3 and doubles as the
// deinterleaver used when the block is written in and read out. The
// permutation polynomials are this design's choice. Contents are computed at
// elaboration; the read is asynchronous.
//
// Interface: addr in, data out. No clock.
module interleaver_rom
  import ldpc_pkg::*;
(
  input  pos_t addr,
  output pos_t data
);

  pos_t rom [4096];

  initial begin
    int unsigned inv [N_DIM][N_DATA];
    for (int unsigned k = 0; k < N_DIM; k++)
      for (int unsigned i = 0; i < N_DATA; i++)
        inv[k][perm(k, i)] = i;
    for (int unsigned k = 0; k < N_DIM; k++)
      for (int unsigned i = 0; i < N_DATA; i++) begin
        logic [1:0] kp;
        logic [9:0] j;
        kp = k[1:0] - 2'd1;
        j  = 10'(inv[kp][perm(k, i)]);
        rom[{k[1:0], i[1:0], i[9:2]}] = {kp, j[1:0], j[9:2]};
      end
  end

  assign data = rom[addr];

endmodule
