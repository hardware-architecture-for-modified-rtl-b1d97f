// f_unit: combinational PLR f-function of two sign-magnitude indices.
//
// f(a,b) is the parity (check-node) combination of two soft values: its sign
// is the product of the two signs and its magnitude is the smaller input
// magnitude, corrected by ln(1+e^-|a+b|) - ln(1+e^-|a-b|). The two correction
// terms come from a small table in eighths of an index step and the result is
// rounded down, so the whole function is a few comparators, adders and a
// 7-entry table. The architecture computes f combinationally instead of
// reading the f-region of the look-up ROM; the exact correction table and
// rounding are this design's own choices.
//
// Interface: a, b in, y out, all 5-bit {sign, magnitude}. Purely combinational.
module f_unit
  import ldpc_pkg::*;
(
  input  sm5_t a,
  input  sm5_t b,
  output sm5_t y
);

  logic [3:0] mn, dif;
  logic [4:0] sum;
  logic [7:0] t;     // 8 * result, before rounding down
  logic [3:0] m;     // result magnitude: t / 8 (t never exceeds 8*15 + 6)

  function automatic logic [2:0] corr(logic [4:0] d);
    case (d)
      5'd0:       return 3'd6;
      5'd1:       return 3'd4;
      5'd2:       return 3'd3;
      5'd3:       return 3'd2;
      5'd4, 5'd5: return 3'd1;
      default:    return 3'd0;
    endcase
  endfunction

  always_comb begin
    mn  = (a[3:0] < b[3:0]) ? a[3:0] : b[3:0];
    dif = (a[3:0] > b[3:0]) ? a[3:0] - b[3:0] : b[3:0] - a[3:0];
    sum = {1'b0, a[3:0]} + {1'b0, b[3:0]};
    // 8*min + corr(sum) - corr(dif), floored at zero
    if ({1'b0, mn, 3'b000} + 8'(corr(sum)) < 8'(corr({1'b0, dif})))
      t = '0;
    else
      t = {1'b0, mn, 3'b000} + 8'(corr(sum)) - 8'(corr({1'b0, dif}));
    m = 4'(t >> 3);
    y = {(a[4] ^ b[4]) && (m != 4'd0), m};
  end

endmodule
