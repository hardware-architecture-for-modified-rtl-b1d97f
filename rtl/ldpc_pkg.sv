// ldpc_pkg: types, constants and arithmetic shared by the modified sequential
// LDPC decoder.
//
// Soft values are 5-bit sign-magnitude quantisation indices in the log
// domain: bit 4 is the sign (1 = negative, i.e. the bit is more likely a 1),
// bits 3:0 the magnitude 0..15. This design reads an index k as the
// log-likelihood ratio k/2 (step 0.5); the step is this design's choice.
// Extrinsic information is clipped to +/-7, all other sums saturate at +/-15.
//
// The code is four-dimensional: 1024 data bits, and in each dimension 256
// rows of 4 data bits plus one parity bit per row. The RAM address is
// {dim, var, col, row} (2+2+2+8 bits), the look-up address {opcode, op1, op2}
// (2+5+5 bits), both as the architecture defines them.
package ldpc_pkg;

  localparam int unsigned N_DIM    = 4;
  localparam int unsigned N_COL    = 4;
  localparam int unsigned N_ROW    = 256;
  localparam int unsigned N_DATA   = N_COL * N_ROW;   // 1024 data bits
  localparam int unsigned N_ITER   = 16;              // incl. the I/O iteration
  localparam int unsigned MAG_MAX  = 15;
  localparam int unsigned EXT_CLIP = 7;

  typedef logic [4:0] sm5_t;   // {sign, magnitude[3:0]}

  typedef enum logic [1:0] {
    OP_F    = 2'b00,   // f-function (combinational), ROM 000h..3FFh
    OP_ADD  = 2'b01,   // saturating addition,        ROM 400h..7FFh
    OP_CADD = 2'b10,   // clipped addition (+/-7),     ROM 800h..BFFh
    OP_SUB  = 2'b11    // saturating subtraction,     ROM C00h..FFFh
  } op_e;

  // "var" field of the RAM address
  typedef enum logic [1:0] {
    VAR_Q    = 2'b00,  // data value of this dimension (prior, then a-posteriori)
    VAR_EXT  = 2'b01,  // extrinsic information of this dimension
    VAR_MISC = 2'b10,  // per-row variables, selected by the col field
    VAR_TMP  = 2'b11   // f of the row's other three data values
  } var_e;

  // col field meaning when var = VAR_MISC
  localparam logic [1:0] MISC_D   = 2'd0;  // f of all four data values of the row
  localparam logic [1:0] MISC_FWD = 2'd1;  // horizontal forward metric of the row
  localparam logic [1:0] MISC_PAR = 2'd3;  // received parity value of the row

  typedef struct packed {
    logic [1:0] dim;
    var_e       vsel;
    logic [1:0] col;
    logic [7:0] row;
  } ram_addr_t;

  // data position: {dim, col, row}, the interleaver ROM's address and data
  typedef struct packed {
    logic [1:0] dim;
    logic [1:0] col;
    logic [7:0] row;
  } pos_t;

  function automatic int sm_to_int(sm5_t v);
    return v[4] ? -int'(v[3:0]) : int'(v[3:0]);
  endfunction

  function automatic sm5_t int_to_sm(int v, int lim);
    int m;
    m = (v < 0) ? -v : v;
    if (m > lim) m = lim;
    return {v < 0, 4'(m)};
  endfunction

  // 8 * ln(1 + exp(-d/2)), rounded: correction term of the f-function
  function automatic int f_corr(int d);
    case (d)
      0: return 6;
      1: return 4;
      2: return 3;
      3: return 2;
      4, 5: return 1;
      default: return 0;
    endcase
  endfunction

  // f(a,b): sign = product of signs, magnitude = min - corr(|a-b|) + corr(a+b)
  function automatic sm5_t f_func(sm5_t a, sm5_t b);
    int ma, mb, mn, t;
    ma = int'(a[3:0]);
    mb = int'(b[3:0]);
    mn = (ma < mb) ? ma : mb;
    t  = 8 * mn - f_corr((ma > mb) ? ma - mb : mb - ma) + f_corr(ma + mb);
    if (t < 0) t = 0;
    t = t / 8;
    return {(a[4] ^ b[4]) && (t != 0), 4'(t)};
  endfunction

  // contents of one look-up table entry
  function automatic sm5_t lut_value(op_e op, sm5_t a, sm5_t b);
    case (op)
      OP_F:    return f_func(a, b);
      OP_ADD:  return int_to_sm(sm_to_int(a) + sm_to_int(b), MAG_MAX);
      OP_CADD: return int_to_sm(sm_to_int(a) + sm_to_int(b), EXT_CLIP);
      default: return int_to_sm(sm_to_int(a) - sm_to_int(b), MAG_MAX);
    endcase
  endfunction

  // Natural data index of position i (= 4*row + col) in dimension k.
  // Dimension 0 is the natural order; dimensions 1..3 use quadratic
  // permutation polynomials P(i) = (F1*i + F2*i^2) mod 1024 (F1 odd,
  // F2 even, so each is a permutation of 0..1023).
  function automatic int unsigned perm(int unsigned k, int unsigned i);
    int unsigned f1, f2;
    case (k)
      1:       begin f1 = 31;  f2 = 64;  end
      2:       begin f1 = 127; f2 = 288; end
      3:       begin f1 = 63;  f2 = 160; end
      default: begin f1 = 1;   f2 = 0;   end
    endcase
    return (f1 * i + f2 * ((i * i) % N_DATA)) % N_DATA;
  endfunction

endpackage
