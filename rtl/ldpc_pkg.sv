// ldpc_pkg: message formats, check-row record and number conversions shared by
// the shift-LDPC min-sum decoder.
//
// Messages between variable node processors (VPU) and check node processors
// (CPU) are 4-bit sign-magnitude words: one sign bit and a 3-bit magnitude.
// Each CPU keeps a 12-bit record per check row: minimum (3 bit), second
// minimum (3 bit), index of the minimum (5 bit) and the XOR of all signs
// (1 bit). These field widths are the ones of the register map of the design;
// the 5-bit index limits the row weight t to at most 32.
//
// Inside the VPU, values are 6-bit: StoT turns a 4-bit sign-magnitude word
// into two's complement, TtoS turns a two's complement sum back into sign and
// 5-bit magnitude, and Scale applies the min-sum scaling factor alpha and
// saturates to the 3-bit message magnitude. The value of alpha (3/4) and the
// symmetric saturation of TtoS are this design's choices.
package ldpc_pkg;

  localparam int MAG_W  = 3;   // message magnitude bits
  localparam int IDX_W  = 5;   // index field of the check-row record
  localparam int VAL_W  = 6;   // VPU internal value width
  localparam int SUM_W  = 9;   // VPU adder width: wide enough for 1 + 8 terms

  localparam logic [MAG_W-1:0] MAG_MAX = '1;

  // Scaling factor alpha = ALPHA_NUM / 2**ALPHA_SHIFT
  localparam int ALPHA_NUM   = 3;
  localparam int ALPHA_SHIFT = 2;

  typedef struct packed {
    logic             sgn;   // 1 = negative
    logic [MAG_W-1:0] mag;
  } msg_t;

  // Check-row record kept in Reg_new / Reg_old
  typedef struct packed {
    logic [MAG_W-1:0] min1;
    logic [MAG_W-1:0] min2;
    logic [IDX_W-1:0] idx;
    logic             sgn;   // XOR of the signs seen so far
  } crec_t;

  localparam crec_t CREC_INIT = '{min1: MAG_MAX, min2: MAG_MAX, idx: '0, sgn: 1'b0};
  localparam crec_t CREC_ZERO = '{min1: '0, min2: '0, idx: '0, sgn: 1'b0};

  // StoT: sign-magnitude message to two's complement, sign-extended to SUM_W
  function automatic logic signed [SUM_W-1:0] s2t(msg_t m);
    logic signed [SUM_W-1:0] v;
    v = signed'({{(SUM_W-MAG_W){1'b0}}, m.mag});
    return m.sgn ? -v : v;
  endfunction

  // Saturate a wide sum to the symmetric VPU range [-(2^(VAL_W-1)-1), 2^(VAL_W-1)-1]
  function automatic logic signed [VAL_W-1:0] sat_val(logic signed [SUM_W-1:0] v);
    localparam logic signed [SUM_W-1:0] HI = SUM_W'((1 << (VAL_W-1)) - 1);
    if (v > HI)  return VAL_W'(HI);
    if (v < -HI) return VAL_W'(-HI);
    return VAL_W'(v);
  endfunction

  // TtoS followed by Scale: 6-bit two's complement to a 4-bit message
  function automatic msg_t t2s_scale(logic signed [VAL_W-1:0] v);
    logic [VAL_W-2:0] mag5;
    logic [VAL_W+1:0] prod;
    msg_t o;
    mag5  = v[VAL_W-1] ? (VAL_W-1)'(-v) : v[VAL_W-2:0];
    prod  = (VAL_W+2)'(mag5) * (VAL_W+2)'(ALPHA_NUM);
    prod  = prod >> ALPHA_SHIFT;
    o.sgn = v[VAL_W-1];
    o.mag = (prod > (VAL_W+2)'(MAG_MAX)) ? MAG_MAX : prod[MAG_W-1:0];
    return o;
  endfunction

  // Column permutation of the leftmost cell of block row r:
  //   row(x) = (a_r * x + b_r) mod P,  a_r = 58*r + 7 (odd), b_r = 53*r + 11.
  // Any odd a_r gives a permutation when P is a power of two.
  function automatic int unsigned perm(int unsigned r, int unsigned x, int unsigned p);
    return ((58 * r + 7) * x + 53 * r + 11) % p;
  endfunction

endpackage
