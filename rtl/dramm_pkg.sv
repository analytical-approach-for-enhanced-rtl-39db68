// dramm_pkg: types and constants shared by the dual-field residue arithmetic
// modular multiplier (DRAMM).
//
// The multiplier works on L residue channels ("lanes"). Each lane holds two
// moduli, one of base A and one of base B, so that RNS Montgomery multiplication
// can move values between the two bases. Every lane also keeps a small bank of
// host-loaded constants per base; the layout of that bank is fixed here as a
// function of L so that the controller, the lanes and the host agree on it.
// The layout, the register map and the command set are this design's own
// choices; the document only states which precomputed constants the
// conversions and the Montgomery algorithm need.
package dramm_pkg;

  // Field select: integers modulo m_j, or polynomials over GF(2) modulo m_j(x).
  typedef enum logic {
    FIELD_GFP  = 1'b0,
    FIELD_GF2N = 1'b1
  } field_e;

  // Commands accepted by the top level.
  typedef enum logic [2:0] {
    OP_B2R  = 3'd0,   // binary (L digits of R bits) -> residues in base A and base B
    OP_RMUL = 3'd1,   // channel-wise residue product, Eq. (1), in both bases
    OP_RMM  = 3'd2,   // RNS Montgomery multiplication, Algorithm 2
    OP_R2B  = 3'd3,   // mixed-radix conversion of the base-A residues + binary output
    OP_EXP  = 3'd4    // left-to-right square-and-multiply built on OP_RMM
  } op_e;

  // X operand of a lane MAC.
  typedef enum logic [1:0] {
    X_REG   = 2'd0,   // lane register rx
    X_BCAST = 2'd1,   // register rb of lane bsel, broadcast to all lanes
    X_EXT   = 2'd2    // external digit (binary-to-residue input)
  } xsel_e;

  // Y operand of a lane MAC.
  typedef enum logic {
    Y_REG   = 1'b0,   // lane register ry
    Y_CONST = 1'b1    // constant cidx of the selected base bank
  } ysel_e;

  // Addend of a lane MAC.
  typedef enum logic [1:0] {
    A_ZERO = 2'd0,
    A_ACC  = 2'd1,    // the lane accumulator
    A_REG  = 2'd2     // lane register ra
  } asel_e;

  // Lane register file: four pairs, each pair = (residue in base A, residue in base B).
  localparam int NREG   = 8;
  localparam int RIW    = 3;    // register index width
  localparam int CIW    = 6;    // constant index width (supports L up to 14)
  localparam int LIW    = 4;    // lane index width
  localparam int MAXL   = 16;
  localparam int R_SCRA = 6;    // scratch register in base A (s_A, v_A)
  localparam int R_SCRB = 7;    // scratch register (t_B, t_A, mixed-radix digits)

  // Constant bank layout of one base of lane j (m_j = that base's modulus).
  //   POW(i)   i in [0,L): <2^(R*i)>_{m_j} or <x^(R*i)>_{m_j}       Eq. (6), (8)
  //   MRCK(i)  i < j     : <-W_i * W_j^-1>_{m_j}                      Eq. (3), (4)
  //   BEXT(i)  i in [0,L): <W'_i>_{m_j}, W' of the other base         base extension
  //   WDIG(k)  k in [0,L): radix-2^R digit k of W_j                   residue-to-binary
  //   MRCINV             : <W_j^-1>_{m_j}
  //   NEGPINV            : <-p^-1>_{m_j}   (base B)                   Alg. 2 step 2
  //   PMOD               : <p>_{m_j}       (base A)                   Alg. 2 step 4
  //   QINV               : <Q^-1>_{m_j}    (base A, Q = prod of base B) Alg. 2 step 6
  //   MOD                : the modulus m_j itself (R+1 bits)
  function automatic int c_pow (int i);        return i;          endfunction
  function automatic int c_mrck(int l, int i); return l + i;      endfunction
  function automatic int c_bext(int l, int i); return 2*l + i;    endfunction
  function automatic int c_wdig(int l, int k); return 3*l + k;    endfunction
  function automatic int c_mrcinv (int l);     return 4*l;        endfunction
  function automatic int c_negpinv(int l);     return 4*l + 1;    endfunction
  function automatic int c_pmod   (int l);     return 4*l + 2;    endfunction
  function automatic int c_qinv   (int l);     return 4*l + 3;    endfunction
  function automatic int c_mod    (int l);     return 4*l + 4;    endfunction
  function automatic int c_depth  (int l);     return 4*l + 4;    endfunction

  // One step of the lane array, issued by the controller every cycle.
  typedef struct packed {
    logic              valid;    // update accumulators (and rd if wr) of enabled lanes
    logic              base;     // 0: base A modulus/bank, 1: base B
    xsel_e             xsel;
    ysel_e             ysel;
    asel_e             asel;
    logic [RIW-1:0]    rx;
    logic [RIW-1:0]    ry;
    logic [RIW-1:0]    ra;
    logic [RIW-1:0]    rd;
    logic              wr;
    logic [CIW-1:0]    cidx;
    logic [LIW-1:0]    bsel;     // lane that drives the broadcast bus
    logic [RIW-1:0]    rb;       // register read for the broadcast bus
    logic [MAXL-1:0]   lane_en;
  } mac_ctrl_t;

endpackage
