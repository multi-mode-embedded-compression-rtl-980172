// ec_pkg: types, constants and coefficient-geometry functions shared by the
// embedded-compression (EC) codec.
//
// A coding unit is one 8x8 block transformed by a two-level 2-D DWT and laid
// out as a pyramid: index = row*8 + col. The 2x2 LL2 group sits at rows/cols
// 0..1; (0,0) is a root without descendants, (0,1), (1,1) and (1,0) are the
// roots of trees 1, 2 and 3. Their offspring are the 2x2 groups of the level-2
// detail bands (rows/cols 0..3) and their grandchildren the 4x4 level-1 bands.
// Outside the LL2 group the parent of (r,c) is (r>>1, c>>1), so the whole
// unit holds four hierarchical trees of 1 + 3*21 = 64 coefficients.
//
// The SPIHT engine visits the unit in four cycles, one 4x4 quadrant per cycle
// (top-left, top-right, bottom-left, bottom-right), and inside a quadrant in
// Z (Morton) order; coef_index() gives that mapping.
package ec_pkg;

  localparam int unsigned N_COEF   = 64;  // coefficients of one coding unit
  localparam int unsigned PIX_W    = 8;   // pixel width
  localparam int unsigned MAG_BITS = 9;   // magnitude bitplanes of a coefficient
  localparam int unsigned COEF_W   = MAG_BITS + 1;  // sign-magnitude word
  localparam int unsigned N_LANE   = 16;  // PEs, one coefficient each per cycle
  localparam int unsigned PE_W     = 24;  // bitstream width through one PE array
  localparam int unsigned PE_MAXB  = 3;   // most bits one PE emits per cycle
  localparam int unsigned BUS_W    = 32;  // external bus word

  typedef enum logic [1:0] {
    PASS_LIP = 2'd0,   // insignificant pixels
    PASS_LIS = 2'd1,   // insignificant sets
    PASS_LSP = 2'd2    // refinement of significant pixels
  } pass_e;

  typedef enum logic [1:0] {
    RATE_LOSSLESS = 2'd0,  // whole bitstream
    RATE_HALF     = 2'd1,  // stop at CR = 2
    RATE_QUARTER  = 2'd2   // stop at CR = 4
  } rate_e;

  typedef enum logic [1:0] {
    ROLE_C0    = 2'd0,  // LL2 coefficient without descendants
    ROLE_ROOT  = 2'd1,  // tree root in LL2
    ROLE_CHILD = 2'd2,  // level-2 detail coefficient
    ROLE_GRAND = 2'd3   // level-1 detail coefficient
  } role_e;

  // Codec configuration, sampled at the start of every coding unit.
  typedef struct packed {
    rate_e      rate;   // rate control: lossless / half / quarter size
    logic [2:0] trunc;  // quality control: low bitplanes left out (0..7)
  } ec_cfg_t;

  // Per-lane control of one PE for one cycle (see spiht_pe).
  typedef struct packed {
    logic       a_base;     // own significance / refinement bit may be coded
    logic       a_need_dn;  // ... only if the tree root's D set is significant
    logic       s_en;       // a '1' significance bit is followed by the sign
    logic       b_base;     // set-significance bit may be coded
    logic       b_need_ln;  // ... only if the tree root's L set is significant
    logic       b_pre;      // set was already significant before this plane
    logic       c_base;     // root only: L-set bit may be coded
    logic       c_pre;      // root only: L set already significant
    logic       is_root;    // lane updates the root flags carried by the chain
    logic [1:0] slot;       // tree slot 0..2 (trees 1, 3, 2 in visiting order)
    logic       bit_e;      // encode value of the own bit
    logic       sign_e;     // encode value of the sign
    logic       bval_e;     // encode value of the set bit
    logic       cval_e;     // encode value of the L-set bit
  } pe_ctrl_t;

  // Per-lane result of one PE.
  typedef struct packed {
    logic       a_en;   // own bit was coded
    logic       a_val;  // own bit (encoded or decoded)
    logic       s_val;  // sign (encoded or decoded)
    logic       out_b;  // set significance after this plane
    logic [2:0] cnt;    // bits emitted / consumed
  } pe_res_t;

  function automatic logic [5:0] coef_index(input logic [1:0] q, input logic [3:0] p);
    logic [2:0] r, c;
    r = {q[1], p[3], p[1]};
    c = {q[0], p[2], p[0]};
    return {r, c};
  endfunction

  function automatic role_e role_of(input logic [5:0] idx);
    logic [2:0] r, c;
    r = idx[5:3];
    c = idx[2:0];
    if (r < 3'd2 && c < 3'd2) return (idx == 6'd0) ? ROLE_C0 : ROLE_ROOT;
    if (r < 3'd4 && c < 3'd4) return ROLE_CHILD;
    return ROLE_GRAND;
  endfunction

  function automatic logic [5:0] parent_of(input logic [5:0] idx);
    return {1'b0, idx[5:4], 1'b0, idx[2:1]};
  endfunction

  // Tree slot of a root, child or grandchild: 0 = tree1 (top-right),
  // 1 = tree3 (bottom-left), 2 = tree2 (bottom-right), i.e. the Z order of
  // the roots inside the LL2 group.
  function automatic logic [1:0] slot_of(input logic [5:0] idx);
    logic [5:0] a;
    if (role_of(idx) == ROLE_GRAND)      a = parent_of(parent_of(idx));
    else if (role_of(idx) == ROLE_CHILD) a = parent_of(idx);
    else                                 a = idx;
    case ({a[3], a[0]})
      2'b01:   return 2'd0;
      2'b10:   return 2'd1;
      2'b11:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  // Position 0..11 of a level-2 coefficient in the Z order of quadrant 0,
  // less the four LL2 lanes: index of its bit in the 12-bit D-flag state.
  function automatic logic [3:0] child_slot(input logic [5:0] idx);
    return {idx[4], idx[1], idx[3], idx[0]} - 4'd4;
  endfunction

  // D(x): all descendants of x.
  function automatic logic [N_COEF-1:0] dmask(input logic [5:0] x);
    logic [N_COEF-1:0] m;
    m = '0;
    for (int i = 0; i < N_COEF; i++) begin
      logic [5:0] y, p1, p2;
      y  = 6'(i);
      p1 = parent_of(y);
      p2 = parent_of(p1);
      if (role_of(y) == ROLE_CHILD && p1 == x && role_of(x) == ROLE_ROOT) m[i] = 1'b1;
      if (role_of(y) == ROLE_GRAND && p1 == x) m[i] = 1'b1;
      if (role_of(y) == ROLE_GRAND && p2 == x && role_of(x) == ROLE_ROOT) m[i] = 1'b1;
    end
    return m;
  endfunction

  // L(x): descendants of x that are not its offspring.
  function automatic logic [N_COEF-1:0] lmask(input logic [5:0] x);
    logic [N_COEF-1:0] m;
    m = '0;
    for (int i = 0; i < N_COEF; i++) begin
      logic [5:0] y;
      y = 6'(i);
      if (role_of(y) == ROLE_GRAND && parent_of(parent_of(y)) == x && role_of(x) == ROLE_ROOT)
        m[i] = 1'b1;
    end
    return m;
  endfunction

  // Bit budget of one coding unit for a rate mode (0 = unlimited).
  function automatic int unsigned unit_budget(input rate_e r);
    case (r)
      RATE_HALF:    return N_COEF * PIX_W / 2;
      RATE_QUARTER: return N_COEF * PIX_W / 4;
      default:      return 0;
    endcase
  endfunction

endpackage
