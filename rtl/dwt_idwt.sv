// dwt_idwt: two-level 2-D DWT (encode) and IDWT (decode) of one 8x8 block,
// using the integer S-transform so that lossless coding is possible.
//
// One 2x2 step of the S-transform on pixels a0 b0 (upper row) and a1 b1:
//   row pass:    L = floor((a+b)/2),  H = a - b          (per row)
//   column pass: LL = floor((L0+L1)/2), VL = L0 - L1,
//                HL = floor((H0+H1)/2), HH = H0 - H1
// and the exact integer inverse. The S-transform has no overlap between
// blocks, so each 8x8 block of pixels yields exactly the four hierarchical
// trees of one coding unit. Output layout (index = row*8 + col): level-1 HL,
// VL, HH bands in the top-right, bottom-left and bottom-right 4x4 quadrants,
// level-2 bands in the same places of the top-left 4x4, LL2 in the top-left
// 2x2. Coefficients are written as sign-magnitude words {sign, |c|}; with
// 8-bit pixels |c| <= 510 fits nine magnitude bits.
//
// Encode: two horizontally adjacent pixels per cycle, raster order, while
// en_i (the register array is free). Odd rows complete a 2x2 step: its three
// detail words are written at once, LL1 is kept inside. After the 32 input
// cycles four cycles transform LL1 (one 2x2 group each, four writes), with
// blk_done_o high in the last of them: 36 cycles per block.
// Decode: after start_i, four cycles rebuild LL1 from the words, then 32
// cycles put out two pixels per cycle (valid/ready), raster order, clamped
// to 0..255; out_done_o is high with the last pair.
module dwt_idwt
  import ec_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          dec_i,
  // encode side
  input  logic                          en_i,
  input  logic                          pix_valid_i,
  input  logic [1:0][PIX_W-1:0]         pix_i,
  output logic                          pix_ready_o,
  output logic [3:0]                    we_o,
  output logic [3:0][5:0]               waddr_o,
  output logic [3:0][COEF_W-1:0]        wdata_o,
  output logic                          blk_done_o,
  // decode side
  input  logic                          start_i,
  input  logic [N_COEF-1:0][COEF_W-1:0] words_i,
  output logic                          pix_valid_o,
  output logic [1:0][PIX_W-1:0]         pix_o,
  input  logic                          pix_ready_i,
  output logic                          out_done_o,
  output logic                          busy_o      // a block is in progress
);

  typedef logic signed [11:0] sv_t;
  typedef struct packed { sv_t a0, b0, a1, b1; } quad_t;

  function automatic quad_t fwd2x2(input quad_t x);
    sv_t l0, l1, h0, h1;
    quad_t y;
    l0 = (x.a0 + x.b0) >>> 1;  h0 = x.a0 - x.b0;
    l1 = (x.a1 + x.b1) >>> 1;  h1 = x.a1 - x.b1;
    y.a0 = (l0 + l1) >>> 1;    // LL
    y.b0 = (h0 + h1) >>> 1;    // HL
    y.a1 = l0 - l1;            // VL
    y.b1 = h0 - h1;            // HH
    return y;
  endfunction

  function automatic quad_t inv2x2(input quad_t y);
    sv_t l0, l1, h0, h1;
    quad_t x;
    l1 = y.a0 - (y.a1 >>> 1);  l0 = l1 + y.a1;
    h1 = y.b0 - (y.b1 >>> 1);  h0 = h1 + y.b1;
    x.b0 = l0 - (h0 >>> 1);    x.a0 = x.b0 + h0;
    x.b1 = l1 - (h1 >>> 1);    x.a1 = x.b1 + h1;
    return x;
  endfunction

  function automatic logic [COEF_W-1:0] to_sm(input sv_t v);
    sv_t m;
    m = (v < 0) ? -v : v;
    return {v < 0, m[MAG_BITS-1:0]};
  endfunction

  function automatic sv_t from_sm(input logic [COEF_W-1:0] w);
    sv_t m;
    m = sv_t'({1'b0, w[MAG_BITS-1:0]});
    return w[MAG_BITS] ? -m : m;
  endfunction

  function automatic logic [PIX_W-1:0] clamp(input sv_t v);
    if (v < 0)   return '0;
    if (v > 255) return 8'd255;
    return v[PIX_W-1:0];
  endfunction

  function automatic logic [5:0] rc(input logic [2:0] r, input logic [2:0] c);
    return {r, c};
  endfunction

  typedef enum logic [2:0] {D_IN, D_L2, I_IDLE, I_L2, I_OUT} st_e;

  st_e        st_q;
  logic [4:0] cnt_q;
  sv_t        ll1_q [4][4];
  sv_t        rb_q  [4][2];

  logic [2:0] row;
  logic [1:0] pair;
  logic       gi, gj;
  quad_t      qin, qout;
  logic       hs_in, hs_out;

  assign row  = cnt_q[4:2];
  assign pair = cnt_q[1:0];
  assign gi   = cnt_q[1];
  assign gj   = cnt_q[0];

  assign pix_ready_o = !dec_i && en_i && (st_q == D_IN);
  assign hs_in       = pix_ready_o && pix_valid_i;
  assign pix_valid_o = dec_i && (st_q == I_OUT);
  assign hs_out      = pix_valid_o && pix_ready_i;
  assign blk_done_o  = (st_q == D_L2) && (cnt_q == 5'd3);
  assign out_done_o  = hs_out && (cnt_q == 5'd31);
  assign busy_o      = (st_q == D_IN) ? (cnt_q != 5'd0) : (st_q != I_IDLE);

  always_comb begin
    we_o    = '0;
    waddr_o = '0;
    wdata_o = '0;
    qin     = '0;
    qout    = '0;
    pix_o   = '0;
    unique case (st_q)
      D_IN: begin
        qin.a0 = rb_q[pair][0];
        qin.b0 = rb_q[pair][1];
        qin.a1 = sv_t'({4'b0, pix_i[0]});
        qin.b1 = sv_t'({4'b0, pix_i[1]});
        qout = fwd2x2(qin);
        if (hs_in && row[0]) begin
          we_o       = 4'b0111;
          waddr_o[0] = rc({1'b0, row[2:1]}, {1'b1, pair});      // HL1
          wdata_o[0] = to_sm(qout.b0);
          waddr_o[1] = rc({1'b1, row[2:1]}, {1'b0, pair});    // VL1
          wdata_o[1] = to_sm(qout.a1);
          waddr_o[2] = rc({1'b1, row[2:1]}, {1'b1, pair}); // HH1
          wdata_o[2] = to_sm(qout.b1);
        end
      end
      D_L2: begin
        qin  = '{a0: ll1_q[{gi, 1'b0}][{gj, 1'b0}], b0: ll1_q[{gi, 1'b0}][{gj, 1'b1}],
                 a1: ll1_q[{gi, 1'b1}][{gj, 1'b0}], b1: ll1_q[{gi, 1'b1}][{gj, 1'b1}]};
        qout = fwd2x2(qin);
        we_o       = 4'b1111;
        waddr_o[0] = rc({2'b00, gi}, {2'b00, gj});           wdata_o[0] = to_sm(qout.a0);
        waddr_o[1] = rc({2'b00, gi}, {2'b01, gj});       wdata_o[1] = to_sm(qout.b0);
        waddr_o[2] = rc({2'b01, gi}, {2'b00, gj});       wdata_o[2] = to_sm(qout.a1);
        waddr_o[3] = rc({2'b01, gi}, {2'b01, gj});   wdata_o[3] = to_sm(qout.b1);
      end
      I_L2: begin
        qin  = '{a0: from_sm(words_i[rc({2'b00, gi}, {2'b00, gj})]),     b0: from_sm(words_i[rc({2'b00, gi}, {2'b01, gj})]),
                 a1: from_sm(words_i[rc({2'b01, gi}, {2'b00, gj})]), b1: from_sm(words_i[rc({2'b01, gi}, {2'b01, gj})])};
        qout = inv2x2(qin);
      end
      I_OUT: begin
        qin  = '{a0: ll1_q[row[2:1]][pair],
                 b0: from_sm(words_i[rc({1'b0, row[2:1]}, {1'b1, pair})]),
                 a1: from_sm(words_i[rc({1'b1, row[2:1]}, {1'b0, pair})]),
                 b1: from_sm(words_i[rc({1'b1, row[2:1]}, {1'b1, pair})])};
        qout = inv2x2(qin);
        if (!row[0]) pix_o = '{clamp(qout.b0), clamp(qout.a0)};
        else         pix_o = '{clamp(rb_q[pair][1]), clamp(rb_q[pair][0])};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= D_IN;
      cnt_q      <= '0;
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) ll1_q[i][j] <= '0;
        rb_q[i][0] <= '0;
        rb_q[i][1] <= '0;
      end
    end else begin
      unique case (st_q)
        D_IN: begin
          if (dec_i) begin
            st_q  <= I_IDLE;
            cnt_q <= '0;
          end else if (hs_in) begin
            if (!row[0]) begin
              rb_q[pair][0] <= sv_t'({4'b0, pix_i[0]});
              rb_q[pair][1] <= sv_t'({4'b0, pix_i[1]});
            end else begin
              ll1_q[row[2:1]][pair] <= qout.a0;
            end
            cnt_q <= cnt_q + 5'd1;
            if (cnt_q == 5'd31) begin
              st_q  <= D_L2;
              cnt_q <= '0;
            end
          end
        end
        D_L2: begin
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'd3) begin
            st_q       <= D_IN;
            cnt_q      <= '0;
          end
        end
        I_IDLE: begin
          if (!dec_i) begin
            st_q  <= D_IN;
            cnt_q <= '0;
          end else if (start_i) begin
            st_q  <= I_L2;
            cnt_q <= '0;
          end
        end
        I_L2: begin
          ll1_q[{gi, 1'b0}][{gj, 1'b0}] <= qout.a0;
          ll1_q[{gi, 1'b0}][{gj, 1'b1}] <= qout.b0;
          ll1_q[{gi, 1'b1}][{gj, 1'b0}] <= qout.a1;
          ll1_q[{gi, 1'b1}][{gj, 1'b1}] <= qout.b1;
          cnt_q <= cnt_q + 5'd1;
          if (cnt_q == 5'd3) begin
            st_q  <= I_OUT;
            cnt_q <= '0;
          end
        end
        I_OUT: begin
          if (hs_out) begin
            if (!row[0]) begin
              rb_q[pair][0] <= qout.a1;
              rb_q[pair][1] <= qout.b1;
            end
            cnt_q <= cnt_q + 5'd1;
            if (cnt_q == 5'd31) begin
              st_q       <= I_IDLE;
              cnt_q      <= '0;
            end
          end
        end
        default: st_q <= D_IN;
      endcase
    end
  end

endmodule
