// spiht_pe: one SPIHT processing element, shared by encoding and decoding.
//
// A PE codes one coefficient position of the current cycle. Up to four bits
// can belong to it, always in this order:
//   A  the own significance bit (LIP, LIS passes) or refinement bit (LSP),
//   S  the sign, only after an A bit of 1 when s_en is set,
//   B  a set-significance bit: Sn(D(x)) of a root or of a level-2 child,
//   C  for a root only, Sn(L(x)), coded when D(x) is significant.
// Whether A and B are coded may depend on the root flags (D and L set
// significance of the tree root) that travel with the bitstream along the
// chain; a root lane overwrites the flags of its slot.
//
// Encoding: the PE shifts the incoming stream right by its bit count and
// puts its own bits at the left (most significant) end; the oldest bit of the
// chain thus ends at the lowest occupied position. Decoding: the PE takes its
// bits from the right (least significant) end and shifts the stream right by
// the same count. The shift is the same in both directions, as the reuse of
// one PE for both requires; the bit count is worked out from the same
// conditions. Purely combinational.
module spiht_pe
  import ec_pkg::*;
#(
  parameter int unsigned W = PE_W
) (
  input  logic           dec_i,       // 1 = decoding
  input  pe_ctrl_t       ctrl_i,
  input  logic [W-1:0]   stream_i,
  input  logic [2:0]     dn_i,        // root D-set flags per tree slot
  input  logic [2:0]     ln_i,        // root L-set flags per tree slot
  output logic [W-1:0]   stream_o,
  output logic [2:0]     dn_o,
  output logic [2:0]     ln_o,
  output pe_res_t        res_o
);

  logic       a_en, b_en, c_en, s_en;
  logic       a_v, s_v, b_v, c_v, out_b, out_c;
  logic [2:0] cnt;
  localparam int unsigned PW = $clog2(W);
  logic [W-1:0]  own;   // own bits, oldest at bit 0
  logic [PW-1:0] pos;   // next free position in own / next stream bit

  always_comb begin
    a_en  = ctrl_i.a_base & (~ctrl_i.a_need_dn | dn_i[ctrl_i.slot]);
    b_en  = ctrl_i.b_base & (~ctrl_i.b_need_ln | ln_i[ctrl_i.slot]);
    pos   = '0;
    own   = '0;
    a_v   = 1'b0;
    s_v   = 1'b0;
    b_v   = 1'b0;
    c_v   = 1'b0;
    s_en  = 1'b0;
    c_en  = 1'b0;

    if (a_en) begin
      a_v = dec_i ? stream_i[pos] : ctrl_i.bit_e;
      own[pos] = a_v;
      pos = pos + PW'(1);
      s_en = ctrl_i.s_en & a_v;
      if (s_en) begin
        s_v = dec_i ? stream_i[pos] : ctrl_i.sign_e;
        own[pos] = s_v;
        pos = pos + PW'(1);
      end
    end
    if (b_en) begin
      b_v = dec_i ? stream_i[pos] : ctrl_i.bval_e;
      own[pos] = b_v;
      pos = pos + PW'(1);
    end
    out_b = ctrl_i.b_pre | (b_en & b_v);
    c_en  = ctrl_i.c_base & out_b;
    if (c_en) begin
      c_v = dec_i ? stream_i[pos] : ctrl_i.cval_e;
      own[pos] = c_v;
      pos = pos + PW'(1);
    end
    out_c = ctrl_i.c_pre | (c_en & c_v);
    cnt   = 3'(pos);

    stream_o = stream_i >> cnt;
    if (!dec_i) stream_o = stream_o | (own << (W - 32'(cnt)));

    dn_o = dn_i;
    ln_o = ln_i;
    if (ctrl_i.is_root) begin
      dn_o[ctrl_i.slot] = out_b;
      ln_o[ctrl_i.slot] = out_c;
    end

    res_o.a_en  = a_en;
    res_o.a_val = a_v;
    res_o.s_val = s_v;
    res_o.out_b = out_b;
    res_o.cnt   = cnt;
  end

endmodule
