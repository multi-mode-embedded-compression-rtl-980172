// encode_shifter: joins the bitstreams of the upper and lower PE arrays.
//
// Each array leaves its cnt bits at the top of a W-bit word, oldest bit
// lowest. The shifter right-aligns both and places the lower array's bits
// directly after the upper array's, giving one 2W-bit word with the oldest
// bit at bit 0 and cnt_up + cnt_lo valid bits, ready for the FIFO.
// Combinational; used only when encoding.
module encode_shifter #(
  parameter int unsigned W  = 24,
  parameter int unsigned CW = $clog2(W+1)
) (
  input  logic [W-1:0]      up_i,
  input  logic [CW-1:0]     cnt_up_i,
  input  logic [W-1:0]      lo_i,
  input  logic [CW-1:0]     cnt_lo_i,
  output logic [2*W-1:0]    data_o,
  output logic [CW:0]       cnt_o
);

  logic [2*W-1:0] up_al, lo_al;

  always_comb begin
    up_al  = (2*W)'(up_i >> (W - 32'(cnt_up_i)));
    lo_al  = (2*W)'(lo_i >> (W - 32'(cnt_lo_i)));
    data_o = up_al | (lo_al << cnt_up_i);
    cnt_o  = (CW+1)'(cnt_up_i) + (CW+1)'(cnt_lo_i);
  end

endmodule
