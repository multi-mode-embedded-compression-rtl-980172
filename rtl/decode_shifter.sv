// decode_shifter: hands the lower PE array the part of the compressed stream
// the upper PE array did not consume.
//
// win_i is the FIFO's look-ahead window (oldest bit at bit 0). The upper array
// decodes from its low W bits; the shifter drops the cnt_up_i bits it used and
// gives the next W bits to the lower array. Combinational; used only when
// decoding.
module decode_shifter #(
  parameter int unsigned W  = 24,
  parameter int unsigned CW = $clog2(W+1)
) (
  input  logic [2*W-1:0] win_i,
  input  logic [CW-1:0]  cnt_up_i,
  output logic [W-1:0]   lo_o
);

  assign lo_o = W'(win_i >> cnt_up_i);

endmodule
