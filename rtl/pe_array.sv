// pe_array: a chain of eight SPIHT PEs (the upper or the lower PE array).
//
// The PEs are connected in the coding order of the cycle: PE 0 sees the
// array input, each further PE the stream and root flags left by the one
// before it. When encoding the input stream is zero and the array leaves its
// bits in the top cnt_o bits of stream_o, oldest bit lowest. When decoding
// stream_i holds the next bits of the compressed stream, oldest at bit 0, and
// the array consumes cnt_o of them. Splitting the sixteen PEs of a cycle into
// two arrays of eight keeps the stream each PE shifts short (W bits).
// Combinational; per-PE counts are brought out so that a bit budget can cut a
// cycle between two PEs.
module pe_array
  import ec_pkg::*;
#(
  parameter int unsigned NPE = 8,
  parameter int unsigned W   = PE_W
) (
  input  logic                  dec_i,
  input  pe_ctrl_t [NPE-1:0]    ctrl_i,
  input  logic [W-1:0]          stream_i,
  input  logic [2:0]            dn_i,
  input  logic [2:0]            ln_i,
  output logic [W-1:0]          stream_o,
  output logic [2:0]            dn_o,
  output logic [2:0]            ln_o,
  output pe_res_t [NPE-1:0]     res_o,
  output logic [$clog2(W+1)-1:0] cnt_o
);

  logic [W-1:0] s_chain [NPE+1];
  logic [2:0]   dn_chain[NPE+1];
  logic [2:0]   ln_chain[NPE+1];

  assign s_chain[0]  = stream_i;
  assign dn_chain[0] = dn_i;
  assign ln_chain[0] = ln_i;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    spiht_pe #(.W(W)) u_pe (
      .dec_i   (dec_i),
      .ctrl_i  (ctrl_i[i]),
      .stream_i(s_chain[i]),
      .dn_i    (dn_chain[i]),
      .ln_i    (ln_chain[i]),
      .stream_o(s_chain[i+1]),
      .dn_o    (dn_chain[i+1]),
      .ln_o    (ln_chain[i+1]),
      .res_o   (res_o[i])
    );
  end

  assign stream_o = s_chain[NPE];
  assign dn_o     = dn_chain[NPE];
  assign ln_o     = ln_chain[NPE];

  always_comb begin
    cnt_o = '0;
    for (int i = 0; i < NPE; i++) cnt_o = cnt_o + ($clog2(W+1))'(res_o[i].cnt);
  end

endmodule
