// reg_array: the 64-word register array between the DWT/IDWT and the
// bitplane register file.
//
// Holds one coding unit as sign-magnitude words ({sign, magnitude}, the sign
// in the top bit). All words can be read at once (words_o). Two write paths:
//  - word writes, NWP per cycle, used by the DWT (address + word), and
//  - plane writes, used when a decoded unit is moved in from the register
//    file: bit plane_idx_i of every word is loaded from plane_i.
// Word writes of the same cycle go to different addresses; a plane write is
// never issued together with word writes. Writes take effect at the clock edge.
module reg_array #(
  parameter int unsigned NWORD  = 64,
  parameter int unsigned WW     = 10,
  parameter int unsigned NWP    = 4,
  parameter int unsigned AW     = $clog2(NWORD),
  parameter int unsigned PW     = $clog2(WW)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NWP-1:0]              we_i,
  input  logic [NWP-1:0][AW-1:0]      waddr_i,
  input  logic [NWP-1:0][WW-1:0]      wdata_i,
  input  logic                        plane_we_i,
  input  logic [PW-1:0]               plane_idx_i,
  input  logic [NWORD-1:0]            plane_i,
  output logic [NWORD-1:0][WW-1:0]    words_o
);

  logic [NWORD-1:0][WW-1:0] mem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q <= '0;
    end else if (plane_we_i) begin
      for (int i = 0; i < NWORD; i++) mem_q[i][plane_idx_i] <= plane_i[i];
    end else begin
      for (int p = 0; p < NWP; p++)
        if (we_i[p]) mem_q[waddr_i[p]] <= wdata_i[p];
    end
  end

  assign words_o = mem_q;

endmodule
