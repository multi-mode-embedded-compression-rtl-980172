// bitplane_rf: single-port register file holding one coding unit bitplane by
// bitplane.
//
// ROWS rows of NBIT bits: rows 0 .. ROWS-2 are the magnitude bitplanes
// (row k = bit k of every coefficient), row ROWS-1 holds the signs. One access
// per cycle: a write when en_i and we_i, otherwise a read when en_i, whose
// data appear on rdata_o after the clock edge. When en_i is low the file is
// idle and rdata_o keeps its value, so the file is read only once per
// bitplane.
module bitplane_rf #(
  parameter int unsigned ROWS = 10,
  parameter int unsigned NBIT = 64,
  parameter int unsigned AW   = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            en_i,
  input  logic            we_i,
  input  logic [AW-1:0]   addr_i,
  input  logic [NBIT-1:0] wdata_i,
  output logic [NBIT-1:0] rdata_o
);

  logic [NBIT-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (en_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end

endmodule
