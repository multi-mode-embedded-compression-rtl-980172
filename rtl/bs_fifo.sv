// bs_fifo: bitstream buffer between the SPIHT engine and the external bus.
//
// Holds up to CAP bits in a shift register, oldest bit at bit 0, level_o of
// them valid; the bits above level_o are always zero.
// Encoding (dec_i = 0): a push adds the eng_cnt_i low bits of eng_data_i
// after the bits held. As soon as BUS_W bits or more are held a word is
// offered on the bus output (valid/ready); a word leaves in the cycle it is
// accepted. The engine must push no more than space_o bits.
// Decoding (dec_i = 1): bus words are accepted while BUS_W bits of room are
// free; win_o shows the oldest IN_W bits and the engine removes eng_cnt_i of
// them with eng_valid_i. It must remove no more than level_o bits.
// A push/pop and a bus transfer may happen in the same cycle.
module bs_fifo #(
  parameter int unsigned BUS_W = 32,
  parameter int unsigned IN_W  = 48,
  parameter int unsigned CAP   = 128,
  parameter int unsigned LW    = $clog2(CAP+1),
  parameter int unsigned NW    = $clog2(IN_W+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dec_i,
  // engine side
  input  logic              eng_valid_i,
  input  logic [IN_W-1:0]   eng_data_i,
  input  logic [NW-1:0]     eng_cnt_i,
  output logic [IN_W-1:0]   win_o,
  output logic [LW-1:0]     level_o,
  output logic [LW-1:0]     space_o,
  // external bus, decode direction
  input  logic              bus_in_valid_i,
  input  logic [BUS_W-1:0]  bus_in_data_i,
  output logic              bus_in_ready_o,
  // external bus, encode direction
  output logic              bus_out_valid_o,
  output logic [BUS_W-1:0]  bus_out_data_o,
  input  logic              bus_out_ready_i
);

  logic [CAP-1:0] bits_q, bits_d;
  logic [LW-1:0]  level_q, level_d;
  logic [CAP-1:0] ins;
  logic [LW-1:0]  take, add;

  assign win_o           = bits_q[IN_W-1:0];
  assign level_o         = level_q;
  assign space_o         = LW'(CAP) - level_q;
  assign bus_out_data_o  = bits_q[BUS_W-1:0];
  assign bus_out_valid_o = !dec_i && (level_q >= LW'(BUS_W));
  assign bus_in_ready_o  = dec_i && (level_q <= LW'(CAP - BUS_W));

  always_comb begin
    take = '0;
    add  = '0;
    ins  = '0;
    if (dec_i) begin
      if (eng_valid_i) take = LW'(eng_cnt_i);
      if (bus_in_valid_i && bus_in_ready_o) begin
        add = LW'(BUS_W);
        ins = CAP'(bus_in_data_i);
      end
    end else begin
      if (bus_out_valid_o && bus_out_ready_i) take = LW'(BUS_W);
      if (eng_valid_i) begin
        add = LW'(eng_cnt_i);
        ins = CAP'(eng_data_i) & ~({CAP{1'b1}} << eng_cnt_i);
      end
    end
    bits_d  = (bits_q >> take) | (ins << (level_q - take));
    level_d = level_q - take + add;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q  <= '0;
      level_q <= '0;
    end else begin
      bits_q  <= bits_d;
      level_q <= level_d;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !dec_i && eng_valid_i |-> LW'(eng_cnt_i) <= space_o)
    else $error("bs_fifo: push beyond capacity");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    dec_i && eng_valid_i |-> LW'(eng_cnt_i) <= level_o)
    else $error("bs_fifo: pop beyond level");

endmodule
