// ec_codec: multi-mode embedded compression (EC) codec engine.
//
// Compresses video data block by block before it goes to external memory and
// restores it on the way back, so that the external traffic shrinks by the
// compression ratio. A coding unit is one 8x8 block (a 4:2:0 macroblock is
// six of them: four Y, one U, one V); it is transformed by a two-level
// integer DWT and coded with a list-free SPIHT (set partitioning in
// hierarchical trees) engine, bitplane by bitplane. One algorithm gives all
// modes, chosen per unit by cfg_i:
//   lossless       the whole embedded bitstream,
//   half / quarter the stream of each unit cut at 256 / 128 bits (CR 2 / 4),
//   quality layers cfg_i.trunc low bitplanes (0..7) left out.
//
// Datapath (encode; decode runs the other way through the same blocks):
//   pixels -> dwt_idwt -> reg_array (64 words) -> ec_control transfer
//   (word to bitplane) -> bitplane_rf (10 x 64) -> spiht_engine (16 PEs)
//   -> bs_fifo -> 32-bit bus words.
// The DWT of unit n+1 overlaps the SPIHT coding of unit n (four-tree
// pipelining), so only two units are held: one in the array, one in the
// register file.
//
// Interface: dec_i selects decoding and may change only while idle_o is
// high. Pixels enter (encode) or leave (decode) two per cycle, raster order
// inside each 8x8 block, with valid/ready. The bitstream leaves (encode) or
// enters (decode) as 32-bit words, oldest bit in bit 0, with valid/ready;
// every unit's stream is padded to a whole word. unit_done_o pulses when the
// engine has finished a unit. The status outputs mark events for monitoring.
module ec_codec
  import ec_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  dec_i,
  input  ec_cfg_t               cfg_i,
  // pixels into the encoder
  input  logic                  pix_in_valid_i,
  input  logic [1:0][PIX_W-1:0] pix_in_i,
  output logic                  pix_in_ready_o,
  // pixels out of the decoder
  output logic                  pix_out_valid_o,
  output logic [1:0][PIX_W-1:0] pix_out_o,
  input  logic                  pix_out_ready_i,
  // bitstream into the decoder
  input  logic                  bs_in_valid_i,
  input  logic [BUS_W-1:0]      bs_in_i,
  output logic                  bs_in_ready_o,
  // bitstream out of the encoder
  output logic                  bs_out_valid_o,
  output logic [BUS_W-1:0]      bs_out_o,
  input  logic                  bs_out_ready_i,
  // status
  output logic                  unit_done_o,
  output logic                  idle_o,
  output logic                  stall_o,     // SPIHT cycle waited for the FIFO
  output logic                  budget_o,    // last unit ended on its bit budget
  output logic                  bubble_o,    // word/bitplane transfer cycle
  output logic [15:0]           unit_bits_o  // bits of the current unit
);

  localparam int unsigned FCAP = 128;
  localparam int unsigned FLW  = $clog2(FCAP + 1);

  // DWT / register array
  logic                          dwt_en, dwt_done, dwt_busy, idwt_start, idwt_done;
  logic [3:0]                    a_we;
  logic [3:0][5:0]               a_waddr;
  logic [3:0][COEF_W-1:0]        a_wdata;
  logic [N_COEF-1:0][COEF_W-1:0] words;
  logic                          plane_we;
  logic [3:0]                    plane_idx;

  // register file
  logic              rf_en, rf_we, c_rf_en, c_rf_we, e_rf_en, e_rf_we, xfer;
  logic [3:0]        rf_addr, c_rf_addr, e_rf_addr;
  logic [N_COEF-1:0] rf_wdata, c_rf_wdata, e_rf_wdata, rf_rdata;

  // engine / FIFO
  logic              eng_start, eng_busy, eng_done;
  logic              f_valid;
  logic [2*PE_W-1:0] f_data, f_win;
  logic [5:0]        f_cnt;
  logic [FLW-1:0]    f_level, f_space;

  dwt_idwt u_dwt (
    .clk(clk), .rst_n(rst_n), .dec_i(dec_i),
    .en_i(dwt_en), .pix_valid_i(pix_in_valid_i), .pix_i(pix_in_i), .pix_ready_o(pix_in_ready_o),
    .we_o(a_we), .waddr_o(a_waddr), .wdata_o(a_wdata), .blk_done_o(dwt_done),
    .start_i(idwt_start), .words_i(words),
    .pix_valid_o(pix_out_valid_o), .pix_o(pix_out_o), .pix_ready_i(pix_out_ready_i),
    .out_done_o(idwt_done), .busy_o(dwt_busy)
  );

  reg_array #(.NWORD(N_COEF), .WW(COEF_W), .NWP(4)) u_array (
    .clk(clk), .rst_n(rst_n),
    .we_i(a_we), .waddr_i(a_waddr), .wdata_i(a_wdata),
    .plane_we_i(plane_we), .plane_idx_i(plane_idx), .plane_i(rf_rdata),
    .words_o(words)
  );

  ec_control u_ctrl (
    .clk(clk), .rst_n(rst_n), .dec_i(dec_i),
    .dwt_en_o(dwt_en), .dwt_done_i(dwt_done),
    .idwt_start_o(idwt_start), .idwt_done_i(idwt_done), .dwt_busy_i(dwt_busy),
    .eng_start_o(eng_start), .eng_busy_i(eng_busy), .eng_done_i(eng_done),
    .stream_avail_i(f_level != '0),
    .xfer_o(xfer), .rf_en_o(c_rf_en), .rf_we_o(c_rf_we), .rf_addr_o(c_rf_addr),
    .rf_wdata_o(c_rf_wdata),
    .words_i(words), .plane_we_o(plane_we), .plane_idx_o(plane_idx),
    .idle_o(idle_o)
  );

  assign rf_en    = xfer ? c_rf_en    : e_rf_en;
  assign rf_we    = xfer ? c_rf_we    : e_rf_we;
  assign rf_addr  = xfer ? c_rf_addr  : e_rf_addr;
  assign rf_wdata = xfer ? c_rf_wdata : e_rf_wdata;

  bitplane_rf #(.ROWS(MAG_BITS + 1), .NBIT(N_COEF)) u_rf (
    .clk(clk), .en_i(rf_en), .we_i(rf_we), .addr_i(rf_addr),
    .wdata_i(rf_wdata), .rdata_o(rf_rdata)
  );

  spiht_engine #(.LW(FLW)) u_spiht (
    .clk(clk), .rst_n(rst_n), .dec_i(dec_i), .cfg_i(cfg_i),
    .start_i(eng_start), .busy_o(eng_busy), .done_o(eng_done),
    .rf_en_o(e_rf_en), .rf_we_o(e_rf_we), .rf_addr_o(e_rf_addr),
    .rf_wdata_o(e_rf_wdata), .rf_rdata_i(rf_rdata),
    .f_valid_o(f_valid), .f_data_o(f_data), .f_cnt_o(f_cnt),
    .f_win_i(f_win), .f_level_i(f_level), .f_space_i(f_space),
    .stall_o(stall_o), .budget_o(budget_o), .bits_o(unit_bits_o)
  );

  bs_fifo #(.BUS_W(BUS_W), .IN_W(2 * PE_W), .CAP(FCAP)) u_fifo (
    .clk(clk), .rst_n(rst_n), .dec_i(dec_i),
    .eng_valid_i(f_valid), .eng_data_i(f_data), .eng_cnt_i(f_cnt),
    .win_o(f_win), .level_o(f_level), .space_o(f_space),
    .bus_in_valid_i(bs_in_valid_i), .bus_in_data_i(bs_in_i), .bus_in_ready_o(bs_in_ready_o),
    .bus_out_valid_o(bs_out_valid_o), .bus_out_data_o(bs_out_o), .bus_out_ready_i(bs_out_ready_i)
  );

  assign unit_done_o = eng_done;
  assign bubble_o    = xfer;

endmodule
