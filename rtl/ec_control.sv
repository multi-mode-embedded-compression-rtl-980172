// ec_control: sequencing of the four-tree pipeline and the word-to-bitplane
// transfer between the register array and the bitplane register file.
//
// Two buffers carry one coding unit each: the register array (DWT side) and
// the register file (SPIHT side); arr_full and rf_full say which one holds a
// unit waiting to move on.
// Encode: the DWT fills the array while it is free; when the array is full
//   and the SPIHT engine has released the register file, the transfer copies
//   the unit into the file row by row (bit k of every word per cycle, NROWS
//   bubble cycles), frees the array and starts the engine. The DWT of unit
//   n+1 thus overlaps the SPIHT coding of unit n.
// Decode: the engine decodes into the free register file; when the file is
//   full and the array free, the transfer reads one row per cycle and writes
//   it, one cycle later, into bit k of every array word (NROWS+1 cycles; the
//   array takes the row straight from the file's read port),
//   then frees the file and starts the IDWT on the array. The IDWT of unit n
//   overlaps the SPIHT decoding of unit n+1.
// The engine is started with a one-cycle pulse (when decoding, only once the
// FIFO holds bitstream); done pulses end each step.
module ec_control
  import ec_pkg::*;
#(
  parameter int unsigned NROWS = MAG_BITS + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          dec_i,
  // DWT / IDWT
  output logic                          dwt_en_o,
  input  logic                          dwt_done_i,
  output logic                          idwt_start_o,
  input  logic                          idwt_done_i,
  input  logic                          dwt_busy_i,
  // SPIHT engine
  output logic                          eng_start_o,
  input  logic                          eng_busy_i,
  input  logic                          eng_done_i,
  input  logic                          stream_avail_i,  // decode: FIFO holds bits
  // register file port used during a transfer (its read data goes to the array)
  output logic                          xfer_o,
  output logic                          rf_en_o,
  output logic                          rf_we_o,
  output logic [3:0]                    rf_addr_o,
  output logic [N_COEF-1:0]             rf_wdata_o,
  // register array
  input  logic [N_COEF-1:0][COEF_W-1:0] words_i,
  output logic                          plane_we_o,
  output logic [3:0]                    plane_idx_o,  // row written back into the array
  // status
  output logic                          idle_o
);

  typedef enum logic [1:0] {X_IDLE, X_A2R, X_R2A} xst_e;

  xst_e       xst_q;
  logic [3:0] t_q;
  logic       arr_full_q, rf_full_q, idwt_run_q;

  assign xfer_o   = (xst_q != X_IDLE);
  assign dwt_en_o = !dec_i && !arr_full_q;
  assign idle_o   = !dwt_busy_i && !arr_full_q && !rf_full_q && !eng_busy_i && !idwt_run_q && !xfer_o;

  assign eng_start_o = !eng_busy_i && !eng_done_i && !xfer_o &&
                       (dec_i ? !rf_full_q && stream_avail_i : rf_full_q);
  assign idwt_start_o = dec_i && arr_full_q && !idwt_run_q && !xfer_o;

  always_comb begin
    rf_en_o     = 1'b0;
    rf_we_o     = 1'b0;
    rf_addr_o   = t_q;
    rf_wdata_o  = '0;
    plane_we_o  = 1'b0;
    plane_idx_o = t_q - 4'd1;
    for (int i = 0; i < N_COEF; i++) rf_wdata_o[i] = words_i[i][t_q];
    unique case (xst_q)
      X_A2R: begin
        rf_en_o = 1'b1;
        rf_we_o = 1'b1;
      end
      X_R2A: begin
        rf_en_o    = (t_q < 4'(NROWS));
        plane_we_o = (t_q != 4'd0);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xst_q      <= X_IDLE;
      t_q        <= '0;
      arr_full_q <= 1'b0;
      rf_full_q  <= 1'b0;
      idwt_run_q <= 1'b0;
    end else begin
      if (dwt_done_i) arr_full_q <= 1'b1;
      if (eng_done_i) rf_full_q  <= dec_i;
      if (idwt_start_o) idwt_run_q <= 1'b1;
      if (idwt_done_i) begin
        idwt_run_q <= 1'b0;
        arr_full_q <= 1'b0;
      end
      unique case (xst_q)
        X_IDLE: begin
          t_q <= '0;
          if (!dec_i && arr_full_q && !rf_full_q && !eng_busy_i && !eng_done_i)
            xst_q <= X_A2R;
          else if (dec_i && rf_full_q && !arr_full_q && !eng_done_i)
            xst_q <= X_R2A;
        end
        X_A2R: begin
          t_q <= t_q + 4'd1;
          if (t_q == 4'(NROWS - 1)) begin
            arr_full_q <= 1'b0;
            rf_full_q  <= 1'b1;
            xst_q      <= X_IDLE;
          end
        end
        X_R2A: begin
          t_q <= t_q + 4'd1;
          if (t_q == 4'(NROWS)) begin
            rf_full_q  <= 1'b0;
            arr_full_q <= 1'b1;
            xst_q      <= X_IDLE;
          end
        end
        default: xst_q <= X_IDLE;
      endcase
    end
  end

  a_one_rf_user: assert property (@(posedge clk) disable iff (!rst_n)
    xfer_o |-> !eng_busy_i)
    else $error("ec_control: register file shared during transfer");

endmodule
