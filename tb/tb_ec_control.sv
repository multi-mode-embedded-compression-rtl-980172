// tb_ec_control: the pipeline sequencer with simple models of its neighbours.
//
// The SPIHT engine is modelled by a counter that stays busy for a random number of cycles
// after a start and then pulses done; the DWT, IDWT and the bitplane register
// file are modelled here. Encode: three units arrive (dwt done pulses) while
// the engine is busy or idle. Checks: the word-to-bitplane transfer writes
// rows 0..9 in ten consecutive cycles, row k holding bit k of every word; the
// DWT is held off while the array is full and released by the transfer;
// the engine starts right after each transfer and never while the
// transfer owns the register file; the transfer of unit n+1 waits for the
// engine to finish unit n. Decode: the engine is not started until the
// FIFO has bits; after each decoded unit the transfer reads rows 0..9 and
// writes them one cycle later as array bitplanes 0..9 (eleven cycles), then
// starts the IDWT once; the next unit's decode overlaps the IDWT. idle_o
// must rise when everything is done.
module tb_ec_control;
  import ec_pkg::*;

  localparam int NROWS = MAG_BITS + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                          dec, dwt_en, dwt_done, idwt_start, idwt_done, dwt_busy;
  logic                          eng_start, eng_busy, eng_done, avail;
  logic                          xfer, rf_en, rf_we, plane_we, idle;
  logic [3:0]                    rf_addr, plane_idx;
  logic [N_COEF-1:0]             rf_wdata, rf_rdata;
  logic [N_COEF-1:0][COEF_W-1:0] words;

  ec_control dut (
    .clk(clk), .rst_n(rst_n), .dec_i(dec),
    .dwt_en_o(dwt_en), .dwt_done_i(dwt_done),
    .idwt_start_o(idwt_start), .idwt_done_i(idwt_done), .dwt_busy_i(dwt_busy),
    .eng_start_o(eng_start), .eng_busy_i(eng_busy), .eng_done_i(eng_done),
    .stream_avail_i(avail),
    .xfer_o(xfer), .rf_en_o(rf_en), .rf_we_o(rf_we), .rf_addr_o(rf_addr),
    .rf_wdata_o(rf_wdata),
    .words_i(words), .plane_we_o(plane_we), .plane_idx_o(plane_idx),
    .idle_o(idle)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine model
  int eng_left = 0, n_start = 0, n_done = 0;
  always @(posedge clk) begin
    eng_done <= 1'b0;
    if (!rst_n) begin
      eng_busy <= 1'b0;
    end else if (eng_busy) begin
      eng_left--;
      if (eng_left == 0) begin
        eng_busy <= 1'b0;
        eng_done <= 1'b1;
        n_done++;
      end
    end else if (eng_start) begin
      eng_busy <= 1'b1;
      eng_left = int'($urandom_range(20, 140));
      n_start++;
    end
  end

  // register file model: rows written by the transfer or "decoded" by the engine
  logic [N_COEF-1:0] rf [NROWS];
  always @(posedge clk) begin
    if (rf_en && rf_we) rf[rf_addr] <= rf_wdata;
    if (rf_en && !rf_we) rf_rdata <= rf[rf_addr];
    if (eng_done && dec) for (int r = 0; r < NROWS; r++) rf[r] <= {$urandom, $urandom};
  end

  // transfer monitor
  int xrun = 0, n_xfer = 0, n_plane = 0, n_idwt = 0;
  logic [N_COEF-1:0] rows_seen [NROWS];
  logic [N_COEF-1:0] last_read;
  always @(posedge clk) if (rst_n) begin
    check(!(xfer && eng_busy), "transfer while the engine is busy");
    check(!(eng_start && xfer), "engine started during a transfer");
    if (xfer) xrun++;
    else if (xrun != 0) begin
      check(xrun == (dec ? NROWS + 1 : NROWS), $sformatf("transfer took %0d cycles", xrun));
      n_xfer++;
      xrun = 0;
    end
    if (!dec && xfer) begin
      logic [N_COEF-1:0] want;
      for (int i = 0; i < N_COEF; i++) want[i] = words[i][xrun - 1];
      check(rf_en && rf_we && int'(rf_addr) == xrun - 1 && rf_wdata == want,
            $sformatf("encode transfer cycle %0d: row %0d", xrun - 1, rf_addr));
    end
    if (dec && xfer) begin
      if (xrun <= NROWS) check(rf_en && !rf_we && int'(rf_addr) == xrun - 1, "decode read row");
      else check(!rf_en, "no read in the last transfer cycle");
      check(plane_we == (xrun > 1), "plane write one cycle after the read");
      if (plane_we) begin
        check(int'(plane_idx) == xrun - 2 && rf_rdata == rf[plane_idx],
              $sformatf("plane %0d wrong", plane_idx));
        n_plane++;
      end
    end
    if (!xfer) check(!plane_we && !(rf_en && rf_we), "array/file written outside a transfer");
    if (idwt_start) n_idwt++;
  end

  // IDWT model: busy 40 cycles after a start, done in the last
  int idwt_left = 0, n_overlap = 0;
  always @(posedge clk) begin
    if (eng_busy && idwt_left > 0) n_overlap++;
    if (idwt_start) idwt_left = 40;
    else if (idwt_left > 0) idwt_left--;
  end
  assign idwt_done = (idwt_left == 1);

  task automatic dwt_block(input int gap);
    // the DWT may only run while dwt_en is high
    @(negedge clk);
    while (!dwt_en) @(negedge clk);
    dwt_busy = 1;
    repeat (gap) begin
      @(negedge clk);
      check(dwt_en, "dwt_en dropped while a block was coming in");
    end
    words = '0;
    for (int i = 0; i < N_COEF; i++) words[i] = COEF_W'($urandom);
    dwt_done = 1;
    @(negedge clk);
    dwt_done = 0;
    dwt_busy = 0;
    #1;
    check(!dwt_en, "array full must hold the DWT");
  endtask

  initial begin
    dec = 0; dwt_done = 0; dwt_busy = 0; avail = 0; words = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(idle && dwt_en && !eng_start && !xfer, "reset state");
    // ---- encode: 3 units, the 2nd arrives while the engine is busy ----
    dwt_block(36);
    dwt_block(36);
    dwt_block(5);
    while (!idle) @(negedge clk);
    check(n_start == 3 && n_done == 3 && n_xfer == 3, $sformatf("encode: %0d starts %0d transfers", n_start, n_xfer));
    // ---- decode: 3 units ----
    dec = 1;
    repeat (5) @(negedge clk);
    check(!eng_start && n_start == 3, "decode engine started without bitstream");
    avail = 1;
    while (n_done < 6) @(negedge clk);
    avail = 0;
    repeat (3) @(negedge clk);
    while (!idle) @(negedge clk);
    check(n_start == 6 && n_xfer == 6 && n_idwt == 3 && n_plane == 3 * NROWS,
          $sformatf("decode: %0d starts %0d transfers %0d idwt %0d planes", n_start, n_xfer, n_idwt, n_plane));
    check(n_overlap > 0, "decoding never overlapped the IDWT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
