// tb_ec_codec: end-to-end test of the EC codec at its default parameters.
//
// For each of five configurations (lossless, half size, quarter size, two
// quality layers cut, and lossless again) one 4:2:0 macroblock (six 8x8
// units) of a synthetic smooth image with noise is encoded, the bitstream
// words are collected, the codec is switched to decoding without a reset and
// the words are fed back. Pixel inputs, bitstream outputs and pixel outputs
// are throttled at random.
// Checks: lossless round trip is exact; half/quarter size streams stay
// within 8 / 4 bus words per unit and decode close to the input; cut
// bitplanes give a bounded error; the delay from the first pixel of a unit to
// the start of its SPIHT coding is 36 DWT cycles, one hand-over cycle and
// 10 transfer cycles; in steady lossless encoding a unit follows the previous
// one every 133 cycles (121 engine cycles, 10 transfer cycles and two
// hand-over cycles).
// Mechanisms counted (each must occur): FIFO stall of the engine, stream cut
// on the bit budget, transfer bubbles, DWT overlapping SPIHT, encode/decode
// mode switch and rate-mode switch.
module tb_ec_codec;
  import ec_pkg::*;

  localparam int NUNIT = 6;
  localparam int NCFG  = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  dec;
  ec_cfg_t               cfg;
  logic                  pin_v, pin_r, pout_v, pout_r;
  logic [1:0][PIX_W-1:0] pin, pout;
  logic                  bin_v, bin_r, bout_v, bout_r;
  logic [BUS_W-1:0]      bin, bout;
  logic                  unit_done, idle, stall, budget, bubble;
  logic [15:0]           ubits;

  ec_codec dut (
    .clk(clk), .rst_n(rst_n), .dec_i(dec), .cfg_i(cfg),
    .pix_in_valid_i(pin_v), .pix_in_i(pin), .pix_in_ready_o(pin_r),
    .pix_out_valid_o(pout_v), .pix_out_o(pout), .pix_out_ready_i(pout_r),
    .bs_in_valid_i(bin_v), .bs_in_i(bin), .bs_in_ready_o(bin_r),
    .bs_out_valid_o(bout_v), .bs_out_o(bout), .bs_out_ready_i(bout_r),
    .unit_done_o(unit_done), .idle_o(idle), .stall_o(stall), .budget_o(budget),
    .bubble_o(bubble), .unit_bits_o(ubits)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_budget = 0, n_bubble = 0, n_overlap = 0, n_dirswitch = 0, n_rateswitch = 0;
  int cycle = 0;

  logic [7:0]  img  [NUNIT][64];
  logic [7:0]  rec  [NUNIT][64];
  logic [31:0] words[$];

  int t_first_pix = -1, t_first_start = -1;
  int t_last_done = -1, max_period = 0;  // unit-to-unit period, steady lossless encode
  int cur_cfg = 0;
  bit collect = 0;
  bit bubble_q = 0, eng_on = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (stall) n_stall++;
      if (bubble) n_bubble++;
      if (unit_done && budget) n_budget++;
      if (unit_done && !dec && cur_cfg == 0) begin
        if (t_last_done >= 0 && cycle - t_last_done > max_period) max_period = cycle - t_last_done;
        t_last_done = cycle;
      end
      if (pin_v && pin_r && eng_on) n_overlap++;
      if (pin_v && pin_r && t_first_pix < 0) t_first_pix = cycle;
      // when encoding, SPIHT starts in the cycle right after a transfer
      if (bubble_q && !bubble && !dec) begin
        eng_on <= 1'b1;
        if (t_first_start < 0) t_first_start = cycle;
      end
      if (unit_done) eng_on <= 1'b0;
      bubble_q <= bubble;
      if (collect && bout_v && bout_r) words.push_back(bout);
    end
  end

  int slow_bus = 0;  // 1: the bus takes a word in one cycle of four
  always @(negedge clk) bout_r <= collect && ($urandom_range(0, slow_bus ? 3 : 0) == 0);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic make_image(input int seed);
    for (int u = 0; u < NUNIT; u++)
      for (int i = 0; i < 64; i++) begin
        int v;
        v = 60 + seed * 7 + u * 20 + (i % 8) * 6 + (i / 8) * 3 + int'($urandom_range(0, 16)) - 8;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[u][i] = 8'(v);
      end
  endtask

  // Inputs change at the falling edge; a transfer happens at the next rising
  // edge when valid and ready are both high just before it.
  task automatic encode(input bit steady);
    int done_units;
    words.delete();
    collect = 1;
    for (int u = 0; u < NUNIT; u++)
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        pin_v = steady ? 1'b1 : ($urandom_range(0, 3) != 0);
        pin[0] = img[u][(k / 4) * 8 + (k % 4) * 2];
        pin[1] = img[u][(k / 4) * 8 + (k % 4) * 2 + 1];
        #1;
        while (!(pin_v && pin_r)) begin
          @(negedge clk);
          pin_v = 1'b1;
          #1;
        end
      end
    @(negedge clk);
    pin_v = 1'b0;
  endtask

  task automatic decode();
    int wi, np;
    wi = 0;
    np = 0;
    while (np < NUNIT * 32) begin
      @(negedge clk);
      bin_v  = (wi < words.size()) && (slow_bus == 0 || $urandom_range(0, 3) == 0);
      bin    = (wi < words.size()) ? words[wi] : '0;
      pout_r = ($urandom_range(0, 3) != 0);
      #1;
      if (bin_v && bin_r) wi++;
      if (pout_v && pout_r) begin
        rec[np / 32][((np % 32) / 4) * 8 + (np % 4) * 2]     = pout[0];
        rec[np / 32][((np % 32) / 4) * 8 + (np % 4) * 2 + 1] = pout[1];
        np++;
      end
    end
    @(negedge clk);
    bin_v  = 1'b0;
    pout_r = 1'b0;
    check(wi == words.size(), $sformatf("decoder took %0d of %0d words", wi, words.size()));
  endtask

  task automatic wait_idle();
    int n;
    n = 0;
    @(negedge clk);
    while (!(idle && !bout_v)) begin
      @(negedge clk);
      n++;
    end
  endtask

  initial begin
    ec_cfg_t cfgs[NCFG];
    rate_e   prev_rate;
    cfgs[0] = '{rate: RATE_LOSSLESS, trunc: 3'd0};
    cfgs[1] = '{rate: RATE_HALF,     trunc: 3'd0};
    cfgs[2] = '{rate: RATE_QUARTER,  trunc: 3'd0};
    cfgs[3] = '{rate: RATE_LOSSLESS, trunc: 3'd2};
    cfgs[4] = '{rate: RATE_LOSSLESS, trunc: 3'd0};
    dec = 1'b0; cfg = cfgs[0];
    pin_v = 0; pin = '0; pout_r = 0; bin_v = 0; bin = '0; bout_r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    prev_rate = cfgs[0].rate;

    for (int c = 0; c < NCFG; c++) begin
      int sum_err, max_err, nword, bound;
      if (cfgs[c].rate != prev_rate) n_rateswitch++;
      prev_rate = cfgs[c].rate;
      cfg = cfgs[c];
      cur_cfg = c;
      slow_bus = (c == 1 || c == 4);
      make_image(c);
      dec = 1'b0;
      encode(c == 0);
      wait_idle();
      collect = 0;
      if (c == 0) begin
        $display("first pixel to SPIHT start: %0d cycles", t_first_start - t_first_pix);
        check(t_first_start - t_first_pix == 36 + 1 + 10, "DWT + transfer latency");
        $display("lossless encode: longest unit-to-unit period %0d cycles", max_period);
        check(max_period == 4 + 13 * MAG_BITS + 10 + 2, "unit period (engine + transfer + hand-over)");
      end
      nword = words.size();
      dec = 1'b1;
      n_dirswitch++;
      decode();
      wait_idle();
      dec = 1'b0;
      n_dirswitch++;
      sum_err = 0;
      max_err = 0;
      for (int u = 0; u < NUNIT; u++)
        for (int i = 0; i < 64; i++) begin
          int e;
          e = int'(img[u][i]) - int'(rec[u][i]);
          if (e < 0) e = -e;
          sum_err += e;
          if (e > max_err) max_err = e;
        end
      $display("cfg %0d rate=%0d trunc=%0d: %0d words (%0d bits of %0d raw), MAE*100=%0d max=%0d",
               c, cfgs[c].rate, cfgs[c].trunc, nword, nword * 32, NUNIT * 512,
               sum_err * 100 / (NUNIT * 64), max_err);
      unique case (cfgs[c].rate)
        RATE_LOSSLESS: begin
          if (cfgs[c].trunc == 0) begin
            check(max_err == 0, $sformatf("cfg %0d lossless not exact", c));
          end else begin
            bound = 1 << cfgs[c].trunc;
            check(max_err <= 4 * bound, $sformatf("cfg %0d truncation error %0d", c, max_err));
            check(sum_err <= bound * NUNIT * 64, $sformatf("cfg %0d truncation MAE", c));
          end
        end
        RATE_HALF: begin
          check(nword <= NUNIT * 8, $sformatf("cfg %0d half size: %0d words", c, nword));
          check(sum_err <= 6 * NUNIT * 64, $sformatf("cfg %0d half size MAE", c));
        end
        default: begin
          check(nword <= NUNIT * 4, $sformatf("cfg %0d quarter size: %0d words", c, nword));
          check(sum_err <= 12 * NUNIT * 64, $sformatf("cfg %0d quarter size MAE", c));
        end
      endcase
    end

    $display("events: stall=%0d budget=%0d bubble=%0d overlap=%0d dirswitch=%0d rateswitch=%0d",
             n_stall, n_budget, n_bubble, n_overlap, n_dirswitch, n_rateswitch);
    check(n_stall > 0, "no FIFO stall seen");
    check(n_budget > 0, "no budget cut seen");
    check(n_bubble > 0, "no transfer bubble seen");
    check(n_overlap > 0, "DWT never overlapped SPIHT");
    check(n_dirswitch > 0, "no encode/decode switch");
    check(n_rateswitch > 0, "no rate-mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
