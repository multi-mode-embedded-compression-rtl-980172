// tb_dwt_idwt: the two-level S-transform block against a model written
// here, and its inverse against the original pixels.
//
// For each random 8x8 block (some flat, some with full-range noise) the
// pixels are sent with random gaps; the register array is modelled by an
// array that takes the write ports. Checks: every coefficient equals the
// model (row pass, then column pass, on whole 8x8 arrays; level 2 on the
// LL1 quarter), written once, as sign-magnitude; blk_done_o comes 4 cycles
// after the last pixel (36 cycles for an unbroken block); en_i low holds the
// input off. Then the block is decoded from the written words with a random
// pixel-ready and must return the original pixels exactly, with out_done_o
// on the last pair.
module tb_dwt_idwt;
  import ec_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                          dec, en, piv, pir, blk_done, start, pov, por, out_done, busy;
  logic [1:0][PIX_W-1:0]         pin, pout;
  logic [3:0]                    we;
  logic [3:0][5:0]               wa;
  logic [3:0][COEF_W-1:0]        wd;
  logic [N_COEF-1:0][COEF_W-1:0] words;

  dwt_idwt dut (
    .clk(clk), .rst_n(rst_n), .dec_i(dec),
    .en_i(en), .pix_valid_i(piv), .pix_i(pin), .pix_ready_o(pir),
    .we_o(we), .waddr_o(wa), .wdata_o(wd), .blk_done_o(blk_done),
    .start_i(start), .words_i(words),
    .pix_valid_o(pov), .pix_o(pout), .pix_ready_i(por),
    .out_done_o(out_done), .busy_o(busy)
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register array model
  int nwrite[64];
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 4; p++) if (we[p]) begin
      words[wa[p]] <= wd[p];
      nwrite[wa[p]]++;
    end

  int x[8][8];
  int want[8][8];

  function automatic int fl2(input int v);  // floor(v / 2)
    return (v >= 0) ? v / 2 : -((1 - v) / 2);
  endfunction

  // one level on the n x n top-left part of a (in place, bands in quadrants)
  function automatic void level(ref int a[8][8], input int n);
    int l[8][8], h[8][8];
    int t[8][8];
    t = a;
    for (int r = 0; r < n; r++)
      for (int j = 0; j < n / 2; j++) begin
        l[r][j] = fl2(t[r][2 * j] + t[r][2 * j + 1]);
        h[r][j] = t[r][2 * j] - t[r][2 * j + 1];
      end
    for (int i = 0; i < n / 2; i++)
      for (int j = 0; j < n / 2; j++) begin
        a[i][j]                 = fl2(l[2 * i][j] + l[2 * i + 1][j]);
        a[i][n / 2 + j]         = fl2(h[2 * i][j] + h[2 * i + 1][j]);
        a[n / 2 + i][j]         = l[2 * i][j] - l[2 * i + 1][j];
        a[n / 2 + i][n / 2 + j] = h[2 * i][j] - h[2 * i + 1][j];
      end
  endfunction

  initial begin
    int ncyc, tdone, tlast;
    dec = 0; en = 1; piv = 0; pin = '0; start = 0; por = 0;
    words = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 24; b++) begin
      bit steady;
      steady = (b % 3 == 0);
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          unique case (b % 4)
            0: x[r][c] = int'($urandom_range(0, 255));
            1: x[r][c] = 100 + r * 4 + c * 2 + int'($urandom_range(0, 6));
            2: x[r][c] = ((r + c) % 2 == 0) ? 255 : 0;
            default: x[r][c] = (b % 8 == 3) ? 255 : 0;
          endcase
      want = x;
      level(want, 8);
      level(want, 4);
      for (int i = 0; i < 64; i++) nwrite[i] = 0;
      // ---- encode ----
      dec = 0;
      ncyc = 0;
      tdone = -1;
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        if (k == 0) ncyc = 0;
        // hold-off test: en low for a few cycles inside the block
        if (k == 10 && b % 2 == 1) begin
          en = 0;
          piv = 1;
          repeat (3) begin
            #1;
            check(!pir, "input accepted while en_i is low");
            @(negedge clk);
            ncyc++;
          end
          en = 1;
        end
        piv = steady ? 1'b1 : ($urandom_range(0, 2) != 0);
        pin[0] = PIX_W'(x[k / 4][(k % 4) * 2]);
        pin[1] = PIX_W'(x[k / 4][(k % 4) * 2 + 1]);
        #1;
        while (!(piv && pir)) begin
          @(negedge clk);
          ncyc++;
          piv = 1;
          #1;
        end
        ncyc++;
      end
      tlast = ncyc;
      @(negedge clk);
      piv = 0;
      for (int w = 1; w <= 6 && tdone < 0; w++) begin
        if (blk_done) tdone = ncyc + w;
        if (tdone < 0) @(negedge clk);
      end
      check(tdone - tlast == 4, $sformatf("block %0d: done %0d cycles after last pixel", b, tdone - tlast));
      if (steady && b % 2 == 0) check(tdone == 36, $sformatf("block %0d: %0d cycles for a block", b, tdone));
      @(negedge clk);
      check(!busy, "busy after the block");
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          int v, m;
          logic [COEF_W-1:0] sm;
          sm = words[r * 8 + c];
          m = int'(sm[MAG_BITS-1:0]);
          v = sm[MAG_BITS] ? -m : m;
          check(v == want[r][c] && nwrite[r * 8 + c] == 1 && !(sm[MAG_BITS] && m == 0),
                $sformatf("block %0d coef (%0d,%0d): %0d want %0d, %0d writes",
                          b, r, c, v, want[r][c], nwrite[r * 8 + c]));
        end
      // ---- decode ----
      dec = 1;
      @(negedge clk);
      @(negedge clk);
      check(!pov, "pixels before start");
      start = 1;
      @(negedge clk);
      start = 0;
      for (int k = 0; k < 32; ) begin
        por = ($urandom_range(0, 2) != 0);
        #1;
        if (pov && por) begin
          check(int'(pout[0]) == x[k / 4][(k % 4) * 2] && int'(pout[1]) == x[k / 4][(k % 4) * 2 + 1],
                $sformatf("block %0d pair %0d: %0d %0d want %0d %0d", b, k, pout[0], pout[1],
                          x[k / 4][(k % 4) * 2], x[k / 4][(k % 4) * 2 + 1]));
          check(out_done == (k == 31), "out_done timing");
          k++;
        end
        @(negedge clk);
      end
      por = 0;
      #1;
      check(!pov && !busy, "decoder stops after 32 pairs");
      dec = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
