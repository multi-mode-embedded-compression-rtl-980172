// tb_spiht_engine: checks the list-free SPIHT engine against a list-based
// SPIHT model and against itself as decoder.
//
// The bitplane register file and the FIFO are modelled in the testbench (an
// array of rows and a queue of bits). For each random coding unit (values
// shrinking from the LL2 group towards the level-1 bands, random signs, some
// empty trees) the engine encodes; the number of bits is compared with a
// textbook SPIHT coder that keeps the LIP, LIS and LSP lists (same bits, other
// order inside a pass), and the cycle count with 4 + 13 cycles per plane.
// The stream is then decoded by the engine, with the FIFO level held back at
// random so that the engine stalls, and the rebuilt register file is
// compared with the original: exact for lossless, low planes cleared for
// quality layers, and for the half / quarter budgets the stream must be
// exactly 256 / 128 bits (or shorter) and every decoded bit must be a bit of
// the original with the right sign.
module tb_spiht_engine;
  import ec_pkg::*;

  localparam int NTEST = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              dec, start, busy, done, stall, bhit;
  ec_cfg_t           cfg;
  logic              rf_en, rf_we;
  logic [3:0]        rf_addr;
  logic [63:0]       rf_wdata, rf_rdata;
  logic              f_valid;
  logic [47:0]       f_data, f_win;
  logic [5:0]        f_cnt;
  logic [7:0]        f_level, f_space;
  logic [15:0]       bits;

  spiht_engine #(.LW(8)) dut (
    .clk(clk), .rst_n(rst_n), .dec_i(dec), .cfg_i(cfg), .start_i(start),
    .busy_o(busy), .done_o(done),
    .rf_en_o(rf_en), .rf_we_o(rf_we), .rf_addr_o(rf_addr), .rf_wdata_o(rf_wdata),
    .rf_rdata_i(rf_rdata),
    .f_valid_o(f_valid), .f_data_o(f_data), .f_cnt_o(f_cnt), .f_win_i(f_win),
    .f_level_i(f_level), .f_space_i(f_space),
    .stall_o(stall), .budget_o(bhit), .bits_o(bits)
  );

  // register file model
  logic [63:0] rf [10];
  always @(posedge clk) if (rf_en) begin
    if (rf_we) rf[rf_addr] <= rf_wdata;
    else       rf_rdata    <= rf[rf_addr];
  end

  // FIFO model
  bit q[$];
  bit hold;
  int nstall = 0;
  always_comb begin
    int n;
    n = (q.size() > 200) ? 200 : q.size();
    f_level = hold ? 8'd0 : 8'(n);
    f_space = 8'd200;
    f_win   = '0;
    for (int i = 0; i < 48; i++) if (i < q.size()) f_win[i] = q[i];
  end
  always @(posedge clk) if (rst_n) begin
    if (stall) nstall++;
    if (f_valid) begin
      if (!dec) for (int i = 0; i < int'(f_cnt); i++) q.push_back(f_data[i]);
      else      for (int i = 0; i < int'(f_cnt); i++) void'(q.pop_front());
    end
  end
  always @(negedge clk) hold <= dec && ($urandom_range(0, 3) == 0);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- list-based SPIHT model (bit count) ----------------
  int mag[64];
  bit sgn[64];

  function automatic void offspring(input int x, output int o[4], output int n);
    int r, c;
    r = x / 8; c = x % 8;
    n = 0;
    if (x == 0 || r >= 4 || c >= 4) return;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        o[n] = (2 * r + i) * 8 + (2 * c + j);
        n++;
      end
  endfunction

  function automatic int maxdesc(input int x, input bit lonly);
    int o[4], n, m, o2[4], n2;
    m = 0;
    offspring(x, o, n);
    for (int i = 0; i < n; i++) begin
      if (!lonly && mag[o[i]] > m) m = mag[o[i]];
      offspring(o[i], o2, n2);
      for (int j = 0; j < n2; j++) if (mag[o2[j]] > m) m = mag[o2[j]];
    end
    return m;
  endfunction

  function automatic int ref_bits(input int lowest);
    int lip[$], lsp[$], lis[$];
    bit lisb[$];
    int total;
    total = 0;
    lip = '{0, 1, 8, 9};
    lis = '{1, 8, 9};
    lisb = '{0, 0, 0};
    for (int n = MAG_BITS - 1; n >= lowest; n--) begin
      int nlsp, i;
      int newlip[$];
      nlsp = lsp.size();
      foreach (lip[k]) begin
        total++;
        if ((mag[lip[k]] >> n) != 0) begin
          total++;
          lsp.push_back(lip[k]);
        end else newlip.push_back(lip[k]);
      end
      lip = newlip;
      i = 0;
      while (i < lis.size()) begin
        int x, o[4], no;
        x = lis[i];
        offspring(x, o, no);
        total++;
        if (!lisb[i]) begin
          if ((maxdesc(x, 0) >> n) != 0) begin
            for (int k = 0; k < no; k++) begin
              total++;
              if ((mag[o[k]] >> n) != 0) begin
                total++;
                lsp.push_back(o[k]);
              end else lip.push_back(o[k]);
            end
            if (x / 8 < 2 && x % 8 < 2) begin  // L(x) not empty: a root
              lis.push_back(x);
              lisb.push_back(1);
            end
            lis.delete(i);
            lisb.delete(i);
          end else i++;
        end else begin
          if ((maxdesc(x, 1) >> n) != 0) begin
            for (int k = 0; k < no; k++) begin
              lis.push_back(o[k]);
              lisb.push_back(0);
            end
            lis.delete(i);
            lisb.delete(i);
          end else i++;
        end
      end
      total += nlsp;
    end
    return total;
  endfunction

  // ---------------- stimulus ----------------
  function automatic void make_unit(input int kind);
    for (int i = 0; i < 64; i++) begin
      int r, c, lim;
      r = i / 8; c = i % 8;
      if (r < 2 && c < 2)      lim = (kind == 0) ? 511 : 255;
      else if (r < 4 && c < 4) lim = (kind == 0) ? 511 : 60;
      else                     lim = (kind == 0) ? 511 : 20;
      mag[i] = int'($urandom_range(0, lim));
      if (kind == 2 && r >= 4) mag[i] = 0;                  // empty trees 3 and 2
      if (kind == 3 && ($urandom_range(0, 3) != 0)) mag[i] = 0;  // sparse
      sgn[i] = (mag[i] != 0) && $urandom_range(0, 1);
    end
  endfunction

  task automatic load_rf();
    for (int p = 0; p < MAG_BITS; p++)
      for (int i = 0; i < 64; i++) rf[p][i] = mag[i][p];
    for (int i = 0; i < 64; i++) rf[MAG_BITS][i] = sgn[i];
  endtask

  task automatic run(input bit d, output int cycles);
    @(negedge clk);
    dec = d;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    dec = 0; start = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTEST; t++) begin
      int cyc, nb, expect_bits, lowest, budget;
      ec_cfg_t c;
      make_unit(t % 4);
      c.rate  = rate_e'((t / 4) % 3);
      c.trunc = ((t / 12) % 2 == 1) ? 3'(t % 5) : 3'd0;
      cfg = c;
      lowest = c.trunc;
      budget = int'(unit_budget(c.rate));
      load_rf();
      q.delete();
      run(1'b0, cyc);
      nb = int'(bits);
      expect_bits = ref_bits(lowest);
      if (budget != 0 && expect_bits > budget) expect_bits = budget;
      check(nb == expect_bits, $sformatf("test %0d: %0d bits, list SPIHT gives %0d", t, nb, expect_bits));
      check(q.size() % BUS_W == 0, $sformatf("test %0d: stream not padded to a word", t));
      if (budget == 0)
        check(cyc == 4 + 13 * (MAG_BITS - lowest),
              $sformatf("test %0d: %0d cycles, want %0d", t, cyc, 4 + 13 * (MAG_BITS - lowest)));
      // decode into a cleared file
      for (int p = 0; p < 10; p++) rf[p] = {$urandom, $urandom};
      run(1'b1, cyc);
      check(q.size() == 0, $sformatf("test %0d: decoder left %0d bits", t, q.size()));
      for (int i = 0; i < 64; i++) begin
        int dm, want;
        bit ds;
        dm = 0;
        for (int p = 0; p < MAG_BITS; p++) dm |= int'(rf[p][i]) << p;
        ds = rf[MAG_BITS][i];
        if (budget == 0) begin
          want = (mag[i] >> lowest) << lowest;
          check(dm == want && ds == (want != 0 && sgn[i]),
                $sformatf("test %0d coef %0d: got %0d/%0d want %0d/%0d", t, i, dm, ds, want, sgn[i]));
        end else begin
          check((dm & ~mag[i]) == 0 && (dm == 0 || ds == sgn[i]),
                $sformatf("test %0d coef %0d: got %0d/%0d from %0d/%0d", t, i, dm, ds, mag[i], sgn[i]));
        end
      end
    end
    $display("engine stalls seen: %0d", nstall);
    check(nstall > 0, "decoder never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
