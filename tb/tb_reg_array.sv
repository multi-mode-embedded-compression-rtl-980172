// tb_reg_array: the 64-word register array against an array model.
//
// Each cycle either a bitplane write, which sets bit plane_idx of every
// word, or up to four random word writes to distinct addresses. All words are compared
// with the model after every clock edge, and reset must clear them.
module tb_reg_array;
  localparam int NWORD = 64;
  localparam int WW    = 10;
  localparam int NWP   = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NWP-1:0]           we;
  logic [NWP-1:0][5:0]      wa;
  logic [NWP-1:0][WW-1:0]   wd;
  logic                     pwe;
  logic [3:0]               pidx;
  logic [NWORD-1:0]         plane;
  logic [NWORD-1:0][WW-1:0] words;

  reg_array #(.NWORD(NWORD), .WW(WW), .NWP(NWP)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .waddr_i(wa), .wdata_i(wd),
    .plane_we_i(pwe), .plane_idx_i(pidx), .plane_i(plane), .words_o(words)
  );

  int checks = 0, failures = 0;
  logic [WW-1:0] m [NWORD];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wa = '0; wd = '0; pwe = 0; pidx = '0; plane = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (words != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < NWORD; i++) m[i] = '0;
    for (int t = 0; t < 4000; t++) begin
      logic [NWORD-1:0] used;
      @(negedge clk);
      for (int i = 0; i < NWORD; i++) begin
        checks++;
        if (words[i] != m[i]) begin
          failures++;
          $display("FAIL t=%0d word %0d: %h want %h", t, i, words[i], m[i]);
        end
      end
      pwe   = ($urandom_range(0, 2) == 0);
      pidx  = 4'($urandom_range(0, WW - 1));
      plane = {$urandom, $urandom};
      if (pwe) for (int i = 0; i < NWORD; i++) m[i][pidx] = plane[i];
      used = '0;
      for (int p = 0; p < NWP; p++) begin
        we[p] = !pwe && $urandom_range(0, 1);
        wa[p] = 6'($urandom);
        while (used[wa[p]]) wa[p] = wa[p] + 6'd1;
        used[wa[p]] = 1'b1;
        wd[p] = WW'($urandom);
        if (we[p]) m[wa[p]] = wd[p];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
