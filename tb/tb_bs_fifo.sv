// tb_bs_fifo: the bitstream buffer against a queue of bits.
//
// Encode phase: random pushes (0..IN_W bits, never beyond space_o) and a
// randomly ready bus; every bus word must be the next 32 bits of the queue,
// level_o must equal the queue length and words must be offered exactly
// when 32 or more bits are held. Decode phase: random bus words enter while
// the buffer has room; the engine removes random counts (never beyond
// level_o) and win_o must always show the oldest bits held.
module tb_bs_fifo;
  localparam int BUS_W = 32;
  localparam int IN_W  = 48;
  localparam int CAP   = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             dec, ev, biv, bir, bov, bor;
  logic [IN_W-1:0]  ed, win;
  logic [5:0]       ec;
  logic [7:0]       level, space;
  logic [BUS_W-1:0] bid, bod;

  bs_fifo #(.BUS_W(BUS_W), .IN_W(IN_W), .CAP(CAP)) dut (
    .clk(clk), .rst_n(rst_n), .dec_i(dec),
    .eng_valid_i(ev), .eng_data_i(ed), .eng_cnt_i(ec),
    .win_o(win), .level_o(level), .space_o(space),
    .bus_in_valid_i(biv), .bus_in_data_i(bid), .bus_in_ready_o(bir),
    .bus_out_valid_o(bov), .bus_out_data_o(bod), .bus_out_ready_i(bor)
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit q[$];

  initial begin
    dec = 0; ev = 0; ed = '0; ec = '0; biv = 0; bid = '0; bor = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- encode ----
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(int'(level) == q.size(), $sformatf("level %0d, queue %0d", level, q.size()));
      check(int'(space) == CAP - q.size(), "space");
      check(bov == (q.size() >= BUS_W), "word offered when 32 bits held");
      bor = ($urandom_range(0, 2) != 0);
      ev  = ($urandom_range(0, 3) != 0);
      ec  = 6'($urandom_range(0, IN_W));
      ed  = {$urandom, $urandom};   // bits above ec must be ignored
      if (int'(ec) > int'(space)) ec = 6'(space);
      #1;
      if (bov && bor) begin
        logic [BUS_W-1:0] want;
        for (int i = 0; i < BUS_W; i++) want[i] = q[i];
        check(bod == want, $sformatf("bus word %h want %h", bod, want));
        for (int i = 0; i < BUS_W; i++) void'(q.pop_front());
      end
      if (ev) for (int i = 0; i < int'(ec); i++) q.push_back(ed[i]);
    end
    @(negedge clk);
    ev = 0; bor = 1;
    #1;
    while (bov) begin
      for (int i = 0; i < BUS_W; i++) void'(q.pop_front());
      @(negedge clk);
      #1;
    end
    bor = 0;
    check(int'(level) == q.size() && q.size() < BUS_W, "drained");
    // ---- decode: start from an empty buffer ----
    rst_n = 1'b0;
    q.delete();
    @(negedge clk);
    rst_n = 1'b1;
    dec = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check(int'(level) == q.size(), $sformatf("dec level %0d, queue %0d", level, q.size()));
      check(bir == (q.size() <= CAP - BUS_W), "room for a word");
      for (int i = 0; i < IN_W && i < q.size(); i++)
        check(win[i] == q[i], $sformatf("window bit %0d", i));
      biv = ($urandom_range(0, 2) != 0);
      bid = $urandom;
      ev  = ($urandom_range(0, 2) != 0);
      ec  = 6'($urandom_range(0, IN_W));
      if (int'(ec) > int'(level)) ec = 6'(level);
      #1;
      if (ev) for (int i = 0; i < int'(ec); i++) void'(q.pop_front());
      if (biv && bir) for (int i = 0; i < BUS_W; i++) q.push_back(bid[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
