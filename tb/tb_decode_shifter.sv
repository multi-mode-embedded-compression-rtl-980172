// tb_decode_shifter: random test of the decode shifter. The lower array must
// receive the W window bits that follow the cnt_up bits used by the upper
// array.
module tb_decode_shifter;
  localparam int W = 24;
  logic [2*W-1:0] win;
  logic [4:0]     cu;
  logic [W-1:0]   lo;

  decode_shifter #(.W(W)) dut (.win_i(win), .cnt_up_i(cu), .lo_o(lo));

  int checks = 0, failures = 0;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] want;
      win = {$urandom, $urandom};
      cu  = 5'($urandom_range(0, W));
      for (int i = 0; i < W; i++) want[i] = win[int'(cu) + i];
      #1;
      checks++;
      if (lo != want) begin failures++; $display("FAIL %h want %h", lo, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
