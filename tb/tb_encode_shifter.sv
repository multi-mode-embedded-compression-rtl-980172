// tb_encode_shifter: random test of the encode shifter. The expected word is
// built bit by bit: the cnt_up top bits of the upper stream, oldest first,
// then the cnt_lo top bits of the lower stream.
module tb_encode_shifter;
  localparam int W = 24;
  logic [W-1:0]   up, lo;
  logic [4:0]     cu, cl;
  logic [2*W-1:0] data;
  logic [5:0]     cnt;

  encode_shifter #(.W(W)) dut (.up_i(up), .cnt_up_i(cu), .lo_i(lo), .cnt_lo_i(cl),
                               .data_o(data), .cnt_o(cnt));

  int checks = 0, failures = 0;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [2*W-1:0] want;
      cu = 5'($urandom_range(0, W));
      cl = 5'($urandom_range(0, W));
      up = W'($urandom) & ~(W'('1) >> cu);   // only the top cu bits are set
      lo = W'($urandom) & ~(W'('1) >> cl);
      if (cu == 0) up = '0;
      if (cl == 0) lo = '0;
      want = '0;
      for (int i = 0; i < cu; i++) want[i] = up[W - cu + i];
      for (int i = 0; i < cl; i++) want[cu + i] = lo[W - cl + i];
      #1;
      checks += 2;
      if (data != want) begin failures++; $display("FAIL data %h want %h", data, want); end
      if (int'(cnt) != int'(cu) + int'(cl)) begin failures++; $display("FAIL cnt"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
