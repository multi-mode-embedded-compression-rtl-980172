// tb_bitplane_rf: the single-port 10 x 64 bitplane register file against an
// array model. Random writes and reads; a read returns the row one clock
// after en_i without we_i and the output holds until the next read.
module tb_bitplane_rf;
  localparam int ROWS = 10;
  localparam int NBIT = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            en, we;
  logic [3:0]      addr;
  logic [NBIT-1:0] wd, rd;

  bitplane_rf #(.ROWS(ROWS), .NBIT(NBIT)) dut (
    .clk(clk), .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wd), .rdata_o(rd)
  );

  int checks = 0, failures = 0;
  logic [NBIT-1:0] m [ROWS];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NBIT-1:0] want;
    bit have;
    have = 0;
    en = 0; we = 0; addr = '0; wd = '0;
    // fill every row first
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 4'(r); wd = {$urandom, $urandom};
      m[r] = wd;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (rd != want) begin
          failures++;
          $display("FAIL t=%0d read %h want %h", t, rd, want);
        end
      end
      en   = ($urandom_range(0, 3) != 0);
      we   = $urandom_range(0, 1);
      addr = 4'($urandom_range(0, ROWS - 1));
      wd   = {$urandom, $urandom};
      if (en && we) m[addr] = wd;
      if (en && !we) begin
        want = m[addr];
        have = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
