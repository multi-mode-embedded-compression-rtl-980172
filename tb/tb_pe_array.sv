// tb_pe_array: an encoding PE array followed by a decoding PE array.
//
// Random per-lane control (with the root flags passed along the chain) is
// applied to an encoding array; its output bits, right-aligned, are fed to a
// second array that decodes with the encode values scrambled. The decoder
// must consume exactly as many bits as were produced, report the same per-PE
// counts and own bits, and leave the same root flags. The total count must
// equal the sum of the per-PE counts and fit the W-bit stream.
module tb_pe_array;
  import ec_pkg::*;

  localparam int NPE = 8;
  localparam int W   = 24;

  pe_ctrl_t [NPE-1:0] ctrl_e, ctrl_d;
  logic [W-1:0]       se_out, sd_in, sd_out;
  logic [2:0]         dn_e, ln_e, dn_d, ln_d, dn_i, ln_i;
  pe_res_t [NPE-1:0]  res_e, res_d;
  logic [$clog2(W+1)-1:0] cnt_e, cnt_d;

  pe_array #(.NPE(NPE), .W(W)) u_enc (
    .dec_i(1'b0), .ctrl_i(ctrl_e), .stream_i('0), .dn_i(dn_i), .ln_i(ln_i),
    .stream_o(se_out), .dn_o(dn_e), .ln_o(ln_e), .res_o(res_e), .cnt_o(cnt_e)
  );
  pe_array #(.NPE(NPE), .W(W)) u_dec (
    .dec_i(1'b1), .ctrl_i(ctrl_d), .stream_i(sd_in), .dn_i(dn_i), .ln_i(ln_i),
    .stream_o(sd_out), .dn_o(dn_d), .ln_o(ln_d), .res_o(res_d), .cnt_o(cnt_d)
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
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int sum;
      dn_i = 3'($urandom);
      ln_i = 3'($urandom);
      for (int i = 0; i < NPE; i++) begin
        ctrl_e[i] = pe_ctrl_t'({$urandom, $urandom});
        ctrl_e[i].slot = 2'($urandom_range(0, 2));
        ctrl_e[i].c_base = ctrl_e[i].c_base & ctrl_e[i].is_root;  // at most three bits
        if (ctrl_e[i].b_base) ctrl_e[i].c_base = 1'b0;
        ctrl_d[i] = ctrl_e[i];
        ctrl_d[i].bit_e = $urandom; ctrl_d[i].sign_e = $urandom;
        ctrl_d[i].bval_e = $urandom; ctrl_d[i].cval_e = $urandom;
      end
      #1;
      sum = 0;
      for (int i = 0; i < NPE; i++) sum += int'(res_e[i].cnt);
      check(int'(cnt_e) == sum, "count is the sum of the PE counts");
      check(sum <= W, "stream fits");
      sd_in = (se_out >> (W - int'(cnt_e))) | (W'($urandom) << cnt_e);
      #1;
      check(cnt_d == cnt_e, $sformatf("decode count %0d, encode count %0d", cnt_d, cnt_e));
      for (int i = 0; i < NPE; i++) begin
        check(res_d[i].cnt == res_e[i].cnt && res_d[i].a_en == res_e[i].a_en &&
              (!res_e[i].a_en || res_d[i].a_val == res_e[i].a_val) &&
              res_d[i].out_b == res_e[i].out_b, $sformatf("lane %0d differs", i));
      end
      check(dn_d == dn_e && ln_d == ln_e, "root flags differ");
      check(sd_out == (sd_in >> cnt_d), "decoder shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
