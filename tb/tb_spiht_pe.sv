// tb_spiht_pe: random test of one SPIHT processing element.
//
// Random control words and streams are applied in both directions. The
// expected bits are worked out here from the coding rules (own bit when
// enabled, sign after a 1 when allowed, set bit, L-set bit of a root when its
// D set is significant); an encoded PE must put exactly those bits, oldest
// lowest, at the top of the shifted stream, and a decoding PE fed with them
// must return the same values, the same count and the input shifted right.
module tb_spiht_pe;
  import ec_pkg::*;

  localparam int W = 24;

  logic         dec;
  pe_ctrl_t     ctrl;
  logic [W-1:0] sin, sout;
  logic [2:0]   dn_i, ln_i, dn_o, ln_o;
  pe_res_t      res;

  spiht_pe #(.W(W)) dut (
    .dec_i(dec), .ctrl_i(ctrl), .stream_i(sin), .dn_i(dn_i), .ln_i(ln_i),
    .stream_o(sout), .dn_o(dn_o), .ln_o(ln_o), .res_o(res)
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
    for (int t = 0; t < 3000; t++) begin
      bit exp_bits[$];
      bit a_en, b_en, c_en, ob, oc;
      logic [W-1:0] prev, enc_out;
      int n;
      exp_bits.delete();
      ctrl = pe_ctrl_t'({$urandom, $urandom});
      ctrl.slot = 2'($urandom_range(0, 2));
      dn_i = 3'($urandom);
      ln_i = 3'($urandom);
      // expected bits
      a_en = ctrl.a_base && (!ctrl.a_need_dn || dn_i[ctrl.slot]);
      b_en = ctrl.b_base && (!ctrl.b_need_ln || ln_i[ctrl.slot]);
      if (a_en) begin
        exp_bits.push_back(ctrl.bit_e);
        if (ctrl.bit_e && ctrl.s_en) exp_bits.push_back(ctrl.sign_e);
      end
      if (b_en) exp_bits.push_back(ctrl.bval_e);
      ob = ctrl.b_pre || (b_en && ctrl.bval_e);
      c_en = ctrl.c_base && ob;
      if (c_en) exp_bits.push_back(ctrl.cval_e);
      oc = ctrl.c_pre || (c_en && ctrl.cval_e);
      n = exp_bits.size();
      // encode
      dec = 1'b0;
      prev = W'($urandom);
      sin = prev;
      #1;
      enc_out = prev >> n;
      for (int i = 0; i < n; i++) enc_out[W - n + i] = exp_bits[i];
      check(int'(res.cnt) == n, $sformatf("enc count %0d want %0d", res.cnt, n));
      check(sout == enc_out, $sformatf("enc stream %h want %h", sout, enc_out));
      check(res.out_b == ob, "enc set flag");
      check(dn_o == (ctrl.is_root ? ((dn_i & ~(3'b1 << ctrl.slot)) | (3'(ob) << ctrl.slot)) : dn_i),
            "enc dn chain");
      check(ln_o == (ctrl.is_root ? ((ln_i & ~(3'b1 << ctrl.slot)) | (3'(oc) << ctrl.slot)) : ln_i),
            "enc ln chain");
      // decode: the expected bits at the bottom, random bits above
      dec = 1'b1;
      sin = W'({$urandom});
      for (int i = 0; i < n; i++) sin[i] = exp_bits[i];
      ctrl.bit_e = ~ctrl.bit_e; ctrl.sign_e = ~ctrl.sign_e;  // must be ignored
      ctrl.bval_e = ~ctrl.bval_e; ctrl.cval_e = ~ctrl.cval_e;
      #1;
      check(int'(res.cnt) == n, $sformatf("dec count %0d want %0d", res.cnt, n));
      check(sout == (sin >> n), "dec shift");
      check(res.out_b == ob, "dec set flag");
      if (a_en) check(res.a_val == exp_bits[0], "dec own bit");
      if (a_en && exp_bits[0] && ctrl.s_en) check(res.s_val == exp_bits[1], "dec sign");
      check(ln_o == (ctrl.is_root ? ((ln_i & ~(3'b1 << ctrl.slot)) | (3'(oc) << ctrl.slot)) : ln_i),
            "dec ln chain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
