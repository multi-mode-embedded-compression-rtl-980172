// spiht_engine: list-free two-level SPIHT codec for one 64-coefficient
// coding unit (four hierarchical trees), encoding or decoding.
//
// Bitplanes are coded from the top magnitude plane (MAG_BITS-1) down to the
// plane set by quality control (cfg.trunc). Each plane takes three passes,
// LIP, LIS and LSP, and each pass four cycles: one 4x4 quadrant of the unit
// per cycle, sixteen coefficients in Z order on sixteen PEs (upper array =
// first eight, lower array = last eight).
//
// The SPIHT lists are not kept. Whether a coefficient or set takes part in a
// pass follows from the significance of coefficients before the current plane
// (sig_q, 64 bits) and, for the level-1 coefficients of the LIS pass, from the
// D-set significance of their parent found in the first LIS cycle (dnk_q,
// 12 bits). Per plane n, with "prev" meaning significant before plane n:
//   LIP: c0/root always, level-2 child if D(root) prev, level-1 coefficient
//        if D(parent) prev; each one still insignificant itself codes its bit
//        and, if 1, its sign.
//   LIS: root: Sn(D) if D not prev; then Sn(L) if D significant and L not
//        prev. Level-2 child: bit+sign if D(root) became significant in this
//        plane; Sn(D(child)) if L(root) significant and D(child) not prev.
//        Level-1 coefficient: bit+sign if D(parent) became significant in
//        this plane.
//   LSP: refinement bit of every coefficient significant before plane n.
// This codes exactly the bits of the list-based algorithm; only the order
// inside a pass is the fixed quadrant/Z order.
//
// Rate control: in the half/quarter-size modes the unit's stream stops after
// 256/128 bits (512 bits of pixels divided by 2 or 4); a cycle can be cut
// between two PEs, and the decoder keeps only the PEs that lie wholly inside
// the budget. Every unit's stream is padded to a whole bus word.
//
// Encoding reads the sign row, then one magnitude row per plane, from the
// bitplane register file (the next plane is read during the last coding
// cycle of the current one); decoding writes each decoded plane, zero rows
// for planes not decoded, and finally the sign row. A coding cycle stalls
// while the FIFO has too little room (encode) or too few bits (decode).
// Cycle count per unit without stalls (encode): one sign-row cycle, one
// load cycle, 12 coding cycles + 1 update cycle per coded plane, one flush
// cycle, i.e. 3 + 13 per plane; decoding adds one cycle per row not decoded
// plus one for the sign row.
module spiht_engine
  import ec_pkg::*;
#(
  parameter int unsigned NPLANE = MAG_BITS,
  parameter int unsigned FBW    = BUS_W,
  parameter int unsigned LW     = 8       // width of the FIFO level
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dec_i,
  input  ec_cfg_t           cfg_i,
  input  logic              start_i,
  output logic              busy_o,
  output logic              done_o,
  // bitplane register file port
  output logic              rf_en_o,
  output logic              rf_we_o,
  output logic [3:0]        rf_addr_o,
  output logic [N_COEF-1:0] rf_wdata_o,
  input  logic [N_COEF-1:0] rf_rdata_i,
  // FIFO port
  output logic              f_valid_o,
  output logic [2*PE_W-1:0] f_data_o,
  output logic [5:0]        f_cnt_o,
  input  logic [2*PE_W-1:0] f_win_i,
  input  logic [LW-1:0]     f_level_i,
  input  logic [LW-1:0]     f_space_i,
  // status
  output logic              stall_o,     // a coding cycle waited for the FIFO
  output logic              budget_o,    // the unit ended on its bit budget
  output logic [15:0]       bits_o       // bits of the current unit so far
);

  typedef enum logic [2:0] {
    S_IDLE, S_SIGN, S_LOAD, S_CODE, S_PEND, S_ZROWS, S_SIGNWR, S_FLUSH
  } state_e;

  state_e            st_q;
  ec_cfg_t           cfg_q;
  logic [3:0]        plane_q;
  pass_e             pass_q;
  logic [1:0]        q_q;
  logic [N_COEF-1:0] sig_q, sign_q, plane_bits_q, newb_q;
  logic [11:0]       dnk_q;
  logic [15:0]       used_q;
  logic              last_q;      // budget exhausted: finish after this plane

  // ------------------------------------------------------------------
  // Set significance of every root and level-2 child
  // ------------------------------------------------------------------
  logic [N_COEF-1:0] dprev, lprev, dnow_e, lnow_e;
  logic [N_COEF-1:0] sig_now_e;
  assign sig_now_e = sig_q | plane_bits_q;

  for (genvar i = 0; i < N_COEF; i++) begin : g_sets
    localparam logic [N_COEF-1:0] DM = dmask(6'(i));
    localparam logic [N_COEF-1:0] LM = lmask(6'(i));
    assign dprev[i]  = |(sig_q & DM);
    assign lprev[i]  = |(sig_q & LM);
    assign dnow_e[i] = |(sig_now_e & DM);
    assign lnow_e[i] = |(sig_now_e & LM);
  end

  // ------------------------------------------------------------------
  // Lane control
  // ------------------------------------------------------------------
  pe_ctrl_t [N_LANE-1:0] ctrl;
  logic     [5:0]        lidx [N_LANE];

  always_comb begin
    for (int p = 0; p < N_LANE; p++) begin
      logic [5:0] idx, par;
      role_e      rl;
      logic [1:0] sl;
      idx = coef_index(q_q, 4'(p));
      par = parent_of(idx);
      rl  = role_of(idx);
      sl  = slot_of(idx);
      lidx[p] = idx;
      ctrl[p] = '0;
      ctrl[p].slot   = (sl == 2'd3) ? 2'd0 : sl;
      ctrl[p].bit_e  = plane_bits_q[idx];
      ctrl[p].sign_e = sign_q[idx];
      unique case (pass_q)
        PASS_LIP: begin
          ctrl[p].s_en   = 1'b1;
          ctrl[p].a_base = !sig_q[idx] &&
                           ((rl == ROLE_C0 || rl == ROLE_ROOT) ? 1'b1 : dprev[par]);
        end
        PASS_LIS: begin
          unique case (rl)
            ROLE_ROOT: begin
              ctrl[p].is_root = 1'b1;
              ctrl[p].b_base  = !dprev[idx];
              ctrl[p].b_pre   = dprev[idx];
              ctrl[p].bval_e  = dnow_e[idx];
              ctrl[p].c_base  = !lprev[idx];
              ctrl[p].c_pre   = lprev[idx];
              ctrl[p].cval_e  = lnow_e[idx];
            end
            ROLE_CHILD: begin
              ctrl[p].s_en      = 1'b1;
              ctrl[p].a_base    = !dprev[par];
              ctrl[p].a_need_dn = 1'b1;
              ctrl[p].b_base    = !dprev[idx];
              ctrl[p].b_need_ln = 1'b1;
              ctrl[p].b_pre     = dprev[idx];
              ctrl[p].bval_e    = dnow_e[idx];
            end
            ROLE_GRAND: begin
              ctrl[p].s_en   = 1'b1;
              ctrl[p].a_base = !dprev[par] && dnk_q[child_slot(par)];
            end
            default: ;
          endcase
        end
        default: begin  // PASS_LSP
          ctrl[p].a_base = sig_q[idx];
        end
      endcase
    end
  end

  // ------------------------------------------------------------------
  // PE arrays and shifters
  // ------------------------------------------------------------------
  localparam int unsigned CW = $clog2(PE_W + 1);
  logic [PE_W-1:0]    up_in, up_out, lo_in, lo_out, lo_dec;
  logic [2:0]         up_dn, up_ln;  // root flags passed to the lower array
  pe_res_t [7:0]      up_res, lo_res;
  logic [CW-1:0]      cnt_up, cnt_lo;
  logic [2*PE_W-1:0]  enc_data;
  logic [CW:0]        cnt_tot;

  assign up_in = dec_i ? f_win_i[PE_W-1:0] : '0;
  assign lo_in = dec_i ? lo_dec : '0;

  pe_array #(.NPE(8), .W(PE_W)) u_upper (
    .dec_i(dec_i), .ctrl_i(ctrl[7:0]), .stream_i(up_in), .dn_i(3'b000), .ln_i(3'b000),
    .stream_o(up_out), .dn_o(up_dn), .ln_o(up_ln), .res_o(up_res), .cnt_o(cnt_up)
  );

  decode_shifter #(.W(PE_W)) u_dshift (
    .win_i(f_win_i), .cnt_up_i(cnt_up), .lo_o(lo_dec)
  );

  pe_array #(.NPE(8), .W(PE_W)) u_lower (
    .dec_i(dec_i), .ctrl_i(ctrl[15:8]), .stream_i(lo_in), .dn_i(up_dn), .ln_i(up_ln),
    .stream_o(lo_out), .dn_o(), .ln_o(), .res_o(lo_res), .cnt_o(cnt_lo)
  );

  encode_shifter #(.W(PE_W)) u_eshift (
    .up_i(up_out), .cnt_up_i(cnt_up), .lo_i(lo_out), .cnt_lo_i(cnt_lo),
    .data_o(enc_data), .cnt_o(cnt_tot)
  );

  // ------------------------------------------------------------------
  // Budget, stall, commit
  // ------------------------------------------------------------------
  pe_res_t [N_LANE-1:0] res;
  assign res = {lo_res, up_res};

  logic [15:0] budget, rem, eff, total, pad;
  logic        limited, code_stall, exhaust, last_cycle;
  logic [N_LANE-1:0] commit;

  always_comb begin
    budget  = 16'(unit_budget(cfg_q.rate));
    limited = (budget != 16'd0);
    rem     = budget - used_q;
    total   = 16'(cnt_tot);
    eff     = (limited && total > rem) ? rem : total;
    exhaust = limited && (total >= rem);
    code_stall = dec_i ? (eff > 16'(f_level_i)) : (eff > 16'(f_space_i));
    begin
      logic [15:0] cum;
      cum = '0;
      for (int p = 0; p < N_LANE; p++) begin
        cum = cum + 16'(res[p].cnt);
        commit[p] = !limited || (cum <= rem);
      end
    end
    pad = 16'((FBW - (32'(used_q) % FBW)) % FBW);
    last_cycle = (pass_q == PASS_LSP) && (q_q == 2'd3);
  end

  // ------------------------------------------------------------------
  // Control
  // ------------------------------------------------------------------
  logic [3:0] trunc4;
  assign trunc4 = {1'b0, cfg_q.trunc};

  always_comb begin
    rf_en_o    = 1'b0;
    rf_we_o    = 1'b0;
    rf_addr_o  = plane_q;
    rf_wdata_o = '0;
    f_valid_o  = 1'b0;
    f_data_o   = enc_data;
    f_cnt_o    = eff[5:0];
    stall_o    = 1'b0;
    unique case (st_q)
      S_IDLE: begin
        if (start_i && !dec_i) begin  // read the sign row
          rf_en_o   = 1'b1;
          rf_addr_o = 4'(NPLANE);
        end
      end
      S_SIGN: begin
        rf_en_o   = 1'b1;             // read the top magnitude plane
        rf_addr_o = plane_q;
      end
      S_CODE: begin
        stall_o   = code_stall;
        f_valid_o = !code_stall;
        if (!dec_i && last_cycle && plane_q != trunc4) begin
          rf_en_o   = 1'b1;             // read the next plane ahead
          rf_addr_o = plane_q - 4'd1;
        end
      end
      S_PEND: begin
        if (dec_i) begin
          rf_en_o    = 1'b1;
          rf_we_o    = 1'b1;
          rf_wdata_o = newb_q;
        end
      end
      S_ZROWS: begin
        rf_en_o   = 1'b1;
        rf_we_o   = 1'b1;
        rf_addr_o = plane_q;
      end
      S_SIGNWR: begin
        rf_en_o    = 1'b1;
        rf_we_o    = 1'b1;
        rf_addr_o  = 4'(NPLANE);
        rf_wdata_o = sign_q;
      end
      S_FLUSH: begin
        f_data_o  = '0;
        f_cnt_o   = pad[5:0];
        f_valid_o = dec_i ? (pad <= 16'(f_level_i)) : (pad <= 16'(f_space_i));
      end
      default: ;
    endcase
  end

  assign busy_o = (st_q != S_IDLE);
  assign bits_o = used_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= S_IDLE;
      cfg_q        <= '0;
      plane_q      <= '0;
      pass_q       <= PASS_LIP;
      q_q          <= '0;
      sig_q        <= '0;
      sign_q       <= '0;
      plane_bits_q <= '0;
      newb_q       <= '0;
      dnk_q        <= '0;
      used_q       <= '0;
      last_q       <= 1'b0;
      done_o       <= 1'b0;
      budget_o     <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (st_q)
        S_IDLE: begin
          if (start_i) begin
            cfg_q    <= cfg_i;
            plane_q  <= 4'(NPLANE - 1);
            sig_q    <= '0;
            sign_q   <= '0;
            dnk_q    <= '0;
            used_q   <= '0;
            last_q   <= 1'b0;
            budget_o <= 1'b0;
            st_q     <= dec_i ? S_LOAD : S_SIGN;
          end
        end
        S_SIGN: begin
          sign_q <= rf_rdata_i;
          st_q   <= S_LOAD;
        end
        S_LOAD: begin
          plane_bits_q <= dec_i ? '0 : rf_rdata_i;
          newb_q       <= '0;
          pass_q       <= PASS_LIP;
          q_q          <= '0;
          st_q         <= S_CODE;
        end
        S_CODE: begin
          if (!code_stall) begin
            used_q <= used_q + eff;
            if (dec_i) begin
              for (int p = 0; p < N_LANE; p++) begin
                if (commit[p] && res[p].a_en) begin
                  if (pass_q == PASS_LSP) begin
                    newb_q[lidx[p]] <= res[p].a_val;
                  end else if (res[p].a_val) begin
                    newb_q[lidx[p]] <= 1'b1;
                    sign_q[lidx[p]] <= res[p].s_val;
                  end
                end
              end
            end
            if (pass_q == PASS_LIS && q_q == 2'd0)
              for (int p = 4; p < N_LANE; p++) dnk_q[p-4] <= res[p].out_b;
            if (exhaust) begin
              last_q   <= 1'b1;
              budget_o <= 1'b1;
              st_q     <= S_PEND;
            end else if (last_cycle) begin
              st_q <= S_PEND;
            end else begin
              q_q <= q_q + 2'd1;
              if (q_q == 2'd3) pass_q <= (pass_q == PASS_LIP) ? PASS_LIS : PASS_LSP;
            end
          end
        end
        S_PEND: begin
          sig_q <= sig_q | (dec_i ? newb_q : plane_bits_q);
          if (last_q || plane_q == trunc4) begin
            if (!dec_i)               st_q <= S_FLUSH;
            else if (plane_q == 4'd0) st_q <= S_SIGNWR;
            else begin
              plane_q <= plane_q - 4'd1;
              st_q    <= S_ZROWS;
            end
          end else begin
            plane_q      <= plane_q - 4'd1;
            plane_bits_q <= dec_i ? '0 : rf_rdata_i;
            newb_q       <= '0;
            pass_q       <= PASS_LIP;
            q_q          <= '0;
            st_q         <= S_CODE;
          end
        end
        S_ZROWS: begin
          if (plane_q == 4'd0) st_q <= S_SIGNWR;
          else                 plane_q <= plane_q - 4'd1;
        end
        S_SIGNWR: st_q <= S_FLUSH;
        S_FLUSH: begin
          if (f_valid_o) begin
            done_o <= 1'b1;
            st_q   <= S_IDLE;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

endmodule
