// dfkpi_cp: coordinating processor (CP) pipeline for data-flow operators.
//
// The CP is a multi-function pipeline whose segments are sequenced by the
// micro-program in dfkpi_ctrl. One token at a time moves through its registers:
//   CP.DI  one-token input port register, written by the CP's own result
//          (PutDI), else by the network (icn_in_*), else from the DQU (GetDT),
//          whenever it is empty, also while the segments behind it are busy.
//   CP     the token being matched: <P><D><MVB><DST: MF IP ADR><IX>, loaded
//          from CP.DI by the Load segment.
//   CMP    splits on DST.MF: B goes straight to LFR; M is matched in the Frame
//          Store item MVB+IX. An empty item takes the operand (back to Load); an
//          item holding the partner gives it up and the pair goes to LFR; an item
//          holding an operand for the same port sends the token to Copy, which
//          writes it back to the DQU (PutDT), or to the network when the DQU is
//          full. Such a token comes back through GetDT and is retried until its
//          partner has arrived and freed the item.
//   LFR    Load/Fetch register: the token, plus the partner operand after a match.
//          LFR.DST.ADR addresses the Instruction Store.
//   FOR    Fetch/Operate register: operator OC, LI, DST, IX from the IS, with the
//          left operand LD and right operand RD ordered by input port IP.
//   PEU    executes the operator; the result token <P><D><MVB><DST><IX> takes D
//          from the PEU, DST and IX from the operator, P and MVB from the operand.
// The result goes, in this order of preference, to the CP's own CP.DI when it
// is empty (PutDI), to the network when it offers a free neighbouring CP
// (PutICN), or to the DQU (PutDQ). An operator with a second destination
// (instr nd = 1) sends its result twice, in consecutive Operate clocks at the
// earliest: first to DST/IX, then to DST2/IX2, each by the same preference. IF
// and CASE change the address of each copy alike. OUT and RET results leave on
// host_out_* once; KILL produces nothing.
//
// A CP counts as busy while its CP.DI holds a token. Timing: a bypassed
// single-input token takes 5 clocks from Load to the clock its result leaves
// (L, M, F, F, O); a matched token one more (M, M); a token taken from the DQU
// spends one clock in CP.DI first; a second destination adds at least one
// clock in Operate. The register set, CMP, the B/M split, the three result
// destinations and their order, and several destinations per operator, follow
// DF-KPI; the handshakes, the widths and the clock counts are this design's
// choice. The PEU result is used directly rather than registered.
module dfkpi_cp
  import dfkpi_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  // CP.DI from the interconnection network
  input  logic             icn_in_valid,
  input  token_t           icn_in_tok,
  output logic             icn_in_ready,
  // CP.DO to the interconnection network (PutICN)
  output logic             icn_out_valid,
  output token_t           icn_out_tok,
  input  logic             icn_out_ready,  // some other CP is free
  // Data Queue Unit (GetDT / PutDT)
  output logic             dq_want,        // CP.DI can take a token from the DQU
  output logic             dq_get,
  input  token_t           dq_head,
  input  logic             dq_empty,
  output logic             dq_put,
  output token_t           dq_put_tok,
  input  logic             dq_put_ready,
  // Instruction Store read port
  output logic             is_rd_en,
  output logic [ADR_W-1:0] is_rd_addr,
  input  instr_t           is_rd_data,
  // Frame Store
  output logic             fs_req,         // waiting for the Frame Store
  input  logic             fs_gnt,         // Frame Store granted this clock
  output logic             fs_rd_en,
  output logic [MVB_W-1:0] fs_rd_addr,
  input  logic             fs_rd_af,
  input  ip_e              fs_rd_ip,
  input  data_t            fs_rd_v,
  output logic             fs_st_en,
  output logic [MVB_W-1:0] fs_st_addr,
  output ip_e              fs_st_ip,
  output data_t            fs_st_v,
  output logic             fs_clr_en,
  output logic [MVB_W-1:0] fs_clr_addr,
  // results of OUT / RET
  output logic             host_out_valid,
  output token_t           host_out_tok,
  output logic             host_out_ret,
  // status
  output cp_state_e        state,
  output logic             cp_free,
  output logic             unsupported,
  output cp_events_t       ev
);

  typedef struct packed {
    token_t tok;
    data_t  partner;   // operand taken from the Frame Store
    logic   paired;
  } lfr_t;

  typedef struct packed {
    instr_t           ins;
    ip_e              ip;
    data_t            ld;
    data_t            rd;
    logic [P_W-1:0]   p;
    logic [MVB_W-1:0] mvb;
  } for_t;

  logic   di_valid;
  token_t di_tok;
  token_t cp_tok;
  lfr_t   lfr;
  for_t   fr;

  // control
  logic load, fs_rd, fs_store, fs_clear, lfr_load, c_put, is_rd, for_load, operate;
  logic bypass, match, fs_hit, fs_same, emit_done, emit_one, last_copy;
  logic second;      // Operate is sending the copy for the second destination
  dst_t cur_dst;
  logic [IX_W-1:0] cur_ix;
  logic [MVB_W-1:0] item;

  // operate
  data_t            peu_d;
  route_e           route;
  logic             peu_ret, peu_unsup;
  logic [ADR_W-1:0] res_adr;
  token_t           res_tok;
  logic             put_di, put_icn, put_dq, c_dq, c_icn;

  dfkpi_cmp u_cmp (
    .tok      (cp_tok),
    .tok_valid(state == ST_M),
    .bypass   (bypass),
    .match    (match),
    .fs_addr  (item)
  );

  assign fs_hit  = fs_rd_af && (fs_rd_ip != cp_tok.dst.ip);
  assign fs_same = fs_rd_af && (fs_rd_ip == cp_tok.dst.ip);

  dfkpi_ctrl u_ctrl (
    .clk, .rst_n, .init,
    .tok_avail   (di_valid),
    .bypass, .match, .fs_hit, .fs_same, .fs_gnt,
    .c_ready     (dq_put_ready || icn_out_ready),
    .emit_done,
    .state,
    .load, .fs_req, .fs_rd, .fs_store, .fs_clear, .lfr_load, .c_put, .is_rd, .for_load,
    .operate, .cp_free
  );

  dfkpi_peu u_peu (
    .oc         (fr.ins.oc),
    .li         (fr.ins.li),
    .dst_adr    (cur_dst.adr),
    .ld         (fr.ld),
    .rd         (fr.rd),
    .d          (peu_d),
    .route      (route),
    .ret        (peu_ret),
    .res_adr    (res_adr),
    .unsupported(peu_unsup)
  );

  // Load: CP.DI first, else GetDT from the DQU.
  assign dq_want = !di_valid && !put_di;
  assign dq_get  = dq_want && !icn_in_valid && !dq_empty;

  // Matching: Frame Store accesses for the item MVB+IX.
  assign fs_rd_en    = fs_rd;
  assign fs_rd_addr  = item;
  assign fs_st_en    = fs_store;
  assign fs_st_addr  = item;
  assign fs_st_ip    = cp_tok.dst.ip;
  assign fs_st_v     = cp_tok.d;
  assign fs_clr_en   = fs_clear;
  assign fs_clr_addr = item;

  // Fetch: operator at LFR.DST.ADR.
  assign is_rd_en   = is_rd;
  assign is_rd_addr = lfr.tok.dst.adr;

  // Operate: result token and its destination (first, then second copy).
  assign cur_dst = second ? fr.ins.dst2 : fr.ins.dst;
  assign cur_ix  = second ? fr.ins.ix2  : fr.ins.ix;

  always_comb begin
    res_tok         = '0;
    res_tok.p       = fr.p;
    res_tok.d       = peu_d;
    res_tok.mvb     = fr.mvb;
    res_tok.dst     = cur_dst;
    res_tok.dst.adr = res_adr;
    res_tok.ix      = cur_ix;
  end

  always_comb begin
    put_di  = operate && (route == RT_NET) && !di_valid;
    put_icn = operate && (route == RT_NET) && di_valid && icn_out_ready;
    put_dq  = operate && (route == RT_NET) && di_valid && !icn_out_ready && dq_put_ready;
    emit_one  = operate && (route != RT_NET || put_di || put_icn || put_dq);
    last_copy = (route != RT_NET) || !fr.ins.nd || second;
    emit_done = emit_one && last_copy;
  end

  assign icn_in_ready   = !di_valid && !put_di;
  assign c_dq           = c_put && dq_put_ready;
  assign c_icn          = c_put && !dq_put_ready && icn_out_ready;
  assign icn_out_valid  = put_icn || c_icn;
  assign icn_out_tok    = c_put ? cp_tok : res_tok;
  assign dq_put         = c_dq || put_dq;
  assign dq_put_tok     = c_put ? cp_tok : res_tok;
  assign host_out_valid = operate && (route == RT_HOST);
  assign host_out_tok   = res_tok;
  assign host_out_ret   = peu_ret;
  assign unsupported    = operate && peu_unsup;

  always_comb begin
    ev.bypass   = lfr_load && bypass;
    ev.fs_store = fs_store;
    ev.fs_match = fs_clear;
    ev.fs_wait  = fs_req && !fs_gnt;
    ev.copy     = c_dq || c_icn;
    ev.get_dt   = dq_get;
    ev.put_di   = put_di;
    ev.put_icn  = put_icn;
    ev.put_dq   = put_dq;
    ev.consumed = operate && route == RT_NONE && !peu_unsup;
    ev.o_stall  = operate && !emit_one;
    ev.fanout   = emit_one && !last_copy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      di_valid <= 1'b0;
      di_tok   <= '0;
      cp_tok   <= '0;
      lfr      <= '0;
      fr       <= '0;
      second   <= 1'b0;
    end else if (init) begin
      di_valid <= 1'b0;
      second   <= 1'b0;
    end else begin
      // Operate: after the first of two copies, send the second
      if (emit_one) second <= !last_copy;
      // CP.DI
      if (put_di) begin
        di_valid <= 1'b1;
        di_tok   <= res_tok;
      end else if (icn_in_valid && icn_in_ready) begin
        di_valid <= 1'b1;
        di_tok   <= icn_in_tok;
      end else if (dq_get) begin
        di_valid <= 1'b1;
        di_tok   <= dq_head;
      end else if (load) begin
        di_valid <= 1'b0;
      end
      // CP register
      if (load) cp_tok <= di_tok;
      // LFR
      if (lfr_load) begin
        lfr.tok     <= cp_tok;
        lfr.partner <= fs_rd_v;
        lfr.paired  <= match;
      end
      // FOR: operands ordered by input port
      if (for_load) begin
        fr.ins <= is_rd_data;
        fr.ip  <= lfr.tok.dst.ip;
        fr.p   <= lfr.tok.p;
        fr.mvb <= lfr.tok.mvb;
        if (lfr.paired && lfr.tok.dst.ip == IP_R) begin
          fr.ld <= lfr.partner;
          fr.rd <= lfr.tok.d;
        end else begin
          fr.ld <= lfr.tok.d;
          fr.rd <= lfr.paired ? lfr.partner : '0;
        end
      end
    end
  end

  a_one_put: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({put_di, put_icn, put_dq, c_dq, c_icn}))
    else $error("result sent to more than one place");

endmodule
