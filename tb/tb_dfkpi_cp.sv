// tb_dfkpi_cp: self-checking test of the coordinating processor pipeline.
// The CP is connected to simple models of the DQU (a queue), the Instruction
// Store (an array read one clock late) and the Frame Store (AF/IP/V arrays).
// A small program exercises a bypassed single input operator chain, IF on both
// branches, KILL, an unsupported operator, matching in both arrival orders, a
// same-port collision sent back to the DQU through Copy, and the three result
// destinations (own CP.DI, network, DQU). Results are compared with values
// computed here, and the latency of a bypassed operator pair (10 clocks from
// network hand-over to the OUT result) and of a matched one (11) is checked.
module tb_dfkpi_cp;
  import dfkpi_pkg::*;

  logic clk = 0, rst_n = 0, init = 0;
  logic icn_in_valid, icn_in_ready, icn_out_valid, icn_out_ready;
  token_t icn_in_tok, icn_out_tok;
  logic dq_get, dq_empty, dq_put, dq_put_ready;
  token_t dq_head, dq_put_tok;
  logic is_rd_en;
  logic [ADR_W-1:0] is_rd_addr;
  instr_t is_rd_data;
  logic fs_rd_en, fs_rd_af, fs_st_en, fs_clr_en;
  logic [MVB_W-1:0] fs_rd_addr, fs_st_addr, fs_clr_addr;
  ip_e fs_rd_ip, fs_st_ip;
  data_t fs_rd_v, fs_st_v;
  logic host_out_valid, host_out_ret, cp_free, unsupported;
  token_t host_out_tok;
  cp_state_e state;
  cp_events_t ev;
  logic fs_req, fs_gnt = 1'b1, dq_want;

  int checks = 0, failures = 0;
  longint cyc = 0, t_in = 0, t_out = 0;
  int fs_seen = 0;
  int n_unsup = 0, n_icn_out = 0, n_dq_put = 0, n_host = 0, n_free = 0, n_fanout = 0;
  longint t_fan [$];

  dfkpi_cp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- models of the stores ----
  token_t q[$];
  instr_t prog [2**ADR_W];
  logic   m_af [2**MVB_W];
  ip_e    m_ip [2**MVB_W];
  data_t  m_v  [2**MVB_W];

  assign dq_empty     = (q.size() == 0);
  assign dq_head      = dq_empty ? '0 : q[0];
  assign dq_put_ready = q.size() < 4;

  // The queue changes just after the clock edge, so that the CP samples the
  // head token as it was before the edge.
  always @(posedge clk) begin
    logic   g, pu;
    token_t pt;
    g  = dq_get && q.size() > 0;
    pu = dq_put && dq_put_ready;
    pt = dq_put_tok;
    #1;
    if (g) void'(q.pop_front());
    if (pu) begin
      q.push_back(pt);
      n_dq_put++;
    end
  end

  always @(posedge clk) begin
    if (is_rd_en) is_rd_data <= prog[is_rd_addr];
    if (fs_rd_en) begin
      fs_rd_af <= m_af[fs_rd_addr];
      fs_rd_ip <= m_ip[fs_rd_addr];
      fs_rd_v  <= m_v[fs_rd_addr];
    end
    if (fs_clr_en) m_af[fs_clr_addr] = 0;
    if (fs_st_en) begin
      m_af[fs_st_addr] = 1; m_ip[fs_st_addr] = fs_st_ip; m_v[fs_st_addr] = fs_st_v;
    end
  end

  // ---- observed outputs ----
  token_t hq[$];
  logic   rq[$];
  token_t nq[$];
  always @(posedge clk) if (rst_n) begin
    if (icn_in_valid && icn_in_ready) t_in = cyc;
    if (host_out_valid) begin
      hq.push_back(host_out_tok); rq.push_back(host_out_ret); t_out = cyc; n_host++;
    end
    if (icn_out_valid && icn_out_ready) begin nq.push_back(icn_out_tok); n_icn_out++; end
    if (unsupported) n_unsup++;
    if (cp_free) n_free++;
    if (ev.fanout) n_fanout++;
    if (ev.put_di || ev.put_icn || ev.put_dq) t_fan.push_back(cyc);
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic token_t mk(input int v, input mf_e mf, input ip_e ip, input int adr,
                                input int mvb = 0, input int ix = 0);
    token_t t = '0;
    t.p = 2'd1; t.d.t = 2'd2; t.d.v = V_W'(v);
    t.dst.mf = mf; t.dst.ip = ip; t.dst.adr = ADR_W'(adr);
    t.mvb = MVB_W'(mvb); t.ix = IX_W'(ix);
    return t;
  endfunction

  function automatic instr_t ins(input oc_e oc, input int li, input int adr,
                                 input mf_e mf = MF_B, input ip_e ip = IP_L);
    instr_t i = '0;
    i.oc = oc; i.li = LI_W'(li); i.dst.mf = mf; i.dst.ip = ip; i.dst.adr = ADR_W'(adr);
    i.ix = 4'd5;
    return i;
  endfunction

  task automatic send(input token_t t);
    @(negedge clk);
    icn_in_valid = 1; icn_in_tok = t;
    do @(posedge clk); while (!icn_in_ready);
    #1 icn_in_valid = 0;
  endtask

  task automatic settle();
    int idle = 0;
    while (idle < 4) begin
      @(posedge clk);
      if (state == ST_L && icn_in_ready && q.size() == 0) idle++; else idle = 0;
    end
  endtask

  task automatic expect_host(input int v, input logic ret, input string what);
    check(hq.size() == 1, {what, ": one result"});
    if (hq.size() > 0) begin
      check(hq[0].d.v == V_W'(v), {what, ": value"});
      check(rq[0] == ret, {what, ": OUT/RET"});
      check(hq[0].p == 2'd1 && hq[0].d.t == 2'd2, {what, ": P and T carried"});
    end
    hq.delete(); rq.delete();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    icn_in_valid = 0; icn_in_tok = '0; icn_out_ready = 0;
    foreach (m_af[i]) m_af[i] = 0;
    foreach (prog[i]) prog[i] = ins(OC_KILL, 0, 0);
    prog[10] = ins(OC_UN_OP, UN_NEG, 20);
    prog[20] = ins(OC_OUT, 0, 0);
    prog[21] = ins(OC_RET, 0, 0);
    prog[30] = ins(OC_BIN_OP, BI_SUB, 20);
    prog[40] = ins(OC_IF, 21, 20);
    prog[50] = ins(OC_KILL, 0, 0);
    prog[51] = ins(OC_SEL, 0, 20);
    prog[60] = ins(OC_ACCEPT, 0, 10);
    prog[70] = ins(OC_UN_OP, UN_INC, 20);           // two destinations: OUT, RET
    prog[70].nd = 1'b1; prog[70].dst2.adr = 8'd21; prog[70].ix2 = 4'd9;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // bypassed UN_OP then OUT
    send(mk(5, MF_B, IP_L, 10));
    settle();
    expect_host(-5, 0, "UN_OP NEG");
    check(t_out - t_in == 10, "latency of two bypassed operators");
    // ACCEPT -> UN_OP -> OUT
    send(mk(9, MF_B, IP_L, 60));
    settle();
    expect_host(-9, 0, "ACCEPT chain");
    // IF both ways
    send(mk(3, MF_B, IP_L, 40));
    settle();
    expect_host(3, 0, "IF true");
    send(mk(0, MF_B, IP_L, 40));
    settle();
    expect_host(0, 1, "IF false to RET");
    // KILL and an unsupported operator
    send(mk(4, MF_B, IP_L, 50));
    settle();
    check(hq.size() == 0 && n_unsup == 0, "KILL produces nothing");
    send(mk(4, MF_B, IP_L, 51));
    settle();
    check(hq.size() == 0 && n_unsup == 1, "SEL flagged unsupported");
    // matching, left first then right first
    send(mk(7, MF_M, IP_L, 30, 4, 2));
    settle();
    check(hq.size() == 0 && m_af[6] == 1, "first operand waits in FS");
    send(mk(3, MF_M, IP_R, 30, 4, 2));
    settle();
    check(t_out - t_in == 11, "latency of matched operator then OUT");
    expect_host(4, 0, "BIN_OP SUB L,R");
    // the same with the Frame Store withheld for 6 clocks
    fork
      begin
        fs_gnt = 1'b0;
        repeat (6) begin
          @(posedge clk);
          if (fs_rd_en) fs_seen++;
        end
        fs_gnt = 1'b1;
      end
      begin
        send(mk(7, MF_M, IP_L, 30, 4, 2));
      end
    join
    check(fs_seen == 0, "no FS access without grant");
    settle();
    send(mk(3, MF_M, IP_R, 30, 4, 2));
    settle();
    expect_host(4, 0, "BIN_OP SUB after FS wait");
    check(m_af[6] == 0, "FS item released");
    send(mk(3, MF_M, IP_R, 30, 4, 2));
    settle();
    send(mk(7, MF_M, IP_L, 30, 4, 2));
    settle();
    expect_host(4, 0, "BIN_OP SUB R,L");
    // same-port collision: second left operand goes back to the DQU
    n_dq_put = 0;
    send(mk(7, MF_M, IP_L, 30, 8, 0));
    send(mk(9, MF_M, IP_L, 30, 8, 0));
    // the second operand cycles between the DQU and Copy until its slot frees
    repeat (30) @(posedge clk);
    check(n_dq_put >= 2, "collision copied to DQU");
    check(hq.size() == 0, "no result yet");
    send(mk(1, MF_M, IP_R, 30, 8, 0));
    settle();
    expect_host(6, 0, "first pair");
    check(m_af[8] == 1 && m_v[8].v == 16'd9, "re-queued operand now waits in FS");
    send(mk(2, MF_M, IP_R, 30, 8, 0));
    settle();
    expect_host(7, 0, "second pair");
    // result routing: CP.DI busy, network free -> PutICN
    icn_out_ready = 1;
    send(mk(1, MF_B, IP_L, 10));
    send(mk(4, MF_B, IP_L, 50));        // occupies CP.DI while UN_OP operates
    settle();
    check(nq.size() == 1, "result sent to the network");
    if (nq.size() > 0) check(nq[0].d.v == 16'hFFFF && nq[0].dst.adr == 8'd20 && nq[0].ix == 4'd5,
                             "network token");
    check(hq.size() == 0, "nothing to host");
    // CP.DI busy, network busy -> PutDQ, later GetDT and OUT
    icn_out_ready = 0;
    n_dq_put = 0;
    send(mk(2, MF_B, IP_L, 10));
    send(mk(4, MF_B, IP_L, 50));
    settle();
    check(n_dq_put == 1, "result stored in DQU");
    expect_host(-2, 0, "DQU token processed");
    check(n_icn_out == 1, "network used once");
    check(n_free > 10, "CP_free pulses");
    // fan-out: first copy to the own CP.DI, second (CP.DI now busy, network
    // busy) to the DQU; both come back as OUT and RET
    icn_out_ready = 0;
    n_dq_put = 0; hq.delete(); rq.delete(); t_fan.delete();
    send(mk(6, MF_B, IP_L, 70));
    settle();
    check(n_fanout == 1, "one fan-out");
    check(n_dq_put == 1, "second copy to the DQU");
    check(hq.size() == 2, "two results from one operator");
    if (hq.size() == 2) begin
      check(hq[0].d.v == 16'd7 && rq[0] == 0, "first copy: OUT");
      check(hq[1].d.v == 16'd7 && rq[1] == 1, "second copy: RET");
    end
    check(t_fan.size() >= 2 && t_fan[1] == t_fan[0] + 1, "copies in consecutive clocks");
    // fan-out over the network: second copy carries DST2 and IX2
    icn_out_ready = 1;
    nq.delete(); t_fan.delete();
    send(mk(1, MF_B, IP_L, 70));
    send(mk(4, MF_B, IP_L, 50));        // keeps CP.DI busy during Operate
    settle();
    check(nq.size() == 2, "both copies over the network");
    if (nq.size() == 2) begin
      check(nq[0].dst.adr == 8'd20 && nq[0].ix == 4'd5 && nq[0].d.v == 16'd2, "copy 1 DST/IX");
      check(nq[1].dst.adr == 8'd21 && nq[1].ix == 4'd9 && nq[1].d.v == 16'd2, "copy 2 DST2/IX2");
    end
    check(n_fanout == 2, "second fan-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
