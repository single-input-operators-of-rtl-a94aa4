// tb_dfkpi_system: end-to-end test of the DF-KPI machine at its default sizes
// (16 coordinating processors, 64-token DQU, 256-word IS and FS).
//
// The host loads a small data flow program into the Instruction Store:
//   1 ACCEPT  a -> ADD.L   (single input producer, double input consumer)
//   2 UN_OP   -b -> ADD.R  (NEG)
//   3 BIN_OP  a + (-b) -> INC     (matched in the Frame Store)
//   4 UN_OP   +1 -> IF and KILL   (two destinations: the result is copied)
//   5 IF      nonzero -> 6 OUT, zero -> 7 RET
//   8 KILL
// and puts the a and b tokens of N activations (each with its own matching
// vector MVB) into the DQU in random order: first as fast as the DQU takes
// them, then at random intervals. Two activations share a matching vector, so a
// second left operand collides with the first and goes round through Copy.
// Every result must arrive exactly once, on some CP's host port, with the value
// a - b + 1 (RET when it is zero). Each mechanism is counted from the CPs' event
// outputs and must occur at least once: bypass, FS store, FS match, FS wait,
// Copy, GetDT, PutDI, PutICN, PutDQ, fan-out, KILL, OUT, RET, Operate stall, and work
// on every CP.
module tb_dfkpi_system;
  import dfkpi_pkg::*;

  localparam int NCP = 16;
  localparam int N   = 200;

  logic clk = 0, rst_n = 0, init = 0;
  logic host_put_valid, host_put_ready;
  token_t host_put_tok;
  logic is_we;
  logic [ADR_W-1:0] is_waddr;
  instr_t is_wdata;
  logic [NCP-1:0] host_out_valid, host_out_ret, cp_free, unsupported;
  token_t host_out_tok [NCP];
  cp_state_e state [NCP];
  cp_events_t ev [NCP];
  logic dq_full;
  logic [6:0] dq_count;

  int checks = 0, failures = 0;
  longint cyc = 0;

  dfkpi_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic instr_t ins(input oc_e oc, input int li, input mf_e mf, input ip_e ip,
                                 input int adr);
    instr_t i = '0;
    i.oc = oc; i.li = LI_W'(li); i.dst.mf = mf; i.dst.ip = ip; i.dst.adr = ADR_W'(adr);
    i.ix = IX_W'(adr);
    return i;
  endfunction

  function automatic token_t mk(input int v, input int adr, input int mvb);
    token_t t = '0;
    t.p = 2'd0; t.d.t = 2'd1; t.d.v = V_W'(v);
    t.dst.mf = MF_B; t.dst.ip = IP_L; t.dst.adr = ADR_W'(adr); t.mvb = MVB_W'(mvb);
    return t;
  endfunction

  // ---- mechanism counters ----
  int n_bypass = 0, n_store = 0, n_hit = 0, n_fs_wait = 0, n_copy = 0, n_get = 0;
  int n_put_di = 0, n_put_icn = 0, n_put_dq = 0, n_kill = 0, n_out = 0, n_ret = 0;
  int n_o_stall = 0, n_dq_full = 0, n_unsup = 0, n_fanout = 0;
  int ops_per_cp [NCP];
  initial foreach (ops_per_cp[i]) ops_per_cp[i] = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NCP; i++) begin
      if (ev[i].bypass) n_bypass++;
      if (ev[i].fs_store) n_store++;
      if (ev[i].fs_match) n_hit++;
      if (ev[i].fs_wait) n_fs_wait++;
      if (ev[i].copy) n_copy++;
      if (ev[i].get_dt) n_get++;
      if (ev[i].put_di) n_put_di++;
      if (ev[i].put_icn) n_put_icn++;
      if (ev[i].put_dq) n_put_dq++;
      if (ev[i].consumed) n_kill++;
      if (ev[i].o_stall) n_o_stall++;
      if (ev[i].fanout) n_fanout++;
      if (unsupported[i]) n_unsup++;
      if (cp_free[i]) ops_per_cp[i]++;
    end
    if (dq_full) n_dq_full++;
  end

  // ---- expected results (multiset) ----
  int exp_cnt [int];      // key: value, or -1 for a RET
  int got = 0, n_exp = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NCP; i++) if (host_out_valid[i]) begin
      int key;
      key = host_out_ret[i] ? -1 : int'(host_out_tok[i].d.v);
      if (host_out_ret[i]) n_ret++; else n_out++;
      check(exp_cnt.exists(key) && exp_cnt[key] > 0, "unexpected result");
      if (exp_cnt.exists(key)) exp_cnt[key]--;
      if (host_out_ret[i]) check(host_out_tok[i].d.v == '0, "RET carries zero");
      got++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d results", got, n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    token_t tl[$];
    int a [N], b [N];
    int busy_cps;
    host_put_valid = 0; host_put_tok = '0; is_we = 0; is_waddr = '0; is_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the program
    for (int i = 0; i < 9; i++) begin
      instr_t w;
      case (i)
        1: w = ins(OC_ACCEPT, 0, MF_M, IP_L, 3);
        2: w = ins(OC_UN_OP, UN_NEG, MF_M, IP_R, 3);
        3: w = ins(OC_BIN_OP, BI_ADD, MF_B, IP_L, 4);
        4: begin
             w = ins(OC_UN_OP, UN_INC, MF_B, IP_L, 5);
             w.nd = 1'b1; w.dst2.mf = MF_B; w.dst2.adr = ADR_W'(8);
           end
        5: w = ins(OC_IF, 7, MF_B, IP_L, 6);
        6: w = ins(OC_OUT, 0, MF_B, IP_L, 0);
        7: w = ins(OC_RET, 0, MF_B, IP_L, 0);
        default: w = ins(OC_KILL, 0, MF_B, IP_L, 0);
      endcase
      @(negedge clk);
      is_we = 1; is_waddr = ADR_W'(i); is_wdata = w;
    end
    @(negedge clk);
    is_we = 0;
    // activations; the shared vector's two right operands are equal because
    // which left operand meets which right one is not fixed
    for (int k = 0; k < N; k++) begin
      a[k] = int'($urandom % 2000) - 1000;
      b[k] = (k % 7 == 3) ? a[k] + 1 : int'($urandom % 2000) - 1000;
    end
    b[1] = b[0];
    for (int k = 0; k < N; k++) begin
      int r;
      r = (a[k] - b[k] + 1) & 16'hFFFF;
      if (r == 0) r = -1;
      if (exp_cnt.exists(r)) exp_cnt[r]++; else exp_cnt[r] = 1;
      n_exp++;
    end
    tl.push_back(mk(a[0], 1, 0));
    tl.push_back(mk(a[1], 1, 0));
    for (int k = 2; k < N; k++) begin
      tl.push_back(mk(a[k], 1, k));
      tl.push_back(mk(b[k], 2, k));
    end
    tl.shuffle();
    for (int i = 0; i < 4; i++) tl.push_back(mk(i, 8, 250));   // KILL
    tl.push_back(mk(b[0], 2, 0));
    tl.push_back(mk(b[1], 2, 0));
    for (int i = 0; i < tl.size(); i++) begin
      @(negedge clk);
      host_put_valid = 1; host_put_tok = tl[i];
      do @(posedge clk); while (!host_put_ready);
      #1 host_put_valid = 0;
      if (i > 120) repeat ($urandom % 6) @(posedge clk);
      if (i == tl.size() - 3) repeat (60) @(posedge clk);
    end
    while (got < n_exp) @(posedge clk);
    repeat (100) @(posedge clk);
    check(got == n_exp, "number of results");
    check(dq_count == 0, "no token left in the DQU");
    check(n_unsup == 0, "no unsupported operator");
    busy_cps = 0;
    foreach (ops_per_cp[i]) if (ops_per_cp[i] > 0) busy_cps++;
    $display("bypass=%0d store=%0d match=%0d fs_wait=%0d copy=%0d getdt=%0d putdi=%0d puticn=%0d putdq=%0d",
             n_bypass, n_store, n_hit, n_fs_wait, n_copy, n_get, n_put_di, n_put_icn, n_put_dq);
    $display("fanout=%0d kill=%0d out=%0d ret=%0d o_stall=%0d dq_full=%0d cps_used=%0d cycles=%0d",
             n_fanout, n_kill, n_out, n_ret, n_o_stall, n_dq_full, busy_cps, cyc);
    check(n_bypass > 0, "bypass happened");
    check(n_store > 0, "FS store happened");
    check(n_hit == N, "one FS match per activation");
    check(n_fs_wait > 0, "a CP waited for the Frame Store");
    check(n_copy > 0, "Copy happened");
    check(n_get > 0, "GetDT happened");
    check(n_put_di > 0, "PutDI happened");
    check(n_put_icn > 0, "PutICN happened");
    check(n_put_dq > 0, "PutDQ happened");
    check(n_fanout == N, "one fan-out per activation");
    check(n_kill == 4 + N, "KILL happened, once per activation and for the direct tokens");
    check(n_out > 0 && n_ret > 0, "OUT and RET happened");
    check(n_o_stall > 0, "Operate stall happened");
    check(busy_cps == NCP, "every CP worked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
