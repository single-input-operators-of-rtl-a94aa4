// tb_dfkpi_bus: self-checking test of the shared DQU / Frame Store bus (4 CPs).
// Every clock the CP states and requests are random, and the CPs answer the
// grants as CPs do (take the head only when shown a non-empty DQU, put only
// when shown ready). Checked each clock: at most one GetDT, PutDT and Frame
// Store grant, each only to a requester; a grant whenever there is a requester
// and nothing forbids it; no Frame Store grant in the clock after one; the DQU
// write takes the granted CP's token, or the host's only when no CP writes and
// more than 2*NCP places are free. Every CP must win each grant some time.
module tb_dfkpi_bus;
  import dfkpi_pkg::*;
  localparam int NCP = 4;
  localparam int DQ_DEPTH = 16;

  logic clk = 0, rst_n = 0;
  cp_state_e state [NCP];
  logic [NCP-1:0] dq_want, dq_get, dq_empty_cp, dq_put, dq_ready_cp, fs_req, fs_gnt;
  token_t dq_put_tok [NCP];
  logic host_put_valid, host_put_ready;
  token_t host_put_tok, q_tok;
  logic q_put, q_get, q_empty, q_full;
  logic [$clog2(DQ_DEPTH+1)-1:0] q_count;
  int checks = 0, failures = 0;
  int w_get [NCP], w_put [NCP], w_fs [NCP];
  logic prev_fs;

  dfkpi_bus #(.NCP(NCP), .DQ_DEPTH(DQ_DEPTH)) dut (
    .clk, .rst_n, .state, .dq_want, .dq_get, .dq_empty_cp, .dq_put, .dq_put_tok,
    .dq_ready_cp, .host_put_valid, .host_put_tok, .host_put_ready, .fs_req, .fs_gnt,
    .q_put, .q_tok, .q_get, .q_empty, .q_full, .q_count);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ones(input logic [NCP-1:0] v);
    int n = 0;
    for (int i = 0; i < NCP; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (w_get[i]) begin w_get[i] = 0; w_put[i] = 0; w_fs[i] = 0; end
    foreach (state[i]) state[i] = ST_L;
    dq_want = '0; dq_get = '0; dq_put = '0; fs_req = '0; host_put_valid = 0;
    host_put_tok = '0; q_empty = 1; q_full = 0; q_count = '0;
    foreach (dq_put_tok[i]) dq_put_tok[i] = '0;
    prev_fs = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      logic [NCP-1:0] cand;
      logic exp_host;
      @(negedge clk);
      for (int i = 0; i < NCP; i++) begin
        state[i] = cp_state_e'($urandom % 5);
        dq_put_tok[i] = token_t'({$urandom, $urandom});
        cand[i] = state[i] == ST_O || state[i] == ST_C;
      end
      dq_want = NCP'($urandom);
      fs_req  = NCP'($urandom) & NCP'($urandom);
      q_count = 5'($urandom % (DQ_DEPTH + 1));
      q_empty = (q_count == 0);
      q_full  = (q_count == DQ_DEPTH);
      host_put_valid = $urandom % 2;
      host_put_tok = token_t'({$urandom, $urandom});
      #1;
      dq_get = ~dq_empty_cp & dq_want & NCP'($urandom | $urandom);
      dq_put = dq_ready_cp & NCP'($urandom | $urandom);
      #1;
      // GetDT
      check(ones(~dq_empty_cp) <= 1, "one GetDT grant");
      check((~dq_empty_cp & ~dq_want) == '0, "GetDT grant only to a requester");
      check(q_empty ? dq_empty_cp == '1 : (dq_want != '0) == (dq_empty_cp != '1),
            "GetDT granted when possible");
      check(q_get == (dq_get != '0), "DQU read");
      // PutDT
      check(ones(dq_ready_cp) <= 1, "one PutDT grant");
      check((dq_ready_cp & ~cand) == '0, "PutDT grant only in O or C");
      check(q_full ? dq_ready_cp == '0 : (cand != '0) == (dq_ready_cp != '0),
            "PutDT granted when possible");
      exp_host = host_put_valid && dq_put == '0 && int'(q_count) + 2 * NCP < DQ_DEPTH;
      check(host_put_ready == (dq_put == '0 && int'(q_count) + 2 * NCP < DQ_DEPTH), "host ready");
      check(q_put == (dq_put != '0 || exp_host), "DQU write");
      for (int i = 0; i < NCP; i++) if (dq_put[i]) check(q_tok == dq_put_tok[i], "CP token written");
      if (exp_host) check(q_tok == host_put_tok, "host token written");
      // Frame Store
      check(ones(fs_gnt) <= 1, "one FS grant");
      check((fs_gnt & ~fs_req) == '0, "FS grant only to a requester");
      check(prev_fs ? fs_gnt == '0 : (fs_req != '0) == (fs_gnt != '0), "FS grant and lock");
      for (int i = 0; i < NCP; i++) begin
        if (!dq_empty_cp[i]) w_get[i]++;
        if (dq_ready_cp[i]) w_put[i]++;
        if (fs_gnt[i]) w_fs[i]++;
      end
      @(posedge clk);
      prev_fs = (fs_gnt & fs_req) != '0;
    end
    for (int i = 0; i < NCP; i++) check(w_get[i] > 0 && w_put[i] > 0 && w_fs[i] > 0, "every CP served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
