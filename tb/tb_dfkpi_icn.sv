// tb_dfkpi_icn: self-checking test of the interconnection network (16 CPs on
// a 4 x 4 torus). Every clock the CP states, the free CP.DI inputs and the
// offers to send are random (a CP offers only when the network has reserved a
// place for it, as the CP does). Checked each clock: only CPs in Operate or
// Copy get a place; tokens go only to a grid neighbour (the distance, counted
// with wrap-around, is one step in one row or column) that is free; no two
// tokens go to one CP; every offered token arrives, unchanged, exactly once.
// In every other clock all CPs with a place send, which shows the full set of
// reservations: a sender left without a place must then have no free neighbour
// that nobody took. Over the run every CP must have both sent and received.
module tb_dfkpi_icn;
  import dfkpi_pkg::*;
  localparam int NCP = 16;
  localparam int W   = 4;      // grid width

  function automatic bit is_nb(input int a, input int b);
    int dr, dc;
    dr = ((a / W) - (b / W) + W) % W;
    dc = ((a % W) - (b % W) + W) % W;
    return (dr == 0 && (dc == 1 || dc == W - 1)) || (dc == 0 && (dr == 1 || dr == W - 1));
  endfunction

  logic clk = 0, rst_n = 0;
  cp_state_e      state [NCP];
  logic [NCP-1:0] dst_free, src_ready, src_valid, dst_valid;
  token_t         src_tok [NCP], dst_tok [NCP];
  int checks = 0, failures = 0;
  int sent [NCP], recv [NCP];

  dfkpi_icn dut (.clk, .rst_n, .state, .dst_free, .src_ready, .src_valid, .src_tok,
                 .dst_valid, .dst_tok);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sent[i]) begin sent[i] = 0; recv[i] = 0; end
    foreach (state[i]) state[i] = ST_L;
    dst_free = '0; src_valid = '0;
    foreach (src_tok[i]) src_tok[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int n_cand, n_free, n_ready, n_sent, n_got;
      @(negedge clk);
      for (int i = 0; i < NCP; i++) begin
        state[i] = cp_state_e'($urandom % 5);
        src_tok[i] = token_t'({$urandom, $urandom});
        src_tok[i].ix = IX_W'(i);            // sender's number rides in IX
      end
      dst_free = NCP'($urandom) & NCP'($urandom >> 3);
      #1;
      src_valid = (c % 2 == 0) ? src_ready : src_ready & NCP'($urandom);
      #1;
      n_sent = 0; n_got = 0;
      for (int i = 0; i < NCP; i++) begin
        if (src_ready[i]) check(state[i] == ST_O || state[i] == ST_C, "place only for O or C");
        if (src_valid[i]) n_sent++;
        if (dst_valid[i]) begin
          n_got++;
          check(dst_free[i], "delivered to a free CP");
          check(is_nb(int'(dst_tok[i].ix), i), "only to a grid neighbour");
          check(src_valid[dst_tok[i].ix] && dst_tok[i] == src_tok[dst_tok[i].ix],
                "token arrives unchanged from an offering CP");
          recv[i]++;
          sent[dst_tok[i].ix]++;
        end
      end
      check(n_sent == n_got, "every offered token arrives once");
      // a candidate without a place: every other free CP is reserved
      n_cand = 0; n_ready = 0; n_free = 0;
      for (int i = 0; i < NCP; i++) begin
        if (state[i] == ST_O || state[i] == ST_C) n_cand++;
        if (src_ready[i]) n_ready++;
        if (dst_free[i]) n_free++;
      end
      check(n_ready <= n_free, "no more places than free CPs");
      if (c % 2 == 0)
        for (int i = 0; i < NCP; i++)
          if ((state[i] == ST_O || state[i] == ST_C) && !src_ready[i])
            for (int j = 0; j < NCP; j++)
              if (is_nb(i, j) && dst_free[j]) check(dst_valid[j], "no free neighbour left unused");
    end
    for (int i = 0; i < NCP; i++) check(sent[i] > 0 && recv[i] > 0, "every CP sent and received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
