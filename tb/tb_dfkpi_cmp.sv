// tb_dfkpi_cmp: self-checking test of the CMP comparator.
// Drives random tokens and checks the B/M split on DST.MF and the Frame Store
// item address MVB + IX (mod 2^MVB_W) against values computed here.
module tb_dfkpi_cmp;
  import dfkpi_pkg::*;

  token_t           tok;
  logic             tok_valid;
  logic             bypass, match;
  logic [MVB_W-1:0] fs_addr;
  int checks = 0, failures = 0;

  dfkpi_cmp dut (.tok, .tok_valid, .bypass, .match, .fs_addr);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int unsigned exp_addr;
      tok       = token_t'({$urandom, $urandom});
      tok_valid = (i % 7) != 0;
      #1;
      exp_addr = (int'(tok.mvb) + int'(tok.ix)) % (1 << MVB_W);
      check(bypass == (tok_valid && tok.dst.mf == MF_B), "bypass");
      check(match  == (tok_valid && tok.dst.mf == MF_M), "match");
      check(int'(fs_addr) == exp_addr, "fs_addr");
    end
    // one fixed case with wrap-around
    tok = '0; tok.mvb = 8'hFE; tok.ix = 4'h3; tok.dst.mf = MF_M; tok_valid = 1'b1;
    #1;
    check(fs_addr == 8'h01 && match && !bypass, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
