// tb_dfkpi_dqu: self-checking test of the Data Queue Unit.
// Random PutDT/GetDT traffic against a queue model: order of tokens, count,
// empty/full flags, refusal of a put when full, and fill to exactly DEPTH.
module tb_dfkpi_dqu;
  import dfkpi_pkg::*;
  localparam int DEPTH = 8;

  logic   clk = 0, rst_n = 0;
  logic   put_valid, put_ready, get, empty, full;
  token_t put_tok, head_tok;
  logic [$clog2(DEPTH+1)-1:0] count;
  token_t model[$];
  int checks = 0, failures = 0;
  int fulls = 0;
  logic acc;

  dfkpi_dqu #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .put_valid, .put_tok, .put_ready,
                                  .get, .head_tok, .empty, .full, .count);

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
    put_valid = 0; get = 0; put_tok = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(head_tok == model[0], "head");
      if (full) fulls++;
      // bias towards filling during the first half, draining after
      put_valid = ($urandom % 100) < ((i % 400) < 200 ? 70 : 30);
      put_tok   = token_t'({$urandom, $urandom});
      get       = !empty && (($urandom % 100) < ((i % 400) < 200 ? 30 : 70));
      acc = put_valid && model.size() < DEPTH;
      check(put_ready == (model.size() < DEPTH), "put_ready");
      @(posedge clk);
      #1;
      if (get) void'(model.pop_front());
      if (acc) model.push_back(put_tok);
    end
    check(fulls > 0, "queue was filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
