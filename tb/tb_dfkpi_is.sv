// tb_dfkpi_is: self-checking test of the Instruction Store with two read ports.
// Fills every word with a random operator, then reads random addresses on both
// ports at once, each port enabled at random, while the host overwrites some
// words. A read returns the word as it was before that clock's write, one clock
// later, and a port's output holds while it is not enabled.
module tb_dfkpi_is;
  import dfkpi_pkg::*;
  localparam int DEPTH = 2**ADR_W;
  localparam int NRD   = 2;

  logic             clk = 0;
  logic             we;
  logic [NRD-1:0]   rd_en;
  logic [ADR_W-1:0] waddr;
  logic [ADR_W-1:0] rd_addr [NRD];
  instr_t           wdata;
  instr_t           rd_data [NRD];
  instr_t           model [DEPTH];
  instr_t           expd [NRD];
  int checks = 0, failures = 0;

  dfkpi_is #(.NRD(NRD)) dut (.clk, .we, .waddr, .wdata, .rd_en, .rd_addr, .rd_data);

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
    we = 0; rd_en = '0; waddr = '0; wdata = '0;
    foreach (rd_addr[r]) rd_addr[r] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = ADR_W'(i); wdata = instr_t'({$urandom, $urandom});
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    rd_en = '1;
    rd_addr[0] = '0; rd_addr[1] = '0;
    @(negedge clk);
    expd[0] = model[0]; expd[1] = model[0];
    for (int i = 0; i < 2000; i++) begin
      for (int r = 0; r < NRD; r++) begin
        rd_en[r]   = ($urandom % 4) != 0;
        rd_addr[r] = ADR_W'($urandom);
      end
      we    = ($urandom % 4) == 0;
      waddr = (i % 8 == 0) ? rd_addr[0] : ADR_W'($urandom);
      wdata = instr_t'({$urandom, $urandom});
      for (int r = 0; r < NRD; r++) if (rd_en[r]) expd[r] = model[rd_addr[r]];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      for (int r = 0; r < NRD; r++) check(rd_data[r] == expd[r], $sformatf("port %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
