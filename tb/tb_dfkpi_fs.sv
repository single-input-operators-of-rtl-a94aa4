// tb_dfkpi_fs: self-checking test of the Frame Store.
// Checks that all affiliation flags are clear after reset, then runs random
// store / clear / read operations against a model of <AF><IP><V> items, with
// reads one clock behind, including store and clear of one item together.
module tb_dfkpi_fs;
  import dfkpi_pkg::*;
  localparam int DEPTH = 2**MVB_W;

  logic             clk = 0, rst_n = 0;
  logic             rd_en, st_en, clr_en, rd_af;
  logic [MVB_W-1:0] rd_addr, st_addr, clr_addr;
  ip_e              rd_ip, st_ip;
  data_t            rd_v, st_v;
  logic             m_af [DEPTH];
  ip_e              m_ip [DEPTH];
  data_t            m_v  [DEPTH];
  int checks = 0, failures = 0;

  dfkpi_fs dut (.clk, .rst_n, .rd_en, .rd_addr, .rd_af, .rd_ip, .rd_v,
                .st_en, .st_addr, .st_ip, .st_v, .clr_en, .clr_addr);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; st_en = 0; clr_en = 0;
    rd_addr = '0; st_addr = '0; clr_addr = '0; st_ip = IP_L; st_v = '0;
    for (int i = 0; i < DEPTH; i++) m_af[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = MVB_W'(i);
      @(negedge clk);
      rd_en = 0;
      check(rd_af == 1'b0, "AF clear after reset");
    end
    for (int i = 0; i < 4000; i++) begin
      logic [MVB_W-1:0] ra;
      @(negedge clk);
      ra       = MVB_W'($urandom % 16);     // a small window so items get reused
      rd_en    = 1; rd_addr = ra;
      st_en    = ($urandom % 3) == 0;
      st_addr  = MVB_W'($urandom % 16);
      st_ip    = ip_e'($urandom % 2);
      st_v     = data_t'($urandom);
      clr_en   = ($urandom % 3) == 0;
      clr_addr = (i % 10 == 0) ? st_addr : MVB_W'($urandom % 16);
      @(posedge clk);
      #1;
      // read returns the content before this clock's writes
      check(rd_af == m_af[ra], "AF");
      if (m_af[ra]) begin
        check(rd_ip == m_ip[ra], "IP");
        check(rd_v == m_v[ra], "V");
      end
      if (clr_en) m_af[clr_addr] = 0;
      if (st_en) begin
        m_af[st_addr] = 1; m_ip[st_addr] = st_ip; m_v[st_addr] = st_v;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
