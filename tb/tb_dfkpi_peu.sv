// tb_dfkpi_peu: self-checking test of the processing execution unit.
// Every operation code is applied with random operands and literals; the value,
// route, RET flag, result address and unsupported flag are compared with a
// reference written independently here.
module tb_dfkpi_peu;
  import dfkpi_pkg::*;

  oc_e              oc;
  logic [LI_W-1:0]  li;
  logic [ADR_W-1:0] dst_adr;
  data_t            ld, rd, d;
  route_e           route;
  logic             ret, unsupported;
  logic [ADR_W-1:0] res_adr;
  int checks = 0, failures = 0;

  dfkpi_peu dut (.oc, .li, .dst_adr, .ld, .rd, .d, .route, .ret, .res_adr, .unsupported);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s oc=%0d li=%0h a=%0h b=%0h d=%0h", what, oc, li, ld.v, rd.v, d.v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int a, b, e;
      route_e er;
      logic [ADR_W-1:0] ea;
      logic eu, eret;
      oc      = oc_e'(i % 16);
      li      = 8'($urandom);
      dst_adr = 8'($urandom);
      ld      = data_t'($urandom);
      rd      = data_t'($urandom);
      if (i % 5 == 0) ld.v = '0;
      if (i % 3 == 0) rd.v = '0;
      #1;
      a = int'($signed(ld.v));
      b = int'($signed(rd.v));
      e = a; er = RT_NET; ea = dst_adr; eu = 0; eret = 0;
      case (int'(oc))
        0: ;
        1: if (a == 0) ea = li;
        2: er = RT_NONE;
        3: er = RT_HOST;
        4: begin er = RT_HOST; eret = 1; end
        6: case (li % 8)
             0: e = -a;      1: e = ~a;      2: e = a + 1;   3: e = a - 1;
             4: e = (a < 0) ? -a : a;        5: e = a * 2;   6: e = a >>> 1;
             default: e = a;
           endcase
        7: case (li % 8)
             0: e = a + b;   1: e = a - b;   2: e = a * b;   3: e = a & b;
             4: e = a | b;   5: e = a ^ b;   6: e = (a < b) ? 1 : 0;
             default: e = (a == b) ? 1 : 0;
           endcase
        8: ea = 8'(int'(dst_adr) + b);
        9: e = int'($signed(li));
        10: if (b == 0) er = RT_NONE;
        default: begin er = RT_NONE; eu = 1; end
      endcase
      check(route == er, "route");
      check(unsupported == eu, "unsupported");
      check(ret == eret, "ret");
      if (er == RT_NET) check(res_adr == ea, "res_adr");
      if (er != RT_NONE) begin
        check(d.v == 16'(e), "value");
        check(d.t == ld.t, "type");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
