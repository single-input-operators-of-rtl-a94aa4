// dfkpi_peu: processing execution unit of the Operate segment.
//
// Takes the operator held in the Fetch/Operate register (operation code OC,
// literal LI, destination DST) and its operands FOR.LD and FOR.RD, and returns the
// result value D together with where the result goes. A single input operator
// uses only LD; a double input operator that reached Operate through operand
// matching has its left-port operand in LD and its right-port operand in RD.
//
// Operators and their behaviour here:
//   ACCEPT  entry operator: passes LD on to DST.
//   IF      two-way branch: LD goes to DST when LD.V != 0, else to ADR = LI.
//   KILL    consumes LD, produces nothing.
//   OUT/RET pass LD out of the data flow module (RET is flagged as a return).
//   UN_OP   unary arithmetic on LD, function chosen by LI[2:0].
//   BIN_OP  binary arithmetic LD op RD, function chosen by LI[2:0].
//   DEF     program constant: sign-extended LI, fired by its operand pair.
//   GATE    passes LD when RD.V != 0, else consumes it.
//   CASE    multi-way switch: LD goes to DST.ADR + RD.V.
//   SEL, LOAD, SEND, TUP, APPLY, CONSTR need a structure store, frame allocation
//   or call mechanism that is outside this unit: they raise `unsupported` and
//   produce nothing.
// The operator names and their one-line purposes are DF-KPI's; the encodings,
// sub-functions and the exact result of each operator are this design's choice.
// Purely combinational; the result type tag T is taken from LD.
module dfkpi_peu
  import dfkpi_pkg::*;
(
  input  oc_e              oc,
  input  logic [LI_W-1:0]  li,
  input  logic [ADR_W-1:0] dst_adr,     // DST.ADR of the operator
  input  data_t            ld,          // FOR.LD
  input  data_t            rd,          // FOR.RD
  output data_t            d,           // result value
  output route_e           route,
  output logic             ret,         // RET rather than OUT
  output logic [ADR_W-1:0] res_adr,     // ADR the result token is sent to
  output logic             unsupported
);

  logic [V_W-1:0] a, b, un_v, bi_v;
  logic [V_W-1:0] prod_lo;

  always_comb begin
    a = ld.v;
    b = rd.v;
    prod_lo = V_W'(a * b);

    unique case (li[2:0])
      UN_NEG:  un_v = -a;
      UN_NOT:  un_v = ~a;
      UN_INC:  un_v = a + 1'b1;
      UN_DEC:  un_v = a - 1'b1;
      UN_ABS:  un_v = a[V_W-1] ? -a : a;
      UN_SHL:  un_v = a << 1;
      UN_SHR:  un_v = $signed(a) >>> 1;
      default: un_v = a;
    endcase

    unique case (li[2:0])
      BI_ADD:  bi_v = a + b;
      BI_SUB:  bi_v = a - b;
      BI_MUL:  bi_v = prod_lo;
      BI_AND:  bi_v = a & b;
      BI_OR:   bi_v = a | b;
      BI_XOR:  bi_v = a ^ b;
      BI_LT:   bi_v = V_W'($signed(a) < $signed(b));
      default: bi_v = V_W'(a == b);
    endcase

    d           = ld;
    route       = RT_NET;
    ret         = 1'b0;
    res_adr     = dst_adr;
    unsupported = 1'b0;

    unique case (oc)
      OC_ACCEPT: ;
      OC_IF:     if (a == '0) res_adr = ADR_W'(li);
      OC_KILL:   route = RT_NONE;
      OC_OUT:    route = RT_HOST;
      OC_RET: begin
        route = RT_HOST;
        ret   = 1'b1;
      end
      OC_UN_OP:  d.v = un_v;
      OC_BIN_OP: d.v = bi_v;
      OC_DEF:    d.v = V_W'($signed(li));
      OC_GATE:   if (b == '0) route = RT_NONE;
      OC_CASE:   res_adr = dst_adr + ADR_W'(b);
      default: begin
        route       = RT_NONE;
        unsupported = 1'b1;
      end
    endcase
  end

endmodule
