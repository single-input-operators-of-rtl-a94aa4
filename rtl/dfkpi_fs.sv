// dfkpi_fs: Frame Store, the memory of matching vectors.
//
// Each item is <AF><V>: AF, the affiliation flag, says an operand is present and
// waiting for its partner, V is that operand. The Matching segment addresses an
// item directly with MVB + IX. Three operations:
//   read   rd_en/rd_addr; rd_af, rd_ip, rd_v valid one clock later.
//   store  st_en: write V and the operand's input port, set AF.
//   clear  clr_en: clear AF (the pair has been consumed).
// A store and a clear of the same item in one cycle leave AF set. The flags are
// cleared by reset; the values need no reset because AF guards them.
//
// The <AF><V> item, addressing by MVB and IX and the test-then-store-or-take use
// are DF-KPI's. Keeping the waiting operand's input port beside V (so that a
// second operand for the same port is not mistaken for the partner), the
// one-cycle read and the depth are this design's own. Allocation and release of
// matching vectors (reference counter RC, headers B_OLD, DST_RET) are not part
// of this unit.
module dfkpi_fs
  import dfkpi_pkg::*;
#(
  parameter int unsigned DEPTH = 2**MVB_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [MVB_W-1:0] rd_addr,
  output logic             rd_af,
  output ip_e              rd_ip,
  output data_t            rd_v,
  input  logic             st_en,
  input  logic [MVB_W-1:0] st_addr,
  input  ip_e              st_ip,
  input  data_t            st_v,
  input  logic             clr_en,
  input  logic [MVB_W-1:0] clr_addr
);

  typedef struct packed {
    ip_e   ip;
    data_t v;
  } item_t;

  logic [DEPTH-1:0] af;
  item_t            mem [DEPTH];
  item_t            rd_item;

  always_ff @(posedge clk) begin
    if (st_en) mem[st_addr] <= '{ip: st_ip, v: st_v};
    if (rd_en) rd_item <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      af    <= '0;
      rd_af <= 1'b0;
    end else begin
      if (clr_en) af[clr_addr] <= 1'b0;
      if (st_en)  af[st_addr]  <= 1'b1;
      if (rd_en)  rd_af        <= af[rd_addr];
    end
  end

  assign rd_ip = rd_item.ip;
  assign rd_v  = rd_item.v;

endmodule
