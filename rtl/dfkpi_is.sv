// dfkpi_is: Instruction Store, the memory of the data flow program's operators.
//
// Each word is one operator <OC><LI><{DST,IX}^n> (instr_t, up to two
// destinations) stored at the address of the operator, the ADR a token names in its DST field. Every coordinating
// processor has its own read port (NRD ports): the Fetch segment reads with
// rd_en/rd_addr and gets the word on rd_data one clock later (synchronous read,
// the output holds while rd_en is low). The host loads the program through the
// single write port.
//
// The content and addressing are DF-KPI's; the depth (2^ADR_W words), the
// one-clock read, the read port per CP and the single write port are this
// design's choice.
module dfkpi_is
  import dfkpi_pkg::*;
#(
  parameter int unsigned DEPTH = 2**ADR_W,
  parameter int unsigned NRD   = 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [ADR_W-1:0] waddr,
  input  instr_t           wdata,
  input  logic [NRD-1:0]   rd_en,
  input  logic [ADR_W-1:0] rd_addr [NRD],
  output instr_t           rd_data [NRD]
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    always_ff @(posedge clk) begin
      if (rd_en[r]) rd_data[r] <= mem[rd_addr[r]];
    end
  end

endmodule
