// dfkpi_bus: shared access of the coordinating processors to the Data Queue
// Unit and the Frame Store.
//
// In DF-KPI all CPs reach one DQU and one Frame Store over a common bus. This
// unit arbitrates that bus, one grant of each kind per clock, each in a
// rotating order:
//   GetDT  among CPs whose CP.DI is empty (dq_want): only the granted CP sees
//          the DQU as non-empty, so at most one takes its head.
//   PutDT  among CPs in Operate or Copy: only the granted CP sees put_ready.
//          The host may put a token in a clock in which no CP does, and only
//          while more than HOST_RESERVE places are free. Every CP holds at most
//          two tokens (CP.DI and the CP register) and an operator makes at most
//          one token of one, so with HOST_RESERVE = 2*NCP the DQU always has room
//          for what the CPs must put, and they cannot deadlock on it.
//   FS     among CPs waiting in Matching (fs_req). The granted CP reads its item
//          and, in the next clock, stores or clears it; no grant is given in
//          that next clock, so the test and the update of an item are atomic.
// The grants depend only on registered CP state and on requests that do not
// depend on the grants, so there is no combinational loop through the bus.
//
// That the CPs share the DQU and FS is DF-KPI's; the arbitration is this
// design's own.
module dfkpi_bus
  import dfkpi_pkg::*;
#(
  parameter int unsigned NCP          = 16,
  parameter int unsigned DQ_DEPTH     = 64,
  parameter int unsigned HOST_RESERVE = 2 * NCP
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cp_state_e      state       [NCP],
  // GetDT
  input  logic [NCP-1:0] dq_want,
  input  logic [NCP-1:0] dq_get,
  output logic [NCP-1:0] dq_empty_cp,     // DQU as seen by each CP
  // PutDT
  input  logic [NCP-1:0] dq_put,
  input  token_t         dq_put_tok  [NCP],
  output logic [NCP-1:0] dq_ready_cp,
  // host writes into the DQU
  input  logic           host_put_valid,
  input  token_t         host_put_tok,
  output logic           host_put_ready,
  // Frame Store
  input  logic [NCP-1:0] fs_req,
  output logic [NCP-1:0] fs_gnt,
  // the DQU
  output logic           q_put,
  output token_t         q_tok,
  output logic           q_get,
  input  logic           q_empty,
  input  logic           q_full,
  input  logic [$clog2(DQ_DEPTH+1)-1:0] q_count
);

  localparam int unsigned RW = (NCP > 1) ? $clog2(NCP) : 1;

  logic [RW-1:0]  rr;
  logic           fs_lock;
  logic [NCP-1:0] g_get, g_put, g_fs, cand_put, cp_puts;

  // first requester at or after position rr
  function automatic logic [NCP-1:0] pick(input logic [NCP-1:0] req, input logic [RW-1:0] start);
    logic [NCP-1:0] g;
    g = '0;
    for (int k = 0; k < NCP; k++) begin
      int i;
      i = int'(start) + k;
      if (i >= NCP) i -= NCP;
      if (req[i] && g == '0) g[i] = 1'b1;
    end
    return g;
  endfunction

  always_comb begin
    for (int i = 0; i < NCP; i++) cand_put[i] = (state[i] == ST_O) || (state[i] == ST_C);
    g_get = pick(dq_want, rr);
    g_put = pick(cand_put, rr);
    g_fs  = fs_lock ? '0 : pick(fs_req, rr);
  end

  assign dq_empty_cp = ~g_get | {NCP{q_empty}};
  assign dq_ready_cp = g_put & {NCP{!q_full}};
  assign fs_gnt      = g_fs;
  assign q_get       = |(dq_get & g_get);
  assign cp_puts     = dq_put & g_put;

  always_comb begin
    q_tok = host_put_tok;
    for (int i = 0; i < NCP; i++) if (cp_puts[i]) q_tok = dq_put_tok[i];
  end

  assign host_put_ready = (cp_puts == '0) && (int'(q_count) + HOST_RESERVE < DQ_DEPTH);
  assign q_put          = (cp_puts != '0) || (host_put_valid && host_put_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr      <= '0;
      fs_lock <= 1'b0;
    end else begin
      rr      <= (int'(rr) == NCP - 1) ? '0 : rr + 1'b1;
      fs_lock <= |(fs_req & g_fs);
    end
  end

  a_one_get: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dq_get))
    else $error("two CPs took the DQU head");

endmodule
