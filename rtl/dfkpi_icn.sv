// dfkpi_icn: interconnection network between the coordinating processors.
//
// A CP whose own input CP.DI is occupied when its Operate segment has a result
// (or when Copy finds the DQU full) hands the token to another CP through the
// network. The CPs sit in a grid of COLS columns (4 x 4 for 16 CPs) whose rows
// and columns are closed into rings, a torus: each CP is linked to its east,
// south, west and north neighbours, and a token moves one hop, over one link,
// in one clock. Every clock the network reserves, for each CP that could send
// (its state is Operate or Copy), a neighbour whose CP.DI is free and that no
// other sender has reserved, trying east, south, west, north in that order.
// The senders are served in a rotating order so none is starved. src_ready[i]
// tells CP i that a neighbour is reserved for it; without one the CP uses the
// DQU instead. A token sent in a clock is in the receiver's CP.DI after that
// clock's edge.
//
// The 16 CPs, their grid and the wrap-around links between neighbours follow
// the DF-KPI system drawing, as does sending a result to another, free CP. The
// one-hop transfer (no routing of a token through intermediate CPs), the
// search order and the one-clock timing are this design's own. src_ready does
// not depend on src_valid, so a CP may decide combinationally whether to send.
module dfkpi_icn
  import dfkpi_pkg::*;
#(
  parameter int unsigned NCP  = 16,
  parameter int unsigned COLS = 4          // NCP must be a multiple of COLS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cp_state_e      state     [NCP],
  input  logic [NCP-1:0] dst_free,          // CP.DI of CP j can take a token
  output logic [NCP-1:0] src_ready,         // a free neighbour is reserved for CP i
  input  logic [NCP-1:0] src_valid,
  input  token_t         src_tok   [NCP],
  output logic [NCP-1:0] dst_valid,
  output token_t         dst_tok   [NCP]
);

  localparam int unsigned RW   = (NCP > 1) ? $clog2(NCP) : 1;
  localparam int unsigned ROWS = NCP / COLS;

  if (NCP % COLS != 0) begin : g_bad_grid
    $error("dfkpi_icn: NCP must be a multiple of COLS");
  end

  // Neighbour of CP s in direction dir (0 east, 1 south, 2 west, 3 north).
  function automatic int nbr(input int s, input int dir);
    int r, c;
    r = s / int'(COLS);
    c = s % int'(COLS);
    case (dir)
      0:       c = (c + 1) % int'(COLS);
      1:       r = (r + 1) % int'(ROWS);
      2:       c = (c + int'(COLS) - 1) % int'(COLS);
      default: r = (r + int'(ROWS) - 1) % int'(ROWS);
    endcase
    return r * int'(COLS) + c;
  endfunction

  logic [RW-1:0]  rr;                       // first sender served this clock
  logic [RW-1:0]  to   [NCP];               // destination reserved for sender i
  logic [NCP-1:0] taken;

  always_comb begin
    int s, d;
    s         = 0;
    d         = 0;
    taken     = '0;
    src_ready = '0;
    for (int i = 0; i < NCP; i++) to[i] = '0;
    for (int k = 0; k < NCP; k++) begin
      s = int'(rr) + k;
      if (s >= NCP) s = s - NCP;
      if (state[s] == ST_O || state[s] == ST_C) begin
        for (int dir = 0; dir < 4; dir++) begin
          d = nbr(s, dir);
          if (d != s && !src_ready[s] && dst_free[d] && !taken[d]) begin
            src_ready[s] = 1'b1;
            taken[d]     = 1'b1;
            to[s]        = RW'(d);
          end
        end
      end
    end
  end

  always_comb begin
    dst_valid = '0;
    for (int j = 0; j < NCP; j++) dst_tok[j] = '0;
    for (int i = 0; i < NCP; i++) begin
      if (src_ready[i] && src_valid[i]) begin
        dst_valid[to[i]] = 1'b1;
        dst_tok[to[i]]   = src_tok[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else        rr <= (int'(rr) == NCP - 1) ? '0 : rr + 1'b1;
  end

  a_valid_needs_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                        (src_valid & ~src_ready) == '0)
    else $error("token offered to the network without a reserved neighbour");

endmodule
