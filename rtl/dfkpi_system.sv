// dfkpi_system: the DF-KPI data flow machine, an array of coordinating
// processors around a shared Data Queue Unit, Instruction Store and Frame Store.
//
// NCP coordinating processors (dfkpi_cp) execute the data flow program. Each
// takes tokens at its CP.DI from the network or, whenever CP.DI is empty, from
// the DQU (GetDT); matches double input operands in the Frame Store; fetches
// operators from the Instruction Store; and sends each result to its own CP.DI
// if that is free, else through the interconnection network (dfkpi_icn) to a
// free neighbouring CP of the grid, else into the DQU (PutDT). The DQU and
// Frame Store are reached over a shared bus (dfkpi_bus); each CP has its own
// read port on the Instruction Store.
//
// Host side: the host loads the program (is_we/is_waddr/is_wdata), puts the
// program's input tokens into the DQU (host_put_*, refused while a CP writes
// the DQU or fewer than 2*NCP places are free), and receives what OUT and RET
// operators produce, one port per CP (host_out_*). ev, state, cp_free and
// unsupported per CP, and the DQU fill level, are status outputs.
//
// Sixteen CPs in a 4 x 4 grid with wrap-around links, sharing a DQU, an IS and
// an FS, follow the DF-KPI system drawing. The queue depth, the memory sizes,
// the bus arbitration and the one-hop network transfer are this design's own.
// Timing per token is that of dfkpi_cp, plus any clocks a CP waits for the
// Frame Store, the DQU or the network.
module dfkpi_system
  import dfkpi_pkg::*;
#(
  parameter int unsigned NCP      = 16,
  parameter int unsigned COLS     = 4,      // CP grid width of the network
  parameter int unsigned DQ_DEPTH = 64,
  parameter int unsigned IS_DEPTH = 2**ADR_W,
  parameter int unsigned FS_DEPTH = 2**MVB_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             host_put_valid,
  input  token_t           host_put_tok,
  output logic             host_put_ready,
  input  logic             is_we,
  input  logic [ADR_W-1:0] is_waddr,
  input  instr_t           is_wdata,
  output logic [NCP-1:0]   host_out_valid,
  output token_t           host_out_tok [NCP],
  output logic [NCP-1:0]   host_out_ret,
  output cp_state_e        state        [NCP],
  output logic [NCP-1:0]   cp_free,
  output logic [NCP-1:0]   unsupported,
  output cp_events_t       ev           [NCP],
  output logic             dq_full,
  output logic [$clog2(DQ_DEPTH+1)-1:0] dq_count
);

  // network
  logic [NCP-1:0]   icn_in_valid, icn_in_ready, icn_out_valid, icn_out_ready;
  token_t           icn_in_tok [NCP], icn_out_tok [NCP];
  // DQU
  logic [NCP-1:0]   dq_want, dq_get, dq_empty_cp, dq_put, dq_ready_cp;
  token_t           dq_put_tok [NCP];
  logic             q_put, q_get, q_empty;
  token_t           q_tok, q_head;
  // IS
  logic [NCP-1:0]   is_rd_en;
  logic [ADR_W-1:0] is_rd_addr [NCP];
  instr_t           is_rd_data [NCP];
  // FS
  logic [NCP-1:0]   fs_req, fs_gnt, fs_rd_en, fs_st_en, fs_clr_en;
  logic [MVB_W-1:0] fs_rd_addr [NCP], fs_st_addr [NCP], fs_clr_addr [NCP];
  ip_e              fs_st_ip [NCP];
  data_t            fs_st_v [NCP];
  logic             f_rd, f_st, f_clr, f_af;
  logic [MVB_W-1:0] f_rd_addr, f_st_addr, f_clr_addr;
  ip_e              f_ip, f_st_ip;
  data_t            f_v, f_st_v;

  for (genvar i = 0; i < NCP; i++) begin : g_cp
    dfkpi_cp u_cp (
      .clk, .rst_n, .init,
      .icn_in_valid  (icn_in_valid[i]),
      .icn_in_tok    (icn_in_tok[i]),
      .icn_in_ready  (icn_in_ready[i]),
      .icn_out_valid (icn_out_valid[i]),
      .icn_out_tok   (icn_out_tok[i]),
      .icn_out_ready (icn_out_ready[i]),
      .dq_want       (dq_want[i]),
      .dq_get        (dq_get[i]),
      .dq_head       (q_head),
      .dq_empty      (dq_empty_cp[i]),
      .dq_put        (dq_put[i]),
      .dq_put_tok    (dq_put_tok[i]),
      .dq_put_ready  (dq_ready_cp[i]),
      .is_rd_en      (is_rd_en[i]),
      .is_rd_addr    (is_rd_addr[i]),
      .is_rd_data    (is_rd_data[i]),
      .fs_req        (fs_req[i]),
      .fs_gnt        (fs_gnt[i]),
      .fs_rd_en      (fs_rd_en[i]),
      .fs_rd_addr    (fs_rd_addr[i]),
      .fs_rd_af      (f_af),
      .fs_rd_ip      (f_ip),
      .fs_rd_v       (f_v),
      .fs_st_en      (fs_st_en[i]),
      .fs_st_addr    (fs_st_addr[i]),
      .fs_st_ip      (fs_st_ip[i]),
      .fs_st_v       (fs_st_v[i]),
      .fs_clr_en     (fs_clr_en[i]),
      .fs_clr_addr   (fs_clr_addr[i]),
      .host_out_valid(host_out_valid[i]),
      .host_out_tok  (host_out_tok[i]),
      .host_out_ret  (host_out_ret[i]),
      .state         (state[i]),
      .cp_free       (cp_free[i]),
      .unsupported   (unsupported[i]),
      .ev            (ev[i])
    );
  end

  dfkpi_icn #(.NCP(NCP), .COLS(COLS)) u_icn (
    .clk, .rst_n, .state,
    .dst_free (icn_in_ready),
    .src_ready(icn_out_ready),
    .src_valid(icn_out_valid),
    .src_tok  (icn_out_tok),
    .dst_valid(icn_in_valid),
    .dst_tok  (icn_in_tok)
  );

  dfkpi_bus #(.NCP(NCP), .DQ_DEPTH(DQ_DEPTH)) u_bus (
    .clk, .rst_n, .state,
    .dq_want, .dq_get, .dq_empty_cp,
    .dq_put, .dq_put_tok, .dq_ready_cp,
    .host_put_valid, .host_put_tok, .host_put_ready,
    .fs_req, .fs_gnt,
    .q_put, .q_tok, .q_get,
    .q_empty, .q_full(dq_full), .q_count(dq_count)
  );

  dfkpi_dqu #(.DEPTH(DQ_DEPTH)) u_dqu (
    .clk, .rst_n,
    .put_valid(q_put), .put_tok(q_tok), .put_ready(),
    .get(q_get), .head_tok(q_head), .empty(q_empty), .full(dq_full),
    .count(dq_count)
  );

  dfkpi_is #(.DEPTH(IS_DEPTH), .NRD(NCP)) u_is (
    .clk,
    .we(is_we), .waddr(is_waddr), .wdata(is_wdata),
    .rd_en(is_rd_en), .rd_addr(is_rd_addr), .rd_data(is_rd_data)
  );

  // The Frame Store is used by one CP at a time (granted by the bus), so its
  // ports take the request of whichever CP drives them.
  always_comb begin
    f_rd = 1'b0; f_st = 1'b0; f_clr = 1'b0;
    f_rd_addr = '0; f_st_addr = '0; f_clr_addr = '0; f_st_ip = IP_L; f_st_v = '0;
    for (int i = 0; i < NCP; i++) begin
      if (fs_rd_en[i]) begin
        f_rd = 1'b1; f_rd_addr = fs_rd_addr[i];
      end
      if (fs_st_en[i]) begin
        f_st = 1'b1; f_st_addr = fs_st_addr[i]; f_st_ip = fs_st_ip[i]; f_st_v = fs_st_v[i];
      end
      if (fs_clr_en[i]) begin
        f_clr = 1'b1; f_clr_addr = fs_clr_addr[i];
      end
    end
  end

  dfkpi_fs #(.DEPTH(FS_DEPTH)) u_fs (
    .clk, .rst_n,
    .rd_en(f_rd), .rd_addr(f_rd_addr), .rd_af(f_af), .rd_ip(f_ip), .rd_v(f_v),
    .st_en(f_st), .st_addr(f_st_addr), .st_ip(f_st_ip), .st_v(f_st_v),
    .clr_en(f_clr), .clr_addr(f_clr_addr)
  );

  a_one_fs_user: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0(fs_rd_en) && $onehot0(fs_st_en) && $onehot0(fs_clr_en))
    else $error("Frame Store used by two CPs at once");

endmodule
