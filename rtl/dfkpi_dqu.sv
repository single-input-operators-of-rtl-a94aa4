// dfkpi_dqu: Data Queue Unit, the store of data tokens that wait to be processed.
//
// A first-in first-out queue of DEPTH tokens. The coordinating processor writes a
// token with PutDT (put_valid) when neither its own input nor the network can
// take it, and reads one with GetDT (get) when its Load segment is idle. The head
// token is visible on head_tok whenever empty is low (show-ahead), so GetDT takes
// it in the same cycle. A put and a get in the same cycle are both performed;
// a put into a full queue is refused (put_ready low).
//
// That the DQU holds tokens and is accessed by GetDT/PutDT is DF-KPI's; the queue
// discipline (FIFO, priority P not used for ordering), the depth and the
// handshake are this design's choice.
module dfkpi_dqu
  import dfkpi_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   put_valid,   // PutDT
  input  token_t put_tok,
  output logic   put_ready,
  input  logic   get,         // GetDT, only while !empty
  output token_t head_tok,
  output logic   empty,
  output logic   full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  token_t          mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_put, do_get;

  assign empty     = (count == 0);
  assign full      = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign put_ready = !full;
  assign head_tok  = mem[rptr];
  assign do_put    = put_valid && !full;
  assign do_get    = get && !empty;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_put) mem[wptr] <= put_tok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_put) wptr <= nxt(wptr);
      if (do_get) rptr <= nxt(rptr);
      count <= count + (do_put ? CW'(1) : CW'(0)) - (do_get ? CW'(1) : CW'(0));
    end
  end

  a_get_nonempty: assert property (@(posedge clk) disable iff (!rst_n) get |-> !empty)
    else $error("GetDT on an empty DQU");

endmodule
