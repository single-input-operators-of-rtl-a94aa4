// dfkpi_pkg: types and constants shared by the DF-KPI coordinating-processor RTL.
//
// A data token is <P><T,V><MVB><DST,IX> and an instruction (operator) is
// <OC><LI><{DST,IX}^n>, with DST = <MF><IP><ADR>. These field lists, the two matching
// labels of MF (M = match, B = bypass), the two input ports of IP (L, R) and the
// sixteen operator names follow the DF-KPI definition. All field widths, the
// encodings of the enums, the sub-function codes of UN_OP and BIN_OP, and the
// limit of n <= 2 destinations per instruction are this design's own choice; change the widths here and the whole design follows.
package dfkpi_pkg;

  localparam int P_W   = 2;   // token priority
  localparam int T_W   = 2;   // operand data type tag
  localparam int V_W   = 16;  // operand value
  localparam int MVB_W = 8;   // Frame Store base address of a matching vector
  localparam int ADR_W = 8;   // Instruction Store address of an operator
  localparam int IX_W  = 4;   // matching index inside a matching vector
  localparam int LI_W  = 8;   // instruction literal

  // Matching function carried in DST.
  typedef enum logic {
    MF_B = 1'b0,   // bypass: consumer is a single input operator
    MF_M = 1'b1    // match: consumer is a double input operator
  } mf_e;

  // Input port of the consumer.
  typedef enum logic {
    IP_L = 1'b0,
    IP_R = 1'b1
  } ip_e;

  typedef struct packed {
    mf_e              mf;
    ip_e              ip;
    logic [ADR_W-1:0] adr;
  } dst_t;

  typedef struct packed {
    logic [T_W-1:0] t;
    logic [V_W-1:0] v;
  } data_t;

  typedef struct packed {
    logic [P_W-1:0]   p;
    data_t            d;
    logic [MVB_W-1:0] mvb;
    dst_t             dst;
    logic [IX_W-1:0]  ix;
  } token_t;

  // Operation codes: single input, then double input, then N input operators.
  typedef enum logic [3:0] {
    OC_ACCEPT = 4'd0,
    OC_IF     = 4'd1,
    OC_KILL   = 4'd2,
    OC_OUT    = 4'd3,
    OC_RET    = 4'd4,
    OC_SEL    = 4'd5,
    OC_UN_OP  = 4'd6,
    OC_BIN_OP = 4'd7,
    OC_CASE   = 4'd8,
    OC_DEF    = 4'd9,
    OC_GATE   = 4'd10,
    OC_LOAD   = 4'd11,
    OC_SEND   = 4'd12,
    OC_TUP    = 4'd13,
    OC_APPLY  = 4'd14,
    OC_CONSTR = 4'd15
  } oc_e;

  typedef struct packed {
    oc_e              oc;
    logic [LI_W-1:0]  li;
    dst_t             dst;    // first destination of the result
    logic [IX_W-1:0]  ix;
    logic             nd;     // 1: the result also goes to dst2/ix2
    dst_t             dst2;   // second destination (fan-out)
    logic [IX_W-1:0]  ix2;
  } instr_t;

  // UN_OP sub-functions, selected by LI[2:0].
  localparam logic [2:0] UN_NEG = 3'd0, UN_NOT = 3'd1, UN_INC = 3'd2, UN_DEC = 3'd3,
                         UN_ABS = 3'd4, UN_SHL = 3'd5, UN_SHR = 3'd6, UN_MOV = 3'd7;
  // BIN_OP sub-functions, selected by LI[2:0]; LD is the left operand.
  localparam logic [2:0] BI_ADD = 3'd0, BI_SUB = 3'd1, BI_MUL = 3'd2, BI_AND = 3'd3,
                         BI_OR  = 3'd4, BI_XOR = 3'd5, BI_LT  = 3'd6, BI_EQ  = 3'd7;

  // Where the Operate segment sends a result.
  typedef enum logic [1:0] {
    RT_NONE = 2'd0,   // operand consumed, nothing produced
    RT_NET  = 2'd1,   // a data token for another operator (own CP, network or DQU)
    RT_HOST = 2'd2    // OUT or RET: leaves the data flow module
  } route_e;

  // One-clock event pulses of the coordinating processor, for performance
  // counters and monitoring.
  typedef struct packed {
    logic bypass;     // token passed CMP with label B
    logic fs_store;   // operand stored in the Frame Store to wait
    logic fs_match;   // partner found, pair formed
    logic fs_wait;    // waiting for the shared Frame Store
    logic copy;       // Copy segment wrote a token back (DQU or network)
    logic get_dt;     // GetDT from the DQU
    logic put_di;     // result to the CP's own input
    logic put_icn;    // result to the network
    logic put_dq;     // result to the DQU
    logic consumed;   // operator produced no token (KILL, closed GATE)
    logic o_stall;    // Operate waited: no destination free
    logic fanout;     // first of two result copies sent, second follows
  } cp_events_t;

  // Micro-program states of the coordinating processor.
  typedef enum logic [2:0] {
    ST_L = 3'd0,   // Load
    ST_M = 3'd1,   // Matching
    ST_C = 3'd2,   // Copy
    ST_F = 3'd3,   // Fetch
    ST_O = 3'd4    // Operate
  } cp_state_e;

endpackage
