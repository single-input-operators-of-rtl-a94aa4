// dfkpi_ctrl: micro-program control of the coordinating processor.
//
// A state machine over the five segments of the CP pipeline, Load (L),
// Matching (M), Copy (C), Fetch (F) and Operate (O), using exactly the state
// changes of the DF-KPI operand-matching state diagram:
//   L -> L  no token at CP.DI or in the DQU; Init also returns here
//   L -> M  a token is loaded into the CP register (from CP.DI, else GetDT)
//   M -> M  a token to be matched waits for the Frame Store (fs_gnt, when
//           several CPs share it) and then one clock for its item
//   M -> F  label B (bypass), or label M and the partner operand is present
//   M -> L  label M and no operand present: the operand is stored in the FS
//   M -> C  label M and the item holds an operand for the same input port
//   C -> C  DQU full and the network busy
//   C -> L  PutDT: the token is written back to the DQU to wait (or, when
//           the DQU is full, handed to the network so that the CP never
//           waits on a queue only it can drain)
//   F -> F  one clock for the Instruction Store read
//   F -> O  operator loaded into the Fetch/Operate register
//   O -> O  the result cannot leave yet (own input, network and DQU all busy)
//   O -> L  the result has left (to CP.DI, the network, PutDT or the host);
//           CP_free is pulsed
// The transitions, Init, GetDT, PutDT and CP_free are DF-KPI's; the conditions on
// each transition and the one-clock waits are this design's choice. Outputs are
// decoded from the state and inputs in the same cycle (Mealy), registers change
// on the rising clock edge. Init is synchronous, rst_n asynchronous.
module dfkpi_ctrl
  import dfkpi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      init,          // Init: restart the pipeline
  input  logic      tok_avail,     // CP.DI holds a token or the DQU is not empty
  input  logic      bypass,        // CMP: label B
  input  logic      match,         // CMP: label M
  input  logic      fs_hit,        // FS item holds the partner (other port)
  input  logic      fs_same,       // FS item holds an operand for the same port
  input  logic      fs_gnt,        // the Frame Store may be used this clock
  input  logic      c_ready,       // Copy: DQU or network can take the token
  input  logic      emit_done,     // Operate: the result has been disposed of
  output cp_state_e state,
  output logic      load,          // load the CP register
  output logic      fs_req,        // waiting to read the FS item
  output logic      fs_rd,         // read the FS item
  output logic      fs_store,      // store the operand in the FS item
  output logic      fs_clear,      // clear the FS item (pair consumed)
  output logic      lfr_load,      // load LFR from the CP register (and FS)
  output logic      c_put,         // Copy: PutDT of the CP register
  output logic      is_rd,         // read the operator at LFR.DST.ADR
  output logic      for_load,      // load FOR with operator and operands
  output logic      operate,       // Operate segment active
  output logic      cp_free        // CP becomes free
);

  cp_state_e nstate;
  logic      m_rd, f_rd;           // the one-clock memory read has been issued

  always_comb begin
    nstate   = state;
    load     = 1'b0;
    fs_req   = 1'b0;
    fs_rd    = 1'b0;
    fs_store = 1'b0;
    fs_clear = 1'b0;
    lfr_load = 1'b0;
    c_put    = 1'b0;
    is_rd    = 1'b0;
    for_load = 1'b0;
    operate  = 1'b0;
    cp_free  = 1'b0;
    unique case (state)
      ST_L: if (tok_avail) begin
        load   = 1'b1;
        nstate = ST_M;
      end
      ST_M: begin
        if (bypass) begin
          lfr_load = 1'b1;
          nstate   = ST_F;
        end else if (match && !m_rd) begin
          fs_req = 1'b1;
          fs_rd  = fs_gnt;
        end else if (match) begin
          if (fs_hit) begin
            lfr_load = 1'b1;
            fs_clear = 1'b1;
            nstate   = ST_F;
          end else if (fs_same) begin
            nstate = ST_C;
          end else begin
            fs_store = 1'b1;
            nstate   = ST_L;
          end
        end else begin
          nstate = ST_L;            // CP register empty: nothing to match
        end
      end
      ST_C: begin
        c_put = 1'b1;
        if (c_ready) nstate = ST_L;
      end
      ST_F: begin
        if (!f_rd) is_rd = 1'b1;
        else begin
          for_load = 1'b1;
          nstate   = ST_O;
        end
      end
      ST_O: begin
        operate = 1'b1;
        if (emit_done) begin
          cp_free = 1'b1;
          nstate  = ST_L;
        end
      end
      default: nstate = ST_L;
    endcase
    if (init) begin
      nstate   = ST_L;
      load     = 1'b0;
      fs_req   = 1'b0;
      fs_rd    = 1'b0;
      fs_store = 1'b0;
      fs_clear = 1'b0;
      lfr_load = 1'b0;
      c_put    = 1'b0;
      is_rd    = 1'b0;
      for_load = 1'b0;
      operate  = 1'b0;
      cp_free  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_L;
      m_rd  <= 1'b0;
      f_rd  <= 1'b0;
    end else begin
      state <= nstate;
      m_rd  <= fs_rd;
      f_rd  <= is_rd;
    end
  end

endmodule
