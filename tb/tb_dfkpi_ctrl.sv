// tb_dfkpi_ctrl: self-checking test of the micro-program state machine.
// Walks every state change of the L/M/C/F/O diagram: idle Load, the bypass path
// L-M-F-F-O-L with an Operate stall, a match miss (M-M-L), a match hit
// (M-M-F, also with the Frame Store withheld for two clocks), a same-port collision through Copy with a DQU-full stall, and Init.
// Each clock the decoded control outputs and the next state are checked.
module tb_dfkpi_ctrl;
  import dfkpi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic init, tok_avail, bypass, match, fs_hit, fs_same, c_ready, emit_done;
  logic fs_gnt = 1'b1, fs_req;
  cp_state_e state;
  logic load, fs_rd, fs_store, fs_clear, lfr_load, c_put, is_rd, for_load, operate, cp_free;
  int checks = 0, failures = 0;

  dfkpi_ctrl dut (.clk, .rst_n, .init, .tok_avail, .bypass, .match, .fs_hit, .fs_same, .fs_gnt, .fs_req,
                  .c_ready, .emit_done, .state, .load, .fs_rd, .fs_store, .fs_clear,
                  .lfr_load, .c_put, .is_rd, .for_load, .operate, .cp_free);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (state %s)", what, $time, state.name());
    end
  endtask

  // Apply inputs, check the decoded outputs {load fs_rd fs_store fs_clear
  // lfr_load c_put is_rd for_load operate cp_free}, clock, check the state.
  task automatic step(input logic [7:0] in, input logic [9:0] exp_out,
                      input cp_state_e exp_next, input string what);
    @(negedge clk);
    {init, tok_avail, bypass, match, fs_hit, fs_same, c_ready, emit_done} = in;
    #1;
    check({load, fs_rd, fs_store, fs_clear, lfr_load, c_put, is_rd, for_load, operate,
           cp_free} == exp_out, {what, " outputs"});
    @(posedge clk);
    #1;
    check(state == exp_next, {what, " next state"});
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  //                  i t b m h s r e
  initial begin
    {init, tok_avail, bypass, match, fs_hit, fs_same, c_ready, emit_done} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(state == ST_L, "reset state");
    step(8'b0000_0010, 10'b0000000000, ST_L, "idle L");
    step(8'b0000_0010, 10'b0000000000, ST_L, "idle L");
    // bypass path
    step(8'b0100_0010, 10'b1000000000, ST_M, "L load");
    step(8'b0010_0010, 10'b0000100000, ST_F, "M bypass");
    step(8'b0000_0010, 10'b0000001000, ST_F, "F read IS");
    step(8'b0000_0010, 10'b0000000100, ST_O, "F load FOR");
    step(8'b0000_0000, 10'b0000000010, ST_O, "O stall");
    step(8'b0000_0000, 10'b0000000010, ST_O, "O stall");
    step(8'b0000_0001, 10'b0000000011, ST_L, "O done");
    // match miss
    step(8'b0100_0010, 10'b1000000000, ST_M, "L load");
    step(8'b0001_0010, 10'b0100000000, ST_M, "M read FS");
    step(8'b0001_0010, 10'b0010000000, ST_L, "M store");
    // match hit, after waiting two clocks for the Frame Store
    step(8'b0100_0010, 10'b1000000000, ST_M, "L load");
    fs_gnt = 1'b0;
    step(8'b0001_0010, 10'b0000000000, ST_M, "M wait FS");
    check(fs_req == 1'b1, "fs_req while waiting");
    step(8'b0001_0010, 10'b0000000000, ST_M, "M wait FS");
    fs_gnt = 1'b1;
    step(8'b0001_0010, 10'b0100000000, ST_M, "M read FS");
    step(8'b0001_1010, 10'b0001100000, ST_F, "M hit");
    step(8'b0000_0010, 10'b0000001000, ST_F, "F read IS");
    step(8'b0000_0010, 10'b0000000100, ST_O, "F load FOR");
    step(8'b0000_0011, 10'b0000000011, ST_L, "O done");
    // same-port collision through Copy
    step(8'b0100_0010, 10'b1000000000, ST_M, "L load");
    step(8'b0001_0010, 10'b0100000000, ST_M, "M read FS");
    step(8'b0001_0110, 10'b0000000000, ST_C, "M same port");
    step(8'b0000_0000, 10'b0000010000, ST_C, "C DQU full");
    step(8'b0000_0010, 10'b0000010000, ST_L, "C PutDT");
    // Init from Operate
    step(8'b0100_0010, 10'b1000000000, ST_M, "L load");
    step(8'b0010_0010, 10'b0000100000, ST_F, "M bypass");
    step(8'b0000_0010, 10'b0000001000, ST_F, "F read IS");
    step(8'b0000_0010, 10'b0000000100, ST_O, "F load FOR");
    step(8'b1000_0000, 10'b0000000000, ST_L, "Init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
