// tb_xl_table_ctrl: table-driven mode.  Programs a few table entries, then
// commits instructions and checks, against expectations computed in the
// testbench: which instructions are forwarded, the message kind, payload
// and type bits, the update notice when a suspension entry matches, the
// bypass (every instruction sent as {PC, data address}) from the next
// instruction on, and the return to table lookups once the monitor clears
// the suspension register.  Nothing may be forwarded while inactive.
module tb_xl_table_ctrl;
  import xl_pkg::*;

  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  logic active, tw_en, sus_wr, sus_wdata, sus_q, cm_valid, cm_fire, fwd, update_bit;
  logic [$clog2(N)-1:0] tw_idx;
  xl_tag_t tw_tag;
  xl_dir_t tw_dir;
  xl_commit_t cm_rec;
  xl_msg_t msg;
  int checks = 0, failures = 0;

  xl_table_ctrl #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int idx, logic id, logic [31:0] tag, logic [31:0] care, logic v, logic s, logic [3:0] t);
    tw_en = 1; tw_idx = idx[$clog2(N)-1:0];
    tw_tag = '{used: 1'b1, id: id, tag: tag, care: care};
    tw_dir = '{valid: v, susp: s, ttype: t};
    @(posedge clk); #1 tw_en = 0;
  endtask

  // commit one instruction and check the decision
  task automatic commit(logic [31:0] pc, logic mem, logic [31:0] da, logic [63:0] res,
                        logic e_fwd, xl_msg_e e_kind, logic [63:0] e_pay, logic [3:0] e_t, logic e_upd);
    cm_valid = 1; cm_fire = 1;
    cm_rec = '{pc: pc, is_mem: mem, daddr: da, result: res};
    #1;
    checks++;
    if (fwd !== e_fwd || (e_fwd && (msg.kind !== e_kind || msg.payload !== e_pay ||
        msg.ttype !== e_t || msg.upd !== e_upd)) || update_bit !== (e_fwd & e_upd)) begin
      failures++;
      $display("FAIL pc=%h fwd=%0d kind=%0d pay=%h t=%0d upd=%0d (exp %0d %0d %h %0d %0d)",
               pc, fwd, msg.kind, msg.payload, msg.ttype, msg.upd, e_fwd, e_kind, e_pay, e_t, e_upd);
    end
    @(posedge clk); #1 cm_valid = 0; cm_fire = 0;
  endtask

  initial begin
    active = 0; tw_en = 0; sus_wr = 0; sus_wdata = 0; cm_valid = 0; cm_fire = 0;
    tw_idx = '0; tw_tag = '0; tw_dir = '0; cm_rec = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    put(0, FLAG_I, 32'h0000_4000, 32'hffff_ffff, 1, 0, 4'd1);   // a monitored PC
    put(1, FLAG_D, 32'h8000_a000, 32'hffff_f000, 1, 0, 4'd2);   // an array 0x8000aXXX
    put(2, FLAG_I, 32'h0000_4100, 32'hffff_ffff, 0, 1, 4'd0);   // call that changes the table
    // inactive: nothing forwarded
    commit(32'h4000, 0, 0, 64'h11, 0, MSG_VALUE, 0, 0, 0);
    active = 1;
    commit(32'h4000, 0, 0, 64'h1234_5678_9abc_def0, 1, MSG_VALUE, 64'h1234_5678_9abc_def0, 1, 0);
    commit(32'h4004, 0, 0, 64'h5, 0, MSG_VALUE, 0, 0, 0);
    commit(32'h4008, 1, 32'h8000_a7f0, 64'h5, 1, MSG_MADDR, 64'h8000_a7f0, 2, 0);
    commit(32'h400c, 1, 32'h8000_b000, 64'h5, 0, MSG_VALUE, 0, 0, 0);
    checks++; if (sus_q !== 0) begin failures++; $display("FAIL early suspension"); end
    // suspension entry: notice sent with this instruction
    commit(32'h4100, 0, 0, 64'h77, 1, MSG_VALUE, 64'h77, 0, 1);
    checks++; if (sus_q !== 1) begin failures++; $display("FAIL suspension not set"); end
    // bypassed: every instruction sent as {PC, daddr}
    commit(32'h4104, 0, 0, 64'h9, 1, MSG_TRACE, {32'h4104, 32'h0}, 0, 0);
    commit(32'h4108, 1, 32'h1234_0000, 64'h9, 1, MSG_TRACE, {32'h4108, 32'h1234_0000}, 0, 0);
    commit(32'h4000, 0, 0, 64'h9, 1, MSG_TRACE, {32'h4000, 32'h0}, 0, 0);
    // a stalled instruction (not committing) must not change state
    // monitor rewrites entry 1 while suspended, then clears the register
    put(1, FLAG_D, 32'h9000_0000, 32'hffff_ff00, 1, 0, 4'd6);
    sus_wr = 1; sus_wdata = 0; @(posedge clk); #1 sus_wr = 0;
    checks++; if (sus_q !== 0) begin failures++; $display("FAIL suspension not cleared"); end
    commit(32'h4008, 1, 32'h8000_a7f0, 64'h5, 0, MSG_VALUE, 0, 0, 0);
    commit(32'h4010, 1, 32'h9000_00ff, 64'h5, 1, MSG_MADDR, 64'h9000_00ff, 6, 0);
    // PC and data address both match: PC entry's type wins
    commit(32'h4000, 1, 32'h9000_0001, 64'h5, 1, MSG_MADDR, 64'h9000_0001, 1, 0);
    // suspension match that is not committed (stall) leaves the register alone
    cm_valid = 1; cm_fire = 0; cm_rec = '{pc: 32'h4100, is_mem: 0, daddr: 0, result: 0};
    @(posedge clk); #1 cm_valid = 0;
    checks++; if (sus_q !== 0) begin failures++; $display("FAIL stalled instruction suspended table"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
