// tb_xl_extraction_logic: one core's extraction logic, programmed through
// its register port as the monitor would.
//  1. disabled: nothing is forwarded;
//  2. table-driven mode: a PC entry and an address-range entry select
//     instructions; a suspension entry raises the update bit, then every
//     instruction is forwarded as {PC, data address} until the suspension
//     register is cleared;
//  3. forward-bit mode: instructions are fetched (annotation bytes from a
//     behavioural cache), their forward bits go into ROB entries, and at
//     commit exactly the instructions whose annotation bit is 1 are written
//     at QBR + RQR, RQR stepping by 8;
//  4. a refused queue write stalls commit; a kernel entry waits for an
//     empty queue.
// Expected values are worked out in the testbench from the formulas.
module tb_xl_extraction_logic;
  import xl_pkg::*;

  localparam int unsigned ROB = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [7:0] cfg_addr; logic [63:0] cfg_wdata;
  logic enabled, suspended; xl_mode_e mode;
  logic if_valid, if_ready, fb_valid, fb_bit, fb_ready;
  logic [31:0] if_pc, ann_req_addr;
  logic ann_req_valid, ann_req_ready, ann_rsp_valid; logic [7:0] ann_rsp_data;
  logic [1:0] rob_ins_en, rob_ins_fb; logic [1:0][3:0] rob_ins_idx;
  logic cm_valid, cm_ready; xl_commit_t cm_rec; logic [3:0] cm_rob_idx;
  logic kern_req, kern_stall;
  logic q_wr_valid, q_wr_ready, q_empty; logic [31:0] q_wr_addr; xl_msg_t q_wr_msg;
  logic ev_fwd, ev_qstall, update_bit;
  int checks = 0, failures = 0;

  xl_extraction_logic #(.TBL_ENTRIES(8), .ROB_ENTRIES(ROB), .QUEUE_ENTRIES(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(logic [7:0] a, logic [63:0] d);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk); #1 cfg_we = 0;
  endtask

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // commit one instruction; e_fwd/e_kind/e_pay are the expected message
  logic [31:0] qoff;
  task automatic commit(logic [31:0] pc, logic mem, logic [31:0] da, logic [63:0] res, logic [3:0] ridx,
                        logic e_fwd, xl_msg_e e_kind, logic [63:0] e_pay, string what);
    cm_valid = 1; cm_rob_idx = ridx;
    cm_rec = '{pc: pc, is_mem: mem, daddr: da, result: res};
    #1;
    chk(q_wr_valid === e_fwd, {what, ": forward decision"});
    if (e_fwd) begin
      chk(q_wr_addr === 32'h0100_0000 + qoff, {what, ": queue address"});
      chk(q_wr_msg.kind === e_kind && q_wr_msg.payload === e_pay, {what, ": message"});
    end
    @(posedge clk);
    if (e_fwd && q_wr_ready) qoff = (qoff + 8) % (64 * 8);
    #1 cm_valid = 0;
  endtask

  // annotation memory: bit of instruction k (code offset 4k) = parity-like hash
  function automatic logic [7:0] ann_byte(logic [31:0] a);
    return a[7:0] * 8'd37 + 8'h1b;
  endfunction
  logic [31:0] pend[$];
  always @(posedge clk) begin
    if (ann_req_valid && ann_req_ready) pend.push_back(ann_req_addr);
    #1;
    ann_rsp_valid = 0;
    if (pend.size() > 0) begin ann_rsp_valid = 1; ann_rsp_data = ann_byte(pend.pop_front()); end
  end

  // pipeline model: forward bits go into consecutive ROB entries
  logic [3:0] rob_tail;
  always @(posedge clk) begin
    if (rst_n && fb_valid && fb_ready) rob_tail <= rob_tail + 1;
  end
  assign rob_ins_en  = {1'b0, fb_valid && fb_ready};
  assign rob_ins_idx = {4'd0, rob_tail};
  assign rob_ins_fb  = {1'b0, fb_bit};

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; if_valid = 0; if_pc = 0; fb_ready = 1;
    ann_req_ready = 1; ann_rsp_valid = 0; ann_rsp_data = 0; cm_valid = 0; cm_rec = '0;
    cm_rob_idx = 0; kern_req = 0; q_wr_ready = 1; q_empty = 1; rob_tail = 0; qoff = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cfg(CFG_QBR, 64'h0100_0000);
    cfg(CFG_RQR, 0);
    // table entries: 0 = PC 0x4000 (I), 1 = 0x8000aXXX (D), 2 = PC 0x4100 suspends
    cfg(CFG_TAG, {31'b0, FLAG_I, 32'h0000_4000}); cfg(CFG_CARE, 64'hffff_ffff);
    cfg(CFG_TBLWR, (64'd0 << 16) | (1 << 8) | (1 << 7) | 64'd3);
    cfg(CFG_TAG, {31'b0, FLAG_D, 32'h8000_a000}); cfg(CFG_CARE, 64'hffff_f000);
    cfg(CFG_TBLWR, (64'd1 << 16) | (1 << 8) | (1 << 7) | 64'd4);
    cfg(CFG_TAG, {31'b0, FLAG_I, 32'h0000_4100}); cfg(CFG_CARE, 64'hffff_ffff);
    cfg(CFG_TBLWR, (64'd2 << 16) | (1 << 8) | (1 << 6));
    // 1. disabled
    commit(32'h4000, 0, 0, 64'h55, 0, 0, MSG_VALUE, 0, "disabled");
    // 2. table-driven mode
    cfg(CFG_CTRL, 64'h1);
    chk(enabled && mode == MODE_TABLE, "control register");
    commit(32'h4000, 0, 0, 64'hdead_beef_0000_0001, 0, 1, MSG_VALUE, 64'hdead_beef_0000_0001, "table PC hit");
    commit(32'h4004, 1, 32'h8000_a123, 64'h0, 0, 1, MSG_MADDR, 64'h8000_a123, "table range hit");
    commit(32'h4008, 1, 32'h8000_b123, 64'h0, 0, 0, MSG_VALUE, 0, "table miss");
    cm_valid = 1; cm_rec = '{pc: 32'h4100, is_mem: 0, daddr: 0, result: 64'h9}; #1;
    chk(update_bit === 1 && q_wr_msg.upd === 1, "update bit on suspension entry");
    @(posedge clk); qoff += 8; #1 cm_valid = 0;
    chk(suspended === 1, "suspension register set");
    commit(32'h4200, 1, 32'h1234_5678, 64'h0, 0, 1, MSG_TRACE, {32'h4200, 32'h1234_5678}, "bypass");
    cfg(CFG_SUSP, 0);
    chk(suspended === 0, "suspension register cleared");
    commit(32'h4200, 1, 32'h1234_5678, 64'h0, 0, 0, MSG_VALUE, 0, "table again");
    // 4a. queue write refused: commit stalls, nothing advances
    q_wr_ready = 0;
    cm_valid = 1; cm_rec = '{pc: 32'h4000, is_mem: 0, daddr: 0, result: 64'h1}; #1;
    chk(cm_ready === 0 && ev_qstall === 1, "queue-full stall");
    @(posedge clk); #1;
    chk(q_wr_addr === 32'h0100_0000 + qoff, "queue address holds during stall");
    q_wr_ready = 1; #1;
    chk(cm_ready === 1, "stall released");
    @(posedge clk); qoff += 8; #1 cm_valid = 0;
    // 4b. kernel entry
    kern_req = 1; q_empty = 0; #1;
    chk(kern_stall === 1, "kernel entry waits for the monitor");
    q_empty = 1; #1;
    chk(kern_stall === 0, "kernel entry proceeds on empty queue");
    kern_req = 0;
    // 3. forward-bit mode
    cfg(CFG_ABR, 64'h0f00_0000);
    cfg(CFG_CMASK, 64'h000f_ffff);
    cfg(CFG_CTRL, 64'h3);
    chk(mode == MODE_FBIT, "mode switch");
    for (int blk = 0; blk < 6; blk++) begin
      logic [31:0] pcs [16];
      logic [15:0] fbs;
      // fetch 16 instructions
      for (int k = 0; k < 16; k++) begin
        logic ok;
        pcs[k] = 32'h0010_0000 + 32'($urandom_range(0, 4095)) * 4;
        fbs[k] = ann_byte(32'h0f00_0000 + (pcs[k] & 32'h000f_ffff) / 32)[7 - ((pcs[k] / 4) % 8)];
        if_valid = 1; if_pc = pcs[k];
        do begin @(negedge clk); ok = if_ready; @(posedge clk); end while (!ok);
        #1 if_valid = 0;
      end
      repeat (8) @(posedge clk); #1;
      chk(rob_tail == 0, "all forward bits placed in the ROB");
      for (int k = 0; k < 16; k++) begin
        logic mem;
        mem = k[0];
        commit(pcs[k], mem, 32'h7000_0000 + k, 64'(k) * 64'h1111, 4'(k), fbs[k],
               mem ? MSG_MADDR : MSG_VALUE, mem ? 64'h7000_0000 + k : 64'(k) * 64'h1111, "forward-bit commit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
