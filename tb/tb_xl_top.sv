// tb_xl_top: end-to-end test of the chip-level extraction logic at its
// default size (4 cores, 32-entry tables, 64-entry ROB flags, 64K-entry
// communication queue).  A monitor model reads the queue at QBR + 8*n in
// order and compares every message with a scoreboard that the testbench
// fills when a forwarded instruction commits.
//
// Phases and the mechanisms they must exercise (each is counted, and a
// mechanism that never occurs is a failure):
//   A  core 1, table-driven mode: PC hits, address-range hits, misses, a
//      suspension entry (update bit), bypass of the table, monitor clears
//      the suspension register;
//   B  core 2, forward-bit mode: fetch, annotation reads, library code
//      skipped, ROB flags, forwarding of the selected instructions;
//   C  core 1 suspended, one instruction per cycle while the monitor
//      pauses: the queue fills and commit stalls (queue full), then the
//      monitor drains it and RQR wraps past the end of the queue;
//   D  kernel entry on core 1 waits until the monitor has emptied the queue;
//   E  cores 0 and 3 both forwarding: one waits for the shared queue.
module tb_xl_top;
  import xl_pkg::*;

  localparam int NC = 4;
  localparam int QE = 65536;
  localparam logic [31:0] QBASE = 32'h0100_0000;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] cfg_we; logic [NC-1:0][7:0] cfg_addr; logic [NC-1:0][63:0] cfg_wdata;
  logic [NC-1:0] enabled, suspended; xl_mode_e [NC-1:0] mode;
  logic [NC-1:0] if_valid, if_ready, fb_valid, fb_bit, fb_ready;
  logic [NC-1:0][31:0] if_pc, ann_req_addr;
  logic [NC-1:0] ann_req_valid, ann_req_ready, ann_rsp_valid; logic [NC-1:0][7:0] ann_rsp_data;
  logic [NC-1:0][1:0] rob_ins_en, rob_ins_fb; logic [NC-1:0][1:0][5:0] rob_ins_idx;
  logic [NC-1:0] cm_valid, cm_ready; xl_commit_t [NC-1:0] cm_rec; logic [NC-1:0][5:0] cm_rob_idx;
  logic [NC-1:0] kern_req, kern_stall, ev_fwd, ev_qstall, update_bit;
  logic mon_rd_en, mon_rd_valid, q_init_busy; logic [31:0] mon_rd_addr; xl_msg_t mon_rd_msg;
  logic [16:0] q_count;

  xl_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_tbl_pc = 0, n_tbl_range = 0, n_tbl_miss = 0, n_update = 0, n_bypass = 0, n_sus_clear = 0;
  int n_fb_fwd = 0, n_fb_skip = 0, n_lib = 0, n_ann = 0, n_qfull = 0, n_wrap = 0, n_kern = 0;
  int n_arb = 0, n_mode = 0, n_mon = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- scoreboard and monitor model ----------------
  xl_msg_t     sb[$];
  logic [NC-1:0] exp_fwd;
  xl_msg_t [NC-1:0] exp_msg;
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (rst_n && cm_valid[c] && cm_ready[c] && exp_fwd[c]) sb.push_back(exp_msg[c]);
      if (rst_n && ev_qstall[c] && q_count != 17'(QE)) n_arb++;
      if (rst_n && ev_qstall[c] && q_count == 17'(QE)) n_qfull++;
      if (rst_n && kern_stall[c]) n_kern++;
      if (rst_n && ann_req_valid[c] && ann_req_ready[c]) n_ann++;
    end
  end

  logic        mon_run;
  int unsigned mon_ptr = 0;
  always @(posedge clk) begin
    if (rst_n && mon_rd_valid) begin
      xl_msg_t e;
      n_mon++;
      if (sb.size() == 0) chk(0, "monitor read a message nobody sent");
      else begin
        e = sb.pop_front();
        chk(mon_rd_msg === e, "message contents and order");
        if (mon_rd_msg !== e && failures < 20)
          $display("  got %0d %0d %h %h exp %0d %0d %h %h", mon_rd_msg.kind, mon_rd_msg.upd,
                   mon_rd_msg.ttype, mon_rd_msg.payload, e.kind, e.upd, e.ttype, e.payload);
      end
      if (mon_ptr == QE - 1) n_wrap++;
      mon_ptr = (mon_ptr + 1) % QE;
    end
    #1;
    mon_rd_en   = mon_run && rst_n && ($urandom_range(0, 3) != 0) && !mon_rd_valid;
    mon_rd_addr = QBASE + mon_ptr * 8;
  end

  // ---------------- per-core drivers ----------------
  task automatic cfg(int c, logic [7:0] a, logic [63:0] d);
    cfg_we[c] = 1; cfg_addr[c] = a; cfg_wdata[c] = d;
    @(posedge clk); #1 cfg_we[c] = 0;
  endtask

  task automatic program_table(int c);
    cfg(c, CFG_QBR, 64'(QBASE));
    cfg(c, CFG_RQR, 0);
    cfg(c, CFG_TAG, {31'b0, FLAG_I, 32'h0000_4000}); cfg(c, CFG_CARE, 64'hffff_ffff);
    cfg(c, CFG_TBLWR, (64'd0 << 16) | (1 << 8) | (1 << 7) | 64'd3);
    cfg(c, CFG_TAG, {31'b0, FLAG_D, 32'h8000_a000}); cfg(c, CFG_CARE, 64'hffff_f000);
    cfg(c, CFG_TBLWR, (64'd1 << 16) | (1 << 8) | (1 << 7) | 64'd4);
    cfg(c, CFG_TAG, {31'b0, FLAG_I, 32'h0000_4100}); cfg(c, CFG_CARE, 64'hffff_ffff);
    cfg(c, CFG_TBLWR, (64'd2 << 16) | (1 << 8) | (1 << 6));
  endtask

  // one committing instruction on core c; waits until it commits
  task automatic commit(int c, xl_commit_t r, logic [5:0] ridx, logic f, xl_msg_t m);
    logic ok;
    cm_valid[c] = 1; cm_rec[c] = r; cm_rob_idx[c] = ridx; exp_fwd[c] = f; exp_msg[c] = m;
    do begin @(negedge clk); ok = cm_ready[c]; @(posedge clk); end while (!ok);
    #1 cm_valid[c] = 0; exp_fwd[c] = 0;
  endtask

  // table-mode model for the fixed entries; sus is the modelled register
  task automatic table_commit(int c, logic [31:0] pc, logic mem, logic [31:0] da, logic [63:0] res,
                              ref logic sus);
    xl_msg_t m; logic f; logic pch, dh, sh;
    m = '0; f = 0;
    pch = (pc == 32'h4000);
    dh  = mem && (da[31:12] == 20'h8000a);
    sh  = (pc == 32'h4100);
    if (sus) begin
      f = 1; m.kind = MSG_TRACE; m.payload = {pc, da}; n_bypass++;
    end else if (pch || dh || sh) begin
      f = 1;
      m.kind = mem ? MSG_MADDR : MSG_VALUE;
      m.payload = mem ? 64'(da) : res;
      m.ttype = pch ? 4'd3 : (dh ? 4'd4 : 4'd0);
      m.upd = sh;
      if (pch) n_tbl_pc++;
      if (dh) n_tbl_range++;
    end else n_tbl_miss++;
    commit(c, '{pc: pc, is_mem: mem, daddr: da, result: res}, 0, f, m);
    if (!sus && sh) begin sus = 1; n_update++; end
  endtask

  // annotation cache per core: in-order, 1..3 cycles
  function automatic logic [7:0] ann_byte(logic [31:0] a);
    return a[7:0] * 8'd29 + a[15:8] + 8'h35;
  endfunction
  for (genvar c = 0; c < NC; c++) begin : g_cache
    logic [31:0] pa[$]; int pt[$]; int cyc = 0;
    always @(posedge clk) begin
      cyc++;
      if (rst_n && ann_req_valid[c] && ann_req_ready[c]) begin pa.push_back(ann_req_addr[c]); pt.push_back(cyc + $urandom_range(1, 3)); end
      #1;
      ann_req_ready[c] = ($urandom_range(0, 4) != 0);
      ann_rsp_valid[c] = 0;
      if (pa.size() > 0 && pt[0] <= cyc) begin
        ann_rsp_valid[c] = 1; ann_rsp_data[c] = ann_byte(pa.pop_front()); void'(pt.pop_front());
      end
    end
  end

  // pipeline model of core 2: forward bits enter consecutive ROB entries
  logic [5:0] rob_tail;
  always @(posedge clk) if (rst_n && fb_valid[2] && fb_ready[2]) rob_tail <= rob_tail + 1;
  always_comb begin
    rob_ins_en = '0; rob_ins_idx = '0; rob_ins_fb = '0;
    rob_ins_en[2][0]  = fb_valid[2] && fb_ready[2];
    rob_ins_idx[2][0] = rob_tail;
    rob_ins_fb[2][0]  = fb_bit[2];
  end

  logic sus1;
  initial begin
    cfg_we = '0; cfg_addr = '0; cfg_wdata = '0; if_valid = '0; if_pc = '0; fb_ready = '1;
    cm_valid = '0; cm_rec = '0; cm_rob_idx = '0; kern_req = '0; exp_fwd = '0; exp_msg = '0;
    mon_run = 1; mon_rd_en = 0; mon_rd_addr = QBASE; rob_tail = 0; sus1 = 0;
    ann_req_ready = '1; ann_rsp_valid = '0; ann_rsp_data = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // wait for the queue's clearing pass
    while (q_init_busy) @(posedge clk);
    #1;
    chk(q_count == 0, "queue empty after clearing pass");

    // ---- A: table-driven mode on core 1 ----
    program_table(1);
    cfg(1, CFG_CTRL, 64'h1); n_mode++;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] pc, da; logic mem;
      case ($urandom_range(0, 9))
        0, 1:    pc = 32'h4000;
        2:       pc = (sus1 ? 32'h4000 : (($urandom_range(0, 9) == 0) ? 32'h4100 : 32'h4004));
        default: pc = 32'h4000 + 4 * $urandom_range(1, 60);
      endcase
      mem = $urandom_range(0, 1);
      da  = ($urandom_range(0, 1) ? 32'h8000_a000 : 32'h8000_9000) + $urandom_range(0, 4095);
      table_commit(1, pc, mem, da, {$urandom, $urandom}, sus1);
      // the monitor finishes its table update some time after the notice
      if (sus1 && $urandom_range(0, 15) == 0) begin
        cfg(1, CFG_SUSP, 0); sus1 = 0; n_sus_clear++;
      end
    end
    chk(suspended[1] == sus1, "suspension register matches the model");
    if (sus1) begin cfg(1, CFG_SUSP, 0); sus1 = 0; n_sus_clear++; end

    // ---- B: forward-bit mode on core 2 ----
    cfg(2, CFG_QBR, 64'(QBASE));
    cfg(2, CFG_ABR, 64'h0f00_0000);
    cfg(2, CFG_CMASK, 64'h000f_ffff);
    cfg(2, CFG_LIB_BASE + 1, 64'h4000_0000);
    cfg(2, CFG_LIB_LIM + 1, 64'h4010_0000);
    cfg(1, CFG_CTRL, 64'h0);                 // monitored process moves to core 2
    while (sb.size() != 0) @(posedge clk);   // core 2's RQR continues core 1's
    #1;
    cfg(2, CFG_RQR, 64'((mon_ptr * 8) % (QE * 8)));
    cfg(2, CFG_CTRL, 64'h3); n_mode++;
    for (int blk = 0; blk < 100; blk++) begin
      logic [31:0] pcs[32]; logic [31:0] fbs;
      for (int k = 0; k < 32; k++) begin
        logic ok, lib;
        lib = ($urandom_range(0, 7) == 0);
        pcs[k] = (lib ? 32'h4000_0000 : 32'h0010_0000) + 32'($urandom_range(0, 65535)) * 4;
        fbs[k] = lib ? 1'b0 : ann_byte(32'h0f00_0000 + (pcs[k] & 32'h000f_ffff) / 32)[7 - ((pcs[k] / 4) % 8)];
        if (lib) n_lib++;
        if_valid[2] = 1; if_pc[2] = pcs[k];
        do begin @(negedge clk); ok = if_ready[2]; @(posedge clk); end while (!ok);
        #1 if_valid[2] = 0;
      end
      repeat (6) @(posedge clk); #1;
      for (int k = 0; k < 32; k++) begin
        xl_msg_t m; logic mem;
        mem = ($urandom_range(0, 2) == 0);
        m = '0;
        m.kind = mem ? MSG_MADDR : MSG_VALUE;
        m.payload = mem ? 64'(32'h6000_0000 + 32'(k)) : {32'(blk), 32'(k)};
        if (fbs[k]) n_fb_fwd++; else n_fb_skip++;
        commit(2, '{pc: pcs[k], is_mem: mem, daddr: 32'h6000_0000 + 32'(k), result: {32'(blk), 32'(k)}},
               6'((blk * 32 + k) % 64), fbs[k], m);
      end
    end
    cfg(2, CFG_CTRL, 64'h0);

    // ---- C: fill the queue from core 1 (table bypassed) ----
    while (sb.size() != 0) @(posedge clk);
    #1;
    cfg(1, CFG_RQR, 64'((mon_ptr * 8) % (QE * 8)));
    cfg(1, CFG_CTRL, 64'h1); n_mode++;
    cfg(1, CFG_SUSP, 1); sus1 = 1;
    mon_run = 0;
    fork
      begin  // the monitor resumes some time after the queue became full
        wait (q_count == 17'(QE));
        repeat (50) @(posedge clk);
        mon_run = 1;
      end
    join_none
    for (int i = 0; i < QE + 200; i++)
      table_commit(1, 32'h5000 + 32'(i % 1024) * 4, 1'b1, 32'(i), 64'h0, sus1);
    mon_run = 1;
    // ---- D: kernel entry waits for an empty queue ----
    kern_req[1] = 1;
    @(posedge clk); #1;
    while (kern_stall[1]) @(posedge clk);
    #1;
    chk(sb.size() == 0 && q_count == 0, "kernel entered only with an empty queue");
    kern_req[1] = 0;
    // ---- E: two cores forward at once ----
    cfg(1, CFG_CTRL, 64'h0);
    for (int c = 0; c < NC; c += 3) begin
      cfg(c, CFG_QBR, 64'(QBASE));
      cfg(c, CFG_CTRL, 64'h1);
      cfg(c, CFG_SUSP, 1);
    end
    // both write through one queue: give them disjoint RQR halves
    cfg(0, CFG_RQR, 64'((mon_ptr * 8) % (QE * 8)));
    cfg(3, CFG_RQR, 64'((mon_ptr * 8 + 8) % (QE * 8)));
    // core 0 takes entry n, core 3 entry n+1: commit them together
    for (int i = 0; i < 50; i++) begin
      fork
        commit(0, '{pc: 32'h7000 + 32'(i), is_mem: 1'b0, daddr: 32'h0, result: 64'h0}, 0, 1,
               '{kind: MSG_TRACE, upd: 1'b0, ttype: 4'd0, payload: {32'h7000 + 32'(i), 32'h0}});
        commit(3, '{pc: 32'h9000 + 32'(i), is_mem: 1'b0, daddr: 32'h0, result: 64'h0}, 0, 1,
               '{kind: MSG_TRACE, upd: 1'b0, ttype: 4'd0, payload: {32'h9000 + 32'(i), 32'h0}});
      join
      // keep the two offsets interleaved: each core skips the other's entry
      cfg(0, CFG_RQR, 64'((mon_ptr * 8 + 8 * sb.size()) % (QE * 8)));
      cfg(3, CFG_RQR, 64'((mon_ptr * 8 + 8 * sb.size() + 8) % (QE * 8)));
    end
    while (sb.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);

    // ---- mechanism coverage ----
    $display("table: pc=%0d range=%0d miss=%0d update=%0d bypass=%0d clear=%0d", n_tbl_pc, n_tbl_range,
             n_tbl_miss, n_update, n_bypass, n_sus_clear);
    $display("fbit: fwd=%0d skip=%0d lib=%0d ann_reads=%0d  queue: full_stall=%0d wrap=%0d kern=%0d arb=%0d mode=%0d mon=%0d",
             n_fb_fwd, n_fb_skip, n_lib, n_ann, n_qfull, n_wrap, n_kern, n_arb, n_mode, n_mon);
    chk(n_tbl_pc > 0, "PC hit");         chk(n_tbl_range > 0, "range hit");
    chk(n_tbl_miss > 0, "table miss");   chk(n_update > 0, "update notice");
    chk(n_bypass > 0, "bypass");         chk(n_sus_clear > 0, "suspension cleared");
    chk(n_fb_fwd > 0, "forward bit 1");  chk(n_fb_skip > 0, "forward bit 0");
    chk(n_lib > 0, "library code");      chk(n_ann > 0, "annotation reads");
    chk(n_qfull > 0, "queue-full stall"); chk(n_wrap > 0, "queue wrap");
    chk(n_kern > 0, "kernel-entry stall"); chk(n_arb > 0, "two cores contend");
    chk(n_mode >= 3, "mode switches");
    chk(sb.size() == 0, "every message reached the monitor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
