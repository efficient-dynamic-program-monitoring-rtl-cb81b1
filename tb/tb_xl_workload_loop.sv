// tb_xl_workload_loop: a memory-bug-detection workload through the whole
// chip at default size.  The monitored program is the loop
//
//     q = p + i;  k = *q;  j = k*k + i;  *q = j + y;  i++;   (1024 times)
//
// laid out as SPARC-like 4-byte instructions from PC 0x10000, running on
// core 0.  A behavioural in-order pipeline fetches it (forward bits from an
// annotation section built by the testbench), places the bits into the ROB
// and commits it.  The monitor has to verify every load and store address.
// Three ways of feeding it are run one after the other:
//   1. table-driven: the load and store PCs are table entries, so each
//      iteration sends two data addresses (2048 messages);
//   2. forward-bit, "send q and i": the annotation marks the add that makes
//      q and the increment of i (2048 messages);
//   3. forward-bit, "send p only": only the instruction that produces p
//      before the loop is marked (1 message); the monitor recomputes every q.
// For each run the message count is checked, and every load/store address
// the monitor obtains or derives must equal the address the program used.
module tb_xl_workload_loop;
  import xl_pkg::*;

  localparam int NC = 4;
  localparam int ITER = 1024;
  localparam logic [31:0] QBASE = 32'h0100_0000;
  localparam logic [31:0] P_VAL = 32'h8000_a000;
  // PCs of the program
  localparam logic [31:0] PC_P = 32'h10000, PC_I0 = 32'h10004, PC_Q = 32'h10008, PC_LD = 32'h1000c,
                          PC_MUL = 32'h10010, PC_ADD = 32'h10014, PC_ADDY = 32'h10018,
                          PC_ST = 32'h1001c, PC_INC = 32'h10020, PC_BR = 32'h10024;

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
  always #5 clk = ~clk;
  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- dynamic instruction trace ----------------
  // trace[2 + 8*it + 1] is the load and trace[2 + 8*it + 5] the store of
  // iteration it
  localparam int NDYN = 2 + 8 * ITER;
  xl_commit_t trace [NDYN];
  function automatic void build_trace();
    int n = 0;
    logic [63:0] i, k, j, q;
    trace[n++] = '{pc: PC_P,  is_mem: 1'b0, daddr: 32'h0, result: 64'(P_VAL)};
    trace[n++] = '{pc: PC_I0, is_mem: 1'b0, daddr: 32'h0, result: 64'h0};
    for (int it = 0; it < ITER; it++) begin
      i = 64'(it); q = 64'(P_VAL) + 4 * i; k = i ^ 64'h55; j = k * k + i;
      trace[n++] = '{pc: PC_Q,    is_mem: 1'b0, daddr: 32'h0,     result: q};
      trace[n++] = '{pc: PC_LD,   is_mem: 1'b1, daddr: q[31:0],   result: k};
      trace[n++] = '{pc: PC_MUL,  is_mem: 1'b0, daddr: 32'h0,     result: k * k};
      trace[n++] = '{pc: PC_ADD,  is_mem: 1'b0, daddr: 32'h0,     result: j};
      trace[n++] = '{pc: PC_ADDY, is_mem: 1'b0, daddr: 32'h0,     result: j + 7};
      trace[n++] = '{pc: PC_ST,   is_mem: 1'b1, daddr: q[31:0],   result: j + 7};
      trace[n++] = '{pc: PC_INC,  is_mem: 1'b0, daddr: 32'h0,     result: i + 1};
      trace[n++] = '{pc: PC_BR,   is_mem: 1'b0, daddr: 32'h0,     result: 64'h0};
    end
  endfunction

  // ---------------- annotation section (ABR = 0x0f000000, code base 0x10000) ----------------
  logic [7:0] ann [16];   // 16 bytes cover 128 instructions
  function automatic void mark(logic [31:0] pc);
    int off = int'(pc & 32'hffff);
    ann[off / 32][7 - (off / 4) % 8] = 1'b1;
  endfunction
  logic [31:0] pa[$];
  always @(posedge clk) begin
    if (rst_n && ann_req_valid[0] && ann_req_ready[0]) pa.push_back(ann_req_addr[0]);
    #1;
    ann_rsp_valid[0] = 0;
    if (pa.size() > 0) begin ann_rsp_valid[0] = 1; ann_rsp_data[0] = ann[pa.pop_front() & 32'hf]; end
  end

  // ---------------- in-order pipeline model on core 0 ----------------
  int fetched, inserted, committed;
  logic running;
  always @(posedge clk) begin
    if (rst_n && running && fb_valid[0] && fb_ready[0]) inserted <= inserted + 1;
    if (rst_n && running && cm_valid[0] && cm_ready[0]) committed <= committed + 1;
    if (rst_n && running && if_valid[0] && if_ready[0]) fetched <= fetched + 1;
  end
  always_comb begin
    if_valid = '0; if_pc = '0; cm_valid = '0; cm_rec = '0; cm_rob_idx = '0;
    rob_ins_en = '0; rob_ins_idx = '0; rob_ins_fb = '0;
    // fetch while the ROB (64 entries) has room
    if_valid[0] = running && (fetched < NDYN) && (fetched - committed < 60);
    if_pc[0]    = (fetched < NDYN) ? trace[fetched].pc : 32'h0;
    rob_ins_en[0][0]  = running && fb_valid[0] && fb_ready[0];
    rob_ins_idx[0][0] = 6'(inserted % 64);
    rob_ins_fb[0][0]  = fb_bit[0];
    cm_valid[0]   = running && (committed < inserted);
    cm_rec[0]     = (committed < NDYN) ? trace[committed] : '0;
    cm_rob_idx[0] = 6'(committed % 64);
  end

  // ---------------- monitor ----------------
  xl_msg_t     got[$];
  int unsigned mon_ptr = 0;
  always @(posedge clk) begin
    if (rst_n && mon_rd_valid) begin got.push_back(mon_rd_msg); mon_ptr = (mon_ptr + 1) % 65536; end
    #1;
    mon_rd_en   = rst_n && !mon_rd_valid;
    mon_rd_addr = QBASE + mon_ptr * 8;
  end

  task automatic cfg(logic [7:0] a, logic [63:0] d);
    cfg_we[0] = 1; cfg_addr[0] = a; cfg_wdata[0] = d;
    @(posedge clk); #1 cfg_we[0] = 0;
  endtask

  task automatic run(string name, int exp_msgs);
    longint t0;
    got.delete();
    fetched = 0; inserted = 0; committed = 0;
    cfg(CFG_RQR, 64'(mon_ptr * 8));
    t0 = $time;
    running = 1;
    while (committed < NDYN) @(posedge clk);
    running = 0;
    repeat (20) @(posedge clk); #1;
    $display("%s: %0d instructions in %0d cycles, %0d messages", name, NDYN, ($time - t0) / 10, got.size());
    chk(got.size() == exp_msgs, {name, ": message count"});
  endtask

  int verified;
  xl_commit_t r;
  logic [63:0] q, p;
  initial begin
    cfg_we = '0; cfg_addr = '0; cfg_wdata = '0; fb_ready = '1; kern_req = '0;
    ann_req_ready = '1; ann_rsp_valid = '0; ann_rsp_data = '0; running = 0;
    fetched = 0; inserted = 0; committed = 0; mon_rd_en = 0; mon_rd_addr = QBASE;
    for (int b = 0; b < 16; b++) ann[b] = 8'h00;
    build_trace();
    repeat (3) @(posedge clk); #1 rst_n = 1;
    while (q_init_busy) @(posedge clk);
    #1;
    cfg(CFG_QBR, 64'(QBASE));
    cfg(CFG_ABR, 64'h0f00_0000);
    cfg(CFG_CMASK, 64'h0000_ffff);

    // 1. table-driven: load and store PCs in the table, types 1 and 2
    cfg(CFG_TAG, {31'b0, FLAG_I, PC_LD}); cfg(CFG_CARE, 64'hffff_ffff);
    cfg(CFG_TBLWR, (64'd0 << 16) | (1 << 8) | (1 << 7) | 64'd1);
    cfg(CFG_TAG, {31'b0, FLAG_I, PC_ST});
    cfg(CFG_TBLWR, (64'd1 << 16) | (1 << 8) | (1 << 7) | 64'd2);
    cfg(CFG_CTRL, 64'h1);
    run("table-driven", 2 * ITER);
    verified = 0;
    for (int m = 0; m < got.size(); m++) begin
      r = trace[2 + 8 * (m / 2) + ((m % 2 != 0) ? 5 : 1)];
      if (got[m].kind == MSG_MADDR && got[m].payload == 64'(r.daddr) && got[m].ttype == 4'((m % 2) + 1))
        verified++;
    end
    chk(verified == 2 * ITER, "table-driven: every load/store address verified");

    // 2. forward-bit, q and i sent; the load and store must use exactly q
    mark(PC_Q); mark(PC_INC);
    cfg(CFG_CTRL, 64'h3);
    run("forward q and i", 2 * ITER);
    verified = 0;
    for (int m = 0; m + 1 < got.size(); m += 2) begin
      q = got[m].payload;
      if (got[m].kind == MSG_VALUE && got[m + 1].kind == MSG_VALUE && got[m + 1].payload == 64'(32'(m / 2 + 1)) &&
          q == 64'(trace[2 + 8 * (m / 2) + 1].daddr) && q == 64'(trace[2 + 8 * (m / 2) + 5].daddr))
        verified += 2;
    end
    chk(verified == 2 * ITER, "forward q and i: every load/store address verified");

    // 3. forward-bit, p only: the monitor computes q = p + i itself (int pointers, 4 bytes)
    for (int b = 0; b < 16; b++) ann[b] = 8'h00;
    mark(PC_P);
    run("forward p only", 1);
    verified = 0;
    if (got.size() == 1 && got[0].kind == MSG_VALUE) begin
      p = got[0].payload;
      for (int it = 0; it < ITER; it++)
        if (p + 64'(4 * it) == 64'(trace[2 + 8 * it + 1].daddr) &&
            p + 64'(4 * it) == 64'(trace[2 + 8 * it + 5].daddr)) verified += 2;
    end
    chk(got.size() == 1 && got[0].payload == 64'(P_VAL), "forward p only: one message carrying p");
    chk(verified == 2 * ITER, "forward p only: every load/store address derived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
