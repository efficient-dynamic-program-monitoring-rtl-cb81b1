// tb_xl_fetch: fetching component.  First the worked example of the
// description (offset 0x1a004, ABR 0xf000000 -> byte address 0xf000d00,
// byte 01100001, bit index 1 -> forward bit 1), then random fetch streams
// with a behavioural annotation cache (in-order responses with random
// latency, random back-pressure), library regions that must get bit 0
// without a memory read, and an inactive phase.  Expected forward bits come
// from the address formula, computed in the testbench.
module tb_xl_fetch;
  import xl_pkg::*;

  logic clk = 0, rst_n = 0;
  logic active;
  logic [ADDR_W-1:0] abr, cmask;
  logic [3:0][ADDR_W-1:0] lib_base, lib_lim;
  logic if_valid, if_ready, ann_req_valid, ann_req_ready, ann_rsp_valid, fb_valid, fb_bit, fb_ready;
  logic [ADDR_W-1:0] if_pc, ann_req_addr;
  logic [7:0] ann_rsp_data;
  int checks = 0, failures = 0, n_req = 0, n_req_exp = 0;

  xl_fetch #(.INSTR_BYTES(4), .NLIB(4), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // annotation content: the example byte at 0xf000d00, a hash elsewhere
  function automatic logic [7:0] ann_byte(logic [31:0] a);
    if (a == 32'h0f00_0d00) return 8'b0110_0001;
    return a[7:0] ^ a[15:8] ^ 8'h5a;
  endfunction

  function automatic logic exp_bit(logic [31:0] pc);
    logic [31:0] off;
    off = pc & cmask;
    if (!active) return 1'b0;
    for (int r = 0; r < 4; r++) if (pc >= lib_base[r] && pc < lib_lim[r]) return 1'b0;
    return ann_byte(abr + off / 32)[7 - ((off / 4) % 8)];
  endfunction

  // behavioural cache: in-order, latency 1..4, random refusals
  logic [31:0] pend_a[$];
  int          pend_t[$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (ann_req_valid && ann_req_ready) begin
      pend_a.push_back(ann_req_addr);
      pend_t.push_back(cyc + $urandom_range(1, 4));
      n_req <= n_req + 1;
    end
  end
  always @(posedge clk) begin
    #1;
    ann_req_ready = ($urandom_range(0, 3) != 0);
    ann_rsp_valid = 0;
    if (pend_a.size() > 0 && pend_t[0] <= cyc) begin
      ann_rsp_valid = 1;
      ann_rsp_data  = ann_byte(pend_a[0]);
      void'(pend_a.pop_front()); void'(pend_t.pop_front());
    end
  end

  // scoreboard of forward bits in fetch order
  logic exp_q[$];
  always @(posedge clk) begin
    if (fb_valid && fb_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected forward bit"); end
      else begin
        logic e;
        e = exp_q.pop_front();
        if (fb_bit !== e) begin failures++; $display("FAIL forward bit %0d exp %0d", fb_bit, e); end
      end
    end
  end

  task automatic fetch(logic [31:0] pc);
    logic ok;
    if_valid = 1; if_pc = pc;
    do begin @(negedge clk); ok = if_ready; @(posedge clk); end while (!ok);
    exp_q.push_back(exp_bit(pc));
    begin
      logic lib = 0;
      for (int r = 0; r < 4; r++) if (pc >= lib_base[r] && pc < lib_lim[r]) lib = 1;
      if (active && !lib) n_req_exp++;
    end
    #1 if_valid = 0;
  endtask

  initial begin
    active = 1; abr = 32'h0f00_0000; cmask = 32'h000f_ffff; lib_base = '0; lib_lim = '0;
    if_valid = 0; if_pc = 0; fb_ready = 1; ann_req_ready = 1; ann_rsp_valid = 0; ann_rsp_data = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    // worked example: PC with code offset 0x1a004
    if_valid = 1; if_pc = 32'h0051_a004; #1;
    checks++;
    if (!(ann_req_valid && ann_req_addr == 32'h0f00_0d00)) begin
      failures++; $display("FAIL example address %h", ann_req_addr);
    end
    begin
      logic ok;
      do begin @(negedge clk); ok = if_ready; @(posedge clk); end while (!ok);
    end
    exp_q.push_back(1'b1); n_req_exp++;
    #1 if_valid = 0;
    repeat (8) @(posedge clk);
    // library regions: no read, bit 0, one cycle later
    lib_base[2] = 32'h4000_0000; lib_lim[2] = 32'h4001_0000;
    @(posedge clk); #1;
    if_valid = 1; if_pc = 32'h4000_0100; #1;
    checks++;
    if (ann_req_valid !== 0) begin failures++; $display("FAIL library instruction read annotation"); end
    @(posedge clk); exp_q.push_back(1'b0); #1 if_valid = 0;
    checks++;
    if (!(fb_valid && fb_bit == 0)) begin failures++; $display("FAIL library forward bit latency"); end
    @(posedge clk); #1;
    // random streams, with random back-pressure from the pipeline
    fork
      begin
        for (int i = 0; i < 4000; i++) begin
          logic [31:0] pc;
          pc = (($urandom_range(0, 5) == 0) ? 32'h4000_0000 : 32'h0010_0000) + ($urandom & 32'h0000_fffc);
          if (i == 3000) active = 0;
          if (i == 3500) active = 1;
          fetch(pc);
          if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
        end
      end
      begin
        forever begin @(posedge clk); #1; fb_ready = ($urandom_range(0, 4) != 0); end
      end
    join_any
    fb_ready = 1;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d forward bits never delivered", exp_q.size()); end
    checks++;
    if (n_req != n_req_exp) begin failures++; $display("FAIL annotation reads %0d exp %0d", n_req, n_req_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
