// tb_xl_comm_queue: communication queue with full/empty bits.  After the
// clearing pass, a producer writes at a rotating address and a monitor reads
// at its own rotating address with random rates; a write to a full entry
// must be refused, a read of an empty entry must miss, messages must arrive
// in order and unchanged, and the count and empty flag must track the
// number of full entries.  The queue is filled completely once to see the
// producer refused.
module tb_xl_comm_queue;
  import xl_pkg::*;
  localparam int unsigned Q = 16;
  localparam logic [31:0] BASE = 32'h4000_0000;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_en, rd_valid, q_empty, init_busy;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  xl_msg_t wr_msg, rd_msg;
  logic [$clog2(Q):0] q_count;
  int checks = 0, failures = 0, sent = 0, got = 0, refused = 0, missed = 0;
  xl_msg_t sb[$];
  logic [31:0] wp, rp;
  logic rd_pend;

  xl_comm_queue #(.QUEUE_ENTRIES(Q)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_en = 0; wr_addr = BASE; rd_addr = BASE; wr_msg = '0; wp = 0; rp = 0; rd_pend = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++;
    if (!init_busy || wr_ready) begin failures++; $display("FAIL no clearing pass"); end
    repeat (Q + 2) @(posedge clk); #1;
    checks++;
    if (init_busy || !q_empty) begin failures++; $display("FAIL clearing pass"); end
    for (int i = 0; i < 4000; i++) begin
      // producer
      wr_valid = (i < 200) ? 1'b1 : ($urandom_range(0, 1) == 1);
      wr_addr  = BASE + wp * 8;
      wr_msg   = '{kind: MSG_VALUE, upd: 1'b0, ttype: 4'($urandom), payload: {$urandom, $urandom}};
      // consumer stays idle at first so that the queue fills
      rd_en    = (i >= 100) && ($urandom_range(0, 2) != 0);
      rd_addr  = BASE + rp * 8;
      #1;
      checks++;
      if (wr_ready !== (sb.size() < Q)) begin
        failures++; $display("FAIL wr_ready=%0d with %0d queued", wr_ready, sb.size());
      end
      @(posedge clk);
      if (wr_valid && wr_ready) begin sb.push_back(wr_msg); wp = (wp + 1) % Q; sent++; end
      else if (wr_valid) refused++;
      rd_pend = rd_en && (sb.size() > (wr_valid && wr_ready ? 1 : 0));
      #1;
      if (rd_en) begin
        checks++;
        if (rd_valid !== rd_pend) begin failures++; $display("FAIL rd_valid=%0d exp %0d", rd_valid, rd_pend); end
        else if (rd_valid) begin
          xl_msg_t e;
          e = sb.pop_front();
          rp = (rp + 1) % Q; got++;
          checks++;
          if (rd_msg !== e) begin failures++; $display("FAIL message %0d", got); end
        end else missed++;
      end
      checks++;
      if (q_count !== sb.size() || q_empty !== (sb.size() == 0)) begin
        failures++; $display("FAIL count %0d exp %0d", q_count, sb.size());
      end
      rd_en = 0; wr_valid = 0;
    end
    checks++;
    if (refused == 0 || missed == 0 || got < 100) begin
      failures++; $display("FAIL coverage refused=%0d missed=%0d got=%0d", refused, missed, got);
    end
    $display("sent=%0d got=%0d refused=%0d missed=%0d", sent, got, refused, missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
