// tb_xl_forward: forwarding component.  Checks the queue item address
// QBR + RQR, the advance of RQR by 8 bytes per forwarded instruction and
// none otherwise, the wrap after the last entry, the stall while the memory
// refuses the write (entry still full) and RQR/QBR reprogramming.
module tb_xl_forward;
  import xl_pkg::*;
  localparam int unsigned Q = 16;
  logic clk = 0, rst_n = 0;
  logic qbr_wr, rqr_wr, fwd_req, fwd_stall, fwd_done, q_wr_valid, q_wr_ready;
  logic [ADDR_W-1:0] cfg_wdata, qbr, rqr, q_wr_addr;
  xl_msg_t fwd_msg, q_wr_msg;
  int checks = 0, failures = 0;
  logic [31:0] exp_off;

  xl_forward #(.QUEUE_ENTRIES(Q)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qbr_wr = 0; rqr_wr = 0; fwd_req = 0; q_wr_ready = 1; cfg_wdata = 0; fwd_msg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    cfg_wdata = 32'h2000_0000; qbr_wr = 1; @(posedge clk); #1 qbr_wr = 0;
    cfg_wdata = 32'h0000_0000; rqr_wr = 1; @(posedge clk); #1 rqr_wr = 0;
    exp_off = 0;
    for (int i = 0; i < 2000; i++) begin
      fwd_req = ($urandom_range(0, 2) != 0);
      q_wr_ready = ($urandom_range(0, 4) != 0);
      fwd_msg.payload = {$urandom, $urandom};
      fwd_msg.kind = MSG_VALUE;
      #1;
      checks++;
      if (q_wr_valid !== fwd_req || (fwd_req && (q_wr_addr !== 32'h2000_0000 + exp_off ||
          q_wr_msg !== fwd_msg)) || fwd_stall !== (fwd_req && !q_wr_ready) ||
          fwd_done !== (fwd_req && q_wr_ready)) begin
        failures++;
        $display("FAIL i=%0d addr=%h exp %h stall=%0d", i, q_wr_addr, 32'h2000_0000 + exp_off, fwd_stall);
      end
      @(posedge clk);
      if (fwd_req && q_wr_ready) exp_off = (exp_off + 8) % (Q * 8);
      #1;
      if (i == 1000) begin
        cfg_wdata = 32'h0000_0030; rqr_wr = 1; fwd_req = 0; @(posedge clk); #1 rqr_wr = 0;
        exp_off = 32'h30;
      end
    end
    checks++;
    if (rqr !== exp_off) begin failures++; $display("FAIL final RQR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
