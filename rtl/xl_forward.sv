// xl_forward: forwarding component, attached to the commit stage.
//
// When a committing instruction is to be forwarded, its message is written to
// the communication queue in shared memory at the queue item address
// QBR + RQR: the Queue Base Register holds the physical base of the queue and
// the Rotating Offset Register the byte offset of the next free entry.  RQR
// advances by forward_bit << 3, i.e. by one 8-byte entry per forwarded
// instruction, and wraps to 0 after the last entry (QUEUE_ENTRIES entries).
// Queue entries carry full/empty bits: the memory refuses a write to an
// entry that is still full (q_wr_ready low), and the committing instruction
// then waits, which is the queue-full stall of the monitored program.
//
// Interface: fwd_req/fwd_msg from the mode logic (combinational with the
// committing instruction); fwd_stall tells the commit stage to hold it;
// fwd_done marks the cycle the entry is written.  QBR and RQR are written by
// the monitoring system at start-up through qbr_wr/rqr_wr.  The description
// calls RQR both "rotating" and "a saturated counter"; it is built here as a
// wrapping offset, which is what a circular queue needs.
module xl_forward
  import xl_pkg::*;
#(
  parameter int unsigned QUEUE_ENTRIES = 65536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              qbr_wr,
  input  logic              rqr_wr,
  input  logic [ADDR_W-1:0] cfg_wdata,
  output logic [ADDR_W-1:0] qbr,
  output logic [ADDR_W-1:0] rqr,
  // from the mode logic
  input  logic              fwd_req,
  input  xl_msg_t           fwd_msg,
  output logic              fwd_stall,
  output logic              fwd_done,
  // write into the communication queue (shared memory)
  output logic              q_wr_valid,
  output logic [ADDR_W-1:0] q_wr_addr,
  output xl_msg_t           q_wr_msg,
  input  logic              q_wr_ready
);

  localparam logic [ADDR_W-1:0] QBYTES = ADDR_W'(QUEUE_ENTRIES * ENTRY_BYTES);

  logic [ADDR_W-1:0] rqr_next;

  assign q_wr_valid = fwd_req;
  assign q_wr_addr  = qbr + rqr;
  assign q_wr_msg   = fwd_msg;
  assign fwd_done   = fwd_req && q_wr_ready;
  assign fwd_stall  = fwd_req && !q_wr_ready;

  // rqr + (forward bit << 3), wrapping at the end of the queue
  always_comb begin
    rqr_next = rqr + (ADDR_W'(fwd_done) << ENTRY_SHIFT);
    if (rqr_next >= QBYTES) rqr_next = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qbr <= '0;
      rqr <= '0;
    end else begin
      if (qbr_wr) qbr <= cfg_wdata;
      if (rqr_wr) rqr <= cfg_wdata;
      else        rqr <= rqr_next;
    end
  end

endmodule
