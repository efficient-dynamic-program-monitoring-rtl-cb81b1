// xl_comm_queue: the communication queue, a region of shared memory whose
// entries are synchronised one by one with full/empty bits.
//
// The producer (a core's forwarding component) writes a message to a byte
// address; the write is accepted only while the addressed entry is empty and
// it sets the entry's full bit.  The consumer (the monitor on another core)
// reads a byte address; a read of a full entry returns the message one cycle
// later with rd_valid set and empties the entry, a read of an empty entry
// returns rd_valid = 0 and changes nothing.  The queue occupies an aligned
// region of QUEUE_ENTRIES 8-byte entries, so the entry index is address bits
// [3 +: log2(QUEUE_ENTRIES)]; the QBR written into the forwarding component
// must therefore be aligned to the queue size (this design's assumption).
//
// The full/empty bits are a second memory beside the data, as they would be
// in the shared memory itself, not a register per entry.  After reset a
// clearing pass empties one entry per cycle (QUEUE_ENTRIES cycles, init_busy
// high); no write is accepted and every read misses until it ends.
//
// The count of full entries drives q_empty, which the kernel-entry check
// uses: before the monitored program enters the kernel, every message must
// have been consumed.  64K entries follow the evaluated configuration; each
// entry stores the 8-byte payload plus the small message tag.
module xl_comm_queue
  import xl_pkg::*;
#(
  parameter int unsigned QUEUE_ENTRIES = 65536
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // producer
  input  logic                          wr_valid,
  input  logic [ADDR_W-1:0]             wr_addr,
  input  xl_msg_t                       wr_msg,
  output logic                          wr_ready,
  // consumer
  input  logic                          rd_en,
  input  logic [ADDR_W-1:0]             rd_addr,
  output logic                          rd_valid,
  output xl_msg_t                       rd_msg,
  // status
  output logic [$clog2(QUEUE_ENTRIES):0] q_count,
  output logic                          q_empty,
  output logic                          init_busy
);

  localparam int unsigned IW = $clog2(QUEUE_ENTRIES);

  xl_msg_t       mem  [QUEUE_ENTRIES];
  logic          full [QUEUE_ENTRIES];
  logic [IW-1:0] wi, ri, clr_idx;
  logic          wr_fire, rd_fire;

  assign wi       = wr_addr[ENTRY_SHIFT +: IW];
  assign ri       = rd_addr[ENTRY_SHIFT +: IW];
  assign wr_ready = !init_busy && !full[wi];
  assign wr_fire  = wr_valid && wr_ready;
  assign rd_fire  = rd_en && !init_busy && full[ri];
  assign q_empty  = (q_count == '0);

  // data and full/empty bits (write and read of one entry never coincide:
  // a write needs the entry empty, a read needs it full)
  always_ff @(posedge clk) begin
    if (wr_fire) mem[wi] <= wr_msg;
    if (rd_en)   rd_msg  <= mem[ri];
    if (init_busy)    full[clr_idx] <= 1'b0;
    else begin
      if (wr_fire)    full[wi]      <= 1'b1;
      if (rd_fire)    full[ri]      <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      clr_idx   <= '0;
      rd_valid  <= 1'b0;
      q_count   <= '0;
    end else begin
      if (init_busy) begin
        clr_idx <= clr_idx + 1'b1;
        if (clr_idx == IW'(QUEUE_ENTRIES - 1)) init_busy <= 1'b0;
      end
      rd_valid <= rd_fire;
      q_count  <= q_count + (IW+1)'(wr_fire) - (IW+1)'(rd_fire);
    end
  end

endmodule
