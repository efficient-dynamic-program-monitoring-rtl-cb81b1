// xl_table_ctrl: the table-driven mode of the extraction logic.
//
// Holds the extraction table and the one-bit suspension register.  For each
// committing instruction it looks up the PC with the I flag and, for a memory
// instruction, the referenced data address with the D flag, both in the same
// cycle.  While the suspension register is clear, the instruction is
// forwarded when either lookup hits an entry whose valid bit is set; the
// message is the data address for a memory instruction and the result
// otherwise, tagged with the matching entry's type bits (PC match first).
// When a matching entry has its suspension bit set, that bit is copied into
// the suspension register, the message carries the update flag (also driven
// on the update_bit output for one cycle) and, from the next committing
// instruction on, the table is bypassed: every instruction is forwarded as
// {PC, data address} until the monitor clears the register through sus_wr.
//
// Interface: cm_valid/cm_rec present an instruction; the decision (fwd,
// msg) is combinational; cm_fire says the instruction actually commits this
// cycle (the state changes only then).  The table follows the description;
// sending the update notice in the queue message, the lookup priority and the
// payload choice are this design's choices.
module xl_table_ctrl
  import xl_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       active,     // enabled and in table mode
  // table entry write (monitor)
  input  logic                       tw_en,
  input  logic [$clog2(ENTRIES)-1:0] tw_idx,
  input  xl_tag_t                    tw_tag,
  input  xl_dir_t                    tw_dir,
  // suspension register write (monitor)
  input  logic                       sus_wr,
  input  logic                       sus_wdata,
  output logic                       sus_q,
  // committing instruction
  input  logic                       cm_valid,
  input  xl_commit_t                 cm_rec,
  input  logic                       cm_fire,
  output logic                       fwd,
  output xl_msg_t                    msg,
  output logic                       update_bit
);

  logic [1:0]             hit, vld, sus;
  logic [1:0][TYPE_W-1:0] typ;
  logic [1:0][ADDR_W-1:0] lk_addr;
  logic                   suspend_now;

  assign lk_addr = {cm_rec.daddr, cm_rec.pc};

  xl_ext_table #(.ENTRIES(ENTRIES), .NPORTS(2)) u_table (
    .clk, .rst_n,
    .wr_en   (tw_en),
    .wr_idx  (tw_idx),
    .wr_tag  (tw_tag),
    .wr_dir  (tw_dir),
    .lk_en   ({cm_valid & active & ~sus_q & cm_rec.is_mem,
               cm_valid & active & ~sus_q}),
    .lk_addr (lk_addr),
    .lk_id   ({FLAG_D, FLAG_I}),
    .lk_hit  (hit),
    .lk_valid(vld),
    .lk_susp (sus),
    .lk_type (typ)
  );

  assign suspend_now = |sus;

  always_comb begin
    fwd = 1'b0;
    msg = '0;
    if (cm_valid && active) begin
      if (sus_q) begin
        fwd         = 1'b1;
        msg.kind    = MSG_TRACE;
        msg.payload = {cm_rec.pc, cm_rec.daddr};
      end else if ((|vld) || suspend_now) begin
        fwd         = 1'b1;
        msg.kind    = cm_rec.is_mem ? MSG_MADDR : MSG_VALUE;
        msg.payload = cm_rec.is_mem ? DATA_W'(cm_rec.daddr) : cm_rec.result;
        msg.ttype   = vld[0] ? typ[0] : (vld[1] ? typ[1] : (hit[0] ? typ[0] : typ[1]));
        msg.upd     = suspend_now;
      end
    end
  end

  assign update_bit = cm_fire && fwd && msg.upd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   sus_q <= 1'b0;
    else if (sus_wr)                              sus_q <= sus_wdata;
    else if (cm_fire && active && !sus_q && suspend_now) sus_q <= 1'b1;
  end

endmodule
