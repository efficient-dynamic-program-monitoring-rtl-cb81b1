// xl_extraction_logic: the extraction logic of one core.
//
// It selects which committing instructions of the monitored program are
// copied into the communication queue, in one of two modes chosen by the
// monitor:
//   * table-driven: the PC (I flag) and the data address (D flag) of each
//     committing instruction are looked up in the ternary extraction table;
//     a hit on a valid entry forwards the instruction, a hit on an entry
//     with the suspension bit suspends the table, after which every
//     instruction's {PC, data address} is forwarded until the monitor
//     clears the suspension register (xl_table_ctrl);
//   * forward-bit: a forward bit per instruction, read from the annotation
//     section by the fetching component (xl_fetch), travels with the
//     instruction in its ROB entry (xl_rob_fb) and decides at commit.
// In both modes the forwarding component (xl_forward) writes the message at
// QBR + RQR and stalls commit while the target entry is still full.  The
// message is the data address for a memory instruction and the result for
// any other instruction.  Before the monitored program enters the kernel
// (kern_req) it is held (kern_stall) until the queue is empty, so that the
// monitor has checked everything first.  The logic does nothing while its
// enable bit is clear: each core has one, and only the core running the
// monitored process turns it on.
//
// The monitor programs it through a register port (cfg_*, map in xl_pkg).
// Commit interface: cm_valid/cm_rec/cm_rob_idx, accepted when cm_ready.  The
// decision is combinational, so a forwarded instruction commits in the same
// cycle its entry is written.  The register map, the library-region
// registers and the payload choice are this design's; the two modes, the
// registers ABR/QBR/RQR/suspension and the address arithmetic follow the
// description.
module xl_extraction_logic
  import xl_pkg::*;
#(
  parameter int unsigned TBL_ENTRIES   = 32,
  parameter int unsigned ROB_ENTRIES   = 64,
  parameter int unsigned NINS          = 2,
  parameter int unsigned NLIB          = 4,
  parameter int unsigned FETCH_DEPTH   = 4,
  parameter int unsigned INSTR_BYTES   = 4,
  parameter int unsigned QUEUE_ENTRIES = 65536
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // configuration registers
  input  logic                                     cfg_we,
  input  logic [7:0]                               cfg_addr,
  input  logic [DATA_W-1:0]                        cfg_wdata,
  output logic                                     enabled,
  output xl_mode_e                                 mode,
  output logic                                     suspended,
  // fetch stage
  input  logic                                     if_valid,
  input  logic [ADDR_W-1:0]                        if_pc,
  output logic                                     if_ready,
  output logic                                     fb_valid,
  output logic                                     fb_bit,
  input  logic                                     fb_ready,
  output logic                                     ann_req_valid,
  output logic [ADDR_W-1:0]                        ann_req_addr,
  input  logic                                     ann_req_ready,
  input  logic                                     ann_rsp_valid,
  input  logic [7:0]                               ann_rsp_data,
  // ROB insertion
  input  logic [NINS-1:0]                          rob_ins_en,
  input  logic [NINS-1:0][$clog2(ROB_ENTRIES)-1:0] rob_ins_idx,
  input  logic [NINS-1:0]                          rob_ins_fb,
  // commit stage
  input  logic                                     cm_valid,
  input  xl_commit_t                               cm_rec,
  input  logic [$clog2(ROB_ENTRIES)-1:0]           cm_rob_idx,
  output logic                                     cm_ready,
  // kernel entry
  input  logic                                     kern_req,
  output logic                                     kern_stall,
  // communication queue
  output logic                                     q_wr_valid,
  output logic [ADDR_W-1:0]                        q_wr_addr,
  output xl_msg_t                                  q_wr_msg,
  input  logic                                     q_wr_ready,
  input  logic                                     q_empty,
  // events
  output logic                                     ev_fwd,
  output logic                                     ev_qstall,
  output logic                                     update_bit
);

  logic [ADDR_W-1:0]           abr, cmask, st_tag, st_care, qbr, rqr;
  logic                        st_id;
  logic [NLIB-1:0][ADDR_W-1:0] lib_base, lib_lim;
  logic                        tbl_active, fb_active;
  logic                        tw_en, sus_wr, qbr_wr, rqr_wr;
  logic [$clog2(TBL_ENTRIES)-1:0] tw_idx;
  xl_tag_t                     tw_tag;
  xl_dir_t                     tw_dir;
  logic                        t_fwd, rob_fb, f_fwd, fwd_req, fwd_stall, fwd_done, cm_fire;
  xl_msg_t                     t_msg, f_msg, fwd_msg;

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enabled  <= 1'b0;
      mode     <= MODE_TABLE;
      abr      <= '0;
      cmask    <= '0;
      st_tag   <= '0;
      st_id    <= 1'b0;
      st_care  <= '0;
      lib_base <= '0;
      lib_lim  <= '0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        CFG_CTRL:  begin
                     enabled <= cfg_wdata[0];
                     mode    <= xl_mode_e'(cfg_wdata[1]);
                   end
        CFG_ABR:   abr     <= cfg_wdata[ADDR_W-1:0];
        CFG_CMASK: cmask   <= cfg_wdata[ADDR_W-1:0];
        CFG_TAG:   begin
                     st_tag <= cfg_wdata[ADDR_W-1:0];
                     st_id  <= cfg_wdata[32];
                   end
        CFG_CARE:  st_care <= cfg_wdata[ADDR_W-1:0];
        default: begin
          for (int r = 0; r < NLIB; r++) begin
            if (cfg_addr == CFG_LIB_BASE + 8'(r)) lib_base[r] <= cfg_wdata[ADDR_W-1:0];
            if (cfg_addr == CFG_LIB_LIM  + 8'(r)) lib_lim[r]  <= cfg_wdata[ADDR_W-1:0];
          end
        end
      endcase
    end
  end

  assign tw_en  = cfg_we && (cfg_addr == CFG_TBLWR);
  assign tw_idx = cfg_wdata[16 +: $clog2(TBL_ENTRIES)];
  assign tw_tag = '{used: cfg_wdata[8], id: st_id, tag: st_tag, care: st_care};
  assign tw_dir = '{valid: cfg_wdata[7], susp: cfg_wdata[6], ttype: cfg_wdata[TYPE_W-1:0]};
  assign sus_wr = cfg_we && (cfg_addr == CFG_SUSP);
  assign qbr_wr = cfg_we && (cfg_addr == CFG_QBR);
  assign rqr_wr = cfg_we && (cfg_addr == CFG_RQR);

  assign tbl_active = enabled && (mode == MODE_TABLE);
  assign fb_active  = enabled && (mode == MODE_FBIT);

  // ---------------- table-driven mode ----------------
  xl_table_ctrl #(.ENTRIES(TBL_ENTRIES)) u_table (
    .clk, .rst_n,
    .active    (tbl_active),
    .tw_en, .tw_idx, .tw_tag, .tw_dir,
    .sus_wr,
    .sus_wdata (cfg_wdata[0]),
    .sus_q     (suspended),
    .cm_valid,
    .cm_rec,
    .cm_fire,
    .fwd       (t_fwd),
    .msg       (t_msg),
    .update_bit
  );

  // ---------------- forward-bit mode ----------------
  xl_fetch #(.INSTR_BYTES(INSTR_BYTES), .NLIB(NLIB), .DEPTH(FETCH_DEPTH)) u_fetch (
    .clk, .rst_n,
    .active (fb_active),
    .abr, .cmask, .lib_base, .lib_lim,
    .if_valid, .if_pc, .if_ready,
    .ann_req_valid, .ann_req_addr, .ann_req_ready,
    .ann_rsp_valid, .ann_rsp_data,
    .fb_valid, .fb_bit, .fb_ready
  );

  xl_rob_fb #(.ROB_ENTRIES(ROB_ENTRIES), .NINS(NINS)) u_rob_fb (
    .clk, .rst_n,
    .ins_en  (rob_ins_en),
    .ins_idx (rob_ins_idx),
    .ins_fb  (rob_ins_fb),
    .cm_idx  (cm_rob_idx),
    .cm_fb   (rob_fb)
  );

  assign f_fwd = cm_valid && fb_active && rob_fb;
  always_comb begin
    f_msg         = '0;
    f_msg.kind    = cm_rec.is_mem ? MSG_MADDR : MSG_VALUE;
    f_msg.payload = cm_rec.is_mem ? DATA_W'(cm_rec.daddr) : cm_rec.result;
  end

  // ---------------- forwarding ----------------
  assign fwd_req = (mode == MODE_FBIT) ? f_fwd : t_fwd;
  assign fwd_msg = (mode == MODE_FBIT) ? f_msg : t_msg;

  xl_forward #(.QUEUE_ENTRIES(QUEUE_ENTRIES)) u_forward (
    .clk, .rst_n,
    .qbr_wr, .rqr_wr,
    .cfg_wdata (cfg_wdata[ADDR_W-1:0]),
    .qbr, .rqr,
    .fwd_req, .fwd_msg, .fwd_stall, .fwd_done,
    .q_wr_valid, .q_wr_addr, .q_wr_msg, .q_wr_ready
  );

  assign cm_ready   = !fwd_stall;
  assign cm_fire    = cm_valid && cm_ready;
  assign kern_stall = enabled && kern_req && !q_empty;
  assign ev_fwd     = fwd_done;
  assign ev_qstall  = fwd_stall;

endmodule
