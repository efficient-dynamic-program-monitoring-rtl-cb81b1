// xl_top: extraction logic for a chip multiprocessor.
//
// Every core of the chip gets its own extraction logic, so the monitored
// process may run on any core; only the extraction logic of the core that
// runs the monitored process is enabled.  All of them write into one
// communication queue in shared memory, which the monitor, running on
// another core, reads entry by entry.  Writes from several enabled cores
// are served by fixed priority (lowest core index first); the others stall
// as if their target entry were full.  Four cores and a 64K-entry queue
// follow the evaluated configuration.
//
// Per core the ports are those of xl_extraction_logic (configuration, fetch,
// annotation-byte reads to the cache, ROB insertion, commit, kernel entry),
// gathered into arrays indexed by core.  The processor pipelines, caches and
// the monitor core itself are outside this block.  The monitor's reads of the
// queue come in on mon_rd_*; a read of a full entry returns its message one
// cycle later and empties it.  After reset the queue spends QUEUE_ENTRIES
// cycles emptying its entries (q_init_busy); forwarding stalls meanwhile.
module xl_top
  import xl_pkg::*;
#(
  parameter int unsigned NCORES        = 4,
  parameter int unsigned TBL_ENTRIES   = 32,
  parameter int unsigned ROB_ENTRIES   = 64,
  parameter int unsigned NINS          = 2,
  parameter int unsigned NLIB          = 4,
  parameter int unsigned FETCH_DEPTH   = 4,
  parameter int unsigned QUEUE_ENTRIES = 65536
) (
  input  logic                                                 clk,
  input  logic                                                 rst_n,
  // per core: configuration
  input  logic [NCORES-1:0]                                    cfg_we,
  input  logic [NCORES-1:0][7:0]                               cfg_addr,
  input  logic [NCORES-1:0][DATA_W-1:0]                        cfg_wdata,
  output logic [NCORES-1:0]                                    enabled,
  output xl_mode_e [NCORES-1:0]                                mode,
  output logic [NCORES-1:0]                                    suspended,
  // per core: fetch stage and annotation reads
  input  logic [NCORES-1:0]                                    if_valid,
  input  logic [NCORES-1:0][ADDR_W-1:0]                        if_pc,
  output logic [NCORES-1:0]                                    if_ready,
  output logic [NCORES-1:0]                                    fb_valid,
  output logic [NCORES-1:0]                                    fb_bit,
  input  logic [NCORES-1:0]                                    fb_ready,
  output logic [NCORES-1:0]                                    ann_req_valid,
  output logic [NCORES-1:0][ADDR_W-1:0]                        ann_req_addr,
  input  logic [NCORES-1:0]                                    ann_req_ready,
  input  logic [NCORES-1:0]                                    ann_rsp_valid,
  input  logic [NCORES-1:0][7:0]                               ann_rsp_data,
  // per core: ROB insertion
  input  logic [NCORES-1:0][NINS-1:0]                          rob_ins_en,
  input  logic [NCORES-1:0][NINS-1:0][$clog2(ROB_ENTRIES)-1:0] rob_ins_idx,
  input  logic [NCORES-1:0][NINS-1:0]                          rob_ins_fb,
  // per core: commit stage
  input  logic [NCORES-1:0]                                    cm_valid,
  input  xl_commit_t [NCORES-1:0]                              cm_rec,
  input  logic [NCORES-1:0][$clog2(ROB_ENTRIES)-1:0]           cm_rob_idx,
  output logic [NCORES-1:0]                                    cm_ready,
  // per core: kernel entry
  input  logic [NCORES-1:0]                                    kern_req,
  output logic [NCORES-1:0]                                    kern_stall,
  // per core: events
  output logic [NCORES-1:0]                                    ev_fwd,
  output logic [NCORES-1:0]                                    ev_qstall,
  output logic [NCORES-1:0]                                    update_bit,
  // monitor side of the communication queue
  input  logic                                                 mon_rd_en,
  input  logic [ADDR_W-1:0]                                    mon_rd_addr,
  output logic                                                 mon_rd_valid,
  output xl_msg_t                                              mon_rd_msg,
  output logic [$clog2(QUEUE_ENTRIES):0]                       q_count,
  output logic                                                 q_init_busy
);

  logic [NCORES-1:0]             c_wr_valid, c_wr_ready;
  logic [NCORES-1:0][ADDR_W-1:0] c_wr_addr;
  xl_msg_t [NCORES-1:0]          c_wr_msg;
  logic                          q_wr_valid, q_wr_ready, q_empty;
  logic [ADDR_W-1:0]             q_wr_addr;
  xl_msg_t                       q_wr_msg;
  logic [NCORES-1:0]             grant;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    xl_extraction_logic #(
      .TBL_ENTRIES  (TBL_ENTRIES),
      .ROB_ENTRIES  (ROB_ENTRIES),
      .NINS         (NINS),
      .NLIB         (NLIB),
      .FETCH_DEPTH  (FETCH_DEPTH),
      .QUEUE_ENTRIES(QUEUE_ENTRIES)
    ) u_xl (
      .clk, .rst_n,
      .cfg_we        (cfg_we[c]),
      .cfg_addr      (cfg_addr[c]),
      .cfg_wdata     (cfg_wdata[c]),
      .enabled       (enabled[c]),
      .mode          (mode[c]),
      .suspended     (suspended[c]),
      .if_valid      (if_valid[c]),
      .if_pc         (if_pc[c]),
      .if_ready      (if_ready[c]),
      .fb_valid      (fb_valid[c]),
      .fb_bit        (fb_bit[c]),
      .fb_ready      (fb_ready[c]),
      .ann_req_valid (ann_req_valid[c]),
      .ann_req_addr  (ann_req_addr[c]),
      .ann_req_ready (ann_req_ready[c]),
      .ann_rsp_valid (ann_rsp_valid[c]),
      .ann_rsp_data  (ann_rsp_data[c]),
      .rob_ins_en    (rob_ins_en[c]),
      .rob_ins_idx   (rob_ins_idx[c]),
      .rob_ins_fb    (rob_ins_fb[c]),
      .cm_valid      (cm_valid[c]),
      .cm_rec        (cm_rec[c]),
      .cm_rob_idx    (cm_rob_idx[c]),
      .cm_ready      (cm_ready[c]),
      .kern_req      (kern_req[c]),
      .kern_stall    (kern_stall[c]),
      .q_wr_valid    (c_wr_valid[c]),
      .q_wr_addr     (c_wr_addr[c]),
      .q_wr_msg      (c_wr_msg[c]),
      .q_wr_ready    (c_wr_ready[c]),
      .q_empty       (q_empty),
      .ev_fwd        (ev_fwd[c]),
      .ev_qstall     (ev_qstall[c]),
      .update_bit    (update_bit[c])
    );
  end

  // fixed-priority choice of the core that writes the queue this cycle
  always_comb begin
    grant      = '0;
    q_wr_valid = 1'b0;
    q_wr_addr  = '0;
    q_wr_msg   = '0;
    for (int c = NCORES - 1; c >= 0; c--) begin
      if (c_wr_valid[c]) begin
        grant      = '0;
        grant[c]   = 1'b1;
        q_wr_valid = 1'b1;
        q_wr_addr  = c_wr_addr[c];
        q_wr_msg   = c_wr_msg[c];
      end
    end
    c_wr_ready = grant & {NCORES{q_wr_ready}};
  end

  xl_comm_queue #(.QUEUE_ENTRIES(QUEUE_ENTRIES)) u_queue (
    .clk, .rst_n,
    .wr_valid (q_wr_valid),
    .wr_addr  (q_wr_addr),
    .wr_msg   (q_wr_msg),
    .wr_ready (q_wr_ready),
    .rd_en    (mon_rd_en),
    .rd_addr  (mon_rd_addr),
    .rd_valid (mon_rd_valid),
    .rd_msg   (mon_rd_msg),
    .q_count  (q_count),
    .q_empty  (q_empty),
    .init_busy(q_init_busy)
  );

endmodule
