// xl_rob_fb: the forward-bit flag carried by every reorder-buffer entry.
//
// The forward bit fetched for an instruction must stay with it until it
// commits, so each ROB entry gets one extra flag.  This module is that column
// of flags, indexed like the ROB: the pipeline writes the flag when it
// inserts an instruction (every micro-operation of a cracked instruction is
// inserted with the instruction's bit) and the forwarding side reads the flag
// of the committing entry.  NINS insertion ports allow several
// micro-operations per cycle; a later port wins on an index clash.
//
// Timing: a write is visible from the next cycle; the commit-side read is
// combinational.  Reset clears all flags.  The ROB size is not given by the
// description; 64 entries is assumed.
module xl_rob_fb #(
  parameter int unsigned ROB_ENTRIES = 64,
  parameter int unsigned NINS        = 2
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [NINS-1:0]                          ins_en,
  input  logic [NINS-1:0][$clog2(ROB_ENTRIES)-1:0] ins_idx,
  input  logic [NINS-1:0]                          ins_fb,
  input  logic [$clog2(ROB_ENTRIES)-1:0]           cm_idx,
  output logic                                     cm_fb
);

  logic [ROB_ENTRIES-1:0] flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags <= '0;
    else
      for (int p = 0; p < NINS; p++)
        if (ins_en[p]) flags[ins_idx[p]] <= ins_fb[p];
  end

  assign cm_fb = flags[cm_idx];

endmodule
