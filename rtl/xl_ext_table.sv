// xl_ext_table: the extraction table of the table-driven mode.
//
// Two parts, as in the design description.  TAG is a ternary CAM: each entry
// holds an address, a care mask (a 0 bit is an "X", don't care, so one entry
// covers an aligned address range such as 0x8000aXXX) and the I/D flag that
// says whether the address is a PC (I) or a data address (D).  DIRECTION is a
// small memory whose word line is driven by the CAM's match line; it holds,
// per entry, the valid bit (forward the instruction), the suspension bit
// (this instruction starts a table update) and the type bits.
//
// Lookups are combinational and there are NPORTS of them per cycle (the
// description allows several ports for simultaneous lookups; two are used,
// one for the committing PC and one for its data address).  When several
// entries match, the lowest index wins: this priority is this design's
// choice.  Outputs are qualified with the hit: an unmatched lookup gives
// valid = susp = 0.
//
// Entries are written one per cycle through the write port; a write takes
// effect on the next clock edge.  Reset clears every entry's "used" bit.
// Table size is not given by the description; 32 entries is assumed.
module xl_ext_table
  import xl_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned NPORTS  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // entry write
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  xl_tag_t                    wr_tag,
  input  xl_dir_t                    wr_dir,
  // lookups
  input  logic [NPORTS-1:0]              lk_en,
  input  logic [NPORTS-1:0][ADDR_W-1:0]  lk_addr,
  input  logic [NPORTS-1:0]              lk_id,
  output logic [NPORTS-1:0]              lk_hit,    // some entry matched
  output logic [NPORTS-1:0]              lk_valid,  // DIRECTION valid of match
  output logic [NPORTS-1:0]              lk_susp,   // DIRECTION suspension bit
  output logic [NPORTS-1:0][TYPE_W-1:0]  lk_type    // DIRECTION type bits
);

  xl_tag_t tags [ENTRIES];
  xl_dir_t dirs [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        tags[e] <= '0;
        dirs[e] <= '0;
      end
    end else if (wr_en) begin
      tags[wr_idx] <= wr_tag;
      dirs[wr_idx] <= wr_dir;
    end
  end

  // Match lines and DIRECTION read, per port
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      logic    found;
      xl_dir_t d;
      found = 1'b0;
      d     = '0;
      for (int e = ENTRIES - 1; e >= 0; e--) begin
        if (lk_en[p] && tags[e].used && (tags[e].id == lk_id[p]) &&
            (((lk_addr[p] ^ tags[e].tag) & tags[e].care) == '0)) begin
          found = 1'b1;
          d     = dirs[e];
        end
      end
      lk_hit[p]   = found;
      lk_valid[p] = found & d.valid;
      lk_susp[p]  = found & d.susp;
      lk_type[p]  = found ? d.ttype : '0;
    end
  end

endmodule
