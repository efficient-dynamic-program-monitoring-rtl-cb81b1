// xl_fetch: fetching component of the forward-bit mode.
//
// Every instruction of the monitored binary has one forward bit in an
// annotation section mapped into the monitored process.  For each fetched
// instruction this unit masks the PC to get its offset in the code section,
// shifts the offset right by log2(INSTR_BYTES*8) (5 for 4-byte SPARC
// instructions, one annotation byte covers 8 instructions), adds the
// Annotation Base Register (ABR) to get the physical address of the byte
// holding the forward bit, reads that byte, and selects the bit with offset
// bits [4:2].  Worked example from the description: offset 0x1a004 gives
// byte offset 0xd00 and bit index 1; with ABR = 0xf000000 the byte is read at
// 0xf000d00, and the byte printed as 01100001 yields forward bit 1.  Bit k of
// a byte is taken from the left of that printing, i.e. bit (7-k) of the byte
// value, which is the reading that agrees with the example.
//
// Instructions inside one of NLIB library regions (set by the OS loader when
// a dynamic library is loaded or unloaded) have no forward bit: they get 0
// and no annotation read, as does every instruction while the unit is not
// active.  The region registers are this design's way of receiving the
// loader's notification.
//
// Interface: if_valid/if_ready/if_pc take one fetched instruction per cycle;
// ann_req_* issue byte reads to the cache (in-order responses on ann_rsp_*,
// any latency); fb_valid/fb_ready/fb_bit hand the forward bits back to the
// pipeline in fetch order.  Up to DEPTH instructions may be in flight.
// Latency: one cycle after the annotation byte returns (one cycle after
// fetch for instructions that need no read).
module xl_fetch
  import xl_pkg::*;
#(
  parameter int unsigned INSTR_BYTES = 4,
  parameter int unsigned NLIB        = 4,
  parameter int unsigned DEPTH       = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         active,
  input  logic [ADDR_W-1:0]            abr,
  input  logic [ADDR_W-1:0]            cmask,
  input  logic [NLIB-1:0][ADDR_W-1:0]  lib_base,
  input  logic [NLIB-1:0][ADDR_W-1:0]  lib_lim,
  // fetched instructions
  input  logic                         if_valid,
  input  logic [ADDR_W-1:0]            if_pc,
  output logic                         if_ready,
  // annotation byte reads
  output logic                         ann_req_valid,
  output logic [ADDR_W-1:0]            ann_req_addr,
  input  logic                         ann_req_ready,
  input  logic                         ann_rsp_valid,
  input  logic [7:0]                   ann_rsp_data,
  // forward bits to the pipeline, in fetch order
  output logic                         fb_valid,
  output logic                         fb_bit,
  input  logic                         fb_ready
);

  localparam int unsigned IB_SH = $clog2(INSTR_BYTES);  // 2
  localparam int unsigned BY_SH = IB_SH + 3;             // 5
  localparam int unsigned PW    = $clog2(DEPTH);

  logic [ADDR_W-1:0] offset;
  logic [2:0]        bit_idx;
  logic              in_lib, needs_mem, room, if_fire, fb_fire;

  // slot ring
  logic [DEPTH-1:0]  s_rdy;
  logic [7:0]        s_data [DEPTH];
  logic [2:0]        s_idx  [DEPTH];
  logic [PW-1:0]     wptr, rptr;
  logic [PW:0]       count;
  // slots waiting for an annotation byte, oldest first
  logic [PW-1:0]     pq [DEPTH];
  logic [PW-1:0]     pq_w, pq_r;

  assign offset  = if_pc & cmask;
  assign bit_idx = offset[IB_SH +: 3];

  always_comb begin
    in_lib = 1'b0;
    for (int r = 0; r < NLIB; r++)
      if (if_pc >= lib_base[r] && if_pc < lib_lim[r]) in_lib = 1'b1;
  end

  assign needs_mem     = active && !in_lib;
  assign room          = (count != (PW+1)'(DEPTH));
  assign ann_req_valid = if_valid && needs_mem && room;
  assign ann_req_addr  = abr + (offset >> BY_SH);
  assign if_ready      = room && (!needs_mem || ann_req_ready);
  assign if_fire       = if_valid && if_ready;

  assign fb_valid = (count != '0) && s_rdy[rptr];
  assign fb_bit   = s_data[rptr][3'd7 - s_idx[rptr]];
  assign fb_fire  = fb_valid && fb_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      pq_w  <= '0;
      pq_r  <= '0;
      s_rdy <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        s_data[i] <= '0;
        s_idx[i]  <= '0;
        pq[i]     <= '0;
      end
    end else begin
      if (if_fire) begin
        s_rdy[wptr]  <= !needs_mem;
        s_data[wptr] <= '0;
        s_idx[wptr]  <= bit_idx;
        wptr         <= wptr + 1'b1;
        if (needs_mem) begin
          pq[pq_w] <= wptr;
          pq_w     <= pq_w + 1'b1;
        end
      end
      if (ann_rsp_valid) begin
        s_rdy[pq[pq_r]]  <= 1'b1;
        s_data[pq[pq_r]] <= ann_rsp_data;
        pq_r             <= pq_r + 1'b1;
      end
      if (fb_fire) rptr <= rptr + 1'b1;
      count <= count + (PW+1)'(if_fire) - (PW+1)'(fb_fire);
    end
  end

  // A response needs an outstanding request.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ann_rsp_valid |-> (pq_r != pq_w) || (count == (PW+1)'(DEPTH)))
    else $error("xl_fetch: annotation response without request");

endmodule
