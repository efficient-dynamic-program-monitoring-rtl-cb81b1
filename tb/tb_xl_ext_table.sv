// tb_xl_ext_table: self-checking test of the ternary extraction table.
// Directed cases (exact PC tag, an address range written with "X" bits,
// I/D separation, priority between overlapping entries, suspension bit,
// unused entries) and random lookups on both ports compared with a
// reference model kept in the testbench.
module tb_xl_ext_table;
  import xl_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [$clog2(N)-1:0] wr_idx;
  xl_tag_t wr_tag;
  xl_dir_t wr_dir;
  logic [1:0] lk_en, lk_id, lk_hit, lk_valid, lk_susp;
  logic [1:0][ADDR_W-1:0] lk_addr;
  logic [1:0][TYPE_W-1:0] lk_type;
  int checks = 0, failures = 0;

  xl_tag_t m_tag [N];
  xl_dir_t m_dir [N];

  xl_ext_table #(.ENTRIES(N), .NPORTS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int idx, logic id, logic [31:0] tag, logic [31:0] care,
                     logic v, logic s, logic [3:0] t);
    wr_en = 1; wr_idx = idx[$clog2(N)-1:0];
    wr_tag = '{used: 1'b1, id: id, tag: tag, care: care};
    wr_dir = '{valid: v, susp: s, ttype: t};
    m_tag[idx] = wr_tag; m_dir[idx] = wr_dir;
    @(posedge clk); #1 wr_en = 0;
  endtask

  // reference: lowest matching index
  task automatic expect_lk(int p, logic [31:0] a, logic id);
    logic h, v, s; logic [3:0] t;
    h = 0; v = 0; s = 0; t = 0;
    for (int e = 0; e < N; e++)
      if (!h && m_tag[e].used && m_tag[e].id == id && ((a & m_tag[e].care) == (m_tag[e].tag & m_tag[e].care))) begin
        h = 1; v = m_dir[e].valid; s = m_dir[e].susp; t = m_dir[e].ttype;
      end
    lk_en[p] = 1; lk_addr[p] = a; lk_id[p] = id;
    #1;
    checks++;
    if (lk_hit[p] !== h || lk_valid[p] !== v || lk_susp[p] !== s || lk_type[p] !== t) begin
      failures++;
      $display("FAIL port%0d addr=%h id=%0d got h%0d v%0d s%0d t%0d exp h%0d v%0d s%0d t%0d",
               p, a, id, lk_hit[p], lk_valid[p], lk_susp[p], lk_type[p], h, v, s, t);
    end
  endtask

  logic [31:0] bases [4] = '{32'h0001_0040, 32'h8000_a000, 32'h8000_a010, 32'h0001_0080};

  initial begin
    wr_en = 0; lk_en = 0; lk_addr = '0; lk_id = '0; wr_idx = '0; wr_tag = '0; wr_dir = '0;
    for (int e = 0; e < N; e++) begin m_tag[e] = '0; m_dir[e] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // empty table: nothing hits
    expect_lk(0, 32'h0001_0040, FLAG_I);
    put(2, FLAG_I, 32'h0001_0040, 32'hffff_ffff, 1, 0, 4'd3);
    put(1, FLAG_D, 32'h8000_a000, 32'hffff_f000, 1, 0, 4'd5);   // 0x8000aXXX
    put(3, FLAG_D, 32'h8000_a010, 32'hffff_ffff, 1, 1, 4'd9);   // shadowed by entry 1
    put(5, FLAG_I, 32'h0001_0080, 32'hffff_ffff, 0, 1, 4'd1);   // suspension only
    put(6, FLAG_D, 32'h8000_a010, 32'hffff_ffff, 0, 1, 4'd7);
    // directed, with values worked out by hand
    lk_en = 2'b11; lk_addr[0] = 32'h0001_0040; lk_id[0] = FLAG_I;
    lk_addr[1] = 32'h8000_afff; lk_id[1] = FLAG_D; #1;
    checks++;
    if (!(lk_hit == 2'b11 && lk_valid == 2'b11 && lk_type[0] == 3 && lk_type[1] == 5 && lk_susp == 2'b00)) begin
      failures++; $display("FAIL directed 1");
    end
    lk_addr[0] = 32'h0001_0080; lk_addr[1] = 32'h8000_b000; #1;
    checks++;
    if (!(lk_hit == 2'b01 && lk_valid == 2'b00 && lk_susp == 2'b01 && lk_type[0] == 1)) begin
      failures++; $display("FAIL directed 2");
    end
    lk_addr[0] = 32'h8000_a010; lk_id[0] = FLAG_I; #1;   // D tag seen as I: miss
    checks++;
    if (lk_hit[0] !== 1'b0) begin failures++; $display("FAIL directed 3"); end
    // random lookups around the tags, against the model
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a;
      a = bases[$urandom_range(0, 3)] ^ (($urandom_range(0, 3) == 0) ? $urandom : ($urandom & 32'h0000_1fff));
      expect_lk(i % 2, a, logic'($urandom_range(0, 1)));
      if (i == 1500) begin
        @(posedge clk); #1;
        put(0, FLAG_D, 32'h8000_0000, 32'hf000_0000, 1, 1, 4'd2);  // wide range, highest priority
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
