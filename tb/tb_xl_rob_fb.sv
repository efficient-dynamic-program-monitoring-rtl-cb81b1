// tb_xl_rob_fb: forward-bit flags of the ROB.  Random insertions on both
// ports (micro-ops of one instruction share a bit), random commit-side
// reads, compared with a shadow array; same-index writes on both ports
// check that the later port wins.
module tb_xl_rob_fb;
  localparam int unsigned R = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] ins_en, ins_fb;
  logic [1:0][$clog2(R)-1:0] ins_idx;
  logic [$clog2(R)-1:0] cm_idx;
  logic cm_fb;
  logic shadow [R];
  int checks = 0, failures = 0;

  xl_rob_fb #(.ROB_ENTRIES(R), .NINS(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_en = 0; ins_fb = 0; ins_idx = '0; cm_idx = 0;
    for (int i = 0; i < R; i++) shadow[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < R; i++) begin
      cm_idx = i[$clog2(R)-1:0]; #1; checks++;
      if (cm_fb !== 0) begin failures++; $display("FAIL reset flag %0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      ins_en  = 2'($urandom);
      ins_idx[0] = $clog2(R)'($urandom);
      ins_idx[1] = ($urandom_range(0, 3) == 0) ? ins_idx[0] : $clog2(R)'($urandom);
      ins_fb  = 2'($urandom);
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (ins_en[p]) shadow[ins_idx[p]] = ins_fb[p];
      #1 ins_en = 0;
      cm_idx = $clog2(R)'($urandom); #1;
      checks++;
      if (cm_fb !== shadow[cm_idx]) begin
        failures++; $display("FAIL idx %0d got %0d exp %0d", cm_idx, cm_fb, shadow[cm_idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
