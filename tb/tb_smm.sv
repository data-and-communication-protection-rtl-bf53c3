// tb_smm: programs the three segments of the design's example memory map
// (bases 0x8000020, 0x8000424, 0x80006ac) plus a data segment and checks
// hits, levels, segment IDs, metadata slots and misses against values worked
// out by hand.
module tb_smm;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0, cfg_clear = 0, cfg_we = 0;
  logic [3:0] cfg_idx;
  smm_entry_t cfg_entry;
  addr_t lk_addr;
  smm_result_t lk;
  int checks = 0, failures = 0;

  smm #(.NSEG(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int i, input logic [31:0] base, input int size, input sec_level_e lv, input logic code);
    @(negedge clk);
    cfg_idx = 4'(i); cfg_entry = '{base: base, size: 24'(size), rsvd: '0, is_code: code, level: lv};
    cfg_we = 1;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic look(input addr_t a, input logic hit, input int seg, input sec_level_e lv, input int idx);
    lk_addr = a; #1;
    checks++;
    if (lk.hit !== hit || (hit && (lk.seg_id != 4'(seg) || lk.level != lv || (lv != SEC_NONE && lk.meta_idx != 32'(idx))))) begin
      failures++;
      $display("FAIL addr %h: hit %0d seg %0d lv %0d idx %0d", a, lk.hit, lk.seg_id, lk.level, lk.meta_idx);
    end
  endtask

  initial begin
    cfg_idx = '0; cfg_entry = '0; lk_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    look(32'h08000020, 0, 0, SEC_NONE, 0);
    // 1028 bytes -> 33 lines, 680 -> 22 lines, 2048 -> 64 lines
    // The example map: segment sizes in bytes as given (1028, 680, 2048).
    wr(0, 32'h08000020, 1028, SEC_CI, 1);
    wr(1, 32'h08000424, 680,  SEC_CO, 1);
    wr(2, 32'h080006ac, 2048, SEC_CI, 1);
    wr(3, 32'h10000000, 256,  SEC_NONE, 0);
    wr(4, 32'h20000000, 128,  SEC_CO, 0);
    // segment 0 spans 33 lines (slots 0..32), segment 1 22 lines (33..54),
    // segment 2 65 lines (55..119), segment 4 4 lines (120..123)
    look(32'h08000020, 1, 0, SEC_CI, 0);
    look(32'h08000040, 1, 0, SEC_CI, 1);
    look(32'h08000420, 1, 0, SEC_CI, 32);
    look(32'h08000440, 1, 1, SEC_CO, 34);
    look(32'h080006a0, 1, 1, SEC_CO, 53);
    look(32'h080006e0, 1, 2, SEC_CI, 57);
    look(32'h08000ea0, 1, 2, SEC_CI, 119);
    look(32'h08000ec0, 0, 0, SEC_NONE, 0);
    look(32'h10000020, 1, 3, SEC_NONE, 0);
    look(32'h20000060, 1, 4, SEC_CO, 123);
    look(32'h20000080, 0, 0, SEC_NONE, 0);
    look(32'h08000000, 0, 0, SEC_NONE, 0);
    @(negedge clk); cfg_clear = 1; @(negedge clk); cfg_clear = 0;
    look(32'h08000040, 0, 0, SEC_NONE, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
