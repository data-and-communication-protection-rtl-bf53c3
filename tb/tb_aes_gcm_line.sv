// tb_aes_gcm_line: checks hash-key derivation, the keystream of the two
// counter blocks against published GCM intermediate values (E_K(Y0), E_K(Y1),
// E_K(Y2) of the GCM specification's test cases 2 and 3), the ten-cycle
// keystream latency, and the tag against a reference GHASH with a three-cycle
// latency.
module tb_aes_gcm_line;
  import hsc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic key_load = 0, h_ready, ks_start = 0, ks_ready, ks_valid, tag_start = 0, tag_ready, tag_valid;
  block_t key, tag;
  logic [63:0] seg_id;
  addr_t addr;
  ts_t ts;
  line_t ks, ct;
  int checks = 0, failures = 0;

  aes_gcm_line dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_key(input block_t k, input block_t exp_h);
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0;
    while (!h_ready) @(negedge clk);
    // H is checked through the tag of the line {1, 0}, which is
    // ((H * H) ^ len) * H and so depends on H alone.
    tagcheck({128'h80000000000000000000000000000000, 128'h0}, exp_h);
  endtask

  task automatic keystream(input logic [63:0] s, input addr_t a, input ts_t t, input line_t exp);
    int cyc;
    @(negedge clk);
    chk(ks_ready, "ks_ready");
    seg_id = s; addr = a; ts = t; ks_start = 1;
    @(negedge clk); ks_start = 0; cyc = 0;
    while (!ks_valid) begin @(negedge clk); cyc++; end
    chk(ks == exp, $sformatf("ks=%h exp %h", ks, exp));
    chk(cyc == 10, $sformatf("keystream latency %0d", cyc));
  endtask

  task automatic tagcheck(input line_t c, input block_t h);
    int cyc;
    block_t exp;
    exp = ref_ghash2(h, c[255:128], c[127:0]);
    @(negedge clk);
    ct = c; tag_start = 1;
    @(negedge clk); tag_start = 0; cyc = 1;
    while (!tag_valid) begin @(negedge clk); cyc++; end
    chk(tag == exp, $sformatf("tag=%h exp %h", tag, exp));
    chk(cyc == 3, $sformatf("tag latency %0d", cyc));
  endtask

  initial begin
    key = '0; seg_id = '0; addr = '0; ts = '0; ct = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_key('0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    keystream(64'd0, 32'd0, 32'd1,
      {128'h58e2fccefa7e3061367f1d57a4e7455a, 128'h0388dace60b6a392f328c2b971b2fe78});
    tagcheck({128'h0388dace60b6a392f328c2b971b2fe78, 128'h0}, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    load_key(128'hfeffe9928665731c6d6a8f9467308308, 128'hb83b533708bf535d0aa6e52980d53b78);
    keystream(64'hcafebabefacedbad, 32'hdecaf888, 32'd1,
      {128'h3247184b3c4f69a44dbcd22887bbb418, 128'h9bb22ce7d9f372c1ee2b28722b25f206});
    keystream(64'hcafebabefacedbad, 32'hdecaf888, 32'd2,
      {128'h9bb22ce7d9f372c1ee2b28722b25f206, 128'h650d887c3936533a1b8d4e1ea39d2b5c});
    for (int i = 0; i < 20; i++)
      tagcheck({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
               128'hb83b533708bf535d0aa6e52980d53b78);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
