// tb_aes128_enc: checks the AES-128 core against the FIPS-197 example vectors
// and the GCM reference vector E_0(0), and checks the 10-cycle latency.
module tb_aes128_enc;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  block_t key, pt, ct;
  int checks = 0, failures = 0;

  aes128_enc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input block_t k, input block_t p, input block_t exp);
    int cyc = 0;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (ct !== exp) begin failures++; $display("FAIL ct=%h exp=%h", ct, exp); end
    if (cyc != 10) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    run(128'hfeffe9928665731c6d6a8f9467308308, 128'h0, 128'hb83b533708bf535d0aa6e52980d53b78);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
