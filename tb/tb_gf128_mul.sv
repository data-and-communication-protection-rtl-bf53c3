// tb_gf128_mul: checks the GCM field multiplier against a reference built a
// different way (bit-reverse, carry-less multiply, polynomial reduction,
// bit-reverse) on random operands, against a published GCM intermediate
// value, and checks the one-cycle latency.
module tb_gf128_mul;
  import hsc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, z_valid;
  block_t x, h, z;
  int checks = 0, failures = 0;

  gf128_mul dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t rev(input block_t a);
    block_t r;
    for (int i = 0; i < 128; i++) r[i] = a[127-i];
    return r;
  endfunction

  function automatic block_t ref_mul(input block_t a, input block_t b);
    logic [255:0] p;
    block_t ra, rb;
    ra = rev(a); rb = rev(b);
    p = '0;
    for (int i = 0; i < 128; i++) if (rb[i]) p ^= (256'(ra) << i);
    for (int i = 254; i >= 128; i--)
      if (p[i]) p ^= (256'h87 << (i - 128)) ^ (256'h1 << i);
    return rev(p[127:0]);
  endfunction

  task automatic one(input block_t a, input block_t b, input block_t exp);
    @(negedge clk);
    x = a; h = b; en = 1;
    @(negedge clk);
    en = 0; x = '0;
    checks += 2;
    if (!z_valid) begin failures++; $display("FAIL no valid after 1 cycle"); end
    if (z !== exp) begin failures++; $display("FAIL %h*%h = %h exp %h", a, b, z, exp); end
  endtask

  initial begin
    x = '0; h = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(128'h0388dace60b6a392f328c2b971b2fe78, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
        128'h5e2ec746917062882c85b0685353deb7);
    one(128'h80000000000000000000000000000000, 128'h1234, 128'h1234);
    for (int t = 0; t < 200; t++) begin
      block_t a, b;
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      one(a, b, ref_mul(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
