// tb_tag_mem: writes random tags to random slots and reads them back against a
// model array, checking the one-cycle read latency.
module tb_tag_mem;
  localparam int L = 32;
  logic clk = 0, rst_n = 0, we = 0, re = 0, rvalid;
  logic [4:0] idx;
  logic [127:0] wtag, rtag;
  logic [127:0] model [L];
  bit written [L];
  int checks = 0, failures = 0;

  tag_mem #(.LINES(L), .TAG_W(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx = '0; wtag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int i;
      i = $urandom_range(L - 1);
      @(negedge clk);
      idx = 5'(i);
      if ($urandom_range(1) == 1 || !written[i]) begin
        wtag = {$urandom, $urandom, $urandom, $urandom};
        we = 1; re = 0;
        model[i] = wtag; written[i] = 1;
        @(negedge clk); we = 0;
      end else begin
        re = 1;
        @(negedge clk); re = 0;
        checks++;
        if (!rvalid || rtag != model[i]) begin failures++; $display("FAIL slot %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
