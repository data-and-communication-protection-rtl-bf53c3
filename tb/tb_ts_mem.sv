// tb_ts_mem: checks the reset sweep, reads, the bump by two per write, the
// one-cycle answer and the ready gap during write-back against a model array.
module tb_ts_mem;
  import hsc_pkg::*;
  localparam int L = 64;
  logic clk = 0, rst_n = 0, op_valid = 0, op_bump = 0, ready, ts_valid;
  logic [5:0] idx;
  ts_t ts;
  ts_t model [L];
  int checks = 0, failures = 0;

  ts_mem #(.LINES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input int i, input logic bump);
    while (!ready) @(negedge clk);
    idx = 6'(i); op_bump = bump; op_valid = 1;
    @(negedge clk); op_valid = 0;
    if (bump) model[i] += 2;
    checks++;
    if (!ts_valid || ts != model[i]) begin
      failures++; $display("FAIL slot %0d ts %0d exp %0d valid %0d", i, ts, model[i], ts_valid);
    end
  endtask

  initial begin
    int cyc;
    idx = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != L) begin failures++; $display("FAIL sweep took %0d", cyc); end
    for (int i = 0; i < L; i++) op(i, 0);
    for (int t = 0; t < 300; t++) op($urandom_range(L - 1), 1'($urandom_range(1)));
    op(5, 1); op(5, 1); op(5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
