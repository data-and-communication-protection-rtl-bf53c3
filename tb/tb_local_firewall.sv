// tb_local_firewall: configures both rule tables over the firewall network
// and drives outgoing and incoming transactions that each break one rule
// (missing section, read/write right, data format, source ID, value range),
// checking that exactly the allowed ones pass, that refused ones raise an
// error and an alarm with the right code one cycle later, that the source ID
// is stamped, and that messages for other firewalls are ignored.
module tb_local_firewall;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ip_o_valid = 0, ip_o_ready, ip_o_err, bus_o_valid, bus_o_ready = 1;
  logic bus_i_valid = 0, bus_i_ready, bus_i_err, ip_i_valid, ip_i_ready = 1;
  bus_txn_t ip_o_txn, bus_o_txn, bus_i_txn, ip_i_txn;
  logic cfg_valid = 0, alarm_valid;
  fw_cfg_t cfg;
  fw_alarm_t alarm;
  int checks = 0, failures = 0;

  local_firewall #(.FW_ID(4'd3), .N_OUT(4), .N_IN(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic fw_rule_t rule(input logic [31:0] b, input logic [31:0] l, input logic r, input logic w,
                                    input logic [2:0] f, input logic [7:0] s, input logic [31:0] vmin, input logic [31:0] vmax);
    return '{valid: 1'b1, base: b, last: l, rd_ok: r, wr_ok: w, fmt_ok: f, src_ok: s, vmin: vmin, vmax: vmax, level: 2'd0};
  endfunction

  task automatic send_cfg(input logic [3:0] id, input logic tin, input int idx, input fw_rule_t r);
    @(negedge clk);
    cfg = '{fw_id: id, tbl_in: tin, idx: 4'(idx), rule: r};
    cfg_valid = 1;
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic out_txn(input logic we, input size_e sz, input logic [31:0] a, input alarm_e exp);
    @(negedge clk);
    ip_o_txn = '{src: 3'd6, we: we, size: sz, addr: a, data: 32'h5};
    ip_o_valid = 1;
    #1;
    chk(bus_o_valid == (exp == ALM_NONE) && ip_o_err == (exp != ALM_NONE) && ip_o_ready,
        $sformatf("outgoing %h: pass %0d err %0d", a, bus_o_valid, ip_o_err));
    if (exp == ALM_NONE) chk(bus_o_txn.src == 3'd3 && bus_o_txn.addr == a, "source stamped");
    @(negedge clk); ip_o_valid = 0;
    chk(alarm_valid == (exp != ALM_NONE) && (exp == ALM_NONE || alarm.code == exp),
        $sformatf("outgoing alarm %0d code %0d exp %0d", alarm_valid, alarm.code, exp));
  endtask

  task automatic in_txn(input logic [2:0] src, input logic we, input logic [31:0] a, input logic [31:0] d, input alarm_e exp);
    @(negedge clk);
    bus_i_txn = '{src: src, we: we, size: SZ_WORD, addr: a, data: d};
    bus_i_valid = 1;
    #1;
    chk(ip_i_valid == (exp == ALM_NONE) && bus_i_err == (exp != ALM_NONE),
        $sformatf("incoming %h from %0d: pass %0d err %0d", a, src, ip_i_valid, bus_i_err));
    @(negedge clk); bus_i_valid = 0;
    chk(alarm_valid == (exp != ALM_NONE) && (exp == ALM_NONE || (alarm.code == exp && alarm.src == src)),
        $sformatf("incoming alarm %0d code %0d exp %0d", alarm_valid, alarm.code, exp));
  endtask

  initial begin
    ip_o_txn = '0; bus_i_txn = '0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    out_txn(0, SZ_WORD, 32'h4000_0000, ALM_NO_SECTION);     // empty table refuses all
    // source side: shared memory rw words only, LCD write-only any size
    send_cfg(4'd3, 0, 0, rule(32'h4000_0000, 32'h4000_ffff, 1, 1, 3'b100, 8'hff, 0, 0));
    send_cfg(4'd3, 0, 1, rule(32'h5000_0000, 32'h5000_00ff, 0, 1, 3'b111, 8'hff, 0, 0));
    // target side: own registers, sources 1 and 2, values 10..99
    send_cfg(4'd3, 1, 0, rule(32'h6000_0000, 32'h6000_000f, 1, 1, 3'b111, 8'b0000_0110, 10, 99));
    // a message for firewall 4 must not change firewall 3
    send_cfg(4'd4, 0, 0, rule(32'h4000_0000, 32'h4000_ffff, 0, 0, 3'b000, 8'h00, 0, 0));
    out_txn(1, SZ_WORD, 32'h4000_0010, ALM_NONE);
    out_txn(0, SZ_WORD, 32'h4000_fffc, ALM_NONE);
    out_txn(0, SZ_BYTE, 32'h4000_0010, ALM_FORMAT);
    out_txn(0, SZ_WORD, 32'h5000_0010, ALM_RW);
    out_txn(1, SZ_BYTE, 32'h5000_0010, ALM_NONE);
    out_txn(1, SZ_WORD, 32'h5000_0100, ALM_NO_SECTION);
    in_txn(3'd1, 1, 32'h6000_0004, 32'd50, ALM_NONE);
    in_txn(3'd2, 0, 32'h6000_0008, 32'd0,  ALM_NONE);
    in_txn(3'd5, 0, 32'h6000_0008, 32'd0,  ALM_SOURCE);
    in_txn(3'd1, 1, 32'h6000_0004, 32'd100, ALM_VALUE);
    in_txn(3'd1, 1, 32'h6000_0004, 32'd9,  ALM_VALUE);
    in_txn(3'd1, 1, 32'h6000_0010, 32'd50, ALM_NO_SECTION);
    // reconfiguration: allow bytes to shared memory
    send_cfg(4'd3, 0, 0, rule(32'h4000_0000, 32'h4000_ffff, 1, 1, 3'b111, 8'hff, 0, 0));
    out_txn(0, SZ_BYTE, 32'h4000_0010, ALM_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
