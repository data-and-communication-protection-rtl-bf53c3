// tb_global_firewall: the security processor writes rules for the global
// firewall (which also become security-memory-map entries) and for a local
// firewall (which must be forwarded on the firewall network). Cacheline
// requests then check: allowed accesses reach external memory encrypted and
// read back; a disallowed source, a write to a read-only section and an
// unknown section are refused without any memory access and raise alarms;
// tampering with a confidentiality-and-integrity line is reported; alarms of
// local firewalls are counted by the supervisor.
module tb_global_firewall;
  import hsc_pkg::*;
  import fw_pkg::*;
  localparam int N_LF = 2;
  localparam int MEM_LAT = 4;

  logic clk = 0, rst_n = 0;
  logic sp_cfg_valid = 0, sp_key_load = 0, ready, noc_cfg_valid;
  fw_cfg_t sp_cfg, noc_cfg;
  block_t sp_key = 128'h000102030405060708090a0b0c0d0e0f;
  logic [N_LF-1:0] lf_alarm_valid = '0;
  fw_alarm_t lf_alarm [N_LF];
  logic [15:0] alarm_count;
  fw_alarm_t last_alarm;
  logic g_req = 0, g_we = 0, g_ack, g_err, g_auth_err;
  logic [SRC_W-1:0] g_src;
  addr_t g_addr, m_addr;
  line_t g_wdata, g_rdata, m_wdata, m_rdata;
  logic m_req, m_we, m_ack;
  int checks = 0, failures = 0, mem_ops = 0;

  global_firewall #(.N_RULES(16), .N_LF(N_LF), .LINES(256)) dut (.*);
  always #5 clk = ~clk;

  line_t ext [65536];
  int mcnt = 0;
  always_ff @(posedge clk) begin
    if (m_ack) begin m_ack <= 0; mcnt <= 0; end
    else if (m_req) begin
      if (mcnt == MEM_LAT - 1) begin
        m_ack <= 1; mem_ops <= mem_ops + 1;
        if (m_we) ext[m_addr[15:0]] <= m_wdata; else m_rdata <= ext[m_addr[15:0]];
      end else mcnt <= mcnt + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(input logic [3:0] id, input int idx, input logic [31:0] b, input logic [31:0] l,
                     input logic r, input logic w, input logic [7:0] s, input sec_level_e lv, output logic fwd);
    @(negedge clk);
    sp_cfg = '{fw_id: id, tbl_in: 1'b1, idx: 4'(idx),
               rule: '{valid: 1'b1, base: b, last: l, rd_ok: r, wr_ok: w, fmt_ok: 3'b111, src_ok: s,
                       vmin: 0, vmax: '1, level: 2'(lv)}};
    sp_cfg_valid = 1;
    #1 fwd = noc_cfg_valid && noc_cfg == sp_cfg;
    @(negedge clk); sp_cfg_valid = 0;
  endtask

  task automatic acc(input logic [2:0] src, input logic we, input addr_t a, input line_t d,
                     output line_t q, output logic err, output logic aerr);
    @(negedge clk);
    g_req = 1; g_src = src; g_we = we; g_addr = a; g_wdata = d;
    do @(negedge clk); while (!g_ack);
    q = g_rdata; err = g_err; aerr = g_auth_err;
    g_req = 0;
  endtask

  initial begin
    line_t q, d;
    logic err, aerr, fwd;
    int ops, cnt;
    sp_cfg = '0; g_src = '0; g_addr = '0; g_wdata = '0; m_rdata = '0; m_ack = 0;
    foreach (lf_alarm[i]) lf_alarm[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sp_key_load = 1; @(negedge clk); sp_key_load = 0;
    while (!ready) @(negedge clk);
    cfg(4'd0, 0, 32'h1000, 32'h13ff, 1, 1, 8'b0000_0110, SEC_CI, fwd);
    chk(!fwd, "own rule not forwarded");
    cfg(4'd0, 1, 32'h2000, 32'h21ff, 1, 0, 8'b0000_0010, SEC_CO, fwd);
    cfg(4'd0, 2, 32'h3000, 32'h30ff, 1, 1, 8'hff, SEC_NONE, fwd);
    cfg(4'd3, 0, 32'h5000, 32'h50ff, 1, 1, 8'hff, SEC_NONE, fwd);
    chk(fwd, "rule for local firewall 3 forwarded");

    d = {8{$urandom}};
    acc(3'd1, 1, 32'h1040, d, q, err, aerr);
    chk(!err && ext[16'h1040] != d, "CI write accepted and encrypted");
    acc(3'd2, 0, 32'h1040, '0, q, err, aerr);
    chk(!err && !aerr && q == d, "CI read back by another allowed source");
    acc(3'd1, 0, 32'h2000, '0, q, err, aerr);
    chk(!err, "CO read allowed");
    acc(3'd1, 1, 32'h3000, d, q, err, aerr);
    chk(!err && ext[16'h3000] == d, "unprotected section stored in clear");

    ops = mem_ops; cnt = alarm_count;
    acc(3'd5, 0, 32'h1040, '0, q, err, aerr);
    chk(err && last_alarm.code == ALM_SOURCE, "foreign source refused");
    acc(3'd1, 1, 32'h2000, d, q, err, aerr);
    chk(err && last_alarm.code == ALM_RW, "write to read-only section refused");
    acc(3'd1, 0, 32'h9000, '0, q, err, aerr);
    chk(err && last_alarm.code == ALM_NO_SECTION && last_alarm.addr == 32'h9000, "unknown section refused");
    chk(mem_ops == ops, "refused requests never reach memory");
    chk(alarm_count == 16'(cnt + 3), $sformatf("alarms counted %0d", alarm_count - cnt));

    ext[16'h1040][100] = ~ext[16'h1040][100];
    acc(3'd1, 0, 32'h1040, '0, q, err, aerr);
    chk(!err && aerr, "tampered CI line reported");

    cnt = alarm_count;
    @(negedge clk);
    lf_alarm_valid = 2'b11;
    lf_alarm[0] = '{fw_id: 4'd1, code: ALM_FORMAT, src: 3'd1, addr: 32'h77};
    lf_alarm[1] = '{fw_id: 4'd2, code: ALM_VALUE, src: 3'd4, addr: 32'h88};
    @(negedge clk); lf_alarm_valid = '0;
    @(negedge clk);
    chk(alarm_count == 16'(cnt + 2), "local firewall alarms counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
