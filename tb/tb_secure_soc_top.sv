// tb_secure_soc_top: end-to-end test of the whole design at its default sizes.
//
// (A) A flash image is built with a reference GCM encoder: a header (IV, TS,
//     tag), an encrypted memory map of four segments (code with integrity,
//     code with confidentiality only, data with integrity, data without
//     protection) and 384 bytes of code. The loader brings it in while the
//     processor's request waits; then the processor reads every code line
//     back through the security core, writes and reads data, and external
//     memory is tampered with and replayed. A second, corrupted image must be
//     refused. The intact image is then loaded once more with the memory map
//     kept as it is (code-only loading), and the code must still run.
// (B) The security processor programs the global firewall and, through it,
//     two local firewalls; allowed and refused transactions cross them, and
//     the alarms of the local firewalls reach the global firewall.
// Every mechanism is counted and a mechanism that never happened is a
// failure.
module tb_secure_soc_top;
  import hsc_pkg::*;
  import fw_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_LF = 7;
  localparam block_t KEY  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam block_t LKEY = 128'hfeffe9928665731c6d6a8f9467308308;
  localparam addr_t  APP  = 32'h0800_0000;
  localparam int     CODE = 384;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, hsc_ready, load_start = 0, load_keep_smm = 0, load_busy, load_done, app_ok;
  addr_t load_img_base = '0, app_addr, flash_addr, cpu_addr = '0, mem_addr;
  logic flash_req, flash_ack = 0, cpu_req = 0, cpu_we = 0, cpu_ack, cpu_auth_err;
  logic [31:0] flash_rdata = '0;
  line_t cpu_wdata = '0, cpu_rdata, mem_wdata, mem_rdata = '0;
  sec_level_e cpu_level;
  logic mem_req, mem_we, mem_ack = 0;
  logic sp_cfg_valid = 0, sp_key_load = 0, gf_ready;
  fw_cfg_t sp_cfg = '0;
  logic [15:0] alarm_count;
  fw_alarm_t last_alarm;
  logic lf_ip_o_valid [N_LF], lf_ip_o_ready [N_LF], lf_ip_o_err [N_LF], lf_bus_o_valid [N_LF];
  logic lf_bus_o_ready [N_LF], lf_bus_i_valid [N_LF], lf_bus_i_ready [N_LF], lf_bus_i_err [N_LF];
  logic lf_ip_i_valid [N_LF], lf_ip_i_ready [N_LF];
  bus_txn_t lf_ip_o_txn [N_LF], lf_bus_o_txn [N_LF], lf_bus_i_txn [N_LF], lf_ip_i_txn [N_LF];
  logic g_req = 0, g_we = 0, g_ack, g_err, g_auth_err;
  logic [SRC_W-1:0] g_src = '0;
  addr_t g_addr = '0, gm_addr;
  line_t g_wdata = '0, g_rdata, gm_wdata, gm_rdata = '0;
  logic gm_req, gm_we, gm_ack = 0;
  block_t key = KEY, load_key = LKEY, sp_key = KEY;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_load_ok = 0, n_load_refused = 0, n_cpu_stall = 0, n_smm_writes = 0, n_bypass = 0, n_co = 0,
      n_ci = 0, n_ts_bump = 0, n_auth_fail = 0, n_replay = 0, n_lf_pass = 0, n_lf_block_src = 0,
      n_lf_block_tgt = 0, n_fw_reconf = 0, n_gf_pass = 0, n_gf_refuse = 0, n_alarm_fwd = 0,
      n_code_only = 0, n_smm_clears = 0;

  secure_soc_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- flash (2-cycle) and two external memories (8-cycle)
  logic [31:0] flash [4096];
  line_t ext [8192], gext [8192];
  function automatic int li(input addr_t a); return {a[27:24], a[13:5]}; endfunction
  int fcnt = 0, mcnt = 0, gcnt = 0;
  always_ff @(posedge clk) begin
    if (flash_ack) begin flash_ack <= 0; fcnt <= 0; end
    else if (flash_req) begin
      if (fcnt == 1) begin flash_ack <= 1; flash_rdata <= flash[flash_addr[13:2]]; end
      else fcnt <= fcnt + 1;
    end
    if (mem_ack) begin mem_ack <= 0; mcnt <= 0; end
    else if (mem_req) begin
      if (mcnt == 7) begin
        mem_ack <= 1;
        if (mem_we) ext[li(mem_addr)] <= mem_wdata; else mem_rdata <= ext[li(mem_addr)];
      end else mcnt <= mcnt + 1;
    end
    if (gm_ack) begin gm_ack <= 0; gcnt <= 0; end
    else if (gm_req) begin
      if (gcnt == 7) begin
        gm_ack <= 1;
        if (gm_we) gext[li(gm_addr)] <= gm_wdata; else gm_rdata <= gext[li(gm_addr)];
      end else gcnt <= gcnt + 1;
    end
  end
  always @(posedge clk) begin
    if (dut.u_hsc.cfg_we) n_smm_writes++;
    if (dut.u_hsc.cfg_clear) n_smm_clears++;
    if (dut.u_hsc.ts_op_valid && dut.u_hsc.ts_op_bump) n_ts_bump++;
  end

  // ---- image builder (reference GCM)
  logic [31:0] pw [512];
  logic [31:0] cw [512];
  int npw;
  task automatic build(input addr_t base);
    block_t h, x, ks, c;
    logic [95:0] iv;
    smm_entry_t e [4];
    iv = 96'h0123456789abcdef00c0ffee;
    e[0] = '{base: APP,           size: 24'd256,  rsvd: '0, is_code: 1'b1, level: SEC_CI};
    e[1] = '{base: APP + 32'd256, size: 24'd128,  rsvd: '0, is_code: 1'b1, level: SEC_CO};
    e[2] = '{base: 32'h0900_0000, size: 24'd1024, rsvd: '0, is_code: 1'b0, level: SEC_CI};
    e[3] = '{base: 32'h0a00_0000, size: 24'd256,  rsvd: '0, is_code: 1'b0, level: SEC_NONE};
    npw = 0;
    pw[npw++] = APP; pw[npw++] = CODE;
    for (int i = 0; i < 4; i++) begin pw[npw++] = e[i][63:32]; pw[npw++] = e[i][31:0]; end
    pw[npw++] = 0; pw[npw++] = 0;
    for (int i = 0; i < CODE / 4; i++) pw[npw++] = $urandom;
    h = ref_aes(LKEY, '0); x = '0;
    for (int b = 0; b * 4 < npw; b++) begin
      ks = ref_aes(LKEY, {iv, 32'(b + 2)}); c = '0;
      for (int j = 0; j < 4; j++) if (b * 4 + j < npw) begin
        cw[b*4+j] = pw[b*4+j] ^ ks[127 - 32*j -: 32];
        c[127 - 32*j -: 32] = cw[b*4+j];
      end
      x = ref_gmul(x ^ c, h);
    end
    x = ref_gmul(x ^ {64'd0, 64'(npw * 32)}, h) ^ ref_aes(LKEY, {iv, 32'd1});
    flash[base[13:2]+0] = iv[95:64]; flash[base[13:2]+1] = iv[63:32]; flash[base[13:2]+2] = iv[31:0];
    flash[base[13:2]+3] = 32'd1;
    flash[base[13:2]+4] = x[127:96]; flash[base[13:2]+5] = x[95:64];
    for (int i = 0; i < npw; i++) flash[base[13:2] + 6 + i] = cw[i];
  endtask

  function automatic line_t code_line(input int l);
    line_t r;
    for (int j = 0; j < 8; j++) r[255 - 32*j -: 32] = pw[12 + l*8 + j];
    return r;
  endfunction

  task automatic cpu(input logic we, input addr_t a, input line_t d, output line_t q, output logic err);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    do @(negedge clk); while (!cpu_ack);
    q = cpu_rdata; err = cpu_auth_err;
    case (cpu_level) SEC_CI: n_ci++; SEC_CO: n_co++; default: n_bypass++; endcase
    cpu_req = 0;
  endtask

  task automatic sp(input logic [3:0] id, input logic tin, input int idx, input logic [31:0] b, input logic [31:0] l,
                    input logic w, input logic [2:0] f, input logic [7:0] s, input logic [1:0] lv);
    @(negedge clk);
    sp_cfg = '{fw_id: id, tbl_in: tin, idx: 4'(idx),
               rule: '{valid: 1'b1, base: b, last: l, rd_ok: 1'b1, wr_ok: w, fmt_ok: f, src_ok: s,
                       vmin: 0, vmax: 32'd1000, level: lv}};
    sp_cfg_valid = 1;
    @(negedge clk); sp_cfg_valid = 0;
    if (id != 0) n_fw_reconf++;
  endtask

  initial begin
    line_t q, d, old;
    logic err;
    for (int i = 0; i < N_LF; i++) begin
      lf_ip_o_valid[i] = 0; lf_ip_o_txn[i] = '0; lf_bus_o_ready[i] = 1;
      lf_bus_i_valid[i] = 0; lf_bus_i_txn[i] = '0; lf_ip_i_ready[i] = 1;
    end
    build(32'h0000);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); key_load = 1; sp_key_load = 1;
    @(negedge clk); key_load = 0; sp_key_load = 0;
    while (!hsc_ready || !gf_ready) @(negedge clk);

    // ---------------- (A) secure loading, with a processor request waiting
    @(negedge clk); load_img_base = 32'h0000; load_start = 1;
    @(negedge clk); load_start = 0;
    cpu_req = 1; cpu_we = 0; cpu_addr = APP;
    while (!load_done) begin
      @(negedge clk);
      if (load_busy && cpu_req && !cpu_ack) n_cpu_stall++;
      chk(!(cpu_ack && load_busy), "processor served during loading");
    end
    cpu_req = 0;
    chk(app_ok && app_addr == APP, "application loaded and authentic");
    if (app_ok) n_load_ok++;
    chk(n_smm_writes == 4, $sformatf("%0d SMM entries written", n_smm_writes));
    for (int l = 0; l < CODE / 32; l++) begin
      cpu(0, APP + 32'(l * 32), '0, q, err);
      chk(q == code_line(l) && !err, $sformatf("code line %0d executes", l));
      chk(ext[li(APP + 32'(l * 32))] != code_line(l), "code encrypted in external memory");
    end
    // data: integrity-protected, unprotected and outside the map
    d = {8{$urandom}};
    cpu(1, 32'h0900_0040, d, q, err);
    cpu(0, 32'h0900_0040, '0, q, err);
    chk(q == d && !err, "CI data read back");
    cpu(1, 32'h0a00_0020, ~d, q, err);
    chk(ext[li(32'h0a00_0020)] == ~d, "unprotected data in clear");
    cpu(0, 32'h0b00_0000, '0, q, err);
    // tamper with code, replay data
    ext[li(APP + 32'h20)][7] ^= 1'b1;
    cpu(0, APP + 32'h20, '0, q, err);
    chk(err, "tampered code line refused");
    if (err) n_auth_fail++;
    old = ext[li(32'h0900_0040)];
    cpu(1, 32'h0900_0040, d ^ 256'h1, q, err);
    ext[li(32'h0900_0040)] = old;
    cpu(0, 32'h0900_0040, '0, q, err);
    chk(err, "replayed data line refused");
    if (err) n_replay++;
    // a corrupted image is refused
    flash[6 + 40] ^= 32'h8000_0000;
    @(negedge clk); load_start = 1;
    @(negedge clk); load_start = 0;
    while (!load_done) @(negedge clk);
    chk(!app_ok, "corrupted image refused");
    if (!app_ok) n_load_refused++;
    // code-only loading: the map stays as it is
    flash[6 + 40] ^= 32'h8000_0000;
    begin
      int nw, nc;
      nw = n_smm_writes; nc = n_smm_clears;
      @(negedge clk); load_keep_smm = 1; load_start = 1;
      @(negedge clk); load_start = 0; load_keep_smm = 0;
      while (!load_done) @(negedge clk);
      chk(app_ok && n_smm_writes == nw && n_smm_clears == nc, "code-only load keeps the map");
      cpu(0, APP + 32'h40, '0, q, err);
      chk(q == code_line(2) && !err, "code reloaded and executes");
      if (app_ok && n_smm_writes == nw) n_code_only++;
    end

    // ---------------- (B) firewalls
    sp(4'd0, 1, 0, 32'h1000_0000, 32'h1000_ffff, 1, 3'b111, 8'b0000_0010, 2'(SEC_CI));
    sp(4'd1, 0, 0, 32'h1000_0000, 32'h1000_ffff, 1, 3'b100, 8'hff, 2'd0);   // LF1 may reach DDR, words
    sp(4'd1, 0, 1, 32'h2000_0000, 32'h2000_00ff, 1, 3'b111, 8'hff, 2'd0);   // LF1 may reach LF2's IP
    sp(4'd2, 1, 0, 32'h2000_0000, 32'h2000_00ff, 1, 3'b111, 8'b0000_0010, 2'd0); // LF2 accepts source 1
    // LF1: allowed word access, refused byte access
    @(negedge clk);
    lf_ip_o_valid[0] = 1; lf_ip_o_txn[0] = '{src: 3'd7, we: 1'b1, size: SZ_WORD, addr: 32'h2000_0010, data: 32'd5};
    #1;
    chk(lf_bus_o_valid[0] && lf_bus_o_txn[0].src == 3'd1, "LF1 passes and stamps source");
    if (lf_bus_o_valid[0]) n_lf_pass++;
    // the bus carries it to LF2's target side
    lf_bus_i_valid[1] = 1; lf_bus_i_txn[1] = lf_bus_o_txn[0];
    #1;
    chk(lf_ip_i_valid[1], "LF2 accepts source 1");
    if (lf_ip_i_valid[1]) n_lf_pass++;
    @(negedge clk);
    lf_ip_o_valid[0] = 0; lf_bus_i_valid[1] = 0;
    lf_ip_o_valid[0] = 1; lf_ip_o_txn[0] = '{src: 3'd0, we: 1'b1, size: SZ_BYTE, addr: 32'h1000_0010, data: 32'd5};
    #1;
    chk(lf_ip_o_err[0] && !lf_bus_o_valid[0], "LF1 refuses a byte write to DDR");
    if (lf_ip_o_err[0]) n_lf_block_src++;
    @(negedge clk); lf_ip_o_valid[0] = 0;
    lf_bus_i_valid[1] = 1; lf_bus_i_txn[1] = '{src: 3'd4, we: 1'b1, size: SZ_WORD, addr: 32'h2000_0010, data: 32'd5};
    #1;
    chk(lf_bus_i_err[1] && !lf_ip_i_valid[1], "LF2 refuses source 4");
    if (lf_bus_i_err[1]) n_lf_block_tgt++;
    @(negedge clk); lf_bus_i_valid[1] = 0;
    repeat (2) @(negedge clk);
    chk(alarm_count == 16'd2 && last_alarm.fw_id == 4'd2 && last_alarm.code == ALM_SOURCE,
        $sformatf("alarms reach the global firewall (%0d)", alarm_count));
    n_alarm_fwd = alarm_count;
    // global firewall: source 1 to protected DDR, source 3 refused
    d = {8{$urandom}};
    @(negedge clk); g_req = 1; g_src = 3'd1; g_we = 1; g_addr = 32'h1000_0040; g_wdata = d;
    do @(negedge clk); while (!g_ack);
    chk(!g_err, "GF accepts source 1");
    g_req = 0;
    @(negedge clk); g_req = 1; g_we = 0;
    do @(negedge clk); while (!g_ack);
    chk(!g_err && !g_auth_err && g_rdata == d && gext[li(32'h1000_0040)] != d, "GF line encrypted and read back");
    if (!g_err) n_gf_pass++;
    g_req = 0;
    @(negedge clk); g_req = 1; g_src = 3'd3;
    do @(negedge clk); while (!g_ack);
    chk(g_err && alarm_count == 16'd3, "GF refuses source 3");
    if (g_err) n_gf_refuse++;
    g_req = 0;

    // ---------------- mechanism coverage
    $display("mechanisms: load_ok=%0d load_refused=%0d cpu_stall=%0d smm_writes=%0d bypass=%0d co=%0d ci=%0d ts_bump=%0d auth_fail=%0d replay=%0d lf_pass=%0d lf_block_src=%0d lf_block_tgt=%0d fw_reconf=%0d gf_pass=%0d gf_refuse=%0d alarm_fwd=%0d code_only=%0d",
             n_load_ok, n_load_refused, n_cpu_stall, n_smm_writes, n_bypass, n_co, n_ci, n_ts_bump, n_auth_fail,
             n_replay, n_lf_pass, n_lf_block_src, n_lf_block_tgt, n_fw_reconf, n_gf_pass, n_gf_refuse, n_alarm_fwd,
             n_code_only);
    chk(n_load_ok > 0, "load happened");          chk(n_load_refused > 0, "refused load happened");
    chk(n_cpu_stall > 0, "processor stall happened"); chk(n_smm_writes > 0, "SMM loading happened");
    chk(n_bypass > 0, "bypass happened");          chk(n_co > 0, "CO access happened");
    chk(n_ci > 0, "CI access happened");           chk(n_ts_bump > 0, "timestamp bump happened");
    chk(n_auth_fail > 0, "integrity failure happened"); chk(n_replay > 0, "replay detection happened");
    chk(n_lf_pass > 0, "LF pass happened");        chk(n_lf_block_src > 0, "LF source refusal happened");
    chk(n_lf_block_tgt > 0, "LF target refusal happened"); chk(n_fw_reconf > 0, "LF reconfiguration happened");
    chk(n_gf_pass > 0, "GF pass happened");        chk(n_gf_refuse > 0, "GF refusal happened");
    chk(n_alarm_fwd > 0, "alarm forwarding happened");
    chk(n_code_only > 0, "code-only loading happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
