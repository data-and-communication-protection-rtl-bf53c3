// tb_secure_loader: builds flash images with a reference GCM encoder (checked
// first against test case 3 of the GCM specification), lets the loader read
// them, and checks the SMM entries it writes, the plaintext lines it hands to
// the security core (address and contents, last line zero padded), the
// application address and the tag verdict; then corrupts a ciphertext word
// and the stored tag and checks that the load is refused. A last load with
// `keep_smm` checks that the map is then neither cleared nor written while
// the code is still loaded. Each load must end within LOAD_MAX cycles; a
// loader that does not is counted as failed and reset.
module tb_secure_loader;
  import hsc_pkg::*;
  import tb_ref_pkg::*;
  localparam block_t KEY = 128'hfeffe9928665731c6d6a8f9467308308;
  localparam int LOAD_MAX = 5000;   // cycles allowed for one load

  logic clk = 0, rst_n = 0, start = 0, keep_smm = 0, busy, done, ok;
  addr_t img_base, app_addr, f_addr, h_addr;
  block_t load_key = KEY;
  logic f_req, f_ack = 0, cfg_clear, cfg_we, h_req, h_we, h_ack = 0;
  logic [31:0] f_rdata = '0;
  logic [3:0] cfg_idx;
  smm_entry_t cfg_entry;
  line_t h_wdata;
  int checks = 0, failures = 0;

  secure_loader #(.NSEG(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- flash model: 2-cycle answer
  logic [31:0] flash [4096];
  int fcnt = 0;
  always_ff @(posedge clk) begin
    if (f_ack) begin f_ack <= 0; fcnt <= 0; end
    else if (f_req) begin
      if (fcnt == 1) begin f_ack <= 1; f_rdata <= flash[f_addr[13:2]]; end
      else fcnt <= fcnt + 1;
    end
  end

  // ---- security core model: records lines, 3-cycle answer
  line_t got_line [64];
  addr_t got_addr [64];
  int nlines = 0, hcnt = 0;
  smm_entry_t got_seg [16];
  int nseg = 0, nclear = 0;
  always_ff @(posedge clk) begin
    if (h_ack) begin h_ack <= 0; hcnt <= 0; end
    else if (h_req) begin
      if (hcnt == 2) begin
        h_ack <= 1;
        got_line[nlines] <= h_wdata;
        got_addr[nlines] <= h_addr;
        nlines <= nlines + 1;
      end else hcnt <= hcnt + 1;
    end
    if (cfg_we) begin got_seg[cfg_idx] <= cfg_entry; nseg <= nseg + 1; end
    if (cfg_clear) nclear <= nclear + 1;
  end

  // ---- reference GCM over a word array
  logic [31:0] pw [256];
  logic [31:0] cw [256];

  function automatic logic [63:0] ref_gcm(input block_t k, input logic [95:0] iv, input logic [31:0] ts, input int n);
    block_t h, x, ks, c;
    h = ref_aes(k, '0);
    x = '0;
    for (int b = 0; b * 4 < n; b++) begin
      ks = ref_aes(k, {iv, ts + 32'(b + 1)});
      c = '0;
      for (int j = 0; j < 4; j++)
        if (b * 4 + j < n) begin
          cw[b*4+j] = pw[b*4+j] ^ ks[127 - 32*j -: 32];
          c[127 - 32*j -: 32] = cw[b*4+j];
        end
      x = ref_gmul(x ^ c, h);
    end
    x = ref_gmul(x ^ {64'd0, 64'(n * 32)}, h);
    x = x ^ ref_aes(k, {iv, ts});
    return x[127:64];
  endfunction

  // payload: app address, size, entries, terminator, code
  int npw;
  task automatic build(input addr_t base, input addr_t app, input int size, input logic [95:0] iv);
    logic [63:0] tag;
    smm_entry_t e [3];
    e[0] = '{base: app,                size: 24'd100,  rsvd: '0, is_code: 1'b1, level: SEC_CI};
    e[1] = '{base: app + 32'd100,      size: 24'd100,  rsvd: '0, is_code: 1'b1, level: SEC_CO};
    e[2] = '{base: app + 32'h0100_0000, size: 24'd4096, rsvd: '0, is_code: 1'b0, level: SEC_CI};
    npw = 0;
    pw[npw++] = app;
    pw[npw++] = 32'(size);
    for (int i = 0; i < 3; i++) begin pw[npw++] = e[i][63:32]; pw[npw++] = e[i][31:0]; end
    pw[npw++] = 32'h0; pw[npw++] = 32'h0;
    for (int i = 0; i < size / 4; i++) pw[npw++] = $urandom;
    tag = ref_gcm(KEY, iv, 32'd1, npw);
    flash[base[13:2] + 0] = iv[95:64];
    flash[base[13:2] + 1] = iv[63:32];
    flash[base[13:2] + 2] = iv[31:0];
    flash[base[13:2] + 3] = 32'd1;
    flash[base[13:2] + 4] = tag[63:32];
    flash[base[13:2] + 5] = tag[31:0];
    for (int i = 0; i < npw; i++) flash[base[13:2] + 6 + i] = cw[i];
    // also keep the entries for checking
    exp_seg[0] = e[0]; exp_seg[1] = e[1]; exp_seg[2] = e[2];
  endtask
  smm_entry_t exp_seg [3];

  task automatic load(input addr_t base, input logic exp_ok, input int size, input addr_t app, input logic check_data);
    nlines = 0; nseg = 0;
    @(negedge clk); img_base = base; start = 1;
    @(negedge clk); start = 0;
    begin
      int w;
      w = 0;
      while (!done && w < LOAD_MAX) begin @(negedge clk); w++; end
      chk(done, $sformatf("load ended within %0d cycles", LOAD_MAX));
      if (!done) begin   // a stuck loader is reset so the next load can run
        rst_n = 0;
        @(negedge clk); rst_n = 1;
      end
    end
    chk(ok == exp_ok, $sformatf("tag verdict %0d expected %0d", ok, exp_ok));
    if (check_data) begin
      int nl;
      nl = (size + 31) / 32;
      chk(app_addr == app, "application address");
      chk(nseg == 3 && got_seg[0] == exp_seg[0] && got_seg[1] == exp_seg[1] && got_seg[2] == exp_seg[2],
          $sformatf("SMM entries (%0d written)", nseg));
      chk(nlines == nl, $sformatf("%0d lines written, expected %0d", nlines, nl));
      for (int l = 0; l < nl; l++) begin
        line_t e;
        e = '0;
        for (int j = 0; j < 8; j++) if (l * 8 + j < size / 4) e[255 - 32*j -: 32] = pw[10 + l*8 + j];
        chk(got_addr[l] == app + 32'(l * 32) && got_line[l] == e, $sformatf("line %0d", l));
      end
    end
  endtask

  initial begin
    logic [63:0] t;
    cfg_idx = '0; img_base = '0;
    // reference check: GCM test case 3
    pw[0:15] = '{32'hd9313225, 32'hf88406e5, 32'ha55909c5, 32'haff5269a, 32'h86a7a953, 32'h1534f7da,
                 32'h2e4c303d, 32'h8a318a72, 32'h1c3c0c95, 32'h95680953, 32'h2fcf0e24, 32'h49a6b525,
                 32'hb16aedf5, 32'haa0de657, 32'hba637b39, 32'h1aafd255};
    t = ref_gcm(KEY, 96'hcafebabefacedbaddecaf888, 32'd1, 16);
    chk(t == 64'h4d5c2af327cd64a6 && cw[0] == 32'h42831ec2 && cw[15] == 32'h473f5985,
        $sformatf("reference GCM tag %h", t));

    repeat (3) @(negedge clk);
    rst_n = 1;
    build(32'h0000, 32'h0800_0000, 200, 96'hcafebabefacedbaddecaf888);
    load(32'h0000, 1, 200, 32'h0800_0000, 1);
    chk(nclear == 1, "SMM cleared at start");
    build(32'h1000, 32'h0800_4000, 204, 96'h0123456789abcdef01234567);   // partial last block
    load(32'h1000, 1, 204, 32'h0800_4000, 1);
    flash[12'h400 + 6 + 20] ^= 32'h0000_0100;                            // corrupt code
    load(32'h1000, 0, 204, 32'h0800_4000, 0);
    flash[12'h400 + 6 + 20] ^= 32'h0000_0100;
    flash[12'h400 + 5] ^= 32'h1;                                         // corrupt tag
    load(32'h1000, 0, 204, 32'h0800_4000, 0);
    flash[12'h400 + 5] ^= 32'h1;
    load(32'h1000, 1, 204, 32'h0800_4000, 1);
    // code-only loading: map already in hardware
    begin
      int nc;
      nc = nclear;
      keep_smm = 1;
      load(32'h1000, 1, 204, 32'h0800_4000, 0);
      keep_smm = 0;
      chk(nclear == nc, "map not cleared with keep_smm");
      chk(nseg == 0, $sformatf("no map entries written with keep_smm (%0d)", nseg));
      chk(nlines == 7 && app_addr == 32'h0800_4000, "code still loaded with keep_smm");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
