// tb_hsc: end-to-end test of the hardware security core with a behavioural
// external memory.
//  * Lines written to confidentiality-and-integrity (CI), confidentiality-only
//    (CO) and unprotected segments read back unchanged.
//  * The ciphertext in external memory equals plaintext XOR the AES keystream
//    of SegID || @ || TS and TS + 1, computed here with a reference AES, with
//    TS advancing by two per write; unprotected lines are stored in clear.
//  * Tampering, replaying an old ciphertext and relocating a ciphertext are
//    detected for CI lines and not reported for CO lines.
//  * Latencies relative to a bypassed access, with a memory slower than the
//    AES. Write: the memory request leaves 12 cycles later (timestamp bump 1,
//    keystream start 1, AES 10) and the tag is ready before the memory ends.
//    CO read: the memory request leaves one cycle later (timestamp read) and
//    the done flags add one cycle: +2. CI read: three GHASH cycles more: +5.
module tb_hsc;
  import hsc_pkg::*;
  import tb_ref_pkg::*;
  localparam int MEM_LAT = 20;
  localparam block_t KEY = 128'hfeffe9928665731c6d6a8f9467308308;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, ready, cfg_clear = 0, cfg_we = 0;
  block_t key = KEY;
  logic [3:0] cfg_idx;
  smm_entry_t cfg_entry;
  logic c_req = 0, c_we = 0, c_ack, c_auth_err;
  addr_t c_addr;
  line_t c_wdata, c_rdata;
  sec_level_e c_level;
  logic m_req, m_we, m_ack;
  addr_t m_addr;
  line_t m_wdata, m_rdata;
  int checks = 0, failures = 0;

  hsc #(.NSEG(16), .LINES(256), .TAG_W(128)) dut (.*);
  always #5 clk = ~clk;

  // ---- behavioural external memory, answers after MEM_LAT cycles
  // indexed by the low 16 bits of the byte address (line aligned)
  line_t ext [65536];
  int mcnt = 0;
  always_ff @(posedge clk) begin
    if (m_ack) begin
      m_ack <= 1'b0;
      mcnt  <= 0;
    end else if (m_req) begin
      if (mcnt == MEM_LAT - 1) begin
        m_ack <= 1'b1;
        if (m_we) ext[m_addr[15:0]] <= m_wdata;
        else      m_rdata <= ext[m_addr[15:0]];
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

  task automatic access(input logic we, input addr_t a, input line_t d, output line_t q,
                        output logic err, output int cyc);
    @(negedge clk);
    c_req = 1; c_we = we; c_addr = a; c_wdata = d; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!c_ack);
    q = c_rdata; err = c_auth_err;
    c_req = 0;
  endtask

  task automatic seg(input int i, input addr_t base, input int size, input sec_level_e lv);
    @(negedge clk);
    cfg_idx = 4'(i); cfg_entry = '{base: base, size: 24'(size), rsvd: '0, is_code: 1'b0, level: lv};
    cfg_we = 1;
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic line_t expect_ct(input int segno, input addr_t a, input ts_t ts, input line_t p);
    block_t k0, k1;
    k0 = ref_aes(KEY, {64'(segno), a, ts});
    k1 = ref_aes(KEY, {64'(segno), a, ts + 32'd1});
    return p ^ {k0, k1};
  endfunction

  initial begin
    line_t q, d, old;
    logic err;
    int cyc, byp_w, byp_r, lat;
    cfg_idx = '0; cfg_entry = '0; c_addr = '0; c_wdata = '0; m_ack = 0; m_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); key_load = 1;
    @(negedge clk); key_load = 0;
    while (!ready) @(negedge clk);
    seg(0, 32'h0000_1000, 1024, SEC_CI);
    seg(1, 32'h0000_2000, 512,  SEC_CO);
    seg(2, 32'h0000_3000, 256,  SEC_NONE);

    // bypass reference latencies
    d = {8{$urandom}};
    access(1, 32'h0000_3000, d, q, err, byp_w);
    chk(ext[32'h3000] == d, "unprotected line stored in clear");
    access(0, 32'h0000_3000, '0, q, err, byp_r);
    chk(q == d && !err, "unprotected read back");
    access(0, 32'h0000_8000, '0, q, err, cyc);
    chk(c_level == SEC_NONE && cyc == byp_r, "address outside all segments bypasses");

    // protected writes: ciphertext and latency
    d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    access(1, 32'h0000_1020, d, q, err, cyc);
    chk(ext[32'h1020] == expect_ct(0, 32'h1020, 32'd2, d), "CI ciphertext, TS 2");
    chk(cyc == byp_w + 12, $sformatf("CI write latency %0d, bypass %0d", cyc, byp_w));
    access(1, 32'h0000_1020, d, q, err, cyc);
    chk(ext[32'h1020] == expect_ct(0, 32'h1020, 32'd4, d), "CI ciphertext, TS 4 after second write");
    access(1, 32'h0000_2040, d, q, err, cyc);
    chk(ext[32'h2040] == expect_ct(1, 32'h2040, 32'd2, d), "CO ciphertext, TS 2");
    chk(cyc == byp_w + 12, $sformatf("CO write latency %0d", cyc));

    // protected reads
    access(0, 32'h0000_1020, '0, q, err, cyc);
    chk(q == d && !err && c_level == SEC_CI, "CI read back");
    chk(cyc == byp_r + 5, $sformatf("CI read latency %0d, bypass %0d", cyc, byp_r));
    access(0, 32'h0000_2040, '0, q, err, cyc);
    chk(q == d && !err && c_level == SEC_CO, "CO read back");
    chk(cyc == byp_r + 2, $sformatf("CO read latency %0d", cyc));

    // many random lines
    for (int t = 0; t < 40; t++) begin
      addr_t a;
      a = (t % 2 == 0) ? 32'h1000 + 32'(($urandom_range(31)) * 32) : 32'h2000 + 32'(($urandom_range(15)) * 32);
      d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      access(1, a, d, q, err, cyc);
      access(0, a, '0, q, err, cyc);
      chk(q == d && !err, $sformatf("random line %h", a));
    end

    // tamper: flip one ciphertext bit
    d = {8{32'hcafe_0001}};
    access(1, 32'h0000_1100, d, q, err, cyc);
    ext[32'h1100][5] = ~ext[32'h1100][5];
    access(0, 32'h0000_1100, '0, q, err, cyc);
    chk(err && q == '0, "CI tamper detected, line withheld");
    access(1, 32'h0000_2100, d, q, err, cyc);
    ext[32'h2100][5] = ~ext[32'h2100][5];
    access(0, 32'h0000_2100, '0, q, err, cyc);
    chk(!err && q != d, "CO tamper not detected, data corrupted");

    // replay: write, keep ciphertext, write again, restore the old one
    access(1, 32'h0000_1200, d, q, err, cyc);
    old = ext[32'h1200];
    access(1, 32'h0000_1200, ~d, q, err, cyc);
    ext[32'h1200] = old;
    access(0, 32'h0000_1200, '0, q, err, cyc);
    chk(err, "CI replay detected");

    // relocation: copy a valid ciphertext line to another address
    access(1, 32'h0000_1240, d, q, err, cyc);
    access(1, 32'h0000_1260, ~d, q, err, cyc);
    ext[32'h1260] = ext[32'h1240];
    access(0, 32'h0000_1260, '0, q, err, cyc);
    chk(err, "CI relocation detected");
    access(0, 32'h0000_1240, '0, q, err, cyc);
    chk(!err && q == d, "untouched neighbour still reads back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
