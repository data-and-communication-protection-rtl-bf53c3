// tb_hsc_workloads: the hardware security core, at its default sizes, holding
// the memory layouts of four applications (image processing, video on
// demand, communication, hashing).
//
// For each application the security memory map is cleared and programmed
// with the application's segments: per security level (confidentiality and
// integrity, confidentiality only, none) and per kind (code, data) a given
// number of kilobytes split over a given number of segments, laid out one
// after the other with small gaps and unaligned bases. The test works out
// independently how many timestamp/tag slots the protected segments need and
// checks that they fit in the core's slots. It then writes the first, a
// middle and the last line of every segment, reads them all back, and checks
// for each line:
//  * the read data, and the security level reported;
//  * that the external-memory copy is ciphertext for protected lines and
//    plaintext for unprotected ones;
//  * the write and read latencies against a bypassed access (+12 for a
//    write, +5 for a read with integrity, +2 for a read without).
// Finally one line of an integrity-protected segment is tampered with in
// external memory, and the read must be refused.
// The external memory is a behavioural model answering after MEM_LAT cycles.
module tb_hsc_workloads;
  import hsc_pkg::*;
  localparam int MEM_LAT = 20;
  localparam int LINES   = 8192;   // the core's default slot count
  localparam block_t KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam addr_t BASE = 32'h0800_0020;

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

  hsc dut (.*);
  always #5 clk = ~clk;

  // ---- behavioural external memory: 1 MB window, one entry per line
  line_t ext [32768];
  int mcnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_ack   <= 1'b0;
      m_rdata <= '0;
      mcnt    <= 0;
    end else if (m_ack) begin
      m_ack <= 1'b0;
      mcnt  <= 0;
    end else if (m_req) begin
      if (mcnt == MEM_LAT - 1) begin
        m_ack <= 1'b1;
        if (m_we) ext[m_addr[19:5]] <= m_wdata;
        else      m_rdata <= ext[m_addr[19:5]];
      end else mcnt <= mcnt + 1;
    end
  end

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

  task automatic access(input logic we, input addr_t a, input line_t d, output line_t q,
                        output logic err, output int cyc);
    @(negedge clk);
    c_req = 1; c_we = we; c_addr = a; c_wdata = d; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!c_ack);
    q = c_rdata; err = c_auth_err;
    c_req = 0;
  endtask

  // application table: KB and segment count per (level, kind);
  // order CI code, CI data, CO code, CO data, none code, none data
  typedef struct {
    string name;
    int    kb  [6];
    int    nsg [6];
  } app_t;
  app_t apps [4];

  // segments of the current application
  int         s_n;
  addr_t      s_base [16];
  int         s_size [16];
  sec_level_e s_lv   [16];

  function automatic sec_level_e lv_of(input int cat);
    return cat < 2 ? SEC_CI : (cat < 4 ? SEC_CO : SEC_NONE);
  endfunction

  function automatic addr_t line_of(input addr_t a);
    return {a[31:5], 5'd0};
  endfunction

  initial begin
    line_t q, d, want [16][3];
    addr_t la [16][3];
    logic err;
    int cyc, byp_w, byp_r, slots;
    addr_t a;

    apps[0] = '{name: "Img",  kb: '{25, 33,  7, 10, 48,  16}, nsg: '{5, 3, 1, 1, 1, 1}};
    apps[1] = '{name: "VOD",  kb: '{26, 113, 58, 0, 68, 318}, nsg: '{3, 4, 1, 0, 1, 1}};
    apps[2] = '{name: "Com",  kb: '{71, 28,  0, 40, 0,   0},  nsg: '{1, 2, 0, 1, 0, 0}};
    apps[3] = '{name: "Hash", kb: '{0,  0,  92,  0, 0,  55},  nsg: '{0, 0, 1, 0, 0, 1}};

    cfg_idx = '0; cfg_entry = '0; c_addr = '0; c_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); key_load = 1;
    @(negedge clk); key_load = 0;
    while (!ready) @(negedge clk);

    // bypass latencies, with an empty map
    access(1, 32'h0000_0000, '1, q, err, byp_w);
    access(0, 32'h0000_0000, '0, q, err, byp_r);

    foreach (apps[k]) begin
      // ---- lay out and program the segments
      @(negedge clk); cfg_clear = 1;
      @(negedge clk); cfg_clear = 0;
      s_n = 0; a = BASE; slots = 0;
      for (int c = 0; c < 6; c++) begin
        for (int j = 0; j < apps[k].nsg[c]; j++) begin
          int sz;
          sz = apps[k].kb[c] * 1024 / apps[k].nsg[c];
          if (j == apps[k].nsg[c] - 1) sz = apps[k].kb[c] * 1024 - sz * j;
          s_base[s_n] = a; s_size[s_n] = sz; s_lv[s_n] = lv_of(c);
          if (lv_of(c) != SEC_NONE)
            slots += int'((line_of(a + addr_t'(sz - 1)) - line_of(a)) / 32) + 1;
          @(negedge clk);
          cfg_idx = 4'(s_n);
          cfg_entry = '{base: a, size: 24'(sz), rsvd: '0, is_code: 1'(c % 2 == 0), level: lv_of(c)};
          cfg_we = 1;
          @(negedge clk); cfg_we = 0;
          a = a + addr_t'(sz) + 32'd100;
          s_n++;
        end
      end
      chk(s_n <= 16, $sformatf("%s: %0d segments fit in 16 map entries", apps[k].name, s_n));
      chk(slots <= LINES, $sformatf("%s: %0d protected lines fit in %0d slots", apps[k].name, slots, LINES));
      chk(a - BASE < 32'h0010_0000, $sformatf("%s: layout inside the modelled memory", apps[k].name));
      $display("%s: %0d segments, %0d protected lines (%0d KB), %0d slots", apps[k].name, s_n, slots,
               slots * 32 / 1024, LINES);

      // ---- first, middle and last line of every segment
      for (int s = 0; s < s_n; s++) begin
        la[s][0] = line_of(s_base[s] + 32'd32);   // first line owned by this segment
        la[s][1] = line_of(s_base[s] + addr_t'(s_size[s] / 2));
        la[s][2] = line_of(s_base[s] + addr_t'(s_size[s] - 33));
        for (int i = 0; i < 3; i++) begin
          d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
          want[s][i] = d;
          access(1, la[s][i], d, q, err, cyc);
          chk(cyc == byp_w + (s_lv[s] == SEC_NONE ? 0 : 12),
              $sformatf("%s seg %0d write latency %0d", apps[k].name, s, cyc));
          chk((ext[la[s][i][19:5]] == d) == (s_lv[s] == SEC_NONE),
              $sformatf("%s seg %0d line %h stored %s", apps[k].name, s, la[s][i],
                        s_lv[s] == SEC_NONE ? "in clear" : "encrypted"));
        end
      end
      for (int s = 0; s < s_n; s++)
        for (int i = 0; i < 3; i++) begin
          access(0, la[s][i], '0, q, err, cyc);
          chk(q == want[s][i] && !err && c_level == s_lv[s],
              $sformatf("%s seg %0d line %h read back", apps[k].name, s, la[s][i]));
          chk(cyc == byp_r + (s_lv[s] == SEC_CI ? 5 : (s_lv[s] == SEC_CO ? 2 : 0)),
              $sformatf("%s seg %0d read latency %0d", apps[k].name, s, cyc));
        end

      // ---- tampering with an integrity-protected line
      for (int s = 0; s < s_n; s++)
        if (s_lv[s] == SEC_CI) begin
          ext[la[s][2][19:5]][7] ^= 1'b1;
          access(0, la[s][2], '0, q, err, cyc);
          chk(err && q == '0, $sformatf("%s seg %0d tampered line refused", apps[k].name, s));
          ext[la[s][2][19:5]][7] ^= 1'b1;
          break;
        end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
