// hsc: hardware security core between the processor caches and external memory.
//
// Every cacheline that leaves the chip is encrypted with AES in counter mode
// and, for segments that ask for it, authenticated with a GCM tag kept on
// chip; every line that comes back is decrypted and checked. Which lines are
// protected, and how, is set per segment by the Security Memory Map, so the
// processor and its operating system are unchanged. A per-line timestamp,
// advanced on every write, makes each ciphertext fresh and defeats replay;
// the segment ID and the address in the counter defeat spoofing and
// relocation.
//
// Parts: `smm` (security memory map), `ts_mem` (timestamps and their
// generator), `tag_mem` (authentication tags), `aes_gcm_line` (keystream and
// tag of a 256-bit line, key register) and `hsc_ctrl` (control logic).
//
// Interface: cache port `c_*` and memory port `m_*` as in `hsc_ctrl`; the SMM
// is written through `cfg_*`; `key_load` with `key` sets the AES key and
// derives the hash key. `ready` is high once the key is loaded and the
// timestamp memory is cleared.
//
// Timing with a memory that answers in L cycles: a bypassed access takes
// L + 3 cycles to `c_ack`; a protected write about 14 more (timestamp bump,
// ten AES cycles, XOR); a protected read max(L, 11) + 5 for confidentiality
// only and 3 more for integrity (three GHASH multiplications).
module hsc
  import hsc_pkg::*;
#(
  parameter int unsigned NSEG  = 16,
  parameter int unsigned LINES = 8192,
  parameter int unsigned TAG_W = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    key_load,
  input  block_t                  key,
  output logic                    ready,
  input  logic                    cfg_clear,
  input  logic                    cfg_we,
  input  logic [$clog2(NSEG)-1:0] cfg_idx,
  input  smm_entry_t              cfg_entry,
  input  logic                    c_req,
  input  logic                    c_we,
  input  addr_t                   c_addr,
  input  line_t                   c_wdata,
  output logic                    c_ack,
  output line_t                   c_rdata,
  output logic                    c_auth_err,
  output sec_level_e              c_level,
  output logic                    m_req,
  output logic                    m_we,
  output addr_t                   m_addr,
  output line_t                   m_wdata,
  input  logic                    m_ack,
  input  line_t                   m_rdata
);

  localparam int unsigned IW = $clog2(LINES);

  addr_t            smm_addr;
  smm_result_t      smm_res;
  logic             ts_ready, ts_op_valid, ts_op_bump, ts_valid;
  logic [IW-1:0]    meta_idx;
  ts_t              ts;
  logic             tag_we, tag_re, tag_rvalid;
  logic [TAG_W-1:0] tag_wdata, tag_rdata;
  logic             h_ready, ks_ready, ks_start, ks_valid, tag_start, tag_ready, tag_valid;
  logic [63:0]      seg_id;
  addr_t            eng_addr;
  ts_t              eng_ts;
  line_t            ks, eng_ct;
  block_t           eng_tag;

  assign ready = h_ready && ts_ready;

  smm #(.NSEG(NSEG)) u_smm (
    .clk, .rst_n, .cfg_clear, .cfg_we, .cfg_idx, .cfg_entry,
    .lk_addr(smm_addr), .lk(smm_res));

  ts_mem #(.LINES(LINES)) u_ts (
    .clk, .rst_n, .op_valid(ts_op_valid), .op_bump(ts_op_bump), .idx(meta_idx),
    .ready(ts_ready), .ts_valid, .ts);

  tag_mem #(.LINES(LINES), .TAG_W(TAG_W)) u_tag (
    .clk, .rst_n, .we(tag_we), .re(tag_re), .idx(meta_idx), .wtag(tag_wdata),
    .rvalid(tag_rvalid), .rtag(tag_rdata));

  aes_gcm_line u_gcm (
    .clk, .rst_n, .key_load, .key, .h_ready,
    .ks_start, .seg_id, .addr(eng_addr), .ts(eng_ts), .ks_ready, .ks_valid, .ks,
    .tag_start, .ct(eng_ct), .tag_ready, .tag_valid, .tag(eng_tag));

  hsc_ctrl #(.LINES(LINES), .TAG_W(TAG_W)) u_ctrl (
    .clk, .rst_n,
    .c_req, .c_we, .c_addr, .c_wdata, .c_ack, .c_rdata, .c_auth_err, .c_level,
    .smm_addr, .smm_res,
    .ts_ready, .ts_op_valid, .ts_op_bump, .meta_idx, .ts_valid, .ts,
    .tag_we, .tag_re, .tag_wdata, .tag_rdata,
    .eng_h_ready(h_ready), .eng_ks_ready(ks_ready), .eng_ks_start(ks_start),
    .eng_seg_id(seg_id), .eng_addr, .eng_ts, .eng_ks_valid(ks_valid), .eng_ks(ks),
    .eng_tag_start(tag_start), .eng_ct, .eng_tag_valid(tag_valid), .eng_tag,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata);

endmodule
