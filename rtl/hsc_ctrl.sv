// hsc_ctrl: control logic of the hardware security core.
//
// Serves one cacheline request of the processor caches at a time and drives
// the security memory map, the timestamp memory, the tag memory, the AES-GCM
// engine and the external memory port.
//
// Write (cache write-back) of a protected line:
//   1. bump the line's timestamp (TS = TS + 2);
//   2. keystream = AES(SegID || @ || TS), AES(SegID || @ || TS+1);
//   3. ciphertext = plaintext ^ keystream, written to external memory;
//   4. for confidentiality-and-integrity lines the tag is computed from the
//      ciphertext while the memory write is in flight and stored on chip.
// Read (cache fill) of a protected line:
//   1. read the timestamp and the stored tag;
//   2. start the keystream and the external memory read together, so the
//      ten AES cycles overlap the bus access;
//   3. plaintext = ciphertext ^ keystream;
//   4. for confidentiality-and-integrity lines recompute the tag from the
//      fetched ciphertext and compare; on a mismatch the line is not
//      delivered (zeros) and `c_auth_err` is set.
// Lines outside protected segments bypass the cipher entirely.
//
// Cache port: hold `c_req` with `c_we`, `c_addr`, `c_wdata` until `c_ack`
// (one cycle; `c_rdata`, `c_auth_err` and `c_level` are valid with it).
// Memory port: `m_req` is held until `m_ack`; `m_rdata` is valid with `m_ack`.
// Requests are taken only while `eng_h_ready` and `ts_ready` are high.
//
// The order of operations is that of the design's write and read algorithms;
// the state machine, the overlap of tag computation with the memory write and
// the zeroing of rejected lines are this implementation's choices.
module hsc_ctrl
  import hsc_pkg::*;
#(
  parameter int unsigned LINES = 8192,
  parameter int unsigned TAG_W = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // cache side
  input  logic                     c_req,
  input  logic                     c_we,
  input  addr_t                    c_addr,
  input  line_t                    c_wdata,
  output logic                     c_ack,
  output line_t                    c_rdata,
  output logic                     c_auth_err,
  output sec_level_e               c_level,
  // security memory map
  output addr_t                    smm_addr,
  input  smm_result_t              smm_res,
  // timestamp memory
  input  logic                     ts_ready,
  output logic                     ts_op_valid,
  output logic                     ts_op_bump,
  output logic [$clog2(LINES)-1:0] meta_idx,
  input  logic                     ts_valid,
  input  ts_t                      ts,
  // tag memory
  output logic                     tag_we,
  output logic                     tag_re,
  output logic [TAG_W-1:0]         tag_wdata,
  input  logic [TAG_W-1:0]         tag_rdata,
  // AES-GCM engine
  input  logic                     eng_h_ready,
  input  logic                     eng_ks_ready,
  output logic                     eng_ks_start,
  output logic [63:0]              eng_seg_id,
  output addr_t                    eng_addr,
  output ts_t                      eng_ts,
  input  logic                     eng_ks_valid,
  input  line_t                    eng_ks,
  output logic                     eng_tag_start,
  output line_t                    eng_ct,
  input  logic                     eng_tag_valid,
  input  block_t                   eng_tag,
  // external memory side
  output logic                     m_req,
  output logic                     m_we,
  output addr_t                    m_addr,
  output line_t                    m_wdata,
  input  logic                     m_ack,
  input  line_t                    m_rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOK, S_TS, S_WR_KS, S_WR_MEM, S_RD_WAIT, S_RD_TAG, S_BYP, S_ACK
  } state_e;

  state_e      st_q;
  logic        we_q, mem_done_q, ks_done_q, tag_done_q, err_q;
  addr_t       addr_q;
  line_t       wdata_q, ct_q, rdata_q;
  smm_result_t lk_q;
  logic [TAG_W-1:0] tag_ref_q;

  wire prot_ci = lk_q.level == SEC_CI;

  // The tag memory answers one cycle after the read issued in S_LOOK.
  logic tag_re_d;
  always_ff @(posedge clk) begin
    if (!rst_n) tag_re_d <= 1'b0;
    else        tag_re_d <= tag_re;
  end


  assign smm_addr = addr_q;
  assign meta_idx = (st_q == S_LOOK) ? smm_res.meta_idx[$clog2(LINES)-1:0]
                                     : lk_q.meta_idx[$clog2(LINES)-1:0];

  // ------------------------------------------------------------ outputs
  always_comb begin
    ts_op_valid   = 1'b0;
    ts_op_bump    = we_q;
    tag_re        = 1'b0;
    tag_we        = 1'b0;
    tag_wdata     = eng_tag[127 -: TAG_W];
    eng_ks_start  = 1'b0;
    eng_seg_id    = {60'd0, lk_q.seg_id};
    eng_addr      = addr_q;
    eng_ts        = ts;
    eng_tag_start = 1'b0;
    eng_ct        = ct_q;
    m_req         = 1'b0;
    m_we          = we_q;
    m_addr        = addr_q;
    m_wdata       = ct_q;
    unique case (st_q)
      S_LOOK: if (smm_res.hit && smm_res.level != SEC_NONE && ts_ready && eng_ks_ready) begin
        ts_op_valid = 1'b1;
        tag_re      = !we_q && smm_res.level == SEC_CI;
      end
      S_TS: eng_ks_start = ts_valid;
      S_WR_KS: if (eng_ks_valid && prot_ci) begin
        eng_tag_start = 1'b1;
        eng_ct        = wdata_q ^ eng_ks;
      end
      S_WR_MEM: begin
        m_req  = !mem_done_q;
        tag_we = eng_tag_valid;
      end
      S_RD_WAIT: begin
        m_req = !mem_done_q;
        if (mem_done_q && ks_done_q && prot_ci) eng_tag_start = 1'b1;
      end
      S_BYP: begin
        m_req   = 1'b1;
        m_wdata = wdata_q;
      end
      default: ;
    endcase
  end

  assign c_ack      = st_q == S_ACK;
  assign c_rdata    = rdata_q;
  assign c_auth_err = err_q;
  assign c_level    = lk_q.hit ? lk_q.level : SEC_NONE;

  // --------------------------------------------------------- state machine
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      we_q       <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      ct_q       <= '0;
      rdata_q    <= '0;
      lk_q       <= '0;
      tag_ref_q  <= '0;
      mem_done_q <= 1'b0;
      ks_done_q  <= 1'b0;
      tag_done_q <= 1'b0;
      err_q      <= 1'b0;
    end else begin
      unique case (st_q)
        S_IDLE: if (c_req && eng_h_ready && ts_ready) begin
          we_q       <= c_we;
          addr_q     <= {c_addr[31:5], 5'd0};
          wdata_q    <= c_wdata;
          mem_done_q <= 1'b0;
          ks_done_q  <= 1'b0;
          tag_done_q <= 1'b0;
          err_q      <= 1'b0;
          st_q       <= S_LOOK;
        end
        S_LOOK: begin
          lk_q <= smm_res;
          if (!smm_res.hit || smm_res.level == SEC_NONE) st_q <= S_BYP;
          else if (ts_ready && eng_ks_ready) st_q <= S_TS;
        end
        S_TS: if (ts_valid) begin
          if (tag_re_d) tag_ref_q <= tag_rdata;
          st_q <= we_q ? S_WR_KS : S_RD_WAIT;
        end
        S_WR_KS: if (eng_ks_valid) begin
          ct_q <= wdata_q ^ eng_ks;
          st_q <= S_WR_MEM;
        end
        S_WR_MEM: begin
          if (m_ack) mem_done_q <= 1'b1;
          if (eng_tag_valid) tag_done_q <= 1'b1;
          if ((mem_done_q || m_ack) && (!prot_ci || tag_done_q || eng_tag_valid)) begin
            rdata_q <= '0;
            st_q    <= S_ACK;
          end
        end
        S_RD_WAIT: begin
          if (m_ack && !mem_done_q) begin
            mem_done_q <= 1'b1;
            ct_q       <= m_rdata;
          end
          if (eng_ks_valid) ks_done_q <= 1'b1;
          if (mem_done_q && ks_done_q) begin
            if (prot_ci) st_q <= S_RD_TAG;
            else begin
              rdata_q <= ct_q ^ eng_ks;
              st_q    <= S_ACK;
            end
          end
        end
        S_RD_TAG: if (eng_tag_valid) begin
          err_q   <= eng_tag[127 -: TAG_W] != tag_ref_q;
          rdata_q <= (eng_tag[127 -: TAG_W] != tag_ref_q) ? '0 : ct_q ^ eng_ks;
          st_q    <= S_ACK;
        end
        S_BYP: if (m_ack) begin
          rdata_q <= we_q ? '0 : m_rdata;
          st_q    <= S_ACK;
        end
        S_ACK: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A protected request never reaches the memory before its keystream.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_req && st_q != S_BYP) |-> (mem_done_q == 1'b0 && (ks_done_q || !we_q || st_q == S_WR_MEM)));
  assert property (@(posedge clk) disable iff (!rst_n) c_ack |=> !c_ack);

endmodule
