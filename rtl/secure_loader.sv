// secure_loader: secure loading of an application and its security memory map
// from flash memory.
//
// The flash image is protected for transport with AES-GCM (the "load" policy);
// in external memory the code is protected per cacheline by the hardware
// security core (the "execution" policy). The loader bridges the two: it
// decrypts and authenticates the image and hands every plaintext cacheline to
// the security core as a cache write, which re-encrypts it for execution.
//
// Image layout, in 32-bit words from `img_base`:
//   IV (3 words, plain) | TS (1 word, plain) | Tag (2 words)
//   then the encrypted payload:
//   application address | application size in bytes |
//   segment entries, 2 words each, as `smm_entry_t` (base, then size/flags),
//   ended by an entry of size zero | application code.
// The payload is one GCM message: counter block Y0 = IV || TS, payload block i
// (from 1) is encrypted with IV || TS + i, the tag is the first 64 bits of
// GHASH(C) ^ E(Y0), GHASH without additional data and with the payload length
// in bits. With TS = 1 this is standard 96-bit-IV GCM.
//
// Operation: `start` (when idle) clears the SMM, derives H = E(0), reads the
// header, computes E(Y0), then loops over payload blocks: read four words
// from flash while the block's keystream is computed, decrypt, fold the
// ciphertext into GHASH, and consume the plaintext words (SMM entries are
// written to the SMM as they arrive, code words are gathered into 256-bit
// lines and written through the security core at application address +
// offset, waiting for each acknowledge). After the last word the tag is
// compared. With `keep_smm` high at `start` the loader serves a system whose
// memory map is already in hardware (for instance set in the FPGA bitstream):
// it neither clears nor writes the map, skips any entries in the image, and
// loads only the code. `done` pulses at the end; `ok` then says whether the
// tag matched and at most NSEG segments were given. Code already written is
// in external memory either way; `ok` is what allows it to be executed.
//
// Flash port: hold `f_req` and `f_addr` (byte address of a word) until
// `f_ack`, with `f_rdata` valid alongside it. Security-core port: as its
// cache port; SMM port: as `smm`.
//
// The header fields and their widths, the order of operations and the use of
// a separate loading policy follow the design. The zero-size terminator entry,
// the field encoding, the `keep_smm` input selecting between the two loading
// scenarios (code only, or map and code), the meaning of the application size
// (code bytes, a multiple of 4), the separate load key and the degree of
// overlap (flash reads with keystream only) are this implementation's choices.
module secure_loader
  import hsc_pkg::*;
#(
  parameter int unsigned NSEG = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    keep_smm,
  input  addr_t                   img_base,
  input  block_t                  load_key,
  output logic                    busy,
  output logic                    done,
  output logic                    ok,
  output addr_t                   app_addr,
  // flash
  output logic                    f_req,
  output addr_t                   f_addr,
  input  logic                    f_ack,
  input  logic [31:0]             f_rdata,
  // security memory map
  output logic                    cfg_clear,
  output logic                    cfg_we,
  output logic [$clog2(NSEG)-1:0] cfg_idx,
  output smm_entry_t              cfg_entry,
  // security core, cache-side port
  output logic                    h_req,
  output logic                    h_we,
  output addr_t                   h_addr,
  output line_t                   h_wdata,
  input  logic                    h_ack
);

  typedef enum logic [3:0] {
    L_IDLE, L_H, L_HDR, L_Y0, L_RD, L_KS, L_PARSE, L_HWR, L_GH, L_LEN, L_CMP
  } lstate_e;

  typedef enum logic [2:0] {
    P_ADDR, P_SIZE, P_SEG_HI, P_SEG_LO, P_CODE, P_END
  } pstate_e;

  lstate_e     st_q;
  pstate_e     ph_q;
  addr_t       rd_addr_q;
  logic [2:0]  wcnt_q;          // words read in header / block, words parsed
  logic [95:0] iv_q;
  ts_t         ts_q, ctr_q;
  logic [63:0] tag_ref_q;
  block_t      h_q, ey0_q, x_q, c_q, p_q, mask_q;
  logic [31:0] app_size_q, code_cnt_q, seg_hi_q, pwords_q;
  logic [$clog2(NSEG):0] nseg_q;
  logic        too_many_q;
  line_t       line_q;
  logic [2:0]  lw_q;            // words in the line buffer
  addr_t       line_addr_q;
  logic        ks_started_q;    // keystream of the current block started
  logic        ks_done_q;       // ... and finished
  logic        keep_q;          // memory map is fixed: do not clear or write it

  // ---------------------------------------------------------------- AES core
  logic   aes_start, aes_busy, aes_done;
  block_t aes_pt, aes_ct;

  aes128_enc u_aes (.clk, .rst_n, .start(aes_start), .key(load_key), .pt(aes_pt),
                    .busy(aes_busy), .done(aes_done), .ct(aes_ct));

  // ----------------------------------------------------------- GHASH product
  block_t gh_x, gh_prod;
  assign gh_prod = gf128_mult(gh_x, h_q);

  // word of the current block being parsed
  logic [31:0] pword;
  assign pword = p_q[127 - 32*wcnt_q[1:0] -: 32];

  always_comb begin
    aes_start = 1'b0;
    aes_pt    = '0;
    unique case (st_q)
      L_IDLE: begin aes_start = start; aes_pt = '0; end
      L_Y0:   begin aes_start = !aes_busy && !aes_done; aes_pt = {iv_q, ts_q}; end
      L_RD:   begin aes_start = wcnt_q == 3'd0 && f_req && !ks_started_q; aes_pt = {iv_q, ctr_q}; end
      default: ;
    endcase
    gh_x = (st_q == L_LEN) ? (x_q ^ {64'd0, 32'd0, pwords_q[26:0], 5'd0}) : (x_q ^ (c_q & mask_q));
  end

  assign f_req     = st_q == L_HDR || st_q == L_RD;
  assign f_addr    = rd_addr_q;
  assign h_req     = st_q == L_HWR;
  assign h_we      = 1'b1;
  assign h_addr    = line_addr_q;
  assign h_wdata   = line_q;
  assign cfg_clear = st_q == L_IDLE && start && !keep_smm;
  assign busy      = st_q != L_IDLE;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q         <= L_IDLE;
      ph_q         <= P_ADDR;
      rd_addr_q    <= '0;
      wcnt_q       <= '0;
      iv_q         <= '0;
      ts_q         <= '0;
      ctr_q        <= '0;
      tag_ref_q    <= '0;
      h_q          <= '0;
      ey0_q        <= '0;
      x_q          <= '0;
      c_q          <= '0;
      p_q          <= '0;
      mask_q       <= '0;
      app_size_q   <= '0;
      app_addr     <= '0;
      code_cnt_q   <= '0;
      seg_hi_q     <= '0;
      pwords_q     <= '0;
      nseg_q       <= '0;
      too_many_q   <= 1'b0;
      line_q       <= '0;
      lw_q         <= '0;
      line_addr_q  <= '0;
      ks_started_q <= 1'b0;
      ks_done_q    <= 1'b0;
      keep_q       <= 1'b0;
      cfg_we       <= 1'b0;
      cfg_idx      <= '0;
      cfg_entry    <= '0;
      done         <= 1'b0;
      ok           <= 1'b0;
    end else begin
      cfg_we <= 1'b0;
      done   <= 1'b0;
      unique case (st_q)
        L_IDLE: if (start) begin
          rd_addr_q  <= img_base;
          wcnt_q     <= '0;
          ph_q       <= P_ADDR;
          x_q        <= '0;
          pwords_q   <= '0;
          nseg_q     <= '0;
          too_many_q <= 1'b0;
          lw_q       <= '0;
          line_q     <= '0;
          code_cnt_q <= '0;
          ok         <= 1'b0;
          keep_q     <= keep_smm;
          st_q       <= L_H;
        end
        L_H: if (aes_done) begin
          h_q  <= aes_ct;
          st_q <= L_HDR;
        end
        // header: IV0 IV1 IV2 TS TAG0 TAG1
        L_HDR: if (f_ack) begin
          rd_addr_q <= rd_addr_q + 32'd4;
          wcnt_q    <= wcnt_q + 3'd1;
          unique case (wcnt_q)
            3'd0: iv_q[95:64]      <= f_rdata;
            3'd1: iv_q[63:32]      <= f_rdata;
            3'd2: iv_q[31:0]       <= f_rdata;
            3'd3: ts_q             <= f_rdata;
            3'd4: tag_ref_q[63:32] <= f_rdata;
            default: begin
              tag_ref_q[31:0] <= f_rdata;
              wcnt_q          <= '0;
              st_q            <= L_Y0;
            end
          endcase
        end
        L_Y0: if (aes_done) begin
          ey0_q        <= aes_ct;
          ctr_q        <= ts_q + 32'd1;
          ks_started_q <= 1'b0;
          st_q         <= L_RD;
        end
        // read the four words of a payload block; the keystream starts with
        // the first request and runs while the words arrive
        L_RD: begin
          if (aes_start) ks_started_q <= 1'b1;
          if (aes_done) ks_done_q <= 1'b1;
          if (f_ack) begin
            rd_addr_q <= rd_addr_q + 32'd4;
            c_q[127 - 32*wcnt_q[1:0] -: 32] <= f_rdata;
            if (wcnt_q == 3'd3) begin
              wcnt_q <= '0;
              st_q   <= L_KS;
            end else wcnt_q <= wcnt_q + 3'd1;
          end
        end
        L_KS: if (aes_done || ks_done_q) begin
          ks_done_q <= 1'b0;
          p_q    <= c_q ^ aes_ct;
          mask_q <= '0;
          ctr_q  <= ctr_q + 32'd1;
          st_q   <= L_PARSE;
        end
        // consume the block's plaintext one word per cycle
        L_PARSE: begin
          if (ph_q != P_END) begin
            mask_q[127 - 32*wcnt_q[1:0] -: 32] <= '1;
            pwords_q <= pwords_q + 32'd1;
          end
          unique case (ph_q)
            P_ADDR: begin app_addr <= pword; line_addr_q <= pword; ph_q <= P_SIZE; end
            P_SIZE: begin app_size_q <= pword; ph_q <= P_SEG_HI; end
            P_SEG_HI: begin seg_hi_q <= pword; ph_q <= P_SEG_LO; end
            P_SEG_LO: begin
              if (pword[31:8] == '0) begin
                ph_q <= (app_size_q == '0) ? P_END : P_CODE;
              end else begin
                if (keep_q) begin
                  // map fixed in hardware: entries in the image are skipped
                end else if (nseg_q < ($clog2(NSEG)+1)'(NSEG)) begin
                  cfg_we    <= 1'b1;
                  cfg_idx   <= nseg_q[$clog2(NSEG)-1:0];
                  cfg_entry <= smm_entry_t'({seg_hi_q, pword});
                  nseg_q    <= nseg_q + 1'b1;
                end else too_many_q <= 1'b1;
                ph_q <= P_SEG_HI;
              end
            end
            P_CODE: begin
              line_q[255 - 32*lw_q -: 32] <= pword;
              lw_q       <= lw_q + 3'd1;
              code_cnt_q <= code_cnt_q + 32'd4;
              if (code_cnt_q + 32'd4 >= app_size_q) ph_q <= P_END;
            end
            default: ;
          endcase
          // a full line, or the last code word, goes to the security core
          if (ph_q == P_CODE && (lw_q == 3'd7 || code_cnt_q + 32'd4 >= app_size_q)) begin
            st_q <= L_HWR;
          end else if (wcnt_q == 3'd3) begin
            wcnt_q <= '0;
            st_q   <= L_GH;
          end else begin
            wcnt_q <= wcnt_q + 3'd1;
          end
        end
        L_HWR: if (h_ack) begin
          line_q      <= '0;
          lw_q        <= '0;
          line_addr_q <= line_addr_q + 32'd32;
          if (wcnt_q == 3'd3) begin
            wcnt_q <= '0;
            st_q   <= L_GH;
          end else begin
            wcnt_q <= wcnt_q + 3'd1;
            st_q   <= L_PARSE;
          end
        end
        L_GH: begin
          x_q          <= gh_prod;
          ks_started_q <= 1'b0;
          st_q         <= (ph_q == P_END) ? L_LEN : L_RD;
        end
        L_LEN: begin
          x_q  <= gh_prod;
          st_q <= L_CMP;
        end
        L_CMP: begin
          ok   <= ((x_q ^ ey0_q) >> 64) == 128'(tag_ref_q) && !too_many_q;
          done <= 1'b1;
          st_q <= L_IDLE;
        end
        default: st_q <= L_IDLE;
      endcase
    end
  end

endmodule
