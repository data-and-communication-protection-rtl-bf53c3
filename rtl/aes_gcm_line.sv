// aes_gcm_line: AES-GCM engine for one 256-bit cacheline.
//
// Counter mode with GHASH authentication, arranged for a cacheline of two AES
// blocks. The two counter blocks are SegID(64) || @(32) || TS(32) and the same
// with TS + 1; two AES cores encrypt them in parallel, giving the 256-bit
// keystream in ten cycles. Because the keystream depends only on segment,
// address and timestamp, it can be computed while the ciphertext is still
// being fetched from external memory. The tag is GHASH over the two
// ciphertext blocks and the length block 0(64) || len(C)(64) = 256:
//   X1 = C1*H,  X2 = (X1 ^ C2)*H,  tag = (X2 ^ len)*H,
// one GF(2^128) multiplication per cycle, three cycles in all. As drawn for
// this design, the tag is not masked with an encrypted pre-counter block;
// confidentiality of the tag comes from the tag memory being on chip.
//
// Interface:
//  * `key_load` takes `key`; the hash key H = E_K(0) is then computed (ten
//    cycles) and `h_ready` rises. The other operations wait for `h_ready`.
//  * `ks_start` (when `ks_ready`) with `seg_id`, `addr`, `ts` -> `ks_valid`
//    for one cycle ten cycles later (the cycle after the tenth clock edge),
//    `ks` holds the keystream (first block in bits [255:128]) until the next
//    start.
//  * `tag_start` with `ct` (when `tag_ready`) -> `tag_valid` for one cycle
//    three cycles later, `tag` holds the result.
//
// Counter layout, two parallel AES cores, three GHASH steps and the missing
// tag mask follow the design's AES-GCM architecture drawing; the handshakes
// are this implementation's own.
module aes_gcm_line
  import hsc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key,
  output logic        h_ready,
  input  logic        ks_start,
  input  logic [63:0] seg_id,
  input  addr_t       addr,
  input  ts_t         ts,
  output logic        ks_ready,
  output logic        ks_valid,
  output line_t       ks,
  input  logic        tag_start,
  input  line_t       ct,
  output logic        tag_ready,
  output logic        tag_valid,
  output block_t      tag
);

  localparam block_t LEN_BLOCK = {64'd0, 64'd256};

  block_t key_q, h_q;
  logic   h_pend_q;
  logic   busy0, busy1, done0, done1, go0, go1;
  block_t pt0, pt1, ct0, ct1;

  // ---------------------------------------------------------------- keystream
  assign ks_ready = h_ready && !busy0 && !busy1 && !key_load;
  assign go0      = (ks_start && ks_ready) || (key_load && !busy0);
  assign go1      = ks_start && ks_ready;
  assign pt0      = key_load ? '0 : {seg_id, addr, ts};
  assign pt1      = {seg_id, addr, ts + ts_t'(1)};

  aes128_enc u_aes0 (.clk, .rst_n, .start(go0), .key(key_load ? key : key_q), .pt(pt0),
                     .busy(busy0), .done(done0), .ct(ct0));
  aes128_enc u_aes1 (.clk, .rst_n, .start(go1), .key(key_q), .pt(pt1),
                     .busy(busy1), .done(done1), .ct(ct1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_q    <= '0;
      h_q      <= '0;
      h_ready  <= 1'b0;
      h_pend_q <= 1'b0;
    end else begin
      if (key_load) begin
        key_q    <= key;
        h_ready  <= 1'b0;
        h_pend_q <= 1'b1;
      end else if (done0 && h_pend_q) begin
        h_q      <= ct0;
        h_pend_q <= 1'b0;
        h_ready  <= 1'b1;
      end
    end
  end

  // The cores hold their result until the next start.
  assign ks_valid = done1;
  assign ks       = {ct0, ct1};

  // -------------------------------------------------------------------- GHASH
  logic [1:0] step_q;     // 0 idle, 1..3 multiplication in flight
  block_t     c2_q, mul_x;
  logic       mul_en, mul_v;
  block_t     mul_z;

  assign tag_ready = h_ready && step_q == 2'd0;

  always_comb begin
    mul_en = 1'b0;
    mul_x  = '0;
    if (tag_start && tag_ready) begin
      mul_en = 1'b1;
      mul_x  = ct[255:128];
    end else if (mul_v && step_q == 2'd1) begin
      mul_en = 1'b1;
      mul_x  = mul_z ^ c2_q;
    end else if (mul_v && step_q == 2'd2) begin
      mul_en = 1'b1;
      mul_x  = mul_z ^ LEN_BLOCK;
    end
  end

  gf128_mul u_mul (.clk, .rst_n, .en(mul_en), .x(mul_x), .h(h_q), .z_valid(mul_v), .z(mul_z));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_q    <= '0;
      c2_q      <= '0;
    end else begin
      if (tag_start && tag_ready) begin
        step_q <= 2'd1;
        c2_q   <= ct[127:0];
      end else if (mul_v) begin
        if (step_q == 2'd3) begin
          step_q <= 2'd0;
        end else begin
          step_q <= step_q + 2'd1;
        end
      end
    end
  end

  // The last product is the tag; it is valid on the cycle after the third
  // multiplication and stays in the multiplier's output register.
  assign tag_valid = mul_v && step_q == 2'd3;
  assign tag       = mul_z;

endmodule
