// smm: Security Memory Map.
//
// Holds one entry per memory segment of the running application: base address,
// size in bytes, security level (confidentiality & integrity, confidentiality
// only, or none) and whether the segment holds code or data. Every cacheline
// address from the caches is looked up against all entries in parallel. A
// line belongs to the valid entry with the lowest number whose byte range it
// overlaps; segments need not be line aligned (a segment boundary inside a
// line gives the whole line the policy of the lower-numbered entry). Lines
// outside every segment are not protected.
//
// The security metadata (timestamps and authentication tags) of all protected
// segments share one index space: a protected segment owns one slot for every
// cacheline it touches, placed after the slots of the protected segments with
// a lower entry number. The lookup returns the slot of the addressed line.
//
// Interface: `cfg_we` writes entry `cfg_idx` with `cfg_entry` (an entry of
// size zero is invalid); `cfg_clear` invalidates all entries. The lookup
// (`lk_addr` -> `lk`) is combinational; `lk_addr` is a line address.
//
// The fields of an entry follow the design; the 64-bit packing, the number of
// entries, the overlap rule and the slot numbering are this implementation's
// choices.
module smm
  import hsc_pkg::*;
#(
  parameter int unsigned NSEG = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_clear,
  input  logic                    cfg_we,
  input  logic [$clog2(NSEG)-1:0] cfg_idx,
  input  smm_entry_t              cfg_entry,
  input  addr_t                   lk_addr,
  output smm_result_t             lk
);

  smm_entry_t  ent_q [NSEG];
  logic [31:0] first_line [NSEG];   // line number of the first byte
  logic [31:0] end_line   [NSEG];   // line number one past the last byte
  logic [31:0] meta_base  [NSEG];

  always_ff @(posedge clk) begin
    if (!rst_n || cfg_clear) begin
      for (int i = 0; i < NSEG; i++) ent_q[i] <= '0;
    end else if (cfg_we) begin
      ent_q[cfg_idx] <= cfg_entry;
    end
  end

  // Line span of every segment and prefix sums of the protected spans.
  always_comb begin
    logic [32:0] last;
    logic [31:0] acc;
    acc = '0;
    for (int i = 0; i < NSEG; i++) begin
      last          = 33'(ent_q[i].base) + 33'(ent_q[i].size) - 33'd1;
      first_line[i] = {5'd0, ent_q[i].base[31:5]};
      end_line[i]   = 32'(last[32:5]) + 32'd1;
      meta_base[i]  = acc;
      if (ent_q[i].level != SEC_NONE && ent_q[i].size != '0)
        acc = acc + (end_line[i] - first_line[i]);
    end
  end

  always_comb begin
    logic [31:0] line;
    line = {5'd0, lk_addr[31:5]};
    lk   = '0;
    for (int i = NSEG - 1; i >= 0; i--) begin
      if (ent_q[i].size != '0 && line >= first_line[i] && line < end_line[i]) begin
        lk.hit      = 1'b1;
        lk.seg_id   = 4'(i);
        lk.level    = ent_q[i].level;
        lk.is_code  = ent_q[i].is_code;
        lk.meta_idx = meta_base[i] + (line - first_line[i]);
      end
    end
  end

endmodule
