// ts_mem: timestamp memory with its timestamp generator.
//
// One 32-bit timestamp (TS) per protected cacheline. A cacheline write bumps
// the line's timestamp by two (TS = TS + 2), because a 256-bit line is
// encrypted with two counter blocks that use TS and TS + 1; a cacheline read
// just returns the stored TS. A replayed old ciphertext is then decrypted and
// authenticated with a newer TS and fails.
//
// Interface: when `ready` is high, `op_valid` starts an operation on slot
// `idx`, a bump if `op_bump` else a read. One cycle later `ts_valid` is high
// and `ts` holds the timestamp to use (the new value after a bump). A bump
// writes the memory back on that following cycle, during which `ready` is low.
// After reset the memory is cleared one slot per cycle; `ready` rises when
// that sweep ends (LINES cycles).
//
// Bumping by two follows the design; the two-cycle read-modify-write, the
// reset sweep and the depth are this implementation's choices. The counter
// wraps at 2^32, which at one write per line per cycle takes years.
module ts_mem
  import hsc_pkg::*;
#(
  parameter int unsigned LINES = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     op_valid,
  input  logic                     op_bump,
  input  logic [$clog2(LINES)-1:0] idx,
  output logic                     ready,
  output logic                     ts_valid,
  output ts_t                      ts
);

  localparam int unsigned IW = $clog2(LINES);

  ts_t           mem [LINES];
  ts_t           rd_q;
  logic          init_q, wb_q;
  logic [IW-1:0] init_idx_q, idx_q;

  assign ready = !init_q && !wb_q;
  assign ts    = wb_q ? rd_q + ts_t'(2) : rd_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_q     <= 1'b1;
      init_idx_q <= '0;
      wb_q       <= 1'b0;
      ts_valid   <= 1'b0;
      idx_q      <= '0;
    end else begin
      ts_valid <= 1'b0;
      wb_q     <= 1'b0;
      if (init_q) begin
        init_idx_q <= init_idx_q + 1'b1;
        if (init_idx_q == IW'(LINES - 1)) init_q <= 1'b0;
      end else if (op_valid && ready) begin
        ts_valid <= 1'b1;
        wb_q     <= op_bump;
        idx_q    <= idx;
      end
    end
  end

  // Memory array: one synchronous read port, one write port.
  always_ff @(posedge clk) begin
    if (init_q) mem[init_idx_q] <= '0;
    else if (wb_q) mem[idx_q] <= ts;
    rd_q <= mem[idx];
  end

endmodule
