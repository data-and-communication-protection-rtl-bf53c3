// aes128_enc: iterative AES-128 encryption core, one round per clock.
//
// The cipher computes one AES round per cycle, so a 128-bit block takes ten
// cycles, the figure given for the design's AES operation. Round keys are
// derived on the fly, one per round, next to the state register, so no key
// schedule is stored and a new key can be used with every block.
//
// Interface: pulse `start` with `key` and `pt` valid (accepted only while
// `busy` is low). The load edge adds the whole key (round 0); the next ten
// edges perform rounds 1..10. `done` is high for one cycle with `ct` valid
// exactly 10 cycles after the cycle in which `start` was high; `ct` holds its
// value until the next start. Reset is synchronous-active-low `rst_n`.
//
// The ten-cycle latency follows the design; the round-per-cycle structure and
// on-the-fly key expansion are this implementation's choice.
module aes128_enc
  import hsc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t pt,
  output logic   busy,
  output logic   done,
  output block_t ct
);

  block_t     state_q, rk_q, rk_next, round_out;
  logic [3:0] round_q;
  logic [7:0] rcon_q;

  always_comb begin
    rk_next   = next_round_key(rk_q, rcon_q);
    round_out = shift_rows(sub_bytes(state_q));
    if (round_q != 4'd10) round_out = mix_columns(round_out);
    round_out = round_out ^ rk_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      state_q <= '0;
      rk_q    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= pt ^ key;
          rk_q    <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = state_q;

endmodule
