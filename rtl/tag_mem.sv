// tag_mem: authentication tag (AC tag) memory.
//
// Stores one GCM authentication tag per protected cacheline, written when the
// line is written back to external memory and read when it is fetched, so the
// recomputed tag can be compared. The memory sits in the trusted area, so the
// tags cannot be modified by an attacker on the external bus.
//
// Interface: single port. `we` writes `wtag` into slot `idx` at the clock edge;
// `re` reads slot `idx`, the tag appears on `rtag` one cycle later with
// `rvalid` high. Contents are not initialised: a line that was never written
// fails authentication.
//
// One tag per cacheline follows the design; the full 128-bit tag width and
// the depth are this implementation's choices.
module tag_mem #(
  parameter int unsigned LINES = 8192,
  parameter int unsigned TAG_W = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(LINES)-1:0] idx,
  input  logic [TAG_W-1:0]         wtag,
  output logic                     rvalid,
  output logic [TAG_W-1:0]         rtag
);

  logic [TAG_W-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (we) mem[idx] <= wtag;
    if (re) rtag <= mem[idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re && !we;
  end

endmodule
