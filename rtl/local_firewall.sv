// local_firewall: firewall between one IP (processor, memory, accelerator,
// I/O controller) and the communication bus.
//
// Every transaction is checked twice. At the source, the firewall of the
// issuing IP checks that the target address lies in a known section (against
// spoofing and relocation), that the read/write right allows it, and that
// the access size is an allowed data format (against overflow-style
// misuse); it also stamps its own ID as the transaction's source, so an IP
// cannot pretend to be another. At the target, the firewall of the receiving
// IP checks that the source ID is allowed for the addressed section, that the
// section exists, and that a written value lies in the allowed range.
// A refused transaction is answered with an error to its sender, never
// reaches the other side, and is reported as an alarm on the firewall
// network. The rules of both tables are written over that network
// (`cfg_valid`, `cfg`, addressed by firewall ID).
//
// Ports: `ip_o_*` from the IP, `bus_o_*` to the bus (valid/ready; the
// decision is combinational, an error is given with `ip_o_ready`); `bus_i_*`
// from the bus, `ip_i_*` to the IP. `alarm_valid`/`alarm` are registered,
// one cycle after the refused transaction. Only requests are checked; read
// data returns outside the firewall.
//
// The checks at each side follow the design's tables; the rule format,
// table sizes, the first-match rule and the handshake are this
// implementation's choices.
module local_firewall
  import fw_pkg::*;
#(
  parameter logic [3:0]  FW_ID = 4'd1,
  parameter int unsigned N_OUT = 4,
  parameter int unsigned N_IN  = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // IP -> bus
  input  logic      ip_o_valid,
  input  bus_txn_t  ip_o_txn,
  output logic      ip_o_ready,
  output logic      ip_o_err,
  output logic      bus_o_valid,
  output bus_txn_t  bus_o_txn,
  input  logic      bus_o_ready,
  // bus -> IP
  input  logic      bus_i_valid,
  input  bus_txn_t  bus_i_txn,
  output logic      bus_i_ready,
  output logic      bus_i_err,
  output logic      ip_i_valid,
  output bus_txn_t  ip_i_txn,
  input  logic      ip_i_ready,
  // firewall network
  input  logic      cfg_valid,
  input  fw_cfg_t   cfg,
  output logic      alarm_valid,
  output fw_alarm_t alarm
);

  fw_rule_t out_q [N_OUT];
  fw_rule_t in_q  [N_IN];
  alarm_e   out_code, in_code;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OUT; i++) out_q[i] <= '0;
      for (int i = 0; i < N_IN; i++)  in_q[i]  <= '0;
    end else if (cfg_valid && cfg.fw_id == FW_ID) begin
      if (cfg.tbl_in) begin
        if (32'(cfg.idx) < N_IN) in_q[cfg.idx[$clog2(N_IN)-1:0]] <= cfg.rule;
      end else begin
        if (32'(cfg.idx) < N_OUT) out_q[cfg.idx[$clog2(N_OUT)-1:0]] <= cfg.rule;
      end
    end
  end

  // Source-side checks.
  always_comb begin
    logic     hit;
    fw_rule_t r;
    hit = 1'b0;
    r   = '0;
    for (int i = N_OUT - 1; i >= 0; i--)
      if (rule_hit(out_q[i], ip_o_txn.addr)) begin hit = 1'b1; r = out_q[i]; end
    if (!hit)                                      out_code = ALM_NO_SECTION;
    else if (ip_o_txn.we ? !r.wr_ok : !r.rd_ok)    out_code = ALM_RW;
    else if (ip_o_txn.size == 2'd3 || !r.fmt_ok[ip_o_txn.size]) out_code = ALM_FORMAT;
    else                                           out_code = ALM_NONE;
  end

  // Target-side checks.
  always_comb begin
    logic     hit;
    fw_rule_t r;
    hit = 1'b0;
    r   = '0;
    for (int i = N_IN - 1; i >= 0; i--)
      if (rule_hit(in_q[i], bus_i_txn.addr)) begin hit = 1'b1; r = in_q[i]; end
    if (!hit)                              in_code = ALM_NO_SECTION;
    else if (!r.src_ok[bus_i_txn.src])     in_code = ALM_SOURCE;
    else if (bus_i_txn.we && (bus_i_txn.data < r.vmin || bus_i_txn.data > r.vmax))
                                           in_code = ALM_VALUE;
    else                                   in_code = ALM_NONE;
  end

  always_comb begin
    bus_o_valid   = ip_o_valid && out_code == ALM_NONE;
    bus_o_txn     = ip_o_txn;
    bus_o_txn.src = FW_ID[SRC_W-1:0];
    ip_o_ready    = (out_code == ALM_NONE) ? bus_o_ready : 1'b1;
    ip_o_err      = ip_o_valid && out_code != ALM_NONE;

    ip_i_valid    = bus_i_valid && in_code == ALM_NONE;
    ip_i_txn      = bus_i_txn;
    bus_i_ready   = (in_code == ALM_NONE) ? ip_i_ready : 1'b1;
    bus_i_err     = bus_i_valid && in_code != ALM_NONE;
  end

  // Alarm report; a refused outgoing access is reported first, a refused
  // incoming one in the same cycle is reported when the source side is quiet.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alarm_valid <= 1'b0;
      alarm       <= '0;
    end else begin
      alarm_valid <= ip_o_err || bus_i_err;
      if (ip_o_err)
        alarm <= '{fw_id: FW_ID, code: out_code, src: FW_ID[SRC_W-1:0], addr: ip_o_txn.addr};
      else if (bus_i_err)
        alarm <= '{fw_id: FW_ID, code: in_code, src: bus_i_txn.src, addr: bus_i_txn.addr};
    end
  end

endmodule
