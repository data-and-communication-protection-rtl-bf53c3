// global_firewall: firewall in front of the external-memory controller, and
// manager of all local firewalls.
//
// Cacheline requests from the bus (already checked at their source by the
// issuing IP's local firewall, which also stamped the source ID) are checked
// at the target: the section must exist, the source ID must be allowed for
// it, and the read/write right must allow the access. Accepted requests go to
// the confidentiality and integrity cores, here a hardware security core
// (`hsc`), which encrypts, authenticates and checks freshness of every line
// in external memory according to the section's protection level. Refused
// requests are answered at once with `g_err` and reported as alarms.
//
// Management: the processor dedicated to security writes rules through
// `sp_cfg_*`. A rule addressed to firewall 0 is one of the global firewall's
// own; the security builder also turns it into the matching entry of the
// security memory map (base, size = last - base + 1, protection level). Rules
// for other firewalls are forwarded on the firewall network (`noc_cfg_*`).
// The supervisor collects the alarms of the local firewalls and its own, and
// counts them (`alarm_count`, `last_alarm`).
//
// Bus port: hold `g_req` with `g_src`, `g_we`, `g_addr`, `g_wdata` until
// `g_ack`; `g_rdata`, `g_err` (policy refusal) and `g_auth_err` (integrity
// failure) come with it. Memory port: as `hsc`. `sp_key_load`/`sp_key` set
// the external-memory key.
//
// Its parts (manager, security builder, supervisor, firewall interface,
// confidentiality and integrity cores) and the checks it makes follow the
// design; the rule format, the rule-to-segment mapping and the alarm
// collection are this implementation's choices.
module global_firewall
  import hsc_pkg::*;
  import fw_pkg::*;
#(
  parameter int unsigned N_RULES = 16,
  parameter int unsigned N_LF    = 7,
  parameter int unsigned LINES   = 8192
) (
  input  logic             clk,
  input  logic             rst_n,
  // security processor
  input  logic             sp_cfg_valid,
  input  fw_cfg_t          sp_cfg,
  input  logic             sp_key_load,
  input  block_t           sp_key,
  output logic             ready,
  // firewall network
  output logic             noc_cfg_valid,
  output fw_cfg_t          noc_cfg,
  input  logic [N_LF-1:0]  lf_alarm_valid,
  input  fw_alarm_t        lf_alarm [N_LF],
  output logic [15:0]      alarm_count,
  output fw_alarm_t        last_alarm,
  // bus side, cacheline requests
  input  logic             g_req,
  input  logic [SRC_W-1:0] g_src,
  input  logic             g_we,
  input  addr_t            g_addr,
  input  line_t            g_wdata,
  output logic             g_ack,
  output line_t            g_rdata,
  output logic             g_err,
  output logic             g_auth_err,
  // external memory side
  output logic             m_req,
  output logic             m_we,
  output addr_t            m_addr,
  output line_t            m_wdata,
  input  logic             m_ack,
  input  line_t            m_rdata
);

  localparam int unsigned RW = $clog2(N_RULES);

  fw_rule_t rule_q [N_RULES];
  alarm_e   code;

  // ------------------------------------------------ manager / security builder
  logic       own_cfg;
  logic       smm_we;
  logic [RW-1:0] smm_idx;
  smm_entry_t smm_entry;
  logic [31:0] span;

  assign own_cfg       = sp_cfg_valid && sp_cfg.fw_id == 4'd0;
  assign noc_cfg_valid = sp_cfg_valid && sp_cfg.fw_id != 4'd0;
  assign noc_cfg       = sp_cfg;
  assign span          = sp_cfg.rule.last - sp_cfg.rule.base + 32'd1;
  assign smm_we        = own_cfg && 32'(sp_cfg.idx) < N_RULES;
  assign smm_idx       = sp_cfg.idx[RW-1:0];
  always_comb begin
    smm_entry         = '0;
    smm_entry.base    = sp_cfg.rule.base;
    smm_entry.size    = sp_cfg.rule.valid ? span[23:0] : 24'd0;
    smm_entry.is_code = 1'b0;
    smm_entry.level   = sec_level_e'(sp_cfg.rule.level);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_RULES; i++) rule_q[i] <= '0;
    end else if (smm_we) begin
      rule_q[smm_idx] <= sp_cfg.rule;
    end
  end

  // ---------------------------------------------------- target-side checks
  always_comb begin
    logic     hit;
    fw_rule_t r;
    hit = 1'b0;
    r   = '0;
    for (int i = N_RULES - 1; i >= 0; i--)
      if (rule_hit(rule_q[i], g_addr)) begin hit = 1'b1; r = rule_q[i]; end
    if (!hit)                        code = ALM_NO_SECTION;
    else if (!r.src_ok[g_src])       code = ALM_SOURCE;
    else if (g_we ? !r.wr_ok : !r.rd_ok) code = ALM_RW;
    else                             code = ALM_NONE;
  end

  // A request is refused in the cycle it appears (while the core is idle),
  // or passed to the security core and held there until it answers.
  logic       pass_q, refuse_q;
  logic       c_ack, c_auth_err;
  line_t      c_rdata;
  sec_level_e c_level;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pass_q   <= 1'b0;
      refuse_q <= 1'b0;
    end else begin
      refuse_q <= 1'b0;
      if (!pass_q && !refuse_q && g_req) begin
        if (code == ALM_NONE) pass_q <= 1'b1;
        else                  refuse_q <= 1'b1;
      end else if (pass_q && c_ack) begin
        pass_q <= 1'b0;
      end
    end
  end

  assign g_ack      = refuse_q || (pass_q && c_ack);
  assign g_err      = refuse_q;
  assign g_auth_err = pass_q && c_auth_err;
  assign g_rdata    = refuse_q ? '0 : c_rdata;

  // ----------------------------------------- confidentiality / integrity cores
  hsc #(.NSEG(N_RULES), .LINES(LINES), .TAG_W(128)) u_core (
    .clk, .rst_n, .key_load(sp_key_load), .key(sp_key), .ready,
    .cfg_clear(1'b0), .cfg_we(smm_we), .cfg_idx(smm_idx), .cfg_entry(smm_entry),
    .c_req(pass_q && !c_ack), .c_we(g_we), .c_addr(g_addr), .c_wdata(g_wdata),
    .c_ack, .c_rdata, .c_auth_err, .c_level,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata);

  // ------------------------------------------------------------ supervisor
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alarm_count <= '0;
      last_alarm  <= '0;
    end else begin
      logic [15:0] n;
      n = alarm_count;
      for (int i = 0; i < N_LF; i++)
        if (lf_alarm_valid[i]) begin
          n = n + 16'd1;
          last_alarm <= lf_alarm[i];
        end
      if (g_req && !pass_q && !refuse_q && code != ALM_NONE) begin
        n = n + 16'd1;
        last_alarm <= '{fw_id: 4'd0, code: code, src: g_src, addr: g_addr};
      end
      alarm_count <= n;
    end
  end

endmodule
