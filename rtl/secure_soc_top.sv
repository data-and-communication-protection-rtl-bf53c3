// secure_soc_top: the two protection systems, side by side.
//
// (A) Protected external memory for one processor. The hardware security core
//     (`hsc`) sits between the processor's caches and external memory and
//     encrypts/authenticates cachelines by segment, as set in its security
//     memory map. The secure loader (`secure_loader`) brings an application
//     and its memory map from flash: while it runs it owns the core's cache
//     port and its map-programming port; when it is done the processor's
//     cache port (`cpu_*`) is connected instead. `app_ok` tells whether the
//     loaded image was authentic; gating the processor on it is left to the
//     system.
// (B) Protected communication in a multiprocessor system. Every IP has a
//     local firewall (`local_firewall`, IDs 1..N_LF); the external-memory
//     controller is behind the global firewall (`global_firewall`), which has
//     its own security core. The global firewall forwards the security
//     processor's reconfiguration messages to the local firewalls and
//     collects their alarms; in this top the firewall network is a broadcast
//     of configuration messages and one alarm wire per local firewall. The
//     system bus between the firewalls, the IPs and the memory controllers
//     are outside: their ports are brought out.
module secure_soc_top
  import hsc_pkg::*;
  import fw_pkg::*;
#(
  parameter int unsigned NSEG    = 16,
  parameter int unsigned LINES   = 8192,
  parameter int unsigned N_LF    = 7,
  parameter int unsigned N_RULES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---------------------------------------------------------------- (A)
  input  logic             key_load,
  input  block_t           key,
  output logic             hsc_ready,
  input  logic             load_start,
  input  logic             load_keep_smm,
  input  addr_t            load_img_base,
  input  block_t           load_key,
  output logic             load_busy,
  output logic             load_done,
  output logic             app_ok,
  output addr_t            app_addr,
  output logic             flash_req,
  output addr_t            flash_addr,
  input  logic             flash_ack,
  input  logic [31:0]      flash_rdata,
  input  logic             cpu_req,
  input  logic             cpu_we,
  input  addr_t            cpu_addr,
  input  line_t            cpu_wdata,
  output logic             cpu_ack,
  output line_t            cpu_rdata,
  output logic             cpu_auth_err,
  output sec_level_e       cpu_level,
  output logic             mem_req,
  output logic             mem_we,
  output addr_t            mem_addr,
  output line_t            mem_wdata,
  input  logic             mem_ack,
  input  line_t            mem_rdata,
  // ---------------------------------------------------------------- (B)
  input  logic             sp_cfg_valid,
  input  fw_cfg_t          sp_cfg,
  input  logic             sp_key_load,
  input  block_t           sp_key,
  output logic             gf_ready,
  output logic [15:0]      alarm_count,
  output fw_alarm_t        last_alarm,
  input  logic             lf_ip_o_valid [N_LF],
  input  bus_txn_t         lf_ip_o_txn   [N_LF],
  output logic             lf_ip_o_ready [N_LF],
  output logic             lf_ip_o_err   [N_LF],
  output logic             lf_bus_o_valid[N_LF],
  output bus_txn_t         lf_bus_o_txn  [N_LF],
  input  logic             lf_bus_o_ready[N_LF],
  input  logic             lf_bus_i_valid[N_LF],
  input  bus_txn_t         lf_bus_i_txn  [N_LF],
  output logic             lf_bus_i_ready[N_LF],
  output logic             lf_bus_i_err  [N_LF],
  output logic             lf_ip_i_valid [N_LF],
  output bus_txn_t         lf_ip_i_txn   [N_LF],
  input  logic             lf_ip_i_ready [N_LF],
  input  logic             g_req,
  input  logic [SRC_W-1:0] g_src,
  input  logic             g_we,
  input  addr_t            g_addr,
  input  line_t            g_wdata,
  output logic             g_ack,
  output line_t            g_rdata,
  output logic             g_err,
  output logic             g_auth_err,
  output logic             gm_req,
  output logic             gm_we,
  output addr_t            gm_addr,
  output line_t            gm_wdata,
  input  logic             gm_ack,
  input  line_t            gm_rdata
);

  // ------------------------------------------------------------------ (A)
  logic                    cfg_clear, cfg_we;
  logic [$clog2(NSEG)-1:0] cfg_idx;
  smm_entry_t              cfg_entry;
  logic                    ld_req, ld_we, h_req, h_we, h_ack;
  addr_t                   ld_addr, h_addr;
  line_t                   ld_wdata, h_wdata;

  secure_loader #(.NSEG(NSEG)) u_loader (
    .clk, .rst_n, .start(load_start), .keep_smm(load_keep_smm), .img_base(load_img_base), .load_key,
    .busy(load_busy), .done(load_done), .ok(app_ok), .app_addr,
    .f_req(flash_req), .f_addr(flash_addr), .f_ack(flash_ack), .f_rdata(flash_rdata),
    .cfg_clear, .cfg_we, .cfg_idx, .cfg_entry,
    .h_req(ld_req), .h_we(ld_we), .h_addr(ld_addr), .h_wdata(ld_wdata), .h_ack);

  // The loader owns the core's cache port while it runs.
  assign h_req   = load_busy ? ld_req   : cpu_req;
  assign h_we    = load_busy ? ld_we    : cpu_we;
  assign h_addr  = load_busy ? ld_addr  : cpu_addr;
  assign h_wdata = load_busy ? ld_wdata : cpu_wdata;
  assign cpu_ack = h_ack && !load_busy;

  hsc #(.NSEG(NSEG), .LINES(LINES), .TAG_W(128)) u_hsc (
    .clk, .rst_n, .key_load, .key, .ready(hsc_ready),
    .cfg_clear, .cfg_we, .cfg_idx, .cfg_entry,
    .c_req(h_req), .c_we(h_we), .c_addr(h_addr), .c_wdata(h_wdata),
    .c_ack(h_ack), .c_rdata(cpu_rdata), .c_auth_err(cpu_auth_err), .c_level(cpu_level),
    .m_req(mem_req), .m_we(mem_we), .m_addr(mem_addr), .m_wdata(mem_wdata),
    .m_ack(mem_ack), .m_rdata(mem_rdata));

  // ------------------------------------------------------------------ (B)
  logic            noc_cfg_valid;
  fw_cfg_t         noc_cfg;
  logic [N_LF-1:0] lf_alarm_valid;
  fw_alarm_t       lf_alarm [N_LF];

  for (genvar i = 0; i < N_LF; i++) begin : g_lf
    local_firewall #(.FW_ID(4'(i + 1)), .N_OUT(4), .N_IN(4)) u_lf (
      .clk, .rst_n,
      .ip_o_valid(lf_ip_o_valid[i]), .ip_o_txn(lf_ip_o_txn[i]),
      .ip_o_ready(lf_ip_o_ready[i]), .ip_o_err(lf_ip_o_err[i]),
      .bus_o_valid(lf_bus_o_valid[i]), .bus_o_txn(lf_bus_o_txn[i]), .bus_o_ready(lf_bus_o_ready[i]),
      .bus_i_valid(lf_bus_i_valid[i]), .bus_i_txn(lf_bus_i_txn[i]),
      .bus_i_ready(lf_bus_i_ready[i]), .bus_i_err(lf_bus_i_err[i]),
      .ip_i_valid(lf_ip_i_valid[i]), .ip_i_txn(lf_ip_i_txn[i]), .ip_i_ready(lf_ip_i_ready[i]),
      .cfg_valid(noc_cfg_valid), .cfg(noc_cfg),
      .alarm_valid(lf_alarm_valid[i]), .alarm(lf_alarm[i]));
  end

  global_firewall #(.N_RULES(N_RULES), .N_LF(N_LF), .LINES(LINES)) u_gf (
    .clk, .rst_n, .sp_cfg_valid, .sp_cfg, .sp_key_load, .sp_key, .ready(gf_ready),
    .noc_cfg_valid, .noc_cfg, .lf_alarm_valid, .lf_alarm, .alarm_count, .last_alarm,
    .g_req, .g_src, .g_we, .g_addr, .g_wdata, .g_ack, .g_rdata, .g_err, .g_auth_err,
    .m_req(gm_req), .m_we(gm_we), .m_addr(gm_addr), .m_wdata(gm_wdata),
    .m_ack(gm_ack), .m_rdata(gm_rdata));

endmodule
