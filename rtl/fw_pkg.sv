// fw_pkg: types shared by the local and global firewalls.
//
// A firewall holds security rules. A rule covers one address section and
// says which accesses are allowed there: read and write rights, the allowed
// data formats (access sizes), the sources that may reach it, the range of
// data values that may be written, and, for the global firewall, the
// protection the section gets in external memory. Firewalls report every
// refused access as an alarm and are reconfigured over their own network.
//
// The kinds of rule and of alarm follow the design's list of security-policy
// parameters and its tables of checks; the field widths and encodings are this
// implementation's own.
package fw_pkg;

  localparam int unsigned SRC_W = 3;   // up to 8 firewalled IPs

  // Access size of a bus transaction.
  typedef enum logic [1:0] { SZ_BYTE = 2'd0, SZ_HALF = 2'd1, SZ_WORD = 2'd2 } size_e;

  typedef struct packed {
    logic [SRC_W-1:0] src;    // source ID, stamped by the source's firewall
    logic             we;
    size_e            size;
    logic [31:0]      addr;
    logic [31:0]      data;
  } bus_txn_t;

  typedef struct packed {
    logic              valid;
    logic [31:0]       base;    // first address of the section
    logic [31:0]       last;    // last address of the section
    logic              rd_ok;
    logic              wr_ok;
    logic [2:0]        fmt_ok;  // allowed sizes, bit per size_e value
    logic [(1<<SRC_W)-1:0] src_ok;  // allowed source IDs
    logic [31:0]       vmin;    // allowed written values, inclusive
    logic [31:0]       vmax;
    logic [1:0]        level;   // external-memory protection (global firewall)
  } fw_rule_t;

  typedef enum logic [2:0] {
    ALM_NONE       = 3'd0,
    ALM_NO_SECTION = 3'd1,   // target address / section does not exist
    ALM_RW         = 3'd2,   // read/write right violated
    ALM_FORMAT     = 3'd3,   // data format not allowed
    ALM_SOURCE     = 3'd4,   // source ID not allowed
    ALM_VALUE      = 3'd5    // written value out of range
  } alarm_e;

  // Reconfiguration message on the firewall network.
  typedef struct packed {
    logic [3:0] fw_id;   // destination firewall, 0 is the global firewall
    logic       tbl_in;  // local firewall: 1 = target-side table, 0 = source side
    logic [3:0] idx;     // rule number
    fw_rule_t   rule;
  } fw_cfg_t;

  typedef struct packed {
    logic [3:0]       fw_id;
    alarm_e           code;
    logic [SRC_W-1:0] src;
    logic [31:0]      addr;
  } fw_alarm_t;

  // Section lookup: index of the first valid rule containing `addr`.
  function automatic logic rule_hit(input fw_rule_t r, input logic [31:0] addr);
    return r.valid && addr >= r.base && addr <= r.last;
  endfunction

endpackage
