// mon_pkg -- types and constants shared by the blocks of the hardware
// monitoring system.
//
// The monitoring system is built from sniffers (an Event Instance Generator
// followed by one or more Data CAPturer and Filter units), a Local Monitoring
// Information Collector that holds the control, initialisation and result
// registers, a Data Collector Interface that exposes those registers on an
// AXI4-Lite bus, and an interrupt controller.
//
// Two records travel between the blocks:
//   * the event instance (event data good, EVENT INCREMENT, EVENT DATA), the
//     interconnect-independent output of every EIG, and
//   * the monitoring information (Wack, Catch, event attribute, metric ID,
//     sniffer ID, result), the output of every DCAPF.
// The field order of both follows the published structure, most significant
// field first.  The field widths are this design's choice: 32-bit event data
// (an AXI address or a 32-bit bus word), a 16-bit increment (enough for the
// byte count of one AXI4 burst) and a 64-bit result (enough for the 53-bit
// time counter).
//
// The programming code of a sniffer (two bits per sniffer in the LMIC
// control register) follows the published table: 00 idle, 01 init,
// 10 filtering, 11 no-filtering.
package mon_pkg;

  localparam int unsigned EV_DATA_W = 32;
  localparam int unsigned EV_INC_W  = 16;
  localparam int unsigned RES_W     = 64;
  localparam int unsigned ID_W      = 4;
  localparam int unsigned REG_W     = 32;

  typedef enum logic [1:0] {
    PROG_IDLE   = 2'b00,
    PROG_INIT   = 2'b01,
    PROG_FILT   = 2'b10,
    PROG_NOFILT = 2'b11
  } prog_e;

  // Event instance: event data good, EVENT INCREMENT, EVENT DATA.
  typedef struct packed {
    logic                 good;
    logic [EV_INC_W-1:0]  inc;
    logic [EV_DATA_W-1:0] data;
  } event_inst_t;

  // Monitoring information of one DCAPF.
  typedef struct packed {
    logic                 wack;
    logic                 catch_s;
    logic [EV_DATA_W-1:0] attr;
    logic [ID_W-1:0]      metric_id;
    logic [ID_W-1:0]      sniffer_id;
    logic [RES_W-1:0]     result;
  } mon_info_t;

  // Control that the dispenser of a sniffer hands to each of its DCAPFs.
  typedef struct packed {
    logic             en;        // run, and the sniffer is filtering or not
    logic             filt;      // sniffer in FILTERING mode
    logic             srst;      // soft reset, sniffer not idle
    logic             wr_inf;    // load init value as lower bound
    logic             wr_sup;    // load init value as upper bound
    logic [REG_W-1:0] init_val;
  } dcapf_ctrl_t;

  localparam event_inst_t EV_NONE = '{good: 1'b0, inc: '0, data: '0};

  // Register map of the evaluated configuration: one LMIC, four sniffers,
  // sixteen 32-bit registers.
  localparam int unsigned DCI_REGS       = 16;
  localparam int unsigned REG_CTRL       = 0;   // run, soft reset, PROG
  localparam int unsigned REG_INIT0      = 1;   // init reg of sniffer 1..4
  localparam int unsigned REG_TRANS      = 5;   // transaction bytes
  localparam int unsigned REG_TASK_LO    = 6;   // task cycles [31:0]
  localparam int unsigned REG_TASK_HI    = 7;   // task cycles [52:32]
  localparam int unsigned REG_OPER       = 8;   // two 10-bit event counts
  localparam int unsigned REG_TS_COUNT   = 9;   // timestamps taken
  localparam int unsigned REG_TS         = 10;  // write: take timestamp
  localparam int unsigned REG_WACK       = 11;  // Wack of every DCAPF
  localparam int unsigned REG_IRQ_PEND   = 12;  // write 1 to clear
  localparam int unsigned REG_IRQ_EN     = 13;
  localparam int unsigned REG_IRQ_THR    = 14;
  localparam int unsigned LMIC_REGS      = 12;  // registers 0..11

  // Sniffer control-register bit positions (Fig. 6.a layout).
  localparam int unsigned CTRL_RUN  = 0;
  localparam int unsigned CTRL_SRST = 1;
  function automatic int unsigned ctrl_prog_lsb(int unsigned sniffer);
    return 2 + 2 * sniffer;   // sniffer counted from 0
  endfunction

endpackage
