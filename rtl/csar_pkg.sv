// csar_pkg: types and constants shared by the CSAR debug SOC.
//
// Every port between a processor, the interconnect and a memory is a pair of
// valid/accept channels: a request channel (address, write enable, write data)
// and a response channel (read data, one response per request, also for
// writes). A transfer happens in the cycle where valid and accept are both
// high; that single-cycle event is the "handshake" the debug infrastructure
// counts and stops on. The widths, the address map and the register map below
// are this design's own choices.
package csar_pkg;

  localparam int unsigned ADDR_W = 16;  // word address
  localparam int unsigned DATA_W = 32;

  // Address map (word addresses): region = addr[15:14]
  //   2'b00 local tightly coupled memory of the tile
  //   2'b01 CMEM (code memory tile)
  //   2'b10 / 2'b11 DMEM (data memory tile)
  localparam logic [1:0] REG_LOCAL = 2'b00;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              we;
    logic [DATA_W-1:0] wdata;
  } req_t;

  typedef struct packed {
    logic [DATA_W-1:0] rdata;
  } rsp_t;

  localparam int unsigned REQ_W = $bits(req_t);
  localparam int unsigned RSP_W = $bits(rsp_t);

  // Monitor configuration word (written through the TAP)
  typedef struct packed {
    logic        arm_wait;  // count only once the distributed arm event is high
    logic        arm_out;   // on a hit raise the arm event instead of the stop event
    logic        clear;     // reset the handshake counter and the events
    logic        chan_rsp;  // 0: count request handshakes, 1: response handshakes
    logic        enable;    // raise the event at handshake number bp_count
    logic [15:0] bp_count;
  } mon_cfg_t;

  // PSI modes
  typedef enum logic [1:0] {
    PSI_RUN  = 2'd0,  // pass all handshakes (unless a debug event stops it)
    PSI_STOP = 2'd1,  // inhibit all handshakes
    PSI_STEP = 2'd2   // pass step_n more request handshakes, then inhibit
  } psi_mode_e;

  typedef struct packed {
    logic        event_en;  // stop when the distributed debug event is raised
    psi_mode_e   mode;
    logic [15:0] step_n;
  } psi_cfg_t;

  localparam int unsigned MON_CFG_W = $bits(mon_cfg_t);
  localparam int unsigned PSI_CFG_W = $bits(psi_cfg_t);

  // Number of monitored interfaces in the SOC of three processor tiles
  // (instruction and data port each) and two memory tiles.
  localparam int unsigned N_IF = 8;

endpackage
