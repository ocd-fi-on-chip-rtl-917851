// ocd_pkg: types and constants shared by the on-chip debug and fault
// injection (OCD-FI) infrastructure and the campaign debugger.
//
// It holds the NEXUS-style message format, the message start/end (MSEO/MSEI)
// encoding, the debug register map and the campaign command format.
//
// A message is a 6-bit transfer code (TCODE) followed by up to three
// packets: IDX (8 bits, a register index, a status byte or a source mask),
// ADDR and DATA. Which packets follow a TCODE is fixed by msg_fields(). The
// message-based protocol with a TCODE and packets, and the start/end signalling
// of packets and messages, follow the NEXUS port described for the design. The
// TCODE numbers, the packet layout, the MSEO encoding and the register map are
// this design's own choices.
package ocd_pkg;

  localparam int TCODE_W     = 6;
  localparam int IDX_W       = 8;
  localparam int FIELD_MAX_W = 32;   // widest ADDR or DATA packet carried
  localparam int NUM_BP      = 3;    // two program and one data breakpoint

  // Transfer codes. Output messages travel from the target, input messages
  // (REG_READ, REG_WRITE, FI_*) travel to it.
  localparam logic [5:0] TC_DEBUG_STATUS = 6'd0;   // out: IDX = debug status
  localparam logic [5:0] TC_DEVICE_ID    = 6'd1;   // out: DATA = device id
  localparam logic [5:0] TC_PROG_TRACE   = 6'd4;   // out: IDX = branch type, ADDR = target, DATA = instr count
  localparam logic [5:0] TC_DATA_TRACE   = 6'd5;   // out: ADDR, DATA of a CPU write
  localparam logic [5:0] TC_ERROR        = 6'd8;   // out: IDX = error flags
  localparam logic [5:0] TC_WATCHPOINT   = 6'd15;  // out: IDX = watchpoint mask
  localparam logic [5:0] TC_REG_READ     = 6'd16;  // in : IDX = register
  localparam logic [5:0] TC_REG_WRITE    = 6'd17;  // in : IDX = register, DATA
  localparam logic [5:0] TC_REG_VALUE    = 6'd18;  // out: IDX = register, DATA
  localparam logic [5:0] TC_FI_SETUP     = 6'd56;  // in : ADDR, DATA loaded into RAW
  localparam logic [5:0] TC_FI_ENABLE    = 6'd57;  // in : IDX = watchpoint mask
  localparam logic [5:0] TC_FI_DISABLE   = 6'd58;  // in : no packet

  typedef struct packed {
    logic [TCODE_W-1:0]     tcode;
    logic [IDX_W-1:0]       idx;
    logic [FIELD_MAX_W-1:0] addr;
    logic [FIELD_MAX_W-1:0] data;
  } nexus_msg_t;

  typedef struct packed {
    logic has_idx;
    logic has_addr;
    logic has_data;
  } msg_fields_t;

  function automatic msg_fields_t msg_fields(logic [TCODE_W-1:0] tc);
    msg_fields_t f;
    case (tc)
      TC_DEBUG_STATUS, TC_ERROR, TC_WATCHPOINT,
      TC_REG_READ, TC_FI_ENABLE:        f = '{has_idx: 1'b1, has_addr: 1'b0, has_data: 1'b0};
      TC_DEVICE_ID:                     f = '{has_idx: 1'b0, has_addr: 1'b0, has_data: 1'b1};
      TC_PROG_TRACE:                    f = '{has_idx: 1'b1, has_addr: 1'b1, has_data: 1'b1};
      TC_DATA_TRACE, TC_FI_SETUP:       f = '{has_idx: 1'b0, has_addr: 1'b1, has_data: 1'b1};
      TC_REG_WRITE, TC_REG_VALUE:       f = '{has_idx: 1'b1, has_addr: 1'b0, has_data: 1'b1};
      default:                          f = '{has_idx: 1'b0, has_addr: 1'b0, has_data: 1'b0};
    endcase
    return f;
  endfunction

  // Message start/end signalling, one code per port clock.
  typedef enum logic [1:0] {
    MSEO_DATA    = 2'b00,   // a beat inside a packet
    MSEO_END_PKT = 2'b01,   // last beat of a packet, more packets follow
    MSEO_END_MSG = 2'b10,   // last beat of the last packet of the message
    MSEO_IDLE    = 2'b11    // no message
  } mseo_e;

  // Debug register indices (IDX packet of REG_READ / REG_WRITE).
  localparam logic [7:0] REG_DID   = 8'h00;  // device id, read only
  localparam logic [7:0] REG_DC    = 8'h01;  // [0] program trace en, [1] data trace en
  localparam logic [7:0] REG_RC    = 8'h02;  // write only: [0] halt, [1] resume, [2] step
  localparam logic [7:0] REG_DS    = 8'h03;  // debug status, read only
  localparam logic [7:0] REG_PB0A  = 8'h04;  // program breakpoint 0 address
  localparam logic [7:0] REG_PB0N  = 8'h05;  // program breakpoint 0 occurrence count
  localparam logic [7:0] REG_PB1A  = 8'h06;
  localparam logic [7:0] REG_PB1N  = 8'h07;
  localparam logic [7:0] REG_DBA   = 8'h08;  // data breakpoint address
  localparam logic [7:0] REG_DBN   = 8'h09;
  localparam logic [7:0] REG_BPCTL = 8'h0A;  // per breakpoint {watch, enable}, [6] db on write, [7] db on read
  localparam logic [7:0] REG_RWCS  = 8'h10;  // RAW control/status
  localparam logic [7:0] REG_RWA   = 8'h11;  // RAW address
  localparam logic [7:0] REG_RWD   = 8'h12;  // RAW data
  localparam logic [7:0] REG_FIS   = 8'h18;  // FI status, read only

  // RWCS bits.
  localparam int RWCS_START = 0;   // write 1: run the access now
  localparam int RWCS_WRITE = 1;   // 1 write, 0 read
  localparam int RWCS_CPU   = 2;   // 1 CPU register, 0 memory
  localparam int RWCS_DONE  = 3;   // read only: last access finished
  localparam int RWCS_ERR   = 4;   // read only: CPU register access while CPU not halted

  // Debug status (DS) bits, also the IDX of a DEBUG_STATUS message.
  localparam int DS_DEBUG  = 0;
  localparam int DS_HALTED = 1;
  localparam int DS_PB0    = 2;
  localparam int DS_PB1    = 3;
  localparam int DS_DB     = 4;
  localparam int DS_EVTI   = 5;
  localparam int DS_CMD    = 6;
  localparam int DS_STEP   = 7;

  // ERROR message IDX bits.
  localparam int ERR_OVF_OUT = 0;  // a message was lost: its source slot was full
  localparam int ERR_OVF_IN  = 1;  // an input message was lost: input queue full
  localparam int ERR_PROTO   = 2;  // malformed input message

  // Message sources of the run control and trace unit, in MMQ priority order.
  localparam int SRC_WP     = 0;
  localparam int SRC_STATUS = 1;
  localparam int SRC_PTRACE = 2;
  localparam int SRC_DTRACE = 3;
  localparam int NUM_RCT_SRC = 4;

  // Campaign command memory entry.
  typedef enum logic [2:0] {
    CMD_SEND  = 3'd0,   // send msg to the target
    CMD_WAIT  = 3'd1,   // wait for an output message with msg.tcode; msg.data = timeout (0: none)
    CMD_RESET = 3'd2,   // hold the target CPU in reset for msg.data cycles (at least 1)
    CMD_DELAY = 3'd3,   // wait msg.data cycles
    CMD_END   = 3'd4    // campaign finished
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e    op;
    nexus_msg_t msg;
  } campaign_cmd_t;

  // Result memory entry: every message received from the target, and a
  // marker for each WAIT that timed out.
  typedef struct packed {
    logic       timeout;
    logic [15:0] stamp;     // cycles since the campaign started
    nexus_msg_t msg;
  } campaign_res_t;

endpackage
