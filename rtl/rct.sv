// rct: run control and trace (RCT) unit of the on-chip debug infrastructure.
//
// Run control. A state machine keeps the CPU in user mode (cpu_halt low) or
// debug mode (cpu_halt high; the CPU finishes the current instruction and
// stops, reporting cpu_halted). Debug mode is entered on a breakpoint, a
// rising edge of EVTI, a halt command, after a single step, or straight out
// of a CPU reset while EVTI is held high. A resume command returns to user
// mode; a step command releases the CPU for exactly one instruction. Each
// entry to and exit from debug mode sends a DEBUG_STATUS message.
//
// Breakpoints. Two program breakpoints compare the address of each executed
// instruction, one data breakpoint the address of each data write and/or
// read. Each has an occurrence count N and fires on every N-th match (N of
// 0 counts as 1); counters restart on CPU reset and on a write to the
// breakpoint registers. A breakpoint set as a watchpoint does not halt the
// CPU: it sends a WATCHPOINT message and pulses its wp_hit line (to the FI
// module). Any hit pulses evt_hit (EVTO). Program breakpoints halt after the
// matching instruction has started.
//
// Trace. With program trace on, the first instruction after a taken branch
// (cpu_flow) or exception (cpu_exc) sends a PROG_TRACE message with the
// target address and the number of instructions executed from the
// previously traced one (included) up to this one (excluded). With data trace on, each CPU write sends a DATA_TRACE
// message with address and data.
//
// Timing: bus inputs are sampled on the clock edge; wp_hit, evt_hit,
// cpu_halt and the messages (one-clock msg_valid pulses) are registered, one
// clock after the bus event. Registers are written through reg_we/reg_idx
// from the read/write unit and read combinationally on reg_rdata.
//
// The features (run control, two program and one data breakpoint with N-th
// occurrence, watchpoints, branch/exception program trace, write data trace,
// EVTI/EVTO) are those of the described infrastructure. The register map, the
// CPU-side signals and the post-instruction halt are this design's own.
module rct
  import ocd_pkg::*;
#(
  parameter int ADDR_W = 16,
  parameter int DATA_W = 8,
  parameter int RW_W   = 16,
  parameter int CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU bus snooping
  input  logic              cpu_rst,
  input  logic              cpu_retire,   // an instruction starts executing at cpu_pc
  input  logic [ADDR_W-1:0] cpu_pc,
  input  logic              cpu_flow,     // it was reached by a taken branch
  input  logic              cpu_exc,      // it was reached by an exception
  input  logic              cpu_dwe,
  input  logic              cpu_dre,
  input  logic [ADDR_W-1:0] cpu_daddr,
  input  logic [DATA_W-1:0] cpu_dwdata,
  // run control
  output logic              cpu_halt,
  input  logic              cpu_halted,
  input  logic              evti,
  output logic              evt_hit,
  output logic              debug_mode,
  // register access from the read/write unit
  input  logic              reg_we,
  input  logic [7:0]        reg_idx,
  input  logic [RW_W-1:0]   reg_wdata,
  output logic [RW_W-1:0]   reg_rdata,
  // watchpoint hits to the FI module
  output logic [NUM_BP-1:0] wp_hit,
  // messages to the message manager
  output nexus_msg_t        msg       [NUM_RCT_SRC],
  output logic [NUM_RCT_SRC-1:0] msg_valid
);
  typedef enum logic [1:0] {ST_RESET, ST_RUN, ST_DEBUG, ST_STEP} rc_state_e;

  rc_state_e         state;
  logic [1:0]        dc;
  logic [7:0]        ds;
  logic [ADDR_W-1:0] bp_addr [NUM_BP];
  logic [CNT_W-1:0]  bp_n    [NUM_BP];
  logic [CNT_W-1:0]  bp_cnt  [NUM_BP];
  logic [7:0]        bpctl;
  logic [RW_W-1:0]   icnt;
  logic              evti_q;

  // Breakpoint matching.
  logic [NUM_BP-1:0] match, fire;
  always_comb begin
    match[0] = bpctl[0] && cpu_retire && cpu_pc == bp_addr[0];
    match[1] = bpctl[2] && cpu_retire && cpu_pc == bp_addr[1];
    match[2] = bpctl[4] && cpu_daddr == bp_addr[2] &&
               ((cpu_dwe && bpctl[6]) || (cpu_dre && bpctl[7]));
    for (int i = 0; i < NUM_BP; i++)
      fire[i] = match[i] && (32'(bp_cnt[i]) + 1 >= ((bp_n[i] == '0) ? 32'd1 : 32'(bp_n[i])));
  end

  logic [NUM_BP-1:0] is_watch, halt_fire, watch_fire;
  assign is_watch   = {bpctl[5], bpctl[3], bpctl[1]};
  assign watch_fire = fire & is_watch;
  assign halt_fire  = fire & ~is_watch;

  // Run control commands.
  logic cmd_halt, cmd_resume, cmd_step, evti_rise, bp_write;
  assign cmd_halt   = reg_we && reg_idx == REG_RC && reg_wdata[0];
  assign cmd_resume = reg_we && reg_idx == REG_RC && reg_wdata[1];
  assign cmd_step   = reg_we && reg_idx == REG_RC && reg_wdata[2];
  assign evti_rise  = evti && !evti_q;
  assign bp_write   = reg_we && reg_idx >= REG_PB0A && reg_idx <= REG_BPCTL;

  // Next state and the cause of a debug entry.
  rc_state_e nstate;
  logic [7:0] cause;
  always_comb begin
    nstate = state;
    cause  = '0;
    cause[DS_PB0] = halt_fire[0];
    cause[DS_PB1] = halt_fire[1];
    cause[DS_DB]  = halt_fire[2];
    cause[DS_EVTI] = evti_rise;
    cause[DS_CMD]  = cmd_halt;
    unique case (state)
      ST_RESET: nstate = evti ? ST_DEBUG : ST_RUN;
      ST_RUN:   if (|cause) nstate = ST_DEBUG;
      ST_STEP:  if (|cause || cpu_retire) nstate = ST_DEBUG;
      ST_DEBUG: if (cmd_step) nstate = ST_STEP; else if (cmd_resume) nstate = ST_RUN;
    endcase
    if (state == ST_RESET) cause[DS_EVTI] = evti;
    if (state == ST_STEP && cpu_retire) cause[DS_STEP] = 1'b1;
    if (cpu_rst) nstate = ST_RESET;
  end

  logic enter_debug, leave_debug;
  assign enter_debug = nstate == ST_DEBUG && state != ST_DEBUG;
  assign leave_debug = nstate != ST_DEBUG && state == ST_DEBUG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_RESET;
      dc        <= '0;
      ds        <= '0;
      bpctl     <= '0;
      icnt      <= '0;
      evti_q    <= 1'b0;
      cpu_halt  <= 1'b1;
      wp_hit    <= '0;
      evt_hit   <= 1'b0;
      msg_valid <= '0;
      for (int i = 0; i < NUM_BP; i++) begin
        bp_addr[i] <= '0;
        bp_n[i]    <= '0;
        bp_cnt[i]  <= '0;
      end
      for (int i = 0; i < NUM_RCT_SRC; i++) msg[i] <= '0;
    end else begin
      state    <= nstate;
      evti_q   <= evti;
      cpu_halt <= (nstate == ST_DEBUG) || (nstate == ST_RESET);
      wp_hit   <= watch_fire;
      evt_hit  <= |fire;
      msg_valid <= '0;

      // configuration registers
      if (reg_we) begin
        case (reg_idx)
          REG_DC:    dc         <= reg_wdata[1:0];
          REG_PB0A:  bp_addr[0] <= ADDR_W'(reg_wdata);
          REG_PB0N:  bp_n[0]    <= CNT_W'(reg_wdata);
          REG_PB1A:  bp_addr[1] <= ADDR_W'(reg_wdata);
          REG_PB1N:  bp_n[1]    <= CNT_W'(reg_wdata);
          REG_DBA:   bp_addr[2] <= ADDR_W'(reg_wdata);
          REG_DBN:   bp_n[2]    <= CNT_W'(reg_wdata);
          REG_BPCTL: bpctl      <= reg_wdata[7:0];
          default: ;
        endcase
      end

      // occurrence counters
      for (int i = 0; i < NUM_BP; i++) begin
        if (cpu_rst || bp_write) bp_cnt[i] <= '0;
        else if (fire[i])        bp_cnt[i] <= '0;
        else if (match[i])       bp_cnt[i] <= bp_cnt[i] + 1'b1;
      end

      // debug status and its message
      if (enter_debug) begin
        ds <= cause;
        ds[DS_DEBUG] <= 1'b1;
      end else if (leave_debug) begin
        ds <= '0;
      end else begin
        ds[DS_HALTED] <= cpu_halted;
      end
      if (enter_debug || leave_debug) begin
        msg[SRC_STATUS].tcode <= TC_DEBUG_STATUS;
        msg[SRC_STATUS].idx   <= enter_debug ? (cause | 8'(1 << DS_DEBUG)) : 8'h00;
        msg[SRC_STATUS].addr  <= '0;
        msg[SRC_STATUS].data  <= '0;
        msg_valid[SRC_STATUS] <= 1'b1;
      end

      // watchpoint message
      if (|watch_fire) begin
        msg[SRC_WP].tcode <= TC_WATCHPOINT;
        msg[SRC_WP].idx   <= 8'(watch_fire);
        msg[SRC_WP].addr  <= '0;
        msg[SRC_WP].data  <= '0;
        msg_valid[SRC_WP] <= 1'b1;
      end

      // program trace
      if (cpu_rst) begin
        icnt <= '0;
      end else if (cpu_retire) begin
        if (dc[0] && (cpu_flow || cpu_exc)) begin
          msg[SRC_PTRACE].tcode <= TC_PROG_TRACE;
          msg[SRC_PTRACE].idx   <= {7'd0, cpu_exc};
          msg[SRC_PTRACE].addr  <= 32'(cpu_pc);
          msg[SRC_PTRACE].data  <= 32'(icnt);
          msg_valid[SRC_PTRACE] <= 1'b1;
          icnt <= RW_W'(1);
        end
        else if (icnt != '1) icnt <= icnt + 1'b1;
      end

      // data trace
      if (dc[1] && cpu_dwe) begin
        msg[SRC_DTRACE].tcode <= TC_DATA_TRACE;
        msg[SRC_DTRACE].idx   <= '0;
        msg[SRC_DTRACE].addr  <= 32'(cpu_daddr);
        msg[SRC_DTRACE].data  <= 32'(cpu_dwdata);
        msg_valid[SRC_DTRACE] <= 1'b1;
      end
    end
  end

  assign debug_mode = (state == ST_DEBUG);

  always_comb begin
    reg_rdata = '0;
    case (reg_idx)
      REG_DC:    reg_rdata = RW_W'(dc);
      REG_DS:    reg_rdata = RW_W'(ds);
      REG_PB0A:  reg_rdata = RW_W'(bp_addr[0]);
      REG_PB0N:  reg_rdata = RW_W'(bp_n[0]);
      REG_PB1A:  reg_rdata = RW_W'(bp_addr[1]);
      REG_PB1N:  reg_rdata = RW_W'(bp_n[1]);
      REG_DBA:   reg_rdata = RW_W'(bp_addr[2]);
      REG_DBN:   reg_rdata = RW_W'(bp_n[2]);
      REG_BPCTL: reg_rdata = RW_W'(bpctl);
      default: ;
    endcase
  end
endmodule
