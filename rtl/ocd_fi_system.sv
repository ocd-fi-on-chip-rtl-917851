// ocd_fi_system: fault injection platform around a target CPU.
//
// Puts together everything next to the target CPU that a fault injection
// campaign needs: the OCD-FI debug and fault injection infrastructure
// (ocd_fi), the target data RAM (dp_ram) with one port for the CPU and one
// for the debug unit, and the campaign debugger (campaign_ctrl) that plays
// a stored command list into the debug unit's NEXUS port and records the
// messages coming back. The CPU itself is outside: its data bus, its
// instruction-execution strobe, its run control and its register port are
// ports of this module.
//
// Data flow of one injection run: the debugger resets the CPU (cpu_rst),
// sets a watchpoint on the trigger instruction, preloads the RAW registers
// with the faulty word (FI_SETUP) and arms the FI module (FI_ENABLE). When
// the CPU executes the trigger instruction, the FI module writes the word
// into the RAM through the debug port two clocks later, with the CPU still
// running, and the trace and error messages of the run end up in the
// result memory.
//
// The CPU data bus addresses the RAM directly: the low MEM_AW address bits
// select the word. The NEXUS port between debugger and debug unit is
// brought out for observation. All logic runs on clk; rst_n resets the debug
// unit and the debugger (NEXUS reset), cpu_rst only the CPU.
module ocd_fi_system
  import ocd_pkg::*;
#(
  parameter int ADDR_W = 16,
  parameter int DATA_W = 8,
  parameter int MEM_AW = 12,
  parameter int MDI_W  = 8,
  parameter int MDO_W  = 8,
  parameter int CREG_W = 8,
  parameter int CMD_AW = 8,
  parameter int RES_AW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // target CPU
  output logic              cpu_rst,
  output logic              cpu_halt,
  input  logic              cpu_halted,
  input  logic              cpu_retire,
  input  logic [ADDR_W-1:0] cpu_pc,
  input  logic              cpu_flow,
  input  logic              cpu_exc,
  input  logic              cpu_dwe,
  input  logic              cpu_dre,
  input  logic [ADDR_W-1:0] cpu_daddr,
  input  logic [DATA_W-1:0] cpu_dwdata,
  output logic [DATA_W-1:0] cpu_drdata,
  output logic              creg_en,
  output logic              creg_we,
  output logic [CREG_W-1:0] creg_addr,
  output logic [DATA_W-1:0] creg_wdata,
  input  logic [DATA_W-1:0] creg_rdata,
  // event pins
  input  logic              evti,
  output logic              evto,
  // campaign host side
  input  logic              cmd_we,
  input  logic [CMD_AW-1:0] cmd_waddr,
  input  campaign_cmd_t     cmd_wdata,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [RES_AW-1:0] res_raddr,
  output campaign_res_t     res_rdata,
  output logic [RES_AW:0]   res_count,
  output logic              res_full,
  // observation
  output logic [MDI_W-1:0]  nexus_mdi,
  output mseo_e             nexus_msei,
  output logic [MDO_W-1:0]  nexus_mdo,
  output mseo_e             nexus_mseo,
  output logic              debug_mode,
  output logic              fi_trigger,
  output logic [NUM_BP-1:0] wp_hit,
  output logic [2:0]        err_seen,
  output logic              rw_done
);
  localparam int RW_W = (ADDR_W > DATA_W) ? ADDR_W : DATA_W;

  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  ocd_fi #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .MDI_W(MDI_W), .MDO_W(MDO_W), .CREG_W(CREG_W)
  ) u_ocd (
    .clk, .rst_n,
    .mdi(nexus_mdi), .msei(nexus_msei), .mdo(nexus_mdo), .mseo(nexus_mseo),
    .evti, .evto,
    .cpu_rst, .cpu_retire, .cpu_pc, .cpu_flow, .cpu_exc,
    .cpu_dwe, .cpu_dre, .cpu_daddr, .cpu_dwdata, .cpu_halt, .cpu_halted,
    .creg_en, .creg_we, .creg_addr, .creg_wdata, .creg_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .debug_mode, .fi_trigger, .wp_hit, .err_seen, .rw_done
  );

  dp_ram #(.DATA_W(DATA_W), .AW(MEM_AW)) u_ram (
    .clk,
    .a_en(cpu_dwe || cpu_dre), .a_we(cpu_dwe), .a_addr(cpu_daddr[MEM_AW-1:0]),
    .a_wdata(cpu_dwdata), .a_rdata(cpu_drdata),
    .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr[MEM_AW-1:0]),
    .b_wdata(mem_wdata), .b_rdata(mem_rdata)
  );

  campaign_ctrl #(
    .ADDR_W(ADDR_W), .RW_W(RW_W), .MDI_W(MDI_W), .MDO_W(MDO_W), .CMD_AW(CMD_AW), .RES_AW(RES_AW)
  ) u_dbg (
    .clk, .rst_n, .cmd_we, .cmd_waddr, .cmd_wdata, .start, .busy, .done,
    .res_raddr, .res_rdata, .res_count, .res_full,
    .tgt_rst(cpu_rst), .tgt_mdi(nexus_mdi), .tgt_msei(nexus_msei),
    .tgt_mdo(nexus_mdo), .tgt_mseo(nexus_mseo)
  );
endmodule
