// ocd_fi: on-chip debugging and fault injection (OCD-FI) infrastructure.
//
// A NEXUS-style class 2 debug unit for a small CPU, extended with a fault
// injection module. Four units are wired together:
//   mmq  message handler and queues behind the NEXUS port (mdi/msei in,
//        mdo/mseo out, evti, evto);
//   rw   debug register hub and RAW access engine, with a real-time port to
//        the target memory and a port to the CPU registers;
//   rct  run control, breakpoints/watchpoints and program/data trace,
//        snooping the CPU buses and driving cpu_halt;
//   fi   arms on an FI_ENABLE message and, on the next selected watchpoint
//        hit, fires the RAW write preloaded by FI_SETUP.
// The FI path is rct.wp_hit -> fi.trigger -> rw memory port: a watchpoint
// condition on the CPU bus in clock t is written into memory at the end of
// clock t+1, two clocks in all, without any message traffic.
//
// RW_W, the width of register values and of the DATA packet, is the larger
// of ADDR_W and DATA_W. cpu_rst is the target CPU reset (the debug unit keeps
// its set-up across it); rst_n is the debug unit's own reset (RSTI).
//
// The partition into these units and their links follows the described
// infrastructure; widths and queue sizes are this design's defaults for the
// 8-bit CPU configuration.
module ocd_fi
  import ocd_pkg::*;
#(
  parameter int          ADDR_W    = 16,
  parameter int          DATA_W    = 8,
  parameter int          MDI_W     = 8,
  parameter int          MDO_W     = 8,
  parameter int          IQ_DEPTH  = 4,
  parameter int          OQ_DEPTH  = 8,
  parameter int          CNT_W     = 16,
  parameter int          CREG_W    = 8,
  parameter logic [31:0] DEVICE_ID = 32'h0CD0_F101
) (
  input  logic              clk,
  input  logic              rst_n,
  // NEXUS port
  input  logic [MDI_W-1:0]  mdi,
  input  mseo_e             msei,
  output logic [MDO_W-1:0]  mdo,
  output mseo_e             mseo,
  input  logic              evti,
  output logic              evto,
  // CPU buses (snooped) and run control
  input  logic              cpu_rst,
  input  logic              cpu_retire,
  input  logic [ADDR_W-1:0] cpu_pc,
  input  logic              cpu_flow,
  input  logic              cpu_exc,
  input  logic              cpu_dwe,
  input  logic              cpu_dre,
  input  logic [ADDR_W-1:0] cpu_daddr,
  input  logic [DATA_W-1:0] cpu_dwdata,
  output logic              cpu_halt,
  input  logic              cpu_halted,
  // CPU register port
  output logic              creg_en,
  output logic              creg_we,
  output logic [CREG_W-1:0] creg_addr,
  output logic [DATA_W-1:0] creg_wdata,
  input  logic [DATA_W-1:0] creg_rdata,
  // target memory debug port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // observation
  output logic              debug_mode,
  output logic              fi_trigger,
  output logic [NUM_BP-1:0] wp_hit,
  output logic [2:0]        err_seen,
  output logic              rw_done
);
  localparam int RW_W = (ADDR_W > DATA_W) ? ADDR_W : DATA_W;

  logic                   rct_evti, rct_evt_hit;
  nexus_msg_t             rct_msg [NUM_RCT_SRC];
  logic [NUM_RCT_SRC-1:0] rct_msg_valid;
  logic                   reg_we;
  logic [7:0]             reg_idx;
  logic [RW_W-1:0]        reg_wdata, reg_rdata;
  logic                   fi_setup, fi_en, fi_dis;
  logic [ADDR_W-1:0]      fi_addr;
  logic [DATA_W-1:0]      fi_data;
  logic [NUM_BP-1:0]      fi_mask;
  logic [7:0]             fi_status;
  logic                   rct_we;
  logic [RW_W-1:0]        rct_wdata, rct_rdata;

  mmq #(
    .MDI_W(MDI_W), .MDO_W(MDO_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .RW_W(RW_W),
    .IQ_DEPTH(IQ_DEPTH), .OQ_DEPTH(OQ_DEPTH)
  ) u_mmq (
    .clk, .rst_n, .mdi, .msei, .mdo, .mseo, .evti, .evto,
    .rct_evti, .rct_evt_hit, .rct_msg, .rct_msg_valid,
    .reg_we, .reg_idx, .reg_wdata, .reg_rdata,
    .fi_setup, .fi_addr, .fi_data, .fi_en, .fi_mask, .fi_dis, .err_seen
  );

  rw #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .RW_W(RW_W), .CREG_W(CREG_W), .DEVICE_ID(DEVICE_ID)
  ) u_rw (
    .clk, .rst_n, .reg_we, .reg_idx, .reg_wdata, .reg_rdata,
    .fi_setup, .fi_addr, .fi_data, .fi_trigger, .fi_status,
    .rct_we, .rct_wdata, .rct_rdata,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .cpu_halted, .creg_en, .creg_we, .creg_addr, .creg_wdata, .creg_rdata,
    .access_done(rw_done)
  );

  rct #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .RW_W(RW_W), .CNT_W(CNT_W)
  ) u_rct (
    .clk, .rst_n, .cpu_rst, .cpu_retire, .cpu_pc, .cpu_flow, .cpu_exc,
    .cpu_dwe, .cpu_dre, .cpu_daddr, .cpu_dwdata,
    .cpu_halt, .cpu_halted, .evti(rct_evti), .evt_hit(rct_evt_hit), .debug_mode,
    .reg_we(rct_we), .reg_idx, .reg_wdata(rct_wdata), .reg_rdata(rct_rdata),
    .wp_hit, .msg(rct_msg), .msg_valid(rct_msg_valid)
  );

  fi #(.NWP(NUM_BP)) u_fi (
    .clk, .rst_n, .wp_hit, .en_cmd(fi_en), .en_mask(fi_mask), .dis_cmd(fi_dis),
    .trigger(fi_trigger), .status(fi_status)
  );
endmodule
