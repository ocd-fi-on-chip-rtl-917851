// rw: read/write (RW) unit of the on-chip debug infrastructure.
//
// It is the hub for all register access coming from the message manager:
// its own RAW registers (RWCS control/status, RWA address, RWD data), the
// device id and the FI status are decoded here, every other index is passed
// on to the run control and trace unit. reg_rdata is combinational from
// reg_idx.
//
// The RAW registers hold one complete access (direction, target, address,
// data), so a single trigger runs it: either a register write of RWCS with
// the START bit, or the fi_trigger line of the FI module. The access goes
// to the target memory through its own port (real time, the CPU keeps
// running) or to a CPU register (RWA selects it; allowed only while the CPU
// is halted, otherwise RWCS.ERR is set and nothing is accessed).
//
// Timing: the memory or CPU register port is driven combinationally in the
// clock of the trigger, so a write lands on the next edge. A read returns
// its word one clock later into RWD and sets RWCS.DONE then. When the FI
// trigger and a debugger START meet in one clock, the FI access runs and the
// other is dropped. fi_setup loads RWA and RWD and sets RWCS to a memory
// write in one clock, as the FI_SETUP message asks.
//
// The RAW register and its single trigger are the described mechanism; the
// register layout, the one-clock latencies and the collision rule are this
// design's own.
module rw
  import ocd_pkg::*;
#(
  parameter int          ADDR_W    = 16,
  parameter int          DATA_W    = 8,
  parameter int          RW_W      = 16,
  parameter int          CREG_W    = 8,
  parameter logic [31:0] DEVICE_ID = 32'h0CD0_F101
) (
  input  logic              clk,
  input  logic              rst_n,
  // register access from the message manager
  input  logic              reg_we,
  input  logic [7:0]        reg_idx,
  input  logic [RW_W-1:0]   reg_wdata,
  output logic [RW_W-1:0]   reg_rdata,
  // fault injection set-up and trigger
  input  logic              fi_setup,
  input  logic [ADDR_W-1:0] fi_addr,
  input  logic [DATA_W-1:0] fi_data,
  input  logic              fi_trigger,
  input  logic [7:0]        fi_status,
  // run control and trace unit registers
  output logic              rct_we,
  output logic [RW_W-1:0]   rct_wdata,
  input  logic [RW_W-1:0]   rct_rdata,
  // target memory debug port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // CPU register port
  input  logic              cpu_halted,
  output logic              creg_en,
  output logic              creg_we,
  output logic [CREG_W-1:0] creg_addr,
  output logic [DATA_W-1:0] creg_wdata,
  input  logic [DATA_W-1:0] creg_rdata,
  output logic              access_done   // one clock when an access completes
);
  logic              cs_write, cs_cpu, cs_done, cs_err;
  logic [ADDR_W-1:0] rwa;
  logic [DATA_W-1:0] rwd;
  logic              rd_pend, rd_cpu;

  logic own_reg;
  assign own_reg = reg_idx == REG_RWCS || reg_idx == REG_RWA || reg_idx == REG_RWD ||
                   reg_idx == REG_DID  || reg_idx == REG_FIS;
  assign rct_we    = reg_we && !own_reg;
  assign rct_wdata = reg_wdata;

  // One access per trigger, with the direction and target of the trigger.
  logic dbg_start, go, go_write, go_cpu, go_ok;
  assign dbg_start = reg_we && reg_idx == REG_RWCS && reg_wdata[RWCS_START];
  assign go        = fi_trigger || dbg_start;
  assign go_write  = fi_trigger ? cs_write : reg_wdata[RWCS_WRITE];
  assign go_cpu    = fi_trigger ? cs_cpu   : reg_wdata[RWCS_CPU];
  assign go_ok     = go && (!go_cpu || cpu_halted);

  always_comb begin
    mem_en     = go_ok && !go_cpu;
    mem_we     = mem_en && go_write;
    mem_addr   = rwa;
    mem_wdata  = rwd;
    creg_en    = go_ok && go_cpu;
    creg_we    = creg_en && go_write;
    creg_addr  = CREG_W'(rwa);
    creg_wdata = rwd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_write    <= 1'b0;
      cs_cpu      <= 1'b0;
      cs_done     <= 1'b0;
      cs_err      <= 1'b0;
      rwa         <= '0;
      rwd         <= '0;
      rd_pend     <= 1'b0;
      rd_cpu      <= 1'b0;
      access_done <= 1'b0;
    end else begin
      access_done <= 1'b0;
      rd_pend     <= 1'b0;
      if (fi_setup) begin
        rwa      <= fi_addr;
        rwd      <= fi_data;
        cs_write <= 1'b1;
        cs_cpu   <= 1'b0;
      end else if (reg_we) begin
        case (reg_idx)
          REG_RWCS: begin
            cs_write <= reg_wdata[RWCS_WRITE];
            cs_cpu   <= reg_wdata[RWCS_CPU];
          end
          REG_RWA: rwa <= ADDR_W'(reg_wdata);
          REG_RWD: rwd <= DATA_W'(reg_wdata);
          default: ;
        endcase
      end
      if (go) begin
        cs_done <= go_ok && go_write;
        cs_err  <= !go_ok;
        if (go_ok && go_write) access_done <= 1'b1;
        if (go_ok && !go_write) begin
          rd_pend <= 1'b1;
          rd_cpu  <= go_cpu;
        end
      end
      if (rd_pend) begin
        rwd         <= rd_cpu ? creg_rdata : mem_rdata;
        cs_done     <= 1'b1;
        access_done <= 1'b1;
      end
    end
  end

  always_comb begin
    case (reg_idx)
      REG_DID:  reg_rdata = RW_W'(DEVICE_ID);
      REG_RWCS: reg_rdata = RW_W'({cs_err, cs_done, cs_cpu, cs_write, 1'b0});
      REG_RWA:  reg_rdata = RW_W'(rwa);
      REG_RWD:  reg_rdata = RW_W'(rwd);
      REG_FIS:  reg_rdata = RW_W'(fi_status);
      default:  reg_rdata = rct_rdata;
    endcase
  end
endmodule
