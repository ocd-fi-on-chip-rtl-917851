// cpu_model: behavioural model of the target CPU, for testbenches only.
//
// It stands in for the 8/32-bit core and runs a fixed fault-tolerant
// matrix-add program: for each element i of N, C[i] = A[i] + B[i] is computed
// and stored, then computed again and compared with the stored C[i]; a
// mismatch jumps to an error routine that writes 1 to ERR_FLAG and spins,
// otherwise the loop goes on, and at the end DONE_FLAG is written and the
// CPU spins. A and B are initialised by the program itself from i.
// Program addresses (one instruction per address):
//   0x08..0x0B  init A[i]=i+1, B[i]=3*i+5 (loop)
//   0x10 load A[i]  0x11 load B[i]  0x12 add  0x13 store C[i]
//   0x14 load A[i]  0x15 load B[i]  0x16 add  0x17 load C[i]
//   0x18 compare, branch to 0x40 on mismatch   0x19 i++, branch to 0x10
//   0x20 store DONE_FLAG, 0x21 spin           0x40 store ERR_FLAG, 0x41 spin
// Every instruction takes three clocks; retire pulses in its first clock with
// pc, flow (reached by a taken branch) and the data bus access. cpu_halt is
// looked at before each instruction; cpu_halted reports a stop. Registers
// r0..r7 (r0 = i) are reachable on the register port while halted; reads
// answer one clock later. Reset restarts the program at 0x00.
module cpu_model #(
  parameter int AW = 16,
  parameter int DW = 8,
  parameter int N  = 4,
  parameter logic [AW-1:0] A_BASE = 'h100,
  parameter logic [AW-1:0] B_BASE = 'h200,
  parameter logic [AW-1:0] C_BASE = 'h300,
  parameter logic [AW-1:0] ERR_FLAG  = 'h010,
  parameter logic [AW-1:0] DONE_FLAG = 'h011
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          halt,
  output logic          halted,
  output logic          retire,
  output logic [AW-1:0] pc,
  output logic          flow,
  output logic          exc,
  output logic          dwe,
  output logic          dre,
  output logic [AW-1:0] daddr,
  output logic [DW-1:0] dwdata,
  input  logic [DW-1:0] drdata,
  input  logic          creg_en,
  input  logic          creg_we,
  input  logic [7:0]    creg_addr,
  input  logic [DW-1:0] creg_wdata,
  output logic [DW-1:0] creg_rdata
);
  logic [DW-1:0] r [8];
  logic [1:0]    phase;      // 0: start of instruction, 1: bus clock, 2: load data back
  logic          taken;      // next instruction reached by a branch
  logic [AW-1:0] npc;
  logic [7:0]    rd_dst;     // register that receives drdata in phase 1
  logic          rd_pend;

  assign exc = 1'b0;

  always_ff @(posedge clk) begin
    if (creg_en) creg_rdata <= r[creg_addr[2:0]];
  end

  always @(posedge clk) begin
    retire <= 0; dwe <= 0; dre <= 0; flow <= 0;
    if (rst) begin
      pc <= 0; phase <= 0; halted <= 0; taken <= 0; rd_pend <= 0;
      for (int i = 0; i < 8; i++) r[i] <= 0;
    end else if (phase == 0) begin
      if (halt) begin
        halted <= 1;
        if (creg_en && creg_we && halted) r[creg_addr[2:0]] <= creg_wdata;
      end else begin
        halted <= 0;
        // execute instruction at npc (pc register holds the current one)
        retire <= 1; flow <= taken; taken <= 0; phase <= 1;
        case (pc)
          'h00: begin r[0] <= 0; npc <= 'h08; end
          'h08: begin dwe <= 1; daddr <= A_BASE + AW'(r[0]); dwdata <= r[0] + 1; npc <= 'h09; end
          'h09: begin dwe <= 1; daddr <= B_BASE + AW'(r[0]); dwdata <= DW'(3 * r[0] + 5); npc <= 'h0A; end
          'h0A: begin r[0] <= r[0] + 1; npc <= 'h0B; end
          'h0B: begin
            if (r[0] < DW'(N)) begin npc <= 'h08; taken <= 1; end
            else begin r[0] <= 0; npc <= 'h10; end
          end
          'h10, 'h14: begin dre <= 1; daddr <= A_BASE + AW'(r[0]); rd_dst <= 1; rd_pend <= 1; npc <= pc + 1; end
          'h11, 'h15: begin dre <= 1; daddr <= B_BASE + AW'(r[0]); rd_dst <= 2; rd_pend <= 1; npc <= pc + 1; end
          'h12: begin r[3] <= r[1] + r[2]; npc <= 'h13; end
          'h13: begin dwe <= 1; daddr <= C_BASE + AW'(r[0]); dwdata <= r[3]; npc <= 'h14; end
          'h16: begin r[4] <= r[1] + r[2]; npc <= 'h17; end
          'h17: begin dre <= 1; daddr <= C_BASE + AW'(r[0]); rd_dst <= 5; rd_pend <= 1; npc <= 'h18; end
          'h18: begin
            if (r[4] != r[5]) begin npc <= 'h40; taken <= 1; end else npc <= 'h19;
          end
          'h19: begin
            r[0] <= r[0] + 1;
            if (r[0] + 1 < DW'(N)) begin npc <= 'h10; taken <= 1; end else begin npc <= 'h20; taken <= 1; end
          end
          'h20: begin dwe <= 1; daddr <= DONE_FLAG; dwdata <= 8'hD0; npc <= 'h21; end
          'h21: begin npc <= 'h21; taken <= 1; end
          'h40: begin dwe <= 1; daddr <= ERR_FLAG; dwdata <= 1; npc <= 'h41; end
          default: begin npc <= pc; taken <= 1; end
        endcase
      end
    end else if (phase == 1) begin
      phase <= 2;
    end else begin
      // a load's word arrives from the synchronous RAM one clock after the request
      if (rd_pend) begin r[rd_dst[2:0]] <= drdata; rd_pend <= 0; end
      phase <= 0;
      pc <= npc;
    end
  end
endmodule
