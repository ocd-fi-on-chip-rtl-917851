// tb_ocd_fi: testbench of the OCD-FI debug and fault injection unit on its
// own, driven through its NEXUS port by a testbench message encoder, with
// the behavioural CPU model and the dual-port RAM as target.
// Checks: device id message; register write/read back; a fault armed with
// FI_SETUP/FI_ENABLE on a watchpoint reaches memory exactly two clocks after
// the trigger instruction starts, once, and the program detects it; a
// program breakpoint halts the CPU, a CPU register is read in debug mode,
// the CPU resumes; a real-time memory read while the CPU runs.
module tb_ocd_fi;
  import ocd_pkg::*;
  import tb_nexus_pkg::*;
  localparam int AW = 16, DW = 8, RW = 16, PW = 8;
  localparam logic [AW-1:0] C_BASE = 'h300;
  localparam int K = 1;
  localparam logic [7:0] GOOD  = 8'((K + 1) + (3 * K + 5));
  localparam logic [7:0] FAULT = GOOD ^ 8'h80;

  logic clk = 0, rst_n = 0, cpu_rst = 1;
  logic [PW-1:0] mdi = 0, mdo;
  mseo_e msei = MSEO_IDLE, mseo;
  logic evti = 0, evto;
  logic cpu_retire, cpu_flow, cpu_exc, cpu_dwe, cpu_dre, cpu_halt, cpu_halted;
  logic [AW-1:0] cpu_pc, cpu_daddr;
  logic [DW-1:0] cpu_dwdata, cpu_drdata;
  logic creg_en, creg_we;
  logic [7:0] creg_addr;
  logic [DW-1:0] creg_wdata, creg_rdata;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic debug_mode, fi_trigger, rw_done;
  logic [2:0] wp_hit, err_seen;

  ocd_fi dut (.*);

  dp_ram #(.DATA_W(DW), .AW(10)) u_ram (
    .clk, .a_en(cpu_dwe || cpu_dre), .a_we(cpu_dwe), .a_addr(cpu_daddr[9:0]), .a_wdata(cpu_dwdata),
    .a_rdata(cpu_drdata), .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr[9:0]), .b_wdata(mem_wdata),
    .b_rdata(mem_rdata)
  );

  cpu_model #(.AW(AW), .DW(DW), .N(3), .C_BASE(C_BASE)) u_cpu (
    .clk, .rst(cpu_rst), .halt(cpu_halt), .halted(cpu_halted), .retire(cpu_retire), .pc(cpu_pc),
    .flow(cpu_flow), .exc(cpu_exc), .dwe(cpu_dwe), .dre(cpu_dre), .daddr(cpu_daddr),
    .dwdata(cpu_dwdata), .drdata(cpu_drdata), .creg_en, .creg_we, .creg_addr, .creg_wdata, .creg_rdata
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0h expected %0h", what, g, e); end
  endtask

  // output collector
  nexus_msg_t outq [$];
  beat_t      curb [$];
  always @(posedge clk) begin
    if (rst_n && mseo != MSEO_IDLE) begin
      curb.push_back(beat_t'({2'(mseo), 32'(mdo)}));
      if (mseo == MSEO_END_MSG) begin
        outq.push_back(decode(curb, PW));
        curb = {};
      end
    end
  end

  task automatic send(logic [5:0] tc, logic [7:0] idx = 0, logic [31:0] a = 0, logic [31:0] d = 0);
    beat_t q[$];
    encode('{tcode: tc, idx: idx, addr: a, data: d}, PW, AW, RW, q);
    foreach (q[i]) begin
      @(negedge clk); mdi = PW'(q[i].d); msei = mseo_e'(q[i].code);
    end
    @(negedge clk); msei = MSEO_IDLE; mdi = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic wait_msg(logic [5:0] tc, output nexus_msg_t m);
    int n = 0;
    m = '0;
    while (n < 2000) begin
      if (outq.size() > 0) begin
        m = outq.pop_front();
        if (m.tcode == tc) return;
      end else begin
        @(posedge clk); n++;
      end
    end
    failures++;
    $display("FAIL no message with tcode %0d", tc);
  endtask

  // trigger and write times
  int n_trig = 0, n_fi = 0;
  longint t_trig = -1, t_write = -1;
  always @(posedge clk) begin
    if (cpu_rst) n_trig = 0;
    else if (cpu_retire && cpu_pc == 'h14) begin
      n_trig++;
      if (n_trig == K + 1) t_trig = cyc;
    end
    if (mem_we && mem_en) begin n_fi++; t_write = cyc + 1; end   // written at the coming edge
  end

  initial begin
    nexus_msg_t m;
    repeat (3) @(posedge clk); rst_n = 1;

    send(TC_REG_READ, REG_DID);
    wait_msg(TC_DEVICE_ID, m);
    chk("device id", m.data, 32'h0000_F101);
    send(TC_REG_WRITE, REG_PB1A, 0, 'h40);
    send(TC_REG_READ, REG_PB1A);
    wait_msg(TC_REG_VALUE, m);
    chk("register read back", m.data, 'h40);

    // fault injection on the 2nd execution of pc 0x14
    send(TC_REG_WRITE, REG_PB0A, 0, 'h14);
    send(TC_REG_WRITE, REG_PB0N, 0, K + 1);
    send(TC_REG_WRITE, REG_PB1N, 0, 1);
    send(TC_REG_WRITE, REG_BPCTL, 0, 8'b0000_1111);
    send(TC_FI_SETUP, 0, C_BASE + K, FAULT);
    send(TC_FI_ENABLE, 8'b001);
    send(TC_REG_READ, REG_FIS);
    wait_msg(TC_REG_VALUE, m);
    chk("FI armed", m.data[0], 1);
    @(negedge clk); cpu_rst = 0;
    wait_msg(TC_WATCHPOINT, m);
    chk("trigger watchpoint", m.idx, 8'b001);
    wait_msg(TC_WATCHPOINT, m);
    chk("error routine reached", m.idx, 8'b010);
    chk("one injection", n_fi, 1);
    chk("written 2 clocks after the trigger instruction", t_write - t_trig, 2);
    chk("faulty word in memory", u_ram.mem[C_BASE + K], FAULT);
    send(TC_REG_READ, REG_FIS);
    wait_msg(TC_REG_VALUE, m);
    chk("FI disarmed itself, injected", m.data[4:0], 5'b10010);

    // breakpoint halt, CPU register read, resume
    @(negedge clk); cpu_rst = 1;
    send(TC_REG_WRITE, REG_PB0A, 0, 'h13);
    send(TC_REG_WRITE, REG_PB0N, 0, 1);
    send(TC_REG_WRITE, REG_BPCTL, 0, 8'b0000_0001);
    @(negedge clk); cpu_rst = 0;
    wait_msg(TC_DEBUG_STATUS, m);
    chk("halt cause pb0", m.idx, 8'(1 << DS_DEBUG | 1 << DS_PB0));
    repeat (5) @(negedge clk);
    chk("CPU halted", cpu_halted, 1);
    send(TC_REG_WRITE, REG_RWA, 0, 3);
    send(TC_REG_WRITE, REG_RWCS, 0, 3'b101);
    send(TC_REG_READ, REG_RWD);
    wait_msg(TC_REG_VALUE, m);
    chk("r3 = A[0] + B[0]", m.data, 1 + 5);
    send(TC_REG_WRITE, REG_BPCTL, 0, 0);
    send(TC_REG_WRITE, REG_RC, 0, 3'b010);
    wait_msg(TC_DEBUG_STATUS, m);
    chk("resumed", m.idx, 0);
    // real-time memory read of C[0] while running
    repeat (100) @(negedge clk);
    send(TC_REG_WRITE, REG_RWA, 0, C_BASE);
    send(TC_REG_WRITE, REG_RWCS, 0, 3'b001);
    send(TC_REG_READ, REG_RWD);
    wait_msg(TC_REG_VALUE, m);
    chk("real-time read C[0]", m.data, 1 + 5);
    chk("no loss", err_seen, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
