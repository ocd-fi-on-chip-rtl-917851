// tb_ocd_fi_system: end-to-end test of the fault injection platform at its
// default parameters, with the behavioural CPU model running the
// fault-tolerant matrix-add program.
//
// One campaign of three runs is loaded into the command memory and played:
//  Run 1 (OCD-FI): watchpoint on the 3rd execution of the second load of
//    A[i] (pc 0x14, i = 2), FI_SETUP with C[2] with bit 2 flipped,
//    FI_ENABLE, CPU reset. The FI module writes the faulty word two clocks
//    after the trigger instruction starts; the program's duplicate check
//    must see it and run its error routine (watchpoint on pc 0x40).
//  Run 2 (plain OCD): same fault preloaded in the RAW registers, but the
//    debugger itself waits for the WATCHPOINT message and sends the START.
//    The write comes too late for the check, the program ends normally
//    (data watchpoint on the done flag) and a real-time memory read shows
//    the latent faulty word.
//  Run 3 (debug): breakpoint halt, CPU register read in debug mode, single
//    step, program and data trace with a trace flood that overflows a
//    message slot, device id request, and an EVTI halt from the pin.
// The result memory is then read back and checked, the writing latency of
// both injection methods is measured, and every mechanism must have
// happened at least once.
module tb_ocd_fi_system;
  import ocd_pkg::*;
  localparam int AW = 16, DW = 8;
  localparam logic [AW-1:0] A_BASE = 'h100, B_BASE = 'h200, C_BASE = 'h300;
  localparam logic [AW-1:0] ERR_FLAG = 'h010, DONE_FLAG = 'h011;
  localparam int K = 2;   // element hit by the fault

  logic clk = 0, rst_n = 0;
  logic cpu_rst, cpu_halt, cpu_halted, cpu_retire, cpu_flow, cpu_exc, cpu_dwe, cpu_dre;
  logic [AW-1:0] cpu_pc, cpu_daddr;
  logic [DW-1:0] cpu_dwdata, cpu_drdata;
  logic creg_en, creg_we;
  logic [7:0] creg_addr;
  logic [DW-1:0] creg_wdata, creg_rdata;
  logic evti = 0, evto;
  logic cmd_we = 0, start = 0, busy, done, res_full;
  logic [7:0] cmd_waddr = 0, res_raddr = 0;
  campaign_cmd_t cmd_wdata = '0;
  campaign_res_t res_rdata;
  logic [8:0] res_count;
  logic [7:0] nexus_mdi, nexus_mdo;
  mseo_e nexus_msei, nexus_mseo;
  logic debug_mode, fi_trigger, rw_done;
  logic [2:0] wp_hit, err_seen;

  ocd_fi_system dut (.*);

  cpu_model #(.AW(AW), .DW(DW), .N(4), .A_BASE(A_BASE), .B_BASE(B_BASE), .C_BASE(C_BASE),
              .ERR_FLAG(ERR_FLAG), .DONE_FLAG(DONE_FLAG)) u_cpu (
    .clk, .rst(cpu_rst || !cpu_started), .halt(cpu_halt), .halted(cpu_halted),
    .retire(cpu_retire), .pc(cpu_pc), .flow(cpu_flow), .exc(cpu_exc),
    .dwe(cpu_dwe), .dre(cpu_dre), .daddr(cpu_daddr), .dwdata(cpu_dwdata), .drdata(cpu_drdata),
    .creg_en, .creg_we, .creg_addr, .creg_wdata, .creg_rdata
  );

  // the application starts with the first reset the campaign gives
  logic cpu_started = 0;
  always @(posedge clk) if (cpu_rst) cpu_started <= 1;

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0h expected %0h", what, g, e); end
  endtask

  int ncmd = 0;
  task automatic add(cmd_op_e op, logic [5:0] tc = 0, logic [7:0] idx = 0, logic [31:0] a = 0, logic [31:0] d = 0);
    @(negedge clk);
    cmd_we = 1; cmd_waddr = 8'(ncmd);
    cmd_wdata = '{op: op, msg: '{tcode: tc, idx: idx, addr: a, data: d}};
    ncmd++;
    @(negedge clk); cmd_we = 0;
  endtask
  task automatic regw(logic [7:0] idx, logic [31:0] d);
    add(CMD_SEND, TC_REG_WRITE, idx, 0, d);
  endtask

  // mechanism counters
  int n_fi = 0, n_wp = 0, n_evto = 0, n_debug_entry = 0, n_rw = 0, n_halt_cycles = 0;
  logic debug_q = 0;
  int n_resets = 0;
  logic rst_q = 0;
  bit trig_seen [2] = '{0, 0};
  bit wr_seen [2] = '{0, 0};
  longint t_trig [4];
  longint t_write [4];
  int n_trig_retire = 0;
  always @(posedge clk) if (rst_n) begin
    if (fi_trigger) n_fi++;
    if (|wp_hit) n_wp++;
    if (evto) n_evto++;
    if (debug_mode && !debug_q) n_debug_entry++;
    debug_q <= debug_mode;
    if (cpu_halted) n_halt_cycles++;
    if (cpu_rst && !rst_q) begin n_trig_retire = 0; n_resets++; end
    rst_q <= cpu_rst;
    if (cpu_retire && cpu_pc == 16'h14 && n_resets >= 1 && n_resets <= 2) begin
      n_trig_retire++;
      if (n_trig_retire == K + 1) begin t_trig[n_resets-1] = cyc; trig_seen[n_resets-1] = 1; end
    end
    if (rw_done) begin
      n_rw++;
      if (n_resets >= 1 && n_resets <= 2 && trig_seen[n_resets-1] && !wr_seen[n_resets-1]) begin
        t_write[n_resets-1] = cyc; wr_seen[n_resets-1] = 1;
      end
    end
  end

  localparam logic [7:0] GOOD  = 8'((K + 1) + (3 * K + 5));
  localparam logic [7:0] FAULT = GOOD ^ 8'h04;

  initial begin
    campaign_res_t r;
    int n_ptrace = 0, n_dtrace = 0, n_err_msg = 0, n_devid = 0, n_step = 0, n_timeouts = 0;
    int wp_seq [$];
    logic [15:0] last_regval [$];
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- run 1: OCD-FI ----
    regw(REG_PB0A, 'h14); regw(REG_PB0N, K + 1);
    regw(REG_PB1A, 'h40); regw(REG_PB1N, 1);
    regw(REG_DBA, DONE_FLAG); regw(REG_DBN, 1);
    regw(REG_BPCTL, 8'b0111_1111);         // all three are watchpoints, data one on writes
    add(CMD_SEND, TC_FI_SETUP, 0, C_BASE + K, FAULT);
    add(CMD_SEND, TC_FI_ENABLE, 8'b001);
    add(CMD_RESET, 0, 0, 0, 4);
    add(CMD_WAIT, TC_WATCHPOINT, 0, 0, 3000);
    add(CMD_WAIT, TC_WATCHPOINT, 0, 0, 3000);
    // ---- run 2: plain OCD ----
    regw(REG_RWA, C_BASE + K); regw(REG_RWD, FAULT); regw(REG_RWCS, 32'b010);
    add(CMD_RESET, 0, 0, 0, 4);
    add(CMD_WAIT, TC_WATCHPOINT, 0, 0, 3000);
    regw(REG_RWCS, 32'b011);
    add(CMD_WAIT, TC_WATCHPOINT, 0, 0, 3000);
    regw(REG_RWCS, 32'b001);               // real-time read of C[K]
    add(CMD_SEND, TC_REG_READ, REG_RWD);
    add(CMD_WAIT, TC_REG_VALUE, 0, 0, 500);
    // ---- run 3: debug features ----
    regw(REG_PB0A, 'h12); regw(REG_PB0N, 1);
    regw(REG_BPCTL, 8'b0000_0001);          // pb0 halts
    add(CMD_RESET, 0, 0, 0, 4);
    add(CMD_WAIT, TC_DEBUG_STATUS, 0, 0, 3000);
    regw(REG_RWA, 3); regw(REG_RWCS, 32'b101);   // read CPU register r3
    add(CMD_SEND, TC_REG_READ, REG_RWD);
    add(CMD_WAIT, TC_REG_VALUE, 0, 0, 500);
    regw(REG_BPCTL, 0);
    regw(REG_RC, 3'b100);                   // single step
    add(CMD_WAIT, TC_DEBUG_STATUS, 0, 0, 500);
    add(CMD_WAIT, TC_DEBUG_STATUS, 0, 0, 500);
    regw(REG_DC, 2'b11);                    // trace on
    regw(REG_RC, 3'b010);                   // resume
    add(CMD_DELAY, 0, 0, 0, 200);
    regw(REG_DC, 2'b00);
    add(CMD_DELAY, 0, 0, 0, 200);
    add(CMD_SEND, TC_REG_READ, REG_DID);
    add(CMD_WAIT, TC_DEVICE_ID, 0, 0, 500);
    add(CMD_END);

    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    // EVTI pin halts the running CPU
    @(negedge clk); evti = 1;
    repeat (10) @(negedge clk);
    chk("EVTI halts CPU", debug_mode && cpu_halted, 1);
    evti = 0;
    repeat (50) @(negedge clk);

    // latencies (cycles from the trigger instruction to the memory write,
    // rw_done is one clock after the write edge)
    $display("writing latency OCD-FI: %0d clocks", t_write[0] - t_trig[0]);
    $display("writing latency OCD   : %0d clocks", t_write[1] - t_trig[1]);
    chk("OCD-FI writes 2 clocks after the trigger", t_write[0] - t_trig[0], 2);
    chk("OCD path is slower", t_write[1] - t_trig[1] > 2, 1);

    // read back results
    for (int i = 0; i < int'(res_count); i++) begin
      @(negedge clk); res_raddr = 8'(i);
      @(negedge clk); r = res_rdata;
      if (r.timeout) n_timeouts++;
      else case (r.msg.tcode)
        TC_WATCHPOINT:   wp_seq.push_back(int'(r.msg.idx));
        TC_PROG_TRACE:   n_ptrace++;
        TC_DATA_TRACE:   n_dtrace++;
        TC_ERROR:        if (r.msg.idx[ERR_OVF_OUT]) n_err_msg++;
        TC_DEVICE_ID:    begin n_devid++; chk("device id value", r.msg.data, 32'h0000_F101); end
        TC_REG_VALUE:    last_regval.push_back(r.msg.data[15:0]);
        TC_DEBUG_STATUS: if (r.msg.idx[DS_STEP]) n_step++;
        default: ;
      endcase
    end
    $display("results: %0d entries, watchpoints %p, regvals %p", res_count, wp_seq, last_regval);
    chk("no timeouts", n_timeouts, 0);
    chk("watchpoint messages", wp_seq.size(), 4);
    if (wp_seq.size() == 4) begin
      chk("run1 trigger", wp_seq[0], 1);
      chk("run1 error detected", wp_seq[1], 2);
      chk("run2 trigger", wp_seq[2], 1);
      chk("run2 ends normally (fault latent)", wp_seq[3], 4);
    end
    chk("register answers", last_regval.size(), 2);
    if (last_regval.size() == 2) begin
      chk("latent fault read in real time", last_regval[0], 16'(FAULT));
      chk("CPU register r3 read in debug mode", last_regval[1], 16'(8'd1 + 8'd5));
    end
    chk("single step seen", n_step, 1);
    // mechanisms
    chk("fault injected by FI (once)", n_fi, 1);
    chk("evto pulses", n_evto > 0, 1);
    chk("debug entries", n_debug_entry >= 3, 1);
    chk("program trace", n_ptrace > 0, 1);
    chk("data trace", n_dtrace > 0, 1);
    chk("overflow reported", n_err_msg > 0 && err_seen[ERR_OVF_OUT], 1);
    chk("device id message", n_devid, 1);
    $display("mechanisms: fi=%0d wp=%0d evto=%0d debug_entries=%0d rw_accesses=%0d ptrace=%0d dtrace=%0d ovf_err=%0d step=%0d devid=%0d halted_cycles=%0d",
             n_fi, n_wp, n_evto, n_debug_entry, n_rw, n_ptrace, n_dtrace, n_err_msg, n_step, n_devid, n_halt_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
