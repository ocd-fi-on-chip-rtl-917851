// tb_rct: self-checking testbench of the run control and trace unit.
// Drives the CPU bus signals directly and checks: debug entry from reset with
// and without EVTI, N-th occurrence program breakpoints that halt, resume,
// halt command and single step, watchpoints on a program address and on data
// writes (hit pulse one clock after the bus event, WATCHPOINT message, no
// halt), EVTI halts, program trace with instruction counts and exception
// type, data trace, and register read-back.
module tb_rct;
  import ocd_pkg::*;
  localparam int AW = 16, DW = 8, RW = 16;

  logic          clk = 0, rst_n = 0;
  logic          cpu_rst = 0, cpu_retire = 0, cpu_flow = 0, cpu_exc = 0;
  logic          cpu_dwe = 0, cpu_dre = 0;
  logic [AW-1:0] cpu_pc = 0, cpu_daddr = 0;
  logic [DW-1:0] cpu_dwdata = 0;
  logic          cpu_halt, cpu_halted = 0, evti = 0, evt_hit, debug_mode;
  logic          reg_we = 0;
  logic [7:0]    reg_idx = 0;
  logic [RW-1:0] reg_wdata = 0, reg_rdata;
  logic [2:0]    wp_hit;
  nexus_msg_t    msg [NUM_RCT_SRC];
  logic [NUM_RCT_SRC-1:0] msg_valid;

  rct #(.ADDR_W(AW), .DATA_W(DW), .RW_W(RW), .CNT_W(16)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collected messages per source and counters
  nexus_msg_t got [NUM_RCT_SRC][$];
  int evt_count = 0;
  int wp_count [3] = '{0, 0, 0};
  always @(posedge clk) begin
    #2;
    for (int s = 0; s < NUM_RCT_SRC; s++) if (msg_valid[s]) got[s].push_back(msg[s]);
    if (evt_hit) evt_count++;
    for (int i = 0; i < 3; i++) if (wp_hit[i]) wp_count[i]++;
  end
  // the CPU model: halted follows halt one clock later
  always @(posedge clk) cpu_halted <= cpu_halt;

  task automatic chk(string what, longint got_v, longint exp_v);
    checks++;
    if (got_v != exp_v) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got_v, exp_v, $time);
    end
  endtask

  task automatic wr(logic [7:0] idx, logic [RW-1:0] d);
    @(negedge clk); reg_we = 1; reg_idx = idx; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic rd(logic [7:0] idx, output logic [RW-1:0] d);
    @(negedge clk); reg_idx = idx; #1 d = reg_rdata;
  endtask

  task automatic retire(logic [AW-1:0] pc, logic flow = 0, logic exc = 0);
    @(negedge clk); cpu_retire = 1; cpu_pc = pc; cpu_flow = flow; cpu_exc = exc;
    @(negedge clk); cpu_retire = 0; cpu_flow = 0; cpu_exc = 0;
  endtask

  task automatic dacc(logic we, logic [AW-1:0] a, logic [DW-1:0] d);
    @(negedge clk); cpu_dwe = we; cpu_dre = !we; cpu_daddr = a; cpu_dwdata = d;
    @(negedge clk); cpu_dwe = 0; cpu_dre = 0;
  endtask

  task automatic expect_msg(int s, logic [5:0] tc, logic [7:0] idx, logic [31:0] a, logic [31:0] d);
    nexus_msg_t m;
    checks++;
    if (got[s].size() == 0) begin
      failures++; $display("FAIL no message on source %0d (tcode %0d)", s, tc); return;
    end
    m = got[s].pop_front();
    if (m.tcode != tc || m.idx != idx || m.addr != a || m.data != d) begin
      failures++;
      $display("FAIL msg src %0d: got %0d/%0h/%0h/%0h expected %0d/%0h/%0h/%0h", s,
               m.tcode, m.idx, m.addr, m.data, tc, idx, a, d);
    end
  endtask

  initial begin
    logic [RW-1:0] v;
    int c0;
    // reset with EVTI low: user mode
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk); #1;
    chk("run after reset", cpu_halt, 0);
    chk("not debug", debug_mode, 0);

    // program breakpoint 0 on the 3rd execution of 0x100
    wr(REG_PB0A, 16'h0100);
    wr(REG_PB0N, 3);
    wr(REG_BPCTL, 8'b0000_0001);
    rd(REG_PB0A, v); chk("PB0A readback", v, 16'h0100);
    rd(REG_PB0N, v); chk("PB0N readback", v, 3);
    retire(16'h0100); retire(16'h0102); retire(16'h0100);
    #1 chk("no halt before 3rd", cpu_halt, 0);
    c0 = evt_count;
    retire(16'h0100);
    #1 chk("halt on 3rd", cpu_halt, 1);
    chk("debug mode", debug_mode, 1);
    chk("evto pulse", evt_count - c0, 1);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'(1 << DS_DEBUG | 1 << DS_PB0), 0, 0);
    @(negedge clk);
    rd(REG_DS, v); chk("DS cause+halted", v, (1 << DS_DEBUG) | (1 << DS_PB0) | (1 << DS_HALTED));

    // resume
    wr(REG_RC, 3'b010);
    #1 chk("resumed", cpu_halt, 0);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'h00, 0, 0);

    // halt command, then single step
    wr(REG_RC, 3'b001);
    #1 chk("halt cmd", cpu_halt, 1);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'(1 << DS_DEBUG | 1 << DS_CMD), 0, 0);
    wr(REG_RC, 3'b100);
    #1 chk("step releases", cpu_halt, 0);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'h00, 0, 0);
    retire(16'h0200);
    #1 chk("step halts again", cpu_halt, 1);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'(1 << DS_DEBUG | 1 << DS_STEP), 0, 0);
    wr(REG_RC, 3'b010);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'h00, 0, 0);

    // watchpoint on program breakpoint 1: one-clock hit pulse, message, no halt
    wr(REG_BPCTL, 8'b0000_1100);
    wr(REG_PB1A, 16'h0300);
    wr(REG_PB1N, 1);
    @(negedge clk); cpu_retire = 1; cpu_pc = 16'h0300;
    @(posedge clk); #1;
    chk("wp_hit one clock after", wp_hit, 3'b010);
    @(negedge clk); cpu_retire = 0;
    @(posedge clk); #1 chk("wp_hit single pulse", wp_hit, 3'b000);
    chk("watchpoint does not halt", cpu_halt, 0);
    expect_msg(SRC_WP, TC_WATCHPOINT, 8'b010, 0, 0);

    // data watchpoint on the 2nd write to 0x40; reads ignored
    wr(REG_DBA, 16'h0040);
    wr(REG_DBN, 2);
    wr(REG_BPCTL, 8'b0111_0000);
    c0 = wp_count[2];
    dacc(1, 16'h0040, 8'h11);
    dacc(0, 16'h0040, 8'h00);
    dacc(1, 16'h0041, 8'h00);
    chk("no data wp yet", wp_count[2] - c0, 0);
    dacc(1, 16'h0040, 8'h22);
    @(negedge clk);
    chk("data wp on 2nd write", wp_count[2] - c0, 1);
    expect_msg(SRC_WP, TC_WATCHPOINT, 8'b100, 0, 0);

    // data breakpoint that halts, on reads
    wr(REG_BPCTL, 8'b1001_0000);
    wr(REG_DBN, 1);
    dacc(0, 16'h0040, 8'h00);
    #1 chk("data bp halts", cpu_halt, 1);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'(1 << DS_DEBUG | 1 << DS_DB), 0, 0);
    wr(REG_RC, 3'b010);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'h00, 0, 0);
    wr(REG_BPCTL, 0);

    // program trace: branch after 4 sequential instructions, then exception
    wr(REG_DC, 2'b01);
    retire(16'h0400, 1);        // first flow change (count since start of trace unknown)
    void'(got[SRC_PTRACE].pop_front());
    retire(16'h0401); retire(16'h0402); retire(16'h0403);
    retire(16'h0500, 1);
    expect_msg(SRC_PTRACE, TC_PROG_TRACE, 8'd0, 32'h0500, 32'd4);
    retire(16'h0008, 0, 1);
    expect_msg(SRC_PTRACE, TC_PROG_TRACE, 8'd1, 32'h0008, 32'd1);
    chk("no trace without flow", got[SRC_PTRACE].size(), 0);

    // data trace
    wr(REG_DC, 2'b10);
    dacc(1, 16'h0123, 8'hA5);
    dacc(0, 16'h0124, 8'h00);
    @(negedge clk);
    expect_msg(SRC_DTRACE, TC_DATA_TRACE, 8'd0, 32'h0123, 32'hA5);
    chk("only writes traced", got[SRC_DTRACE].size(), 0);
    retire(16'h0600, 1);
    chk("program trace off", got[SRC_PTRACE].size(), 0);

    // EVTI rising edge halts
    @(negedge clk); evti = 1;
    @(negedge clk); #1 chk("evti halts", cpu_halt, 1);
    expect_msg(SRC_STATUS, TC_DEBUG_STATUS, 8'(1 << DS_DEBUG | 1 << DS_EVTI), 0, 0);

    // CPU reset with EVTI held: stays in debug mode from reset
    @(negedge clk); cpu_rst = 1;
    @(negedge clk); cpu_rst = 0;
    repeat (2) @(negedge clk);
    chk("debug from reset", debug_mode, 1);
    chk("halt from reset", cpu_halt, 1);
    // CPU reset with EVTI low: user mode after reset
    evti = 0;
    @(negedge clk); cpu_rst = 1;
    @(negedge clk); cpu_rst = 0;
    repeat (2) @(negedge clk);
    chk("user mode from reset", debug_mode, 0);
    chk("running from reset", cpu_halt, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
