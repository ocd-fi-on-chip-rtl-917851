// tb_campaign_ctrl: self-checking testbench of the campaign debugger.
// The debugger's NEXUS output is looped back to its input, so every message
// it sends comes back and must be recorded. A command list exercising SEND,
// WAIT (matched and timed out), RESET, DELAY and END is loaded; the test
// checks the order, contents and cycle stamps of the result entries, the
// length of the reset pulse, the done flag and the entry count.
module tb_campaign_ctrl;
  import ocd_pkg::*;
  localparam int PW = 4, CAW = 4, RAW_ = 4;

  logic              clk = 0, rst_n = 0;
  logic              cmd_we = 0, start = 0, busy, done, res_full, tgt_rst;
  logic [CAW-1:0]    cmd_waddr = 0;
  campaign_cmd_t     cmd_wdata = '0;
  logic [RAW_-1:0]   res_raddr = 0;
  campaign_res_t     res_rdata;
  logic [RAW_:0]     res_count;
  logic [PW-1:0]     link_d;
  mseo_e             link_c;

  campaign_ctrl #(.ADDR_W(16), .RW_W(16), .MDI_W(PW), .MDO_W(PW), .CMD_AW(CAW), .RES_AW(RAW_)) dut (
    .clk, .rst_n, .cmd_we, .cmd_waddr, .cmd_wdata, .start, .busy, .done,
    .res_raddr, .res_rdata, .res_count, .res_full, .tgt_rst,
    .tgt_mdi(link_d), .tgt_msei(link_c), .tgt_mdo(link_d), .tgt_mseo(link_c)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0h expected %0h at %0t", what, g, e, $time); end
  endtask

  task automatic load(int a, cmd_op_e op, logic [5:0] tc, logic [7:0] idx, logic [31:0] ad, logic [31:0] d);
    @(negedge clk);
    cmd_we = 1; cmd_waddr = CAW'(a);
    cmd_wdata = '{op: op, msg: '{tcode: tc, idx: idx, addr: ad, data: d}};
    @(negedge clk); cmd_we = 0;
  endtask

  int rst_cycles = 0;
  always @(posedge clk) if (rst_n && tgt_rst) rst_cycles++;

  initial begin
    campaign_res_t e [4];
    repeat (2) @(posedge clk); rst_n = 1;
    load(0, CMD_SEND,  TC_REG_WRITE, 8'h05, 0, 32'h00A5);
    load(1, CMD_WAIT,  TC_REG_WRITE, 0, 0, 0);
    load(2, CMD_RESET, 0, 0, 0, 7);
    load(3, CMD_SEND,  TC_FI_SETUP, 0, 32'h0123, 32'h0042);
    load(4, CMD_WAIT,  TC_WATCHPOINT, 0, 0, 40);   // never comes: times out
    load(5, CMD_DELAY, 0, 0, 0, 20);
    load(6, CMD_SEND,  TC_FI_DISABLE, 0, 0, 0);
    load(7, CMD_END,   0, 0, 0, 0);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk("busy", busy, 1);
    wait (done);
    repeat (20) @(negedge clk);
    chk("reset pulse length", rst_cycles, 7);
    chk("entries", res_count, 4);
    chk("not full", res_full, 0);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); res_raddr = RAW_'(i);
      @(negedge clk); e[i] = res_rdata;
    end
    chk("e0 tcode", e[0].msg.tcode, TC_REG_WRITE);
    chk("e0 idx", e[0].msg.idx, 8'h05);
    chk("e0 data", e[0].msg.data, 32'h00A5);
    chk("e0 not timeout", e[0].timeout, 0);
    chk("e1 tcode", e[1].msg.tcode, TC_FI_SETUP);
    chk("e1 addr", e[1].msg.addr, 32'h0123);
    chk("e1 data", e[1].msg.data, 32'h0042);
    chk("e2 timeout", e[2].timeout, 1);
    chk("e2 waited tcode", e[2].msg.tcode, TC_WATCHPOINT);
    chk("e3 tcode", e[3].msg.tcode, TC_FI_DISABLE);
    // stamps: the timeout entry comes 40 clocks after its wait started,
    // the disable message after the 20-clock delay
    chk("stamps ordered", (e[0].stamp < e[1].stamp) && (e[1].stamp < e[2].stamp) && (e[2].stamp < e[3].stamp), 1);
    chk("delay then send", e[3].stamp - e[2].stamp >= 20, 1);
    chk("wait timeout length", e[2].stamp - e[1].stamp >= 25 && e[2].stamp - e[1].stamp <= 40, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
