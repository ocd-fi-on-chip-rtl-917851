// tb_mmq: self-checking testbench of the message manager.
// Uses a 2-bit input port and an 8-bit output port so that packets span
// several beats. Sends REG_WRITE, REG_READ, FI_* and malformed messages and
// checks the register and FI command pulses and the answers; feeds the run
// control message sources and checks the messages on the output port, their
// beat framing and length, the source priority, the loss of messages when a
// slot overflows and the ERROR message that reports it, and EVTI/EVTO.
module tb_mmq;
  import ocd_pkg::*;
  import tb_nexus_pkg::*;
  localparam int MDI_W = 2, MDO_W = 8, AW = 16, DW = 8, RW = 16;

  logic             clk = 0, rst_n = 0;
  logic [MDI_W-1:0] mdi = 0;
  mseo_e            msei = MSEO_IDLE;
  logic [MDO_W-1:0] mdo;
  mseo_e            mseo;
  logic             evti = 0, evto, rct_evti, rct_evt_hit = 0;
  nexus_msg_t       rct_msg [NUM_RCT_SRC];
  logic [NUM_RCT_SRC-1:0] rct_msg_valid = 0;
  logic             reg_we;
  logic [7:0]       reg_idx;
  logic [RW-1:0]    reg_wdata, reg_rdata;
  logic             fi_setup, fi_en, fi_dis;
  logic [AW-1:0]    fi_addr;
  logic [DW-1:0]    fi_data;
  logic [2:0]       fi_mask, err_seen;

  mmq #(.MDI_W(MDI_W), .MDO_W(MDO_W), .ADDR_W(AW), .DATA_W(DW), .RW_W(RW),
        .IQ_DEPTH(4), .OQ_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0h expected %0h at %0t", what, g, e, $time); end
  endtask

  // register file behind the register port
  logic [RW-1:0] regs [256];
  assign reg_rdata = (reg_idx == REG_DID) ? 16'hD1D0 : regs[reg_idx];
  int fi_setups = 0, fi_ens = 0, fi_diss = 0;
  logic [AW-1:0] last_fi_addr; logic [DW-1:0] last_fi_data; logic [2:0] last_mask;
  always @(posedge clk) begin
    if (reg_we) regs[reg_idx] <= reg_wdata;
    if (fi_setup) begin fi_setups++; last_fi_addr <= fi_addr; last_fi_data <= fi_data; end
    if (fi_en) begin fi_ens++; last_mask <= fi_mask; end
    if (fi_dis) fi_diss++;
  end

  // output port collector
  nexus_msg_t outq [$];
  int         outlen [$];
  beat_t      cur [$];
  always @(posedge clk) begin
    if (rst_n && mseo != MSEO_IDLE) begin
      cur.push_back('{code: mseo, d: 32'(mdo)});
      if (mseo == MSEO_END_MSG) begin
        outq.push_back(decode(cur, MDO_W));
        outlen.push_back(cur.size());
        cur.delete();
      end
    end
  end

  task automatic send(nexus_msg_t m);
    beat_t q[$];
    encode(m, MDI_W, AW, RW, q);
    foreach (q[i]) begin
      @(negedge clk); mdi = MDI_W'(q[i].d); msei = mseo_e'(q[i].code);
    end
    @(negedge clk); msei = MSEO_IDLE; mdi = 0;
  endtask

  task automatic expect_out(string what, logic [5:0] tc, logic [7:0] idx, logic [31:0] a, logic [31:0] d, int beats);
    nexus_msg_t m;
    int n = 0;
    while (outq.size() == 0 && n < 200) begin @(posedge clk); n++; end
    checks++;
    if (outq.size() == 0) begin failures++; $display("FAIL %s: no output message", what); return; end
    m = outq.pop_front();
    if (m.tcode != tc || m.idx != idx || m.addr != a || m.data != d) begin
      failures++;
      $display("FAIL %s: got %0d/%0h/%0h/%0h expected %0d/%0h/%0h/%0h", what, m.tcode, m.idx, m.addr, m.data, tc, idx, a, d);
    end
    chk({what, " beats"}, outlen.pop_front(), beats);
  endtask

  task automatic rct_send(logic [NUM_RCT_SRC-1:0] which, nexus_msg_t m [NUM_RCT_SRC]);
    @(negedge clk);
    rct_msg = m; rct_msg_valid = which;
    @(negedge clk); rct_msg_valid = 0;
  endtask

  initial begin
    nexus_msg_t mm [NUM_RCT_SRC];
    for (int i = 0; i < 256; i++) regs[i] = 0;
    for (int i = 0; i < NUM_RCT_SRC; i++) rct_msg[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    // register write and read back
    send('{tcode: TC_REG_WRITE, idx: 8'h05, addr: 0, data: 32'h1234});
    repeat (3) @(negedge clk);
    chk("register written", regs[5], 16'h1234);
    send('{tcode: TC_REG_READ, idx: 8'h05, addr: 0, data: 0});
    // REG_VALUE at 8 bits/beat: tcode 1 + idx 1 + data 2 beats
    expect_out("reg value", TC_REG_VALUE, 8'h05, 0, 32'h1234, 4);
    send('{tcode: TC_REG_READ, idx: REG_DID, addr: 0, data: 0});
    expect_out("device id", TC_DEVICE_ID, 8'h00, 0, 32'hD1D0, 3);

    // fault injection commands
    send('{tcode: TC_FI_SETUP, idx: 0, addr: 32'h0ABC, data: 32'h7E});
    repeat (3) @(negedge clk);
    chk("fi_setup pulses", fi_setups, 1);
    chk("fi addr", last_fi_addr, 16'h0ABC);
    chk("fi data", last_fi_data, 8'h7E);
    send('{tcode: TC_FI_ENABLE, idx: 8'h02, addr: 0, data: 0});
    repeat (3) @(negedge clk);
    chk("fi_en pulses", fi_ens, 1);
    chk("fi mask", last_mask, 3'b010);
    send('{tcode: TC_FI_DISABLE, idx: 0, addr: 0, data: 0});
    repeat (3) @(negedge clk);
    chk("fi_dis pulses", fi_diss, 1);

    // run control sources: one message, then priority of simultaneous ones
    mm[SRC_WP]     = '{tcode: TC_WATCHPOINT, idx: 8'h01, addr: 0, data: 0};
    mm[SRC_STATUS] = '{tcode: TC_DEBUG_STATUS, idx: 8'h05, addr: 0, data: 0};
    mm[SRC_PTRACE] = '{tcode: TC_PROG_TRACE, idx: 8'h00, addr: 32'h0321, data: 32'h0007};
    mm[SRC_DTRACE] = '{tcode: TC_DATA_TRACE, idx: 8'h00, addr: 32'h0040, data: 32'h00AA};
    rct_send(4'b0100, mm);
    expect_out("prog trace", TC_PROG_TRACE, 0, 32'h0321, 32'h0007, 6);
    rct_send(4'b1111, mm);
    expect_out("prio 1 wp", TC_WATCHPOINT, 8'h01, 0, 0, 2);
    expect_out("prio 2 status", TC_DEBUG_STATUS, 8'h05, 0, 0, 2);
    expect_out("prio 3 ptrace", TC_PROG_TRACE, 0, 32'h0321, 32'h0007, 6);
    expect_out("prio 4 dtrace", TC_DATA_TRACE, 0, 32'h0040, 32'h00AA, 5);

    // overflow: data trace every clock for 40 clocks
    chk("no error yet", err_seen, 0);
    for (int i = 0; i < 40; i++) begin
      mm[SRC_DTRACE].addr = 32'(i);
      @(negedge clk); rct_msg = mm; rct_msg_valid = 4'b1000;
    end
    @(negedge clk); rct_msg_valid = 0;
    repeat (300) @(negedge clk);
    chk("overflow flagged", err_seen[ERR_OVF_OUT], 1);
    begin
      int n_err = 0, n_dtr = 0;
      nexus_msg_t m;
      while (outq.size() > 0) begin
        m = outq.pop_front();
        void'(outlen.pop_front());
        if (m.tcode == TC_ERROR && m.idx[ERR_OVF_OUT]) n_err++;
        if (m.tcode == TC_DATA_TRACE) n_dtr++;
      end
      chk("error message sent", n_err > 0, 1);
      chk("some traces lost", n_dtr < 40, 1);
      chk("some traces kept", n_dtr > 4, 1);
    end

    // malformed / unknown input
    send('{tcode: 6'd40, idx: 0, addr: 0, data: 0});
    expect_out("protocol error", TC_ERROR, 8'(1 << ERR_PROTO), 0, 0, 2);

    // event pins
    @(negedge clk); evti = 1; rct_evt_hit = 1; #1;
    chk("evti passed", rct_evti, 1);
    chk("evto driven", evto, 1);
    @(negedge clk); evti = 0; rct_evt_hit = 0; #1;
    chk("evto low", evto, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
