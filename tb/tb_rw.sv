// tb_rw: self-checking testbench of the read/write unit.
// A small RAM model answers the memory port and a register file model the
// CPU register port. Checks: device id and FI status read, forwarding of
// other registers to the run control unit, RAW memory writes in the clock of
// the START write, memory and CPU register reads into RWD one clock later
// with DONE, the halted-only rule for CPU registers (ERR), FI_SETUP plus the
// FI trigger writing the preloaded word, and FI winning over a debugger
// START in the same clock. Random RAW accesses are compared with the models.
module tb_rw;
  import ocd_pkg::*;
  localparam int AW = 16, DW = 8, RW = 16;

  logic          clk = 0, rst_n = 0;
  logic          reg_we = 0;
  logic [7:0]    reg_idx = 0;
  logic [RW-1:0] reg_wdata = 0, reg_rdata;
  logic          fi_setup = 0, fi_trigger = 0;
  logic [AW-1:0] fi_addr = 0;
  logic [DW-1:0] fi_data = 0;
  logic [7:0]    fi_status = 8'h5A;
  logic          rct_we;
  logic [RW-1:0] rct_wdata, rct_rdata;
  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic          cpu_halted = 0;
  logic          creg_en, creg_we;
  logic [7:0]    creg_addr;
  logic [DW-1:0] creg_wdata, creg_rdata;
  logic          access_done;

  rw #(.ADDR_W(AW), .DATA_W(DW), .RW_W(RW), .CREG_W(8), .DEVICE_ID(32'h1234_5678)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // models
  logic [DW-1:0] ram [256];
  logic [DW-1:0] cregs [256];
  logic [RW-1:0] rct_regs [256];
  int mem_writes = 0;
  always @(posedge clk) begin
    if (mem_en) mem_rdata <= ram[mem_addr[7:0]];
    if (mem_en && mem_we) begin ram[mem_addr[7:0]] <= mem_wdata; mem_writes++; end
    if (creg_en) creg_rdata <= cregs[creg_addr];
    if (creg_en && creg_we) cregs[creg_addr] <= creg_wdata;
    if (rct_we) rct_regs[reg_idx] <= rct_wdata;
  end
  assign rct_rdata = rct_regs[reg_idx];

  task automatic chk(string what, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s: got %0h expected %0h at %0t", what, g, e, $time); end
  endtask

  task automatic wr(logic [7:0] idx, logic [RW-1:0] d);
    @(negedge clk); reg_we = 1; reg_idx = idx; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic rd(logic [7:0] idx, output logic [RW-1:0] d);
    @(negedge clk); reg_idx = idx; #1 d = reg_rdata;
  endtask

  logic [DW-1:0] ref_ram [256];
  logic [DW-1:0] ref_creg [256];

  initial begin
    logic [RW-1:0] v;
    for (int i = 0; i < 256; i++) begin
      ram[i] = 8'(i * 7 + 3); ref_ram[i] = ram[i];
      cregs[i] = 8'(i ^ 8'h3C); ref_creg[i] = cregs[i];
      rct_regs[i] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1;

    rd(REG_DID, v); chk("device id", v, 16'h5678);
    rd(REG_FIS, v); chk("fi status", v, 16'h005A);
    wr(8'h05, 16'hBEEF);
    rd(8'h05, v); chk("forwarded register", v, 16'hBEEF);
    chk("RAW not forwarded", rct_regs[REG_RWA], 0);
    wr(REG_RWA, 16'h0010);
    chk("RWA stays local", rct_regs[REG_RWA], 0);

    // memory write: port driven in the clock of the START write
    wr(REG_RWD, 8'hC3);
    @(negedge clk); reg_we = 1; reg_idx = REG_RWCS; reg_wdata = 16'b0_0011; #1;
    chk("mem_we same clock", mem_we, 1);
    chk("mem_addr", mem_addr, 16'h0010);
    chk("mem_wdata", mem_wdata, 8'hC3);
    @(negedge clk); reg_we = 0;
    chk("written", ram[16], 8'hC3); ref_ram[16] = 8'hC3;
    rd(REG_RWCS, v); chk("done after write", v[RWCS_DONE], 1);

    // memory read: RWD one clock later
    wr(REG_RWA, 16'h0020);
    wr(REG_RWCS, 16'b0_0001);
    rd(REG_RWD, v); chk("mem read data", v, ref_ram[32]);
    rd(REG_RWCS, v); chk("done after read", v[RWCS_DONE], 1);

    // CPU register access refused while running
    wr(REG_RWA, 16'h0003);
    wr(REG_RWCS, 16'b0_0101);
    rd(REG_RWCS, v); chk("err when running", v[RWCS_ERR], 1);
    rd(REG_RWD, v); chk("no read when running", v, ref_ram[32]);
    cpu_halted = 1;
    wr(REG_RWCS, 16'b0_0101);
    rd(REG_RWD, v); chk("cpu reg read", v, ref_creg[3]);
    rd(REG_RWCS, v); chk("no err when halted", v[RWCS_ERR], 0);
    wr(REG_RWD, 8'h99);
    wr(REG_RWCS, 16'b0_0111);
    chk("cpu reg write", cregs[3], 8'h99); ref_creg[3] = 8'h99;

    // fault injection: setup then trigger
    @(negedge clk); fi_setup = 1; fi_addr = 16'h0040; fi_data = 8'h5E;
    @(negedge clk); fi_setup = 0;
    rd(REG_RWA, v); chk("setup RWA", v, 16'h0040);
    rd(REG_RWD, v); chk("setup RWD", v, 8'h5E);
    rd(REG_RWCS, v); chk("setup RWCS write mem", v[2:1], 2'b01);
    chk("nothing written before trigger", ram[64], ref_ram[64]);
    @(negedge clk); fi_trigger = 1; #1;
    chk("fi write same clock", mem_we, 1);
    @(negedge clk); fi_trigger = 0;
    chk("fault written", ram[64], 8'h5E); ref_ram[64] = 8'h5E;

    // collision: FI trigger and a debugger read START in the same clock
    @(negedge clk); fi_trigger = 1; reg_we = 1; reg_idx = REG_RWCS; reg_wdata = 16'b0_0001; #1;
    chk("FI wins collision", mem_we, 1);
    @(negedge clk); fi_trigger = 0; reg_we = 0;

    // random RAW accesses
    repeat (300) begin
      logic [7:0] a; logic w; logic c; logic [7:0] d;
      a = 8'($urandom); w = 1'($urandom); c = 1'($urandom); d = 8'($urandom);
      cpu_halted = 1'($urandom);
      wr(REG_RWA, 16'(a));
      if (w) wr(REG_RWD, 16'(d));
      wr(REG_RWCS, 16'({c, w, 1'b1}));
      rd(REG_RWCS, v);
      if (c && !cpu_halted) chk("rand err", v[RWCS_ERR], 1);
      else begin
        chk("rand done", v[RWCS_DONE], 1);
        if (w) begin
          if (c) ref_creg[a] = d; else ref_ram[a] = d;
        end else begin
          rd(REG_RWD, v);
          chk("rand read", v, c ? ref_creg[a] : ref_ram[a]);
        end
      end
    end
    for (int i = 0; i < 256; i++) begin
      chk("final ram", ram[i], ref_ram[i]);
      chk("final creg", cregs[i], ref_creg[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
