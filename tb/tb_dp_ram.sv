// tb_dp_ram: self-checking testbench of the dual-port target RAM.
// Random reads and writes on both ports are compared with a reference
// array, including the one-clock read latency, read-first behaviour and the
// rule that port B wins a same-address write collision.
module tb_dp_ram;
  localparam int DW = 8, AW = 6;
  logic          clk = 0;
  logic          a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [DW-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [2**AW];

  dp_ram #(.DATA_W(DW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_a, exp_b;
    logic          chk_a, chk_b;
    // fill through port A
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = DW'($urandom);
      ref_mem[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    // collision: both write the same word, B wins
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = 5; a_wdata = 8'h11;
    b_en = 1; b_we = 1; b_addr = 5; b_wdata = 8'h22;
    ref_mem[5] = 8'h22;
    @(negedge clk);
    a_we = 0; b_we = 0; a_addr = 5; b_addr = 5;
    @(negedge clk);
    checks += 2;
    if (a_rdata !== 8'h22 || b_rdata !== 8'h22) begin
      failures++; $display("FAIL collision: %h %h", a_rdata, b_rdata);
    end
    // random traffic
    repeat (2000) begin
      @(negedge clk);
      a_en = $urandom % 2; a_we = $urandom % 2; a_addr = AW'($urandom); a_wdata = DW'($urandom);
      b_en = $urandom % 2; b_we = $urandom % 2; b_addr = AW'($urandom); b_wdata = DW'($urandom);
      chk_a = a_en; chk_b = b_en;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("FAIL A read %h exp %h", a_rdata, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("FAIL B read %h exp %h", b_rdata, exp_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
