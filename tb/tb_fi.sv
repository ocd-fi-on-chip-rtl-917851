// tb_fi: self-checking testbench of the fault injection module.
// Arms the module with several masks, drives watchpoint hits and checks that
// the trigger fires on the first selected hit only, in the same clock, that
// the module then disarms itself, and that disarming and the status bits
// work. A random sequence is compared with a reference model.
module tb_fi;
  logic       clk = 0, rst_n = 0;
  logic [2:0] wp_hit = 0, en_mask = 0;
  logic       en_cmd = 0, dis_cmd = 0, trigger;
  logic [7:0] status;
  int checks = 0, failures = 0;

  fi #(.NWP(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // reference state
  logic       r_armed = 0, r_inj = 0;
  logic [2:0] r_mask = 0;

  task automatic step(logic [2:0] hit, logic en, logic [2:0] m, logic dis);
    logic exp_trig;
    @(negedge clk);
    wp_hit = hit; en_cmd = en; en_mask = m; dis_cmd = dis;
    #1;
    exp_trig = r_armed && |(hit & r_mask);
    check("trigger", trigger, exp_trig);
    if (en) begin r_armed = 1; r_inj = 0; r_mask = (m == 0) ? 3'b111 : m; end
    else if (dis) r_armed = 0;
    else if (exp_trig) begin r_armed = 0; r_inj = 1; end
    @(posedge clk); #1;
    check("armed", status[0], r_armed);
    check("injected", status[4], r_inj);
    checks++;
    if (status[3:1] !== r_mask) begin failures++; $display("FAIL mask %b/%b", status[3:1], r_mask); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // not armed: no trigger
    step(3'b111, 0, 0, 0);
    // arm on watchpoint 1 only
    step(3'b000, 1, 3'b010, 0);
    step(3'b001, 0, 0, 0);     // other line: nothing
    step(3'b100, 0, 0, 0);
    step(3'b010, 0, 0, 0);     // fires
    check("disarmed after fire", status[0], 1'b0);
    step(3'b010, 0, 0, 0);     // fires no more
    // arm with zero mask = all lines, then disable
    step(3'b000, 1, 3'b000, 0);
    step(3'b000, 0, 0, 1);
    step(3'b111, 0, 0, 0);
    // random sequence
    repeat (400) step(3'($urandom), ($urandom % 8) == 0, 3'($urandom), ($urandom % 16) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
