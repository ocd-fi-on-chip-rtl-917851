// fi: fault injection (FI) module.
//
// When armed, it watches the watchpoint hit lines of the run control and
// trace unit. The first hit on a line selected by the arm mask raises
// trigger, which makes the read/write unit run the access preloaded in its
// RAW registers (a memory write of the faulty word), and the module disarms
// itself in the same clock, so the debug resources are free again.
//
// Interface: en_cmd (one clock) arms the module with en_mask (a zero mask
// selects every line) and clears the injected flag; dis_cmd disarms it.
// trigger is combinational from wp_hit and the armed state, so the write
// reaches the memory on the edge after the hit is reported. status is the
// FI status register: [0] armed, [3:1] mask, [4] injected since last arm.
//
// The behaviour (enable, watch the watchpoint signals, order one write,
// disable itself) is the one described for the FI module; the command
// interface and the status layout are this design's own.
module fi #(
  parameter int NWP = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NWP-1:0] wp_hit,
  input  logic           en_cmd,
  input  logic [NWP-1:0] en_mask,
  input  logic           dis_cmd,
  output logic           trigger,
  output logic [7:0]     status
);
  logic           armed;
  logic           injected;
  logic [NWP-1:0] mask;

  assign trigger = armed && |(wp_hit & mask);

  always_comb begin
    status = '0;
    status[0] = armed;
    status[1 +: NWP] = mask;
    status[4] = injected;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed    <= 1'b0;
      injected <= 1'b0;
      mask     <= '0;
    end else if (en_cmd) begin
      armed    <= 1'b1;
      injected <= 1'b0;
      mask     <= (en_mask == '0) ? '1 : en_mask;
    end else if (dis_cmd) begin
      armed    <= 1'b0;
    end else if (trigger) begin
      armed    <= 1'b0;
      injected <= 1'b1;
    end
  end

  // The module arms only on a command and fires at most once per arming.
  assert property (@(posedge clk) disable iff (!rst_n) trigger |=> !armed || $past(en_cmd));
endmodule
