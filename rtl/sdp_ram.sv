// sdp_ram: simple dual-port synchronous RAM, one write port and one read
// port on the same clock. Used for the campaign command memory and the
// result memory of the campaign debugger.
//
// A write stores wdata at waddr on the clock edge. A read returns the word at
// raddr on the edge after re (one cycle latency); rdata holds otherwise.
// Reading an address written on the same edge returns the old word.
module sdp_ram #(
  parameter int WIDTH = 8,
  parameter int AW    = 8
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
