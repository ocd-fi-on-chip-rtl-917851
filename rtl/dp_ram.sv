// dp_ram: target data RAM with two independent synchronous ports.
//
// Port A belongs to the CPU, port B to the debug infrastructure (the RW
// unit), so the debugger reads and writes memory in real time without
// stopping the CPU, and a fault injection write lands while the application
// keeps running. Each port writes wdata on the clock edge when en and we are
// high, and returns the addressed word on the edge after en (read-first: a
// read of the word being written returns the old value). When both ports
// write the same word on the same edge, port B wins, so an injected fault is
// never lost to a simultaneous CPU write.
//
// The RAM sits between the CPU and the debugger as the target of real-time
// memory access and of fault injection. Its size, the read latency and the
// collision rule are this design's own choices.
module dp_ram #(
  parameter int DATA_W = 8,
  parameter int AW     = 12
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  logic [DATA_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end
endmodule
