// campaign_ctrl: fault campaign debugger.
//
// Runs a fault injection campaign stored as a command list in an on-chip
// command memory and keeps what the target reports in a result memory, so
// a whole campaign runs inside one programmable device without a host in
// the loop. It talks to the target only through the target's NEXUS port:
// its nexus_tx drives the target's mdi/msei, its nexus_rx listens to the
// target's mdo/mseo.
//
// Commands (ocd_pkg::campaign_cmd_t), executed in order from address 0
// after start:
//   CMD_SEND   send the message (e.g. REG_WRITE, FI_SETUP, FI_ENABLE);
//   CMD_WAIT   wait until a message with the given TCODE arrives, or for
//              msg.data cycles if that is not zero (then a timeout entry is
//              recorded);
//   CMD_RESET  hold the target CPU reset (tgt_rst) for msg.data cycles, so
//              the application starts again from the beginning;
//   CMD_DELAY  wait msg.data cycles;
//   CMD_END    stop and raise done.
// From start on, also after END, every message received from the target is
// written to the result memory with a 16-bit cycle stamp counted from start, up to
// 2**RES_AW entries (res_full tells when later ones were lost).
//
// Host side: cmd_we/cmd_waddr/cmd_wdata load the command memory; res_raddr
// reads the result memory with one clock of latency. A command takes two
// clocks to fetch; SEND then waits for the serializer.
//
// Keeping the campaign and the results in RAM blocks next to the target is
// the described arrangement; the command set and its encoding are this
// design's own.
module campaign_ctrl
  import ocd_pkg::*;
#(
  parameter int ADDR_W = 16,
  parameter int RW_W   = 16,
  parameter int MDI_W  = 8,    // target input port width
  parameter int MDO_W  = 8,    // target output port width
  parameter int CMD_AW = 8,
  parameter int RES_AW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              cmd_we,
  input  logic [CMD_AW-1:0] cmd_waddr,
  input  campaign_cmd_t     cmd_wdata,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [RES_AW-1:0] res_raddr,
  output campaign_res_t     res_rdata,
  output logic [RES_AW:0]   res_count,
  output logic              res_full,
  // target
  output logic              tgt_rst,
  output logic [MDI_W-1:0]  tgt_mdi,
  output mseo_e             tgt_msei,
  input  logic [MDO_W-1:0]  tgt_mdo,
  input  mseo_e             tgt_mseo
);
  localparam int CMD_W = $bits(campaign_cmd_t);
  localparam int RES_W = $bits(campaign_res_t);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_SEND, S_WAIT, S_TIMED, S_DONE} st_e;

  st_e           st;
  logic [CMD_AW-1:0] pc;
  campaign_cmd_t cur;
  logic [31:0]   timer;
  logic [15:0]   stamp;
  logic [CMD_W-1:0] cmd_rdata;
  campaign_cmd_t cmd_fetched;
  assign cmd_fetched = campaign_cmd_t'(cmd_rdata);
  logic [RES_W-1:0] res_rbits;

  sdp_ram #(.WIDTH(CMD_W), .AW(CMD_AW)) u_cmd_mem (
    .clk, .we(cmd_we), .waddr(cmd_waddr), .wdata(cmd_wdata),
    .re(st == S_FETCH), .raddr(pc), .rdata(cmd_rdata)
  );

  // Target link.
  logic       tx_ready;
  nexus_msg_t rx_msg;
  logic       rx_valid, rx_err;

  nexus_tx #(.PORT_W(MDI_W), .ADDR_W(ADDR_W), .DATA_W(RW_W)) u_tx (
    .clk, .rst_n, .msg(cur.msg), .valid(st == S_SEND), .ready(tx_ready),
    .mdo(tgt_mdi), .mseo(tgt_msei)
  );

  nexus_rx #(.PORT_W(MDO_W)) u_rx (
    .clk, .rst_n, .mdi(tgt_mdo), .msei(tgt_mseo),
    .msg(rx_msg), .msg_valid(rx_valid), .proto_err(rx_err)
  );

  // Result recording.
  logic          timed_out, res_we;
  campaign_res_t res_entry;
  always_comb begin
    timed_out = st == S_WAIT && !rx_valid && cur.msg.data != '0 && timer + 1 >= cur.msg.data;
    res_entry = '{timeout: !rx_valid, stamp: stamp, msg: rx_valid ? rx_msg : cur.msg};
    res_we    = st != S_IDLE && (rx_valid || timed_out) && !res_count[RES_AW];
  end

  sdp_ram #(.WIDTH(RES_W), .AW(RES_AW)) u_res_mem (
    .clk, .we(res_we), .waddr(res_count[RES_AW-1:0]), .wdata(res_entry),
    .re(1'b1), .raddr(res_raddr), .rdata(res_rbits)
  );
  assign res_rdata = campaign_res_t'(res_rbits);

  assign busy = st != S_IDLE && st != S_DONE;
  assign done = st == S_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      pc        <= '0;
      cur       <= '0;
      timer     <= '0;
      stamp     <= '0;
      res_count <= '0;
      res_full  <= 1'b0;
      tgt_rst   <= 1'b0;
    end else begin
      if (st != S_IDLE) stamp <= stamp + 16'd1;
      if (res_we) res_count <= res_count + 1'b1;
      if (st != S_IDLE && (rx_valid || timed_out) && res_count[RES_AW]) res_full <= 1'b1;
      case (st)
        S_IDLE, S_DONE: if (start) begin
          st        <= S_FETCH;
          pc        <= '0;
          stamp     <= '0;
          res_count <= '0;
          res_full  <= 1'b0;
        end
        S_FETCH: st <= S_DECODE;
        S_DECODE: begin
          cur   <= cmd_fetched;
          pc    <= pc + 1'b1;
          timer <= '0;
          case (cmd_fetched.op)
            CMD_SEND:  st <= S_SEND;
            CMD_WAIT:  st <= S_WAIT;
            CMD_RESET: begin st <= S_TIMED; tgt_rst <= 1'b1; end
            CMD_DELAY: st <= S_TIMED;
            default:   st <= S_DONE;
          endcase
        end
        S_SEND: if (tx_ready) st <= S_FETCH;
        S_WAIT: begin
          timer <= timer + 1;
          if ((rx_valid && rx_msg.tcode == cur.msg.tcode) || timed_out) st <= S_FETCH;
        end
        S_TIMED: begin
          timer <= timer + 1;
          if (timer + 1 >= cur.msg.data) begin
            st      <= S_FETCH;
            tgt_rst <= 1'b0;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
