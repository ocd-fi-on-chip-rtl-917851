// mmq: message management and queuing (MMQ) unit, the NEXUS message
// handler of the on-chip debug infrastructure.
//
// Input side. nexus_rx turns the serial input port (mdi/msei) into
// messages, which wait in an input queue of IQ_DEPTH entries. The head is
// executed in one clock: REG_WRITE writes a debug register, REG_READ reads
// one and answers with REG_VALUE (or DEVICE_ID for the device id register),
// FI_SETUP loads the RAW registers of the read/write unit, FI_ENABLE and
// FI_DISABLE arm and disarm the FI module. A REG_READ waits at the head
// while the previous answer has not yet moved on. An unknown TCODE is
// dropped and reported.
//
// Output side. Every message source owns a one-message slot: error,
// watchpoint, register answer, debug status, program trace, data trace, in
// that priority order. Each clock the highest-priority full slot moves into
// the output queue (OQ_DEPTH entries) if it has room, and nexus_tx sends the
// queue head on the serial output port (mdo/mseo). A message arriving at a
// slot that is still full is lost; so is an input message arriving at a full
// input queue or a malformed one. Each loss sets a flag, and the flags go out
// as an ERROR message (IDX bits ERR_OVF_OUT, ERR_OVF_IN, ERR_PROTO).
//
// EVTI is passed to the run control unit and the run control unit's hit
// pulse drives EVTO. The port clocks MCKI and MCKO are the core clock here:
// mdi/msei are sampled and mdo/mseo change on its rising edge.
//
// Translating debug operations to messages and back and managing the queues
// is the described role of this unit; the queue sizes, the slot scheme, the
// priorities and the error reporting are this design's own.
module mmq
  import ocd_pkg::*;
#(
  parameter int MDI_W    = 8,
  parameter int MDO_W    = 8,
  parameter int ADDR_W   = 16,
  parameter int DATA_W   = 8,
  parameter int RW_W     = 16,
  parameter int IQ_DEPTH = 4,
  parameter int OQ_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // NEXUS port
  input  logic [MDI_W-1:0]  mdi,
  input  mseo_e             msei,
  output logic [MDO_W-1:0]  mdo,
  output mseo_e             mseo,
  input  logic              evti,
  output logic              evto,
  // run control and trace unit
  output logic              rct_evti,
  input  logic              rct_evt_hit,
  input  nexus_msg_t        rct_msg [NUM_RCT_SRC],
  input  logic [NUM_RCT_SRC-1:0] rct_msg_valid,
  // register access through the read/write unit
  output logic              reg_we,
  output logic [7:0]        reg_idx,
  output logic [RW_W-1:0]   reg_wdata,
  input  logic [RW_W-1:0]   reg_rdata,
  // fault injection commands
  output logic              fi_setup,
  output logic [ADDR_W-1:0] fi_addr,
  output logic [DATA_W-1:0] fi_data,
  output logic              fi_en,
  output logic [NUM_BP-1:0] fi_mask,
  output logic              fi_dis,
  output logic [2:0]        err_seen   // sticky loss flags, for observation
);
  localparam int MSG_W  = $bits(nexus_msg_t);
  localparam int NSLOT  = 6;
  localparam int S_ERR  = 0;
  localparam int S_WP   = 1;
  localparam int S_RESP = 2;
  localparam int S_STAT = 3;
  localparam int S_PTR  = 4;
  localparam int S_DTR  = 5;

  assign rct_evti = evti;
  assign evto     = rct_evt_hit;

  // ---------------- input side ----------------
  nexus_msg_t rx_msg, imsg;
  logic       rx_valid, rx_err;
  logic       iq_full, iq_empty, iq_pop;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_count;
  logic [MSG_W-1:0] iq_rdata;

  nexus_rx #(.PORT_W(MDI_W)) u_rx (
    .clk, .rst_n, .mdi, .msei,
    .msg(rx_msg), .msg_valid(rx_valid), .proto_err(rx_err)
  );

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .push(rx_valid), .wdata(rx_msg),
    .pop(iq_pop), .rdata(iq_rdata),
    .full(iq_full), .empty(iq_empty), .count(iq_count)
  );
  assign imsg = nexus_msg_t'(iq_rdata);

  // ---------------- output slots ----------------
  logic       slot_v [NSLOT];     // slot 0 computed, 1..NSLOT-1 from slot_vq/slot_mq
  nexus_msg_t slot_m [NSLOT];
  logic       slot_vq [NSLOT];
  nexus_msg_t slot_mq [NSLOT];
  logic [2:0] err_pend;
  logic [2:0] new_err;

  // Slot 0 is built from the pending error flags.
  logic       resp_load;
  nexus_msg_t resp_msg;
  logic       bad_cmd;

  always_comb begin
    iq_pop    = 1'b0;
    reg_we    = 1'b0;
    reg_idx   = imsg.idx;
    reg_wdata = RW_W'(imsg.data);
    fi_setup  = 1'b0;
    fi_addr   = ADDR_W'(imsg.addr);
    fi_data   = DATA_W'(imsg.data);
    fi_en     = 1'b0;
    fi_mask   = NUM_BP'(imsg.idx);
    fi_dis    = 1'b0;
    resp_load = 1'b0;
    bad_cmd   = 1'b0;
    resp_msg  = '0;
    resp_msg.tcode = (imsg.idx == REG_DID) ? TC_DEVICE_ID : TC_REG_VALUE;
    resp_msg.idx   = (imsg.idx == REG_DID) ? 8'h00 : imsg.idx;
    resp_msg.data  = 32'(reg_rdata);
    if (!iq_empty) begin
      case (imsg.tcode)
        TC_REG_READ: if (!slot_v[S_RESP]) begin
          resp_load = 1'b1;
          iq_pop    = 1'b1;
        end
        TC_REG_WRITE:  begin reg_we   = 1'b1; iq_pop = 1'b1; end
        TC_FI_SETUP:   begin fi_setup = 1'b1; iq_pop = 1'b1; end
        TC_FI_ENABLE:  begin fi_en    = 1'b1; iq_pop = 1'b1; end
        TC_FI_DISABLE: begin fi_dis   = 1'b1; iq_pop = 1'b1; end
        default:       begin bad_cmd  = 1'b1; iq_pop = 1'b1; end
      endcase
    end
  end

  // Arbiter: the first full slot moves into the output queue.
  logic       oq_full, oq_empty, oq_pop, oq_push;
  logic [$clog2(OQ_DEPTH+1)-1:0] oq_count;
  logic [MSG_W-1:0] oq_rdata;
  int         pick;
  nexus_msg_t pick_msg;

  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      slot_v[s] = slot_vq[s];
      slot_m[s] = slot_mq[s];
    end
    slot_v[S_ERR] = (err_pend != '0);
    slot_m[S_ERR] = '{tcode: TC_ERROR, idx: 8'(err_pend), addr: '0, data: '0};
    pick = NSLOT;
    for (int i = NSLOT - 1; i >= 0; i--) if (slot_v[i]) pick = i;
    oq_push  = (pick < NSLOT) && !oq_full;
    pick_msg = slot_m[(pick < NSLOT) ? pick : 0];
  end

  // Source of each RCT-fed slot.
  function automatic int src_of(int s);
    case (s)
      S_WP:    return SRC_WP;
      S_STAT:  return SRC_STATUS;
      S_PTR:   return SRC_PTRACE;
      default: return SRC_DTRACE;
    endcase
  endfunction

  always_comb begin
    new_err = '0;
    new_err[ERR_OVF_IN] = rx_valid && iq_full;
    new_err[ERR_PROTO]  = rx_err || bad_cmd;
    for (int s = 1; s < NSLOT; s++) begin
      if (s != S_RESP && rct_msg_valid[src_of(s)] && slot_v[s] && !(oq_push && pick == s))
        new_err[ERR_OVF_OUT] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_pend <= '0;
      err_seen <= '0;
      for (int s = 0; s < NSLOT; s++) begin
        slot_vq[s] <= 1'b0;
        slot_mq[s] <= '0;
      end
    end else begin
      err_pend <= ((oq_push && pick == S_ERR) ? 3'b000 : err_pend) | new_err;
      err_seen <= err_seen | new_err;
      for (int s = 1; s < NSLOT; s++) begin
        if (oq_push && pick == s) slot_vq[s] <= 1'b0;
        if (s == S_RESP) begin
          if (resp_load) begin
            slot_vq[s] <= 1'b1;
            slot_mq[s] <= resp_msg;
          end
        end else if (rct_msg_valid[src_of(s)] && (!slot_v[s] || (oq_push && pick == s))) begin
          slot_vq[s] <= 1'b1;
          slot_mq[s] <= rct_msg[src_of(s)];
        end
      end
    end
  end

  sync_fifo #(.WIDTH(MSG_W), .DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst_n,
    .push(oq_push), .wdata(pick_msg),
    .pop(oq_pop), .rdata(oq_rdata),
    .full(oq_full), .empty(oq_empty), .count(oq_count)
  );

  logic tx_ready;
  assign oq_pop = tx_ready && !oq_empty;

  nexus_tx #(.PORT_W(MDO_W), .ADDR_W(ADDR_W), .DATA_W(RW_W)) u_tx (
    .clk, .rst_n,
    .msg(nexus_msg_t'(oq_rdata)), .valid(!oq_empty), .ready(tx_ready),
    .mdo, .mseo
  );
endmodule
