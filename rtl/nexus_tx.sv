// nexus_tx: message serializer for one direction of the NEXUS message port.
//
// A message (ocd_pkg::nexus_msg_t) is accepted with valid/ready and sent as
// its TCODE packet followed by the IDX, ADDR and DATA packets that
// ocd_pkg::msg_fields() lists for that TCODE. Each packet goes out least
// significant bits first, PORT_W bits per clock, in ceil(width/PORT_W)
// beats; the packet widths are 6 (TCODE), 8 (IDX), ADDR_W and DATA_W.
// mseo marks every beat: MSEO_DATA inside a packet, MSEO_END_PKT on the last
// beat of a packet, MSEO_END_MSG on the last beat of the message and
// MSEO_IDLE when nothing is sent. ready is high only while idle, so
// consecutive messages are separated by at least one idle clock.
//
// The port width choice (one, two, four, eight or more pins) and the
// start/end marking follow the NEXUS port description; the beat order and the
// encoding are this design's own.
module nexus_tx
  import ocd_pkg::*;
#(
  parameter int PORT_W = 8,
  parameter int ADDR_W = 16,
  parameter int DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  nexus_msg_t        msg,
  input  logic              valid,
  output logic              ready,
  output logic [PORT_W-1:0] mdo,
  output mseo_e             mseo
);
  // Packet numbers: 0 TCODE, 1 IDX, 2 ADDR, 3 DATA, 4 none.
  logic              busy;
  logic [2:0]        pkt;
  logic [5:0]        beat;
  logic [31:0]       sh;
  nexus_msg_t        m;
  msg_fields_t       f;

  function automatic int pkt_width(logic [2:0] p);
    case (p)
      3'd0:    return TCODE_W;
      3'd1:    return IDX_W;
      3'd2:    return ADDR_W;
      default: return DATA_W;
    endcase
  endfunction

  function automatic logic [2:0] next_pkt(logic [2:0] p, msg_fields_t fl);
    if (p < 3'd1 && fl.has_idx)  return 3'd1;
    if (p < 3'd2 && fl.has_addr) return 3'd2;
    if (p < 3'd3 && fl.has_data) return 3'd3;
    return 3'd4;
  endfunction

  function automatic logic [31:0] pkt_value(logic [2:0] p, nexus_msg_t mm);
    case (p)
      3'd0:    return 32'(mm.tcode);
      3'd1:    return 32'(mm.idx);
      3'd2:    return 32'(mm.addr[ADDR_W-1:0]);
      default: return 32'(mm.data[DATA_W-1:0]);
    endcase
  endfunction

  logic [5:0] beats;
  logic       last_beat, last_pkt;
  logic [2:0] npkt;

  always_comb begin
    beats     = 6'((pkt_width(pkt) + PORT_W - 1) / PORT_W);
    last_beat = (beat == beats - 6'd1);
    npkt      = next_pkt(pkt, f);
    last_pkt  = (npkt == 3'd4);
    ready     = !busy;
    mdo       = sh[PORT_W-1:0];
    if (!busy)          mseo = MSEO_IDLE;
    else if (!last_beat) mseo = MSEO_DATA;
    else if (last_pkt)  mseo = MSEO_END_MSG;
    else                mseo = MSEO_END_PKT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      pkt  <= '0;
      beat <= '0;
      sh   <= '0;
      m    <= '0;
      f    <= '0;
    end else if (!busy) begin
      if (valid) begin
        busy <= 1'b1;
        m    <= msg;
        f    <= msg_fields(msg.tcode);
        pkt  <= 3'd0;
        beat <= '0;
        sh   <= pkt_value(3'd0, msg);
      end
    end else if (!last_beat) begin
      beat <= beat + 6'd1;
      sh   <= sh >> PORT_W;
    end else if (last_pkt) begin
      busy <= 1'b0;
    end else begin
      pkt  <= npkt;
      beat <= '0;
      sh   <= pkt_value(npkt, m);
    end
  end
endmodule
