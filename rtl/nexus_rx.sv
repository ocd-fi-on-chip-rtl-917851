// nexus_rx: message deserializer for one direction of the NEXUS message port.
//
// Samples the data pins (mdi) and the start/end code (msei) every clock.
// Beats are collected least significant bits first into the current packet;
// a MSEO_END_PKT or MSEO_END_MSG beat closes it. On MSEO_END_MSG the first
// packet is taken as the TCODE and the following packets are assigned to the
// IDX, ADDR and DATA fields that ocd_pkg::msg_fields() lists for it. The
// finished message appears on msg with msg_valid high for one clock, the
// clock after its last beat. A message with more packets than the layout
// allows or with a wrong packet count raises proto_err for one clock and is
// dropped. Packets wider than 32 bits keep their low 32 bits.
//
// The framing by packet and message end codes follows the NEXUS port
// description; the encoding is this design's own (see nexus_tx).
module nexus_rx
  import ocd_pkg::*;
#(
  parameter int PORT_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PORT_W-1:0] mdi,
  input  mseo_e             msei,
  output nexus_msg_t        msg,
  output logic              msg_valid,
  output logic              proto_err
);
  logic [31:0] pk [4];
  logic [2:0]  npk;        // packets closed so far in this message
  logic [5:0]  beat;
  logic [31:0] acc;
  logic [31:0] acc_now;
  logic        overflow;   // more than four packets seen

  // The current beat merged into the packet being collected.
  always_comb begin
    acc_now = acc;
    if (int'(beat) * PORT_W < 32) acc_now = acc | (32'(mdi) << (int'(beat) * PORT_W));
  end

  // Assemble the message from the packets closed before and the one closing now.
  nexus_msg_t  asm_msg;
  logic        asm_ok;
  always_comb begin
    logic [31:0] p [4];
    msg_fields_t fl;
    int          n;
    for (int i = 0; i < 4; i++) p[i] = (3'(i) == npk) ? acc_now : pk[i];
    asm_msg       = '0;
    asm_msg.tcode = p[0][TCODE_W-1:0];
    fl            = msg_fields(asm_msg.tcode);
    n             = 1;
    if (fl.has_idx)  begin asm_msg.idx  = p[n[1:0]][IDX_W-1:0]; n++; end
    if (fl.has_addr) begin asm_msg.addr = p[n[1:0]];            n++; end
    if (fl.has_data) begin asm_msg.data = p[n[1:0]];            n++; end
    asm_ok = !overflow && (int'(npk) + 1 == n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      npk       <= '0;
      beat      <= '0;
      acc       <= '0;
      overflow  <= 1'b0;
      msg       <= '0;
      msg_valid <= 1'b0;
      proto_err <= 1'b0;
      for (int i = 0; i < 4; i++) pk[i] <= '0;
    end else begin
      msg_valid <= 1'b0;
      proto_err <= 1'b0;
      case (msei)
        MSEO_DATA: begin
          acc  <= acc_now;
          beat <= beat + 6'd1;
        end
        MSEO_END_PKT: begin
          if (npk < 3'd4) pk[npk[1:0]] <= acc_now;
          else            overflow <= 1'b1;
          if (npk < 3'd4) npk <= npk + 3'd1;
          acc  <= '0;
          beat <= '0;
        end
        MSEO_END_MSG: begin
          if (asm_ok && npk < 3'd4) begin
            msg       <= asm_msg;
            msg_valid <= 1'b1;
          end else begin
            proto_err <= 1'b1;
          end
          npk      <= '0;
          acc      <= '0;
          beat     <= '0;
          overflow <= 1'b0;
        end
        default: ;  // idle
      endcase
    end
  end
endmodule
