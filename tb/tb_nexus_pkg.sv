// tb_nexus_pkg: testbench reference for the NEXUS message framing.
// encode() turns a message into the list of port beats (start/end code and
// data bits) that the port must carry; decode() turns the beats of one
// received message back into a message. Packets go least significant bits
// first, PORT_W bits a beat; the packet list of a TCODE comes from
// ocd_pkg::msg_fields().
package tb_nexus_pkg;
  import ocd_pkg::*;

  typedef struct packed {
    logic [1:0]  code;
    logic [31:0] d;
  } beat_t;

  function automatic void encode(nexus_msg_t m, int pw, int aw, int dw, ref beat_t q[$]);
    msg_fields_t f = msg_fields(m.tcode);
    longint vals [4];
    int     ws   [4];
    bit     pres [4];
    int     last;
    vals = '{longint'(m.tcode), longint'(m.idx), longint'(m.addr), longint'(m.data)};
    ws   = '{6, 8, aw, dw};
    pres = '{1'b1, f.has_idx, f.has_addr, f.has_data};
    last = 0;
    for (int i = 0; i < 4; i++) if (pres[i]) last = i;
    for (int i = 0; i < 4; i++) begin
      int nb;
      nb = pres[i] ? (ws[i] + pw - 1) / pw : 0;
      for (int b = 0; b < nb; b++) begin
        beat_t bt;
        bt.d = 32'((vals[i] >> (b * pw)) & ((64'd1 << pw) - 1));
        if (b != nb - 1)   bt.code = 2'b00;
        else if (i == last) bt.code = 2'b10;
        else               bt.code = 2'b01;
        q.push_back(bt);
      end
    end
  endfunction

  function automatic nexus_msg_t decode(beat_t q[$], int pw);
    longint     pk [$];
    longint     acc = 0;
    int         b = 0;
    nexus_msg_t m = '0;
    msg_fields_t f;
    int         n;
    foreach (q[i]) begin
      acc |= longint'(q[i].d) << (b * pw);
      b++;
      if (q[i].code != 2'b00) begin pk.push_back(acc); acc = 0; b = 0; end
    end
    m.tcode = 6'(pk[0]);
    f = msg_fields(m.tcode);
    n = 1;
    if (f.has_idx)  begin m.idx  = 8'(pk[n]);  n++; end
    if (f.has_addr) begin m.addr = 32'(pk[n]); n++; end
    if (f.has_data) begin m.data = 32'(pk[n]); n++; end
    return m;
  endfunction
endpackage
