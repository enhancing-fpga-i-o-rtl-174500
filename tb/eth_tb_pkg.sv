// eth_tb_pkg: testbench helpers for the EthController. Builds MII nibble
// streams of protocol frames and checks frames captured from the transmit
// side. The CRC here is a bit-serial, MSB-first model of the IEEE 802.3
// CRC-32 (polynomial 04C11DB7h on bit-reversed bytes), written apart from the
// byte-wide reflected form in the design, so that the two check each other.
package eth_tb_pkg;

  localparam logic [31:0] T_DATA = 32'h4441_5441;   // "DATA"
  localparam logic [31:0] T_ACK  = 32'h4143_4B20;   // "ACK "

  typedef logic [7:0] byte_q_t [$];
  typedef logic [3:0] nib_q_t  [$];

  function automatic logic [31:0] ref_fcs(input byte_q_t m);
    logic [31:0] r = 32'hFFFF_FFFF;
    logic [31:0] o;
    foreach (m[k]) begin
      for (int i = 0; i < 8; i++) begin
        logic fb = r[31] ^ m[k][i];          // LSB of the byte first
        r = {r[30:0], 1'b0};
        if (fb) r = r ^ 32'h04C1_1DB7;
      end
    end
    r = ~r;
    for (int i = 0; i < 32; i++) o[i] = r[31-i];
    return o;
  endfunction

  // Data field: type, number, length, payload, zero padding to min_data bytes.
  function automatic byte_q_t data_field(input logic [31:0] typ, input logic [15:0] nr,
                                         input logic [15:0] len, input byte_q_t pay,
                                         input int min_data);
    byte_q_t q;
    for (int i = 3; i >= 0; i--) q.push_back(typ[8*i +: 8]);
    q.push_back(nr[15:8]);  q.push_back(nr[7:0]);
    q.push_back(len[15:8]); q.push_back(len[7:0]);
    foreach (pay[i]) q.push_back(pay[i]);
    while (q.size() < min_data) q.push_back(8'h00);
    return q;
  endfunction

  // Whole frame as MII nibbles: pre_nibbles x 5h (15 in a standard frame),
  // Dh, the data field and its FCS (corrupted when bad_fcs is set).
  function automatic nib_q_t frame_nibbles(input byte_q_t df, input int pre_nibbles,
                                           input bit bad_fcs);
    nib_q_t n;
    logic [31:0] f = ref_fcs(df);
    byte_q_t all = df;
    if (bad_fcs) f ^= 32'h0000_0100;
    for (int k = 0; k < 4; k++) all.push_back(f[8*k +: 8]);
    repeat (pre_nibbles) n.push_back(4'h5);
    n.push_back(4'hD);
    foreach (all[i]) begin
      n.push_back(all[i][3:0]);
      n.push_back(all[i][7:4]);
    end
    return n;
  endfunction

  typedef struct {
    bit          ok;          // preamble, SFD, FCS and layout are right
    logic [31:0] typ;
    logic [15:0] nr;
    logic [15:0] len;
    byte_q_t     pay;
    int          total;       // bytes after the SFD, FCS included
    string       why;
  } frame_t;

  // Decodes a frame captured from tx_data while tx_en was high.
  function automatic frame_t parse_frame(input nib_q_t n);
    frame_t fr;
    byte_q_t b, df;
    logic [31:0] f;
    fr.ok = 1'b0; fr.typ = '0; fr.nr = '0; fr.len = '0; fr.total = 0; fr.why = "";
    if (n.size() < 16) begin fr.why = "too short"; return fr; end
    for (int i = 0; i < 15; i++)
      if (n[i] != 4'h5) begin fr.why = "preamble"; return fr; end
    if (n[15] != 4'hD) begin fr.why = "SFD"; return fr; end
    if (n.size() % 2 != 0) begin fr.why = "odd nibble count"; return fr; end
    for (int i = 16; i < n.size(); i += 2) b.push_back({n[i+1], n[i]});
    fr.total = b.size();
    if (b.size() < 64) begin fr.why = "below 64 bytes"; return fr; end
    df = b[0 : b.size()-5];
    f  = {b[b.size()-1], b[b.size()-2], b[b.size()-3], b[b.size()-4]};
    if (f != ref_fcs(df)) begin fr.why = "FCS"; return fr; end
    fr.typ = {df[0], df[1], df[2], df[3]};
    fr.nr  = {df[4], df[5]};
    fr.len = {df[6], df[7]};
    if (8 + int'(fr.len) > df.size()) begin fr.why = "length"; return fr; end
    for (int i = 0; i < int'(fr.len); i++) fr.pay.push_back(df[8+i]);
    for (int i = 8 + int'(fr.len); i < df.size(); i++)
      if (df[i] != 8'h00) begin fr.why = "padding not zero"; return fr; end
    fr.ok = 1'b1;
    return fr;
  endfunction

  function automatic byte_q_t rand_bytes(input int n);
    byte_q_t q;
    repeat (n) q.push_back(8'($urandom));
    return q;
  endfunction

endpackage
