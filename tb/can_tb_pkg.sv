// can_tb_pkg: CAN frame generator for the testbenches.
//
// build_frame() assembles a standard or extended data or remote frame bit by
// bit: start of frame, identifier (most significant bit first), RTR/SRR, IDE,
// reserved bits, DLC, data bytes, the CRC-15 over all of these
// (polynomial x^15+x^14+x^10+x^8+x^7+x^4+x^3+1, 0x4599), CRC delimiter, a
// dominant ACK slot, ACK delimiter and seven end-of-frame bits. It returns
// the plain bit sequence (what the receiver should store, and whose length is
// the frame length it should report) and the sequence as it appears on the
// bus wire, with a complementary stuff bit after every five equal bits from the
// start of frame to the last CRC bit.
package can_tb_pkg;

  typedef bit bitq_t[$];

  function automatic logic [14:0] crc15(input bitq_t bits);
    logic [14:0] crc = '0;
    foreach (bits[i]) begin
      logic nxt = bits[i] ^ crc[14];
      crc = {crc[13:0], 1'b0};
      if (nxt) crc ^= 15'h4599;
    end
    return crc;
  endfunction

  function automatic void push_field(ref bitq_t q, input logic [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  // raw: destuffed frame; line_bits: as sent on the bus wire
  function automatic void build_frame(input logic [28:0] id, input bit ext, input bit rtr,
                                      input logic [3:0] dlc, input logic [63:0] data,
                                      output bitq_t raw, output bitq_t line_bits);
    bitq_t head;
    int nbytes;
    int run;
    bit last;
    logic [14:0] crc;
    head = {};
    head.push_back(1'b0);                       // SOF
    if (ext) begin
      push_field(head, 32'(id[28:18]), 11);
      head.push_back(1'b1);                     // SRR
      head.push_back(1'b1);                     // IDE
      push_field(head, 32'(id[17:0]), 18);
      head.push_back(rtr);
      head.push_back(1'b0);                     // r1
      head.push_back(1'b0);                     // r0
    end else begin
      push_field(head, 32'(id[10:0]), 11);
      head.push_back(rtr);
      head.push_back(1'b0);                     // IDE
      head.push_back(1'b0);                     // r0
    end
    push_field(head, 32'(dlc), 4);
    nbytes = rtr ? 0 : ((dlc > 8) ? 8 : int'(dlc));
    for (int b = 0; b < nbytes; b++) push_field(head, 32'(data[63 - 8 * b -: 8]), 8);
    crc = crc15(head);
    push_field(head, 32'(crc), 15);
    // stuffing over SOF..CRC
    line_bits = {};
    run = 0;
    last = 1'b1;
    foreach (head[i]) begin
      line_bits.push_back(head[i]);
      if (i > 0 && head[i] == last) run++;
      else run = 1;
      last = head[i];
      if (run == 5) begin
        line_bits.push_back(~last);
        last = ~last;
        run = 1;
      end
    end
    raw = head;
    // CRC delimiter, ACK (dominant, acknowledged), ACK delimiter, EOF
    raw.push_back(1'b1);  line_bits.push_back(1'b1);
    raw.push_back(1'b0);  line_bits.push_back(1'b0);
    raw.push_back(1'b1);  line_bits.push_back(1'b1);
    for (int k = 0; k < 7; k++) begin
      raw.push_back(1'b1);
      line_bits.push_back(1'b1);
    end
  endfunction

  function automatic int frame_len(input bit ext, input bit rtr, input logic [3:0] dlc);
    int nbytes = rtr ? 0 : ((dlc > 8) ? 8 : int'(dlc));
    return (ext ? 64 : 44) + 8 * nbytes;
  endfunction

endpackage
