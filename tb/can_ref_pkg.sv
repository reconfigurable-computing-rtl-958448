// can_ref_pkg: reference model of a CAN 2.0A standard data frame, used by the
// testbenches to work out expected bus streams independently of the RTL.
//
// ref_frame() lists the frame bits in bus order (SOF, identifier, RTR, IDE,
// r0, DLC, data, CRC-15, CRC delimiter, ACK slot and delimiter as sent by the
// transmitter, 10 recessive EOF/IFS bits). ref_crc() divides a bit list by the
// CAN polynomial 4599h bit by bit. ref_stuff() inserts a complemented bit after
// every run of five equal bits from SOF to the end of the CRC sequence.
package can_ref_pkg;

  typedef bit bitq_t[$];

  function automatic int ref_bytes(input bit [3:0] dlc);
    return (dlc > 8) ? 8 : int'(dlc);
  endfunction

  function automatic bit [14:0] ref_crc(input bitq_t bits);
    bit [14:0] r = '0;
    bit        nxt;
    foreach (bits[i]) begin
      nxt = bits[i] ^ r[14];
      r   = {r[13:0], 1'b0};
      if (nxt) r = r ^ 15'h4599;
    end
    return r;
  endfunction

  function automatic bitq_t ref_frame(input bit [10:0] id, input bit [3:0] dlc, input bit [63:0] data);
    bitq_t     q;
    bit [14:0] c;
    q.push_back(1'b0);
    for (int i = 10; i >= 0; i--) q.push_back(id[i]);
    q.push_back(1'b0); q.push_back(1'b0); q.push_back(1'b0);
    for (int i = 3; i >= 0; i--) q.push_back(dlc[i]);
    for (int k = 0; k < ref_bytes(dlc); k++)
      for (int j = 7; j >= 0; j--) q.push_back(data[8*k + j]);
    c = ref_crc(q);
    for (int i = 14; i >= 0; i--) q.push_back(c[i]);
    repeat (13) q.push_back(1'b1);
    return q;
  endfunction

  // Bus stream as sent by the transmitter (ACK slot recessive).
  function automatic bitq_t ref_stuff(input bitq_t f, input bit [3:0] dlc);
    bitq_t s;
    int    run = 0;
    bit    last = 1'b1;
    int    stuff_end = 19 + 8*ref_bytes(dlc) + 15;
    foreach (f[i]) begin
      s.push_back(f[i]);
      if (i < stuff_end) begin
        run  = (i > 0 && f[i] == last) ? run + 1 : 1;
        last = f[i];
        if (run == 5) begin
          s.push_back(~last);
          last = ~last;
          run  = 1;
        end
      end
    end
    return s;
  endfunction

endpackage
