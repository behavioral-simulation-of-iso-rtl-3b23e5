// tb_gen2_pkg -- reference models used by the testbenches.
//
// Bit-serial CRC references written from the polynomial definitions (not
// from the RTL), and builders that assemble reader commands as bit queues,
// first bit first, with their CRC appended.  Fields follow the Gen2 command
// layouts.
package tb_gen2_pkg;

  typedef bit bitq_t[$];

  // Gen2 CRC-16: polynomial 1021h, preset FFFFh, MSB first, sent inverted.
  function automatic bit [15:0] ref_crc16(bitq_t bits);
    bit [15:0] r = 16'hFFFF;
    foreach (bits[i]) begin
      bit top = r[15];
      r = r << 1;
      if (top != bits[i]) r = r ^ 16'h1021;
    end
    return ~r;
  endfunction

  // Gen2 CRC-5: polynomial 09h (x^5+x^3+1), preset 01001b, MSB first.
  function automatic bit [4:0] ref_crc5(bitq_t bits);
    bit [4:0] r = 5'b01001;
    foreach (bits[i]) begin
      bit top = r[4];
      r = r << 1;
      if (top != bits[i]) r = r ^ 5'b01001;
    end
    return r;
  endfunction

  function automatic void put(ref bitq_t q, input bit [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  function automatic void put_crc16(ref bitq_t q);
    bit [15:0] c = ref_crc16(q);
    put(q, c, 16);
  endfunction

  // EBV encoding of a value below 2^21, with the fewest bytes.
  function automatic void put_ebv(ref bitq_t q, input int unsigned v);
    if (v < 128) put(q, v, 8);
    else if (v < 16384) begin
      put(q, {1'b1, 7'(v >> 7)}, 8);
      put(q, {1'b0, 7'(v)}, 8);
    end else begin
      put(q, {1'b1, 7'(v >> 14)}, 8);
      put(q, {1'b1, 7'(v >> 7)}, 8);
      put(q, {1'b0, 7'(v)}, 8);
    end
  endfunction

  function automatic bitq_t f_query(bit dr, bit [1:0] m, bit trext, bit [1:0] sel,
                                    bit [1:0] session, bit target, bit [3:0] qv);
    bitq_t q;
    bit [4:0] c;
    put(q, 4'b1000, 4); put(q, dr, 1); put(q, m, 2); put(q, trext, 1);
    put(q, sel, 2); put(q, session, 2); put(q, target, 1); put(q, qv, 4);
    c = ref_crc5(q);
    put(q, c, 5);
    return q;
  endfunction

  function automatic bitq_t f_queryrep(bit [1:0] session);
    bitq_t q;
    put(q, 2'b00, 2); put(q, session, 2);
    return q;
  endfunction

  function automatic bitq_t f_queryadj(bit [1:0] session, bit [2:0] updn);
    bitq_t q;
    put(q, 4'b1001, 4); put(q, session, 2); put(q, updn, 3);
    return q;
  endfunction

  function automatic bitq_t f_ack(bit [15:0] rn);
    bitq_t q;
    put(q, 2'b01, 2); put(q, rn, 16);
    return q;
  endfunction

  function automatic bitq_t f_nak();
    bitq_t q;
    put(q, 8'hC0, 8);
    return q;
  endfunction

  function automatic bitq_t f_reqrn(bit [15:0] rn);
    bitq_t q;
    put(q, 8'hC1, 8); put(q, rn, 16); put_crc16(q);
    return q;
  endfunction

  function automatic bitq_t f_read(bit [1:0] bank, int unsigned ptr, bit [7:0] cnt,
                                   bit [15:0] rn);
    bitq_t q;
    put(q, 8'hC2, 8); put(q, bank, 2); put_ebv(q, ptr); put(q, cnt, 8);
    put(q, rn, 16); put_crc16(q);
    return q;
  endfunction

  function automatic bitq_t f_write(bit [1:0] bank, int unsigned ptr, bit [15:0] data,
                                    bit [15:0] rn);
    bitq_t q;
    put(q, 8'hC3, 8); put(q, bank, 2); put_ebv(q, ptr); put(q, data, 16);
    put(q, rn, 16); put_crc16(q);
    return q;
  endfunction

  // mask: its `len` low bits, the first of them sent being bit len-1.
  function automatic bitq_t f_select(bit [2:0] target, bit [2:0] action, bit [1:0] bank,
                                     int unsigned ptr, int len, bit [255:0] mask,
                                     bit trunc);
    bitq_t q;
    put(q, 4'b1010, 4); put(q, target, 3); put(q, action, 3); put(q, bank, 2);
    put_ebv(q, ptr); put(q, 8'(len), 8);
    for (int i = len - 1; i >= 0; i--) q.push_back(mask[i]);
    q.push_back(trunc);
    put_crc16(q);
    return q;
  endfunction

endpackage
