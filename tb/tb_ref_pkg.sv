// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: CRC by polynomial long division, a bit-serial
// scrambler / descrambler (1 + x^39 + x^58) and a bit-serial PRBS-31.
package tb_ref_pkg;

  // Remainder of msg(x) * x^w divided by g(x) = x^w + poly; msg holds n
  // bits, msg[n-1] is the first (highest) coefficient.
  function automatic logic [7:0] crc_div(input logic [127:0] msg, input int n,
                                         input int w, input logic [7:0] poly);
    logic [135:0] r;
    logic [8:0]   g;
    r = '0;
    for (int i = 0; i < n; i++) r[w + i] = msg[i];
    g = {1'b1, poly} & ((9'd1 << (w + 1)) - 9'd1);
    g[w] = 1'b1;
    for (int i = n + w - 1; i >= w; i--)
      if (r[i]) for (int j = 0; j <= w; j++) r[i - w + j] ^= g[j];
    return r[7:0];
  endfunction

  // Serial scrambler: one bit at a time, state[0] newest.
  function automatic logic scr_bit(inout logic [57:0] st, input logic b);
    logic o;
    o  = b ^ st[38] ^ st[57];
    st = {st[56:0], o};
    return o;
  endfunction

  // Serial descrambler: shifts in the received (scrambled) bit.
  function automatic logic descr_bit(inout logic [57:0] st, input logic b);
    logic o;
    o  = b ^ st[38] ^ st[57];
    st = {st[56:0], b};
    return o;
  endfunction

  function automatic logic prbs_bit(inout logic [30:0] st);
    logic o;
    o  = st[30] ^ st[27];
    st = {st[29:0], o};
    return o;
  endfunction

endpackage
