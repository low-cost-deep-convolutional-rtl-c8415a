// tb_sc_ref_pkg: reference model used by the testbenches.
//
// It multiplies the slow, obvious way: it walks the low-discrepancy bitstream
// one bit per cycle (bit x[Q-1-tz(c)] at cycle c = 1, 2, ...) and counts with an
// up/down counter, so it checks the bit-parallel hardware against the
// bit-serial definition rather than against the hardware's own formulas.
package tb_sc_ref_pkg;

  // trailing zeros of a positive integer
  function automatic int tz(input int c);
    int n = 0;
    while (((c >> n) & 1) == 0 && n < 31) n++;
    return n;
  endfunction

  // bitstream bit at 1-based cycle c of the Q-bit MUX operand xs
  function automatic int ld_bit(input longint unsigned xs, input int q, input int c);
    int t = tz(c);
    if (t >= q) return 0;
    return int'((xs >> (q - 1 - t)) & 1);
  endfunction

  // change of the up/down counter for one multiplication
  function automatic int mult_delta(input longint unsigned x, input int q, input bit xis,
                                    input bit neg, input int wabs);
    longint unsigned xs = x ^ (longint'(xis) << (q - 1));
    int d = 0;
    for (int c = 1; c <= wabs; c++) begin
      int b = ld_bit(xs, q, c);
      if (xis) d += b ? 1 : -1;
      else     d += b;
    end
    return neg ? -d : d;
  endfunction

  // weight -> (negative, number of cycles), formats as in sc_pkg
  // fmt: 0 linear, 1 log sign-magnitude, 2/3 log two's complement
  function automatic void decode(input longint unsigned word, input int q, input int fmt,
                                 input int prec, output bit neg, output int wabs);
    longint s;
    int m;
    neg = 0; wabs = 0;
    if (fmt == 0) begin
      s = longint'(word);
      if ((word >> (q - 1)) & 1) s = s - (longint'(1) << q);  // sign extend
      s = s / (longint'(1) << (q - prec)) - ((s < 0 && (s % (longint'(1) << (q - prec))) != 0) ? 1 : 0);
      neg  = s < 0;
      wabs = int'(neg ? -s : s);
    end else begin
      if (fmt == 1) begin
        neg = (word >> 4) & 1;
        m   = int'(word & 15);
      end else begin
        int qv = int'(word & 31);
        if (qv >= 16) qv -= 32;
        neg = qv < 0;
        m   = neg ? -qv : qv;
      end
      if (m != 0 && m <= prec - 1) wabs = 1 << (prec - 1 - m);
    end
  endfunction

  function automatic longint sat(input longint v, input int w);
    longint mx = (longint'(1) << (w - 1)) - 1;
    longint mn = -(longint'(1) << (w - 1));
    if (v > mx) return mx;
    if (v < mn) return mn;
    return v;
  endfunction

  // the accumulator saturates every clock; replay that with b bits per clock
  function automatic longint acc_mult(input longint acc, input longint unsigned x, input int q,
                                      input bit xis, input bit neg, input int wabs,
                                      input int b, input int accw);
    longint unsigned xs = x ^ (longint'(xis) << (q - 1));
    int c = 1;
    while (c <= wabs) begin
      int d = 0;
      for (int k = 0; k < b && c <= wabs; k++, c++) begin
        int bt = ld_bit(xs, q, c);
        if (xis) d += bt ? 1 : -1;
        else     d += bt;
      end
      acc = sat(acc + (neg ? -d : d), accw);
    end
    return acc;
  endfunction

endpackage
