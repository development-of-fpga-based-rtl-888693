// can_ref_pkg: reference model used by the testbenches.
//
// Builds, independently of the RTL, the bit sequence a CAN 2.0A frame with
// an EEDC field must produce on the bus: the protected span (SOF through
// data), the EEDC redundancy bits computed straight from their definition
// (parity k covers the positions p with bit k of p set; the last bit is the
// parity of the others), bit stuffing over span and redundancy bits, then
// the fixed trailer (delimiter, ACK slot, ACK delimiter, EOF).
package can_ref_pkg;
  import eedc_pkg::*;

  localparam int MAXB = 256;

  typedef struct {
    bit  b     [MAXB];   // bit value, 1 = recessive
    int  upos  [MAXB];   // de-stuffed position (1 = SOF), 0 for stuff bits
    int  n;              // number of bits SOF .. last EOF bit
    int  n_stuffed_end;  // index just after the stuffed region
    int  ack_idx;        // index of the ACK slot
    int  nstuff;         // stuff bits inserted
    int  span;
    int  nchk;
  } stream_t;

  // Number of redundancy bits, from the definition: position parities
  // needed to name positions 1..d, plus one.
  function automatic int ref_nchk(int d);
    int k = 0;
    while ((1 << k) <= d) k++;
    return k + 1;
  endfunction

  // EEDC redundancy bits of span[1..d] in transmission order.
  function automatic void ref_eedc(input bit span[MAXB], input int d,
                                   output bit chk[16], output int r);
    int k;
    bit par;
    r   = ref_nchk(d);
    k   = r - 1;
    par = 0;
    for (int j = 0; j < 16; j++) chk[j] = 0;
    for (int j = 0; j < k; j++) begin
      bit p = 0;
      for (int pos = 1; pos <= d; pos++)
        if (((pos >> j) & 1) == 1) p ^= span[pos];
      chk[j] = p;
      par ^= p;
    end
    chk[k] = par;
  endfunction

  // Protected span of a frame, 1-based (span[1] = SOF).
  function automatic void ref_span(input can_frame_t f, output bit span[MAXB], output int d);
    int nb;
    for (int i = 0; i < MAXB; i++) span[i] = 0;
    nb = f.rtr ? 0 : (f.dlc > 8 ? 8 : int'(f.dlc));
    d = 0;
    span[++d] = 0;
    for (int i = 10; i >= 0; i--) span[++d] = f.id[i];
    span[++d] = f.rtr;
    span[++d] = 0;
    span[++d] = 0;
    for (int i = 3; i >= 0; i--) span[++d] = f.dlc[i];
    for (int i = 0; i < nb * 8; i++) span[++d] = f.data[63 - i];
  endfunction

  // Stuffs raw[0..nraw-1] (span followed by redundancy bits) and appends
  // the trailer.
  function automatic void ref_stuff(input bit raw[MAXB], input int nraw, output stream_t s);
    int run;
    bit last;
    s.n = 0;
    s.nstuff = 0;
    run = 0;
    last = 1;
    for (int i = 0; i < nraw; i++) begin
      s.b[s.n] = raw[i];
      s.upos[s.n] = i + 1;
      s.n++;
      if (i > 0 && raw[i] == last) run++; else run = 1;
      last = raw[i];
      if (run == 5) begin
        s.b[s.n] = !last;
        s.upos[s.n] = 0;
        s.n++;
        s.nstuff++;
        last = !last;
        run = 1;
      end
    end
    s.n_stuffed_end = s.n;
    s.b[s.n] = 1; s.upos[s.n] = 0; s.n++;          // delimiter
    s.ack_idx = s.n;
    s.b[s.n] = 1; s.upos[s.n] = 0; s.n++;          // ACK slot as sent
    s.b[s.n] = 1; s.upos[s.n] = 0; s.n++;          // ACK delimiter
    for (int i = 0; i < 7; i++) begin
      s.b[s.n] = 1; s.upos[s.n] = 0; s.n++;        // EOF
    end
  endfunction

  function automatic void ref_stream(input can_frame_t f, output stream_t s);
    bit span[MAXB];
    bit chk[16];
    bit raw[MAXB];
    int d, r, nraw;
    ref_span(f, span, d);
    ref_eedc(span, d, chk, r);
    nraw = 0;
    for (int i = 1; i <= d; i++) raw[nraw++] = span[i];
    for (int i = 0; i < r; i++) raw[nraw++] = chk[i];
    ref_stuff(raw, nraw, s);
    s.span = d;
    s.nchk = r;
  endfunction

  // True if inverting the stuffed-stream bits at indices i and j (j = -1
  // for a single flip) leaves every stuff bit where it was, so that a
  // receiver de-stuffs the same number of bits and sees exactly those
  // raw bits changed.
  function automatic bit flip_ok(input stream_t s, input int i, input int j);
    bit raw[MAXB];
    int nraw;
    stream_t t;
    if (s.upos[i] == 0) return 0;
    if (j >= 0 && (s.upos[j] == 0 || j == i)) return 0;
    nraw = 0;
    for (int k = 0; k < s.n_stuffed_end; k++)
      if (s.upos[k] != 0) raw[nraw++] = s.b[k];
    raw[s.upos[i] - 1] ^= 1;
    if (j >= 0) raw[s.upos[j] - 1] ^= 1;
    ref_stuff(raw, nraw, t);
    if (t.n != s.n) return 0;
    for (int k = 0; k < s.n; k++)
      if (t.upos[k] != s.upos[k]) return 0;
    return 1;
  endfunction

  function automatic can_frame_t rand_frame(int dlc);
    can_frame_t f;
    f.id   = 11'($urandom);
    f.rtr  = 1'b0;
    f.dlc  = 4'(dlc);
    f.data = {$urandom, $urandom};
    for (int i = 0; i < 64; i++)
      if (i >= (dlc > 8 ? 8 : dlc) * 8) f.data[63 - i] = 1'b0;
    return f;
  endfunction

endpackage
