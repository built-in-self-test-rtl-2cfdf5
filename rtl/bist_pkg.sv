// bist_pkg: types, register map and the sine-table function shared by the
// frequency-response BIST blocks.
//
// sine_code() returns the offset-binary sample that the DDS look-up table
// holds for one phase index. It is evaluated once per table entry when the
// table is initialised, using integer fixed-point arithmetic only (a
// quarter-wave reduction followed by a Taylor series in Q2.30), so any tool
// can evaluate it without real-number support. The sample is
//   code = 2^(D-1) + round((2^(D-1)-1) * sin(2*pi*p / 2^W)),
// i.e. a full-scale sine centred on mid-code (the DC bias k1 of the test
// tone). The amplitude, centre and the use of a full-wave table are this
// design's choices; the document only names a "sine look-up table ROM".
//
// The host register map and the result record are also this design's own:
// the document mentions a PC interface but does not describe it.
package bist_pkg;

  // Host register addresses (word addresses on a 4-bit bus).
  typedef enum logic [3:0] {
    REG_CTRL       = 4'h0, // W: bit0 start sweep, bit1 ack result. R: status
    REG_FCW_START  = 4'h1, // first frequency control word of the sweep
    REG_FCW_STEP   = 4'h2, // FCW increment between test tones
    REG_FCW_STOP   = 4'h3, // last FCW of the sweep (inclusive)
    REG_SETTLE     = 4'h4, // cycles waited after a tone change
    REG_RES_FCW    = 4'h5, // R: FCW of the current result
    REG_RES_PHASE  = 4'h6, // R: measured delay in clock cycles (ORA1)
    REG_RES_AMP_LO = 4'h7, // R: ORA2 accumulator bits 31:0
    REG_RES_AMP_HI = 4'h8, // R: ORA2 accumulator upper bits, sign-extended
    REG_RES_THETA  = 4'h9  // R: phase shift as a fraction of a turn, L bits
  } reg_addr_e;

  // Status bits returned when REG_CTRL is read.
  localparam int STAT_BUSY    = 0;
  localparam int STAT_VALID   = 1;
  localparam int STAT_DONE    = 2;
  localparam int STAT_TIMEOUT = 3;

  // Q2.30 value of pi/2.
  localparam longint unsigned HALF_PI_Q30 = 64'd1686629713;

  // sin(q * pi/2 / 2^qbits) in Q2.30 for 0 <= q <= 2^qbits.
  function automatic longint sin_q30(input longint q, input int qbits);
    longint x, x2, term, acc;
    x    = (q * longint'(HALF_PI_Q30)) >>> qbits;
    x2   = (x * x) >>> 30;
    term = x;
    acc  = x;
    for (int k = 1; k <= 7; k++) begin
      term = -(((term * x2) >>> 30) / longint'((2 * k) * (2 * k + 1)));
      acc  = acc + term;
    end
    return acc;
  endfunction

  // Offset-binary table entry for phase index p of a 2^w-entry table with
  // d-bit samples.
  function automatic int sine_code(input int p, input int w,
                                            input int d);
    logic [1:0]  quad;
    int          idx, qsize;
    longint      s, amp, scaled;
    qsize = 1 << (w - 2);
    quad  = 2'(p >> (w - 2));
    idx   = p & (qsize - 1);
    if (quad[0]) s = sin_q30(longint'(qsize) - longint'(idx), w - 2);
    else         s = sin_q30(longint'(idx), w - 2);
    amp    = (longint'(1) << (d - 1)) - 1;
    scaled = (amp * s + (longint'(1) << 29)) >>> 30;
    if (quad[1]) scaled = -scaled;
    return int'((longint'(1) << (d - 1)) + scaled);
  endfunction

endpackage
