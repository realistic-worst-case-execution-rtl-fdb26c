// fr_pkg: constants, types and timing formulas shared by the FlexRay-like
// interface (f-interface) modules.
//
// The bus protocol sends every frame bit as eight identical copies, the
// receiver samples the middle copy (count 4 of a modulo-8 counter) and the
// frame of an L-byte message is f(m) = 0 1 (1 0 m[i])* 0 1.  The slot length T,
// the synchronisation offset off and the transmission time tc are tied
// together by the clock-drift argument: with a clock tolerance delta = 0.15 %
// the relative drift between two ECUs is Delta = 2*delta/(1-delta),
// off = 15 + ns*T*Delta and tc = 45 + 80*L; a slot is long enough when
// off + (off+tc)*(1+Delta) <= T.  The functions below evaluate these bounds
// in integer arithmetic (delta in parts per million, results rounded up) so
// that parameter sets can be checked at elaboration time.
package fr_pkg;

  // Clock tolerance of each oscillator, parts per million (0.15 %).
  localparam longint unsigned DELTA_PPM = 64'd1500;
  localparam longint unsigned PPM       = 64'd1000000;
  // Worst-case adjustment time of a receiving timer after the TSS, cycles.
  localparam int unsigned SYNC_ADJ   = 15;
  // Copies of each frame bit on the bus and the copy the receiver samples.
  localparam int unsigned BIT_COPIES = 8;
  localparam int unsigned STROBE_AT  = 4;

  // Frame bit being transmitted (sender) or last sampled (receiver).
  typedef enum logic [2:0] {
    FB_IDLE = 3'd0,  // bus idle, value 1
    FB_TSS  = 3'd1,  // transmission start sequence, 0
    FB_FSS  = 3'd2,  // frame start sequence, 1
    FB_BS1  = 3'd3,  // byte start sequence, first bit, 1
    FB_BS0  = 3'd4,  // byte start sequence, second bit, 0
    FB_DATA = 3'd5,  // one of the eight message bits of a byte
    FB_FES  = 3'd6,  // frame end sequence, 0
    FB_TES  = 3'd7   // transmission end sequence, 1
  } frame_bit_e;

  // Drift term ns*T*Delta in cycles, rounded up.
  function automatic int unsigned drift_cycles(int unsigned ns, int unsigned t);
    longint unsigned num, den;
    num = longint'(ns) * longint'(t) * 64'd2 * DELTA_PPM;
    den = PPM - DELTA_PPM;
    return int'((num + den - 64'd1) / den);
  endfunction

  // Synchronisation offset off = 15 + ns*T*Delta.
  function automatic int unsigned calc_off(int unsigned ns, int unsigned t);
    return SYNC_ADJ + drift_cycles(ns, t);
  endfunction

  // Transmission cycles of one frame of l bytes, sender clock.
  function automatic int unsigned calc_tc(int unsigned l);
    return 45 + 80 * l;
  endfunction

  // Lemma-4 condition: the transmission window fits in every ECU's slot.
  function automatic bit slot_fits(int unsigned t, int unsigned l, int unsigned off);
    longint unsigned need;
    need = (longint'(off) + longint'(calc_tc(l))) * (PPM + DELTA_PPM);
    need = (need + (PPM - DELTA_PPM) - 64'd1) / (PPM - DELTA_PPM);
    return (longint'(off) + need) <= longint'(t);
  endfunction

endpackage
