`timescale 1ps/1fs
// jm_pkg: constants and helper functions shared by the clock jitter
// measurement blocks.
//
// The scheme measures the length of the clock high phase with n delay lines
// ("NOT chains") whose taps are offset from each other by tau/n. The taps are
// interleaved into one word out[1..n*N] in order of their delay from CK:
// p_21, p_31, ..., p_n1, p_11, p_22, ..., p_n2, p_12, ... so that bit m sees CK
// delayed by (1 + m/n)*tau. The functions below give that mapping and the
// polarity of each tap, which the output stage needs to turn the sampled word
// into a thermometer code.
//
// Default numbers follow the 65 nm, 3 GHz design point: tau = 12 ps, N = 28
// NOTs per chain, two chains (resolution tau/2 = 6 ps), a jitter-free word of
// 28 zeros, ring oscillators of 99 stages. Delays are in ps (timescale 1ps/1fs).
package jm_pkg;

  localparam int  N_TAPS_DEF    = 28;    // NOTs per chain that feed the sampler
  localparam int  N_CHAINS_DEF  = 2;     // out-of-phase chains (resolution tau/n)
  localparam real TAU_PS_DEF    = 12.0;  // delay of one NOT
  localparam int  REF_ZEROS_DEF = 28;    // zeros of the jitter-free word
  localparam int  K_RO_DEF      = 99;    // inverting stages of one ring oscillator

  // Number of inversions between CK and interleaved output bit m (1-based).
  // Chain 1 has an extra first NOT (its output is p_s), so its tap p_1i has gone
  // through i+1 NOTs; tap p_ji of chain j >= 2 has gone through i.
  function automatic int tap_inversions(int m, int nch);
    int lvl, k;
    lvl = (m - 1) / nch + 1;
    k   = (m - 1) % nch + 1;
    return (k == nch) ? lvl + 1 : lvl;
  endfunction

  // 1 where the output stage has to complement bit m: the tap is in phase
  // with CK (even number of inversions). For one chain this is "i odd".
  function automatic logic tap_in_phase(int m, int nch);
    return (tap_inversions(m, nch) % 2) == 0;
  endfunction

  // Interleaved position (1-based) of tap i of chain j.
  function automatic int tap_index(int j, int i, int nch);
    return (j == 1) ? i * nch : (i - 1) * nch + (j - 1);
  endfunction

  // Delay of a programmable NOT for program code {A,B,C}, relative to the
  // nominal setting A=1, B=C=0. Plotted settings follow the measured curve of
  // the programmable inverter (about 15.5, 13.2, 12.0, 10.8, 10.1, 9.4 ps at a
  // 12 ps nominal); the two settings that are not plotted (000 and 011) are
  // given the value of the nearest plotted one.
  function automatic real prog_factor(logic [2:0] abc);
    case (abc)
      3'b001:  return 15.5 / 12.0;   // C=1
      3'b010:  return 13.2 / 12.0;   // B=1
      3'b100:  return 1.0;           // A=1 (nominal)
      3'b101:  return 10.8 / 12.0;   // A=C=1
      3'b110:  return 10.1 / 12.0;   // A=B=1
      3'b111:  return 9.4 / 12.0;    // A=B=C=1
      3'b011:  return 13.2 / 12.0;   // not plotted: as B=1
      default: return 15.5 / 12.0;   // 000, not plotted: as C=1
    endcase
  endfunction

endpackage
