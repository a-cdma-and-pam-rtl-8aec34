`timescale 1ps/1ps
// cpia_pkg: types, sizes and tables shared by the CDMA and 4-PAM interconnect.
//
// - Default sizes: N = 16 bus lines spread over S = 16 chips. A chip sum then
//   needs log2(N)+2 = 6 bits and travels on 3 four-level wires. The
//   architecture fixes only the relation between N and the line count; the
//   number 16 is this design's choice.
// - Spreading codes: line i uses Walsh-Hadamard row i, code_i[k] =
//   parity(i AND k). These codes are mutually orthogonal, so each line can be
//   separated from the sum of all of them. They are computed, not stored.
// - pam_line_t: one end's drive onto a wire (driven flag and voltage in mV),
//   used by the behavioural models of the analog parts.
// - Transition delays of the 4-PAM output stage at the near end of a loaded
//   line (50%-to-50%, for 1, 3 and 5 pF) and of the receiver, in ps, taken
//   from HSpice figures published for a 0.35 um implementation of this scheme.
package cpia_pkg;

  parameter int unsigned N_DEF = 16;  // bus lines n
  parameter int unsigned S_DEF = 16;  // chips per word

  // Four line levels in mV: 0, 1.1, 2.2 and 3.3 V.
  typedef logic [11:0] mv_t;

  typedef struct packed {
    logic drive;  // this end drives the wire (switch closed)
    mv_t  mv;     // voltage it drives, valid when drive = 1
  } pam_line_t;

  // Bit k of the spreading code of line i.
  function automatic logic walsh_bit(input int unsigned i, input int unsigned k);
    return ^(i & k);
  endfunction

  // Index 0..5 of the level pair {a,b}, a != b: 0-1, 0-2, 0-3, 1-2, 1-3, 2-3.
  function automatic int unsigned pair_index(input int unsigned a, input int unsigned b);
    logic [1:0] lo, hi;
    lo = 2'((a < b) ? a : b);
    hi = 2'((a < b) ? b : a);
    case ({lo, hi})
      4'b0001: return 0;
      4'b0010: return 1;
      4'b0011: return 2;
      4'b0110: return 3;
      4'b0111: return 4;
      default: return 5;
    endcase
  endfunction

  // Output-stage delay in ps for a change from level a to level b, load in pF
  // (1, 3 or 5; other values use the 5 pF row).
  function automatic int unsigned tx_delay_ps(input int unsigned a, input int unsigned b,
                                              input int unsigned load_pf);
    int unsigned rise[3][6];
    int unsigned fall[3][6];
    logic [1:0] row;
    rise[0] = '{960, 552, 454, 704, 409, 361};
    fall[0] = '{183, 275, 408, 655, 829, 900};
    rise[1] = '{1175, 615, 504, 751, 445, 394};
    fall[1] = '{216, 317, 446, 796, 967, 956};
    rise[2] = '{1300, 670, 540, 800, 470, 420};
    fall[2] = '{240, 350, 480, 880, 1090, 1000};
    row = (load_pf == 1) ? 2'd0 : (load_pf == 3) ? 2'd1 : 2'd2;
    if (a == b) return 0;
    return (b > a) ? rise[row][pair_index(a, b)] : fall[row][pair_index(a, b)];
  endfunction

  // Receiver delay in ps for a change from level a to level b.
  function automatic int unsigned rx_delay_ps(input int unsigned a, input int unsigned b);
    int unsigned rise[6];
    int unsigned fall[6];
    rise = '{446, 0, 437, 0, 444, 439};
    fall = '{0, 445, 192, 193, 203, 448};
    if (a == b) return 0;
    return (b > a) ? rise[pair_index(a, b)] : fall[pair_index(a, b)];
  endfunction

  // Nearest of the four nominal levels to a voltage (decision points 0.55,
  // 1.65, 2.75 V); used only to pick a delay from the tables.
  function automatic int unsigned mv_to_level(input mv_t mv);
    if (mv > 12'd2750) return 3;
    if (mv > 12'd1650) return 2;
    if (mv > 12'd550) return 1;
    return 0;
  endfunction

endpackage
