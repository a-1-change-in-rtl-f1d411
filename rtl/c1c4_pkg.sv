// Shared types and helpers for the 1-change-in-4 (1c4) link.
//
// A 1c4 codeword has four lines C3..C0. C2^C3 and C1^C3 carry the two data bits
// D1 and D0, C3 says whether the word is stored inverted, and C0 fixes the parity:
// words with an odd number of ones belong to the odd phase, the others to the
// even phase. Between two consecutive words exactly one line changes, so a
// receiver can detect a new word by its parity alone.
//
// Data values travel inside a link end as 1-of-4 codes (bit i set means value i,
// i.e. 00, 01, 10, 11) and as dual-rail bits (t high = 1, f high = 0, both low =
// no data). All signals here are active high; the transistor circuits the link
// is modelled on use active-low versions of several of them. The code and the
// decoder equations are those of the 1c4 scheme; the type names are this
// design's.
package c1c4_pkg;

  typedef logic [3:0] code_t;      // link codeword C3..C0
  typedef logic [3:0] onehot4_t;   // 1-of-4 data value, at most one bit set

  typedef struct packed {
    logic t;                       // bit is 1
    logic f;                       // bit is 0
  } dr_t;

  // Parity of a codeword: 1 for odd-phase words.
  function automatic logic odd4(code_t c);
    return ^c;
  endfunction

  // Combinational 1c4 decoder. 'e' selects the phase that is accepted (1 = odd,
  // 0 = even); a word of the other phase decodes to no data (all rails low).
  // Flipping C0 turns an even word into an odd one, so one set of gates serves
  // both phases: each rail is the AND of one bit-extracting XOR and one parity
  // check.
  function automatic dr_t [1:0] dec4(code_t si, logic e);
    logic s0p;
    dr_t [1:0] r;
    s0p     = ~e ^ si[0];
    r[0].f  = (si[3] == si[1]) && (s0p == ~si[2]);
    r[0].t  = (si[3] != si[1]) && (s0p ==  si[2]);
    r[1].f  = (si[3] == si[2]) && (s0p == ~si[1]);
    r[1].t  = (si[3] != si[2]) && (s0p ==  si[1]);
    return r;
  endfunction

endpackage
