// eti_pkg: types shared by the ETI (embedded transition inversion) serial link.
//
// The phase encoder sends every bit as two half-bit slots on the line. Which of
// three paths produced the slots of a bit is reported with phase_path_e:
//   PATH_PLAIN   - zero phase difference: both halves carry the bit (every bit of
//                  a word that was not inverted, and all but the last bit of an
//                  inverted word).
//   PATH_SHIFT   - last bit of an inverted word whose value differs from the bit
//                  before it: the data edge is moved half a bit late.
//   PATH_SPECIAL - last bit of an inverted word equal to the bit before it: there
//                  is no edge to move, so a half-bit complement pulse is sent
//                  first to create one.
// The three paths follow the description of the phase encoder; the half-bit
// waveforms themselves are this design's choice.
package eti_pkg;

  typedef enum logic [1:0] {
    PATH_PLAIN   = 2'd0,
    PATH_SHIFT   = 2'd1,
    PATH_SPECIAL = 2'd2
  } phase_path_e;

endpackage
