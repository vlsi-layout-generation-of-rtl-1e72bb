// crc_pkg: types shared by the programmable serial CRC generator.
//
// The controller is a three-state machine held in one-hot form, one control
// flip-flop per state, as in the state trace of the original chip where the
// state vector reads 100, 010 and 001. The encoding below keeps that order:
// the leftmost bit is state 1.
package crc_pkg;

  typedef enum logic [2:0] {
    ST_INIT = 3'b100,  // state 1: clear COUNT and CREG, wait for START
    ST_GEN  = 3'b010,  // state 2: pass message bits through, divide them into CREG
    ST_SEND = 3'b001   // state 3: shift the CRC out behind the message
  } crc_state_e;

endpackage
