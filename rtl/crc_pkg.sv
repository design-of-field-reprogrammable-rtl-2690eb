// crc_pkg: types shared by the field programmable CRC.
//
// The configuration registers are reached over a small processor bus whose
// register map is the enum below. The map is this design's choice; the
// architecture only says that a processor interface loads a set of CRC
// variables.
package crc_pkg;

  // Register map of the processor bus (word addresses).
  typedef enum logic [2:0] {
    REG_POLY      = 3'd0,  // generator polynomial without its x^r term
    REG_CRC_SIZE  = 3'd1,  // r, degree of the polynomial (1..N)
    REG_PORT_SIZE = 3'd2,  // W, input port width in bits (1..N)
    REG_INIT      = 3'd3,  // initial CRC value loaded on a message's first word
    REG_START     = 3'd4,  // write: start computing and loading the D matrix
    REG_STATUS    = 3'd5   // read: {.., done, busy}
  } reg_addr_e;

endpackage
