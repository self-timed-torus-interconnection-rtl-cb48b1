// oof_pkg: shared types and constants for the one-of-five (1-of-5) channel code.
//
// A channel carries five forward wires {EOP, w3, w2, w1, w0} and one
// acknowledge wire. At most one forward wire is high at a time: w0..w3 carry
// the two-bit values 00, 01, 10 and 11, EOP marks the end of a packet and
// all-zero is the null (spacer) state of the return-to-zero four-phase
// handshake. The code table is the document's; the helper functions are this
// design's own.
package oof_pkg;

  typedef logic [4:0] flit_t;

  localparam flit_t FLIT_NULL = 5'b00000;
  localparam flit_t FLIT_D00  = 5'b00001;  // w0
  localparam flit_t FLIT_D01  = 5'b00010;  // w1
  localparam flit_t FLIT_D10  = 5'b00100;  // w2
  localparam flit_t FLIT_D11  = 5'b01000;  // w3
  localparam flit_t FLIT_EOP  = 5'b10000;  // end of packet

  localparam int EOP_BIT = 4;

  // Header state of a router stage (Set_Dec, Table 3 encoding).
  typedef enum logic [1:0] {
    HDR_IDLE = 2'b00,  // clear / waiting for the address flit
    HDR_DEC  = 2'b01,  // the current flit is the address: decrement or strip
    HDR_PASS = 2'b10   // pass every flit until EOP
  } hdr_state_e;

  // Completion detection: a five-input OR.
  function automatic logic flit_valid(flit_t f);
    return |f;
  endfunction

  // Two-bit value to one-of-five code word.
  function automatic flit_t encode2(logic [1:0] v);
    return flit_t'(5'b00001 << v);
  endfunction

  // One-of-five data code word to two-bit value (EOP and null give 0).
  function automatic logic [1:0] decode2(flit_t f);
    return {f[3] | f[2], f[3] | f[1]};
  endfunction

endpackage
