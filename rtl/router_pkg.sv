// router_pkg: types and constants shared by the 1x3 packet router.
//
// A packet is a header byte, 1 to 63 payload bytes and a parity byte.
// The header carries the payload length in bits [7:2] and the destination
// port in bits [1:0]; ports 0, 1 and 2 exist, address 3 is not a port.
// The parity byte is the XOR of the header and all payload bytes (the
// packet format is the one of the router; the XOR rule is a choice of
// this design, the format only names a parity byte).
package router_pkg;

  localparam int unsigned DATA_W    = 8;   // byte lanes everywhere
  localparam int unsigned NUM_PORTS = 3;   // output ports
  localparam int unsigned ADDR_W    = 2;   // header bits [1:0]
  localparam int unsigned LEN_W     = 6;   // header bits [7:2]

  typedef logic [DATA_W-1:0] byte_t;

  typedef struct packed {
    logic [LEN_W-1:0]  length;  // payload bytes, 1..63
    logic [ADDR_W-1:0] addr;    // destination port
  } header_t;

  // Controller states. The names follow the control outputs of the
  // controller (detect_add, lfd_state, ld_state, full_state, laf_state,
  // rst_int_reg); DROP_PACKET and the encoding are this design's own.
  typedef enum logic [2:0] {
    DECODE_ADDRESS,     // detect_add: waiting for a header
    WAIT_TILL_EMPTY,    // destination FIFO still holds an older packet
    LOAD_FIRST_DATA,    // lfd_state: write the header into the FIFO
    LOAD_DATA,          // ld_state: write payload and parity from the input
    FIFO_FULL_STATE,    // full_state: destination full, input held
    LOAD_AFTER_FULL,    // laf_state: write the byte saved when it filled
    CHECK_PARITY_ERROR, // rst_int_reg: packet done, parity compared
    DROP_PACKET         // FIFO soft-reset mid-packet: discard the rest
  } fsm_state_t;

  function automatic logic addr_valid(input logic [ADDR_W-1:0] a);
    return a != 2'd3;
  endfunction

endpackage
