// router_pkg: constants and types shared by the FIFO router.
//
// A packet is a header byte, LEN payload bytes and a parity byte. The header
// carries the destination port in its low ADDR_W bits and the payload length
// in the bits above them. The router has NUM_PORTS output ports, each with its
// own FIFO. The three output ports follow the design this RTL is drawn from;
// the byte width, the header layout and the parity rule (even parity, the XOR
// of header and payload bytes) are this design's own choices.
package router_pkg;

  parameter int unsigned RT_DATA_W     = 8;   // width of one packet byte
  parameter int unsigned RT_NUM_PORTS  = 3;   // output ports, one FIFO each
  parameter int unsigned RT_ADDR_W     = 2;   // header bits naming the port
  parameter int unsigned RT_LEN_W      = RT_DATA_W - RT_ADDR_W; // header bits giving the payload length
  parameter int unsigned RT_FIFO_DEPTH = 16;  // words per output FIFO

  typedef logic [RT_ADDR_W-1:0] addr_t;
  typedef logic [RT_LEN_W-1:0]  len_t;

  // Header layout: {length, address}
  typedef struct packed {
    len_t  len;
    addr_t addr;
  } header_t;

  // Packet framing states of the controller
  typedef enum logic [1:0] {
    ST_HEADER = 2'd0,  // waiting for a header byte
    ST_DATA   = 2'd1,  // receiving payload bytes
    ST_PARITY = 2'd2   // waiting for the parity byte
  } fsm_state_t;

endpackage
