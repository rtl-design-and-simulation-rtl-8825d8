// router_route: routing logic of the router.
//
// Decodes a destination address into a one-hot port select. Addresses 0 to
// NUM_PORTS-1 name an output port (addr_ok high); any other address names no
// port. For a valid address it steers the write strobe wr to that port's
// FIFO only (fifo_we) and reports whether that FIFO is full (dest_full), which
// is how the router detects congestion on the packet's path. Purely
// combinational. Routing by the destination address in the header follows
// the document; the binary address code and the handling of addresses that
// name no port are this design's choices.
module router_route
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS = router_pkg::RT_NUM_PORTS,
  parameter int unsigned ADDR_W    = router_pkg::RT_ADDR_W
) (
  input  logic [ADDR_W-1:0]    addr,
  input  logic                 wr,
  input  logic [NUM_PORTS-1:0] fifo_full,
  output logic                 addr_ok,
  output logic                 dest_full,
  output logic [NUM_PORTS-1:0] fifo_we
);

  logic [NUM_PORTS-1:0] sel;

  always_comb begin
    sel = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (addr == ADDR_W'(p)) sel[p] = 1'b1;
    end
  end

  assign addr_ok   = |sel;
  assign dest_full = |(sel & fifo_full);
  assign fifo_we   = (wr && !dest_full) ? sel : '0;

endmodule
