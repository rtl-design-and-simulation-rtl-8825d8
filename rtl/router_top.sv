// router_top: one-input, three-output FIFO router.
//
// Packets arrive one byte per cycle on data_in with a valid/ready handshake.
// Each packet is a header byte {len, addr}, len payload bytes and a parity
// byte. The input interface registers each byte; the framing controller
// (router_fsm) reads the destination address from the header and keeps it
// for the whole packet; the routing logic steers each byte to that output
// port. If the port is idle (FIFO empty, output register free) the byte goes
// straight to the port's output register; otherwise it is written into the
// port's FIFO. Each port's output interface hands its words to the receiver
// with its own valid/ready handshake. Packets therefore leave a port
// whole and in arrival order. When the destination FIFO is full the router
// lowers ready_in and the sender holds its byte, so congestion stalls the
// input instead of losing data. Packets to an address with no port are
// discarded (pkt_drop); pkt_done pulses once per packet taken in; a parity byte that does not match the XOR of header
// and payload raises parity_err, and the packet is still delivered.
// Latency: a byte taken at edge k is on data_out after edge k+2 (input
// register, output register) when its port is idle, and waits in the FIFO
// otherwise.
// Structure (input interface, routing logic, one FIFO per output port, output
// interface, controller) and the direct path for uncongested traffic follows the document; widths, depth, header layout,
// parity rule and drop policy are this design's choices.
// rst_n is active low and synchronous and clears every buffer and register.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned DATA_W     = router_pkg::RT_DATA_W,
  parameter int unsigned FIFO_DEPTH = router_pkg::RT_FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // input port
  input  logic [DATA_W-1:0] data_in,
  input  logic              valid_in,
  output logic              ready_in,
  // output ports
  output logic [DATA_W-1:0] data_out  [RT_NUM_PORTS],
  output logic              valid_out [RT_NUM_PORTS],
  input  logic              ready_out [RT_NUM_PORTS],
  // status
  output logic              parity_err,
  output logic              pkt_done,
  output logic              pkt_drop
);

  localparam int unsigned NUM_PORTS = RT_NUM_PORTS;
  localparam int unsigned ADDR_W    = RT_ADDR_W;

  logic [DATA_W-1:0]    core_data;
  logic                 core_valid, core_ready;
  logic [ADDR_W-1:0]    route_addr;
  logic                 addr_ok, dest_full, wr;
  logic [NUM_PORTS-1:0] fifo_full, fifo_empty, fifo_we, fifo_rd, byp_take;
  logic [DATA_W-1:0]    fifo_data [NUM_PORTS];

  router_input_if #(.DATA_W(DATA_W)) u_in (
    .clk, .rst_n,
    .data_in, .valid_in, .ready_in,
    .core_data, .core_valid, .core_ready
  );

  router_fsm #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) fsm1 (
    .clk, .rst_n,
    .in_data (core_data),
    .in_valid(core_valid),
    .in_ready(core_ready),
    .route_addr, .addr_ok, .dest_full, .wr,
    .state(), .parity_err, .pkt_done, .pkt_drop
  );

  router_route #(.NUM_PORTS(NUM_PORTS), .ADDR_W(ADDR_W)) u_route (
    .addr(route_addr), .wr, .fifo_full,
    .addr_ok, .dest_full, .fifo_we
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    router_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (fifo_we[p] && !byp_take[p]),
      .wr_data(core_data),
      .rd_en  (fifo_rd[p]),
      .rd_data(fifo_data[p]),
      .full   (fifo_full[p]),
      .empty  (fifo_empty[p]),
      .count  ()
    );

    router_output_if #(.DATA_W(DATA_W)) u_out (
      .clk, .rst_n,
      .fifo_data (fifo_data[p]),
      .fifo_empty(fifo_empty[p]),
      .fifo_rd   (fifo_rd[p]),
      .byp_data  (core_data),
      .byp_wr    (fifo_we[p]),
      .byp_take  (byp_take[p]),
      .data_out  (data_out[p]),
      .valid_out (valid_out[p]),
      .ready_out (ready_out[p])
    );
  end

endmodule
