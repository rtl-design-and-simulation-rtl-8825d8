// router_input_if: input interface of the router.
//
// Takes packet bytes from the sending node with a valid/ready handshake and
// holds them in a one-word register for the router core. A byte is taken at
// a rising edge when valid_in and ready_in are both high; while ready_in is
// low the sender must hold data_in and valid_in steady, so nothing is lost.
// ready_in is high when the register is empty or when the core takes the
// held word in the same cycle, so the stage passes one byte per cycle with
// one cycle of latency. When the destination FIFO is full the core stops
// taking words and ready_in falls: this is the router's congestion signal
// (the "suspend data" of the input protocol, seen from the sender as
// ready_in low). The handshake names follow the document; the single
// register and its timing are this design's choice. rst_n is active low and
// synchronous and empties the register.
module router_input_if
  import router_pkg::*;
#(
  parameter int unsigned DATA_W = router_pkg::RT_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // sending node
  input  logic [DATA_W-1:0] data_in,
  input  logic              valid_in,
  output logic              ready_in,
  // router core
  output logic [DATA_W-1:0] core_data,
  output logic              core_valid,
  input  logic              core_ready
);

  assign ready_in = !core_valid || core_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      core_valid <= 1'b0;
      core_data  <= '0;
    end else if (ready_in) begin
      core_valid <= valid_in;
      if (valid_in) core_data <= data_in;
    end
  end

  // A sender that was stalled must keep offering the same byte.
  a_hold_while_stalled: assert property (@(posedge clk) disable iff (!rst_n)
    (valid_in && !ready_in) |=> (valid_in && $stable(data_in)));

endmodule
