// router_output_if: output interface of one router port.
//
// Moves words to the receiving node through an output register (data_out,
// valid_out). A word on data_out is delivered at the rising edge where
// valid_out and ready_out are both high, as in the router's output protocol;
// while ready_out is low the word stays put. The register is refilled when it
// is empty or being taken this cycle ("can load"), from one of two sources:
//   - the port FIFO, when it holds words: fifo_rd pops its head;
//   - directly from the router core, when the FIFO is empty and a byte for
//     this port arrives (byp_wr): byp_take tells the core that the byte went
//     straight to the output and must not be written into the FIFO.
// The second path is the uncongested case, where a byte skips buffering;
// when the port is congested (receiver stalled or FIFO not empty) bytes are
// buffered in the FIFO, so the word order is always kept. With ready_out held
// high the port sends one byte per cycle. The handshake and the split between
// direct transmission and FIFO buffering follow the document; the output
// register and the exact bypass condition are this design's choices.
// rst_n is active low and synchronous.
module router_output_if
  import router_pkg::*;
#(
  parameter int unsigned DATA_W = router_pkg::RT_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // port FIFO
  input  logic [DATA_W-1:0] fifo_data,
  input  logic              fifo_empty,
  output logic              fifo_rd,
  // bytes for this port from the router core
  input  logic [DATA_W-1:0] byp_data,
  input  logic              byp_wr,
  output logic              byp_take,
  // receiving node
  output logic [DATA_W-1:0] data_out,
  output logic              valid_out,
  input  logic              ready_out
);

  logic can_load;
  assign can_load = !valid_out || ready_out;
  assign fifo_rd  = can_load && !fifo_empty;
  assign byp_take = can_load && fifo_empty && byp_wr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      data_out  <= '0;
    end else if (can_load) begin
      valid_out <= fifo_rd || byp_take;
      if (fifo_rd)       data_out <= fifo_data;
      else if (byp_take) data_out <= byp_data;
    end
  end

  // A word offered to the receiver stays until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (valid_out && !ready_out) |=> (valid_out && $stable(data_out)));

endmodule
