// router_fifo: register-based synchronous FIFO, one per router output port.
//
// The storage is an array of DEPTH words addressed by a write pointer and a
// read pointer, as the router's FIFO design prescribes. Each pointer carries
// one extra wrap bit: the FIFO is empty when the pointers are equal and full
// when they differ only in the wrap bit. The head word is always visible on
// rd_data (first-word fall-through), so a read is a pop: rd_en with !empty
// removes the word shown on rd_data at the next rising edge. A write with
// wr_en and !full stores wr_data at the same edge. Writes to a full FIFO and
// reads from an empty one are ignored (and flagged by assertions).
// Reset (rst_n, active low, synchronous) empties the FIFO. The pointer and
// flag scheme follows the document; depth, width, fall-through reads and the
// count output are this design's choices. DEPTH must be a power of two.
module router_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              full,
  output logic              empty,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PW:0] wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[PW] != rd_ptr[PW]) && (wr_ptr[PW-1:0] == rd_ptr[PW-1:0]);
  assign count   = wr_ptr - rd_ptr;
  assign rd_data = mem[rd_ptr[PW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[PW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // Overflow and underflow are the upstream logic's errors: it must look at
  // full and empty first.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
