// router_fsm: packet framing controller of the router.
//
// Follows each packet through its three parts, header (H), payload (D) and
// parity (P). A packet is header_t {len, addr}, then len payload bytes, then
// one parity byte; len may be zero. In ST_HEADER the address is taken
// straight from the incoming header byte and given to the routing logic
// (route_addr); when the header is accepted the controller latches the
// address, so every byte of the packet, parity included, goes to the same
// port FIFO, in arrival order. A byte is accepted (in_ready high) when the
// destination FIFO is not full; a packet whose address names no port is
// accepted at full rate and discarded (drop). The controller keeps the XOR of
// the header and payload bytes; when the parity byte arrives and differs from
// it, parity_err pulses for one cycle, while the packet, parity byte included,
// is still forwarded unchanged. pkt_done pulses for one cycle after each
// packet's last byte, pkt_drop after the header of a dropped packet.
// wr asks the routing logic to write the current byte. Timing: one byte per
// cycle, decisions taken combinationally in the cycle the byte is offered,
// state and pulses registered. The packet parts H, D and P follow the
// document; the length field, the parity rule and the dropping of unroutable
// packets are this design's choices. rst_n is active low and synchronous.
module router_fsm
  import router_pkg::*;
#(
  parameter int unsigned DATA_W = router_pkg::RT_DATA_W,
  parameter int unsigned ADDR_W = router_pkg::RT_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // bytes from the input interface
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_valid,
  output logic              in_ready,
  // routing logic
  output logic [ADDR_W-1:0] route_addr,
  input  logic              addr_ok,
  input  logic              dest_full,
  output logic              wr,
  // status
  output fsm_state_t        state,
  output logic              parity_err,
  output logic              pkt_done,
  output logic              pkt_drop
);

  localparam int unsigned LEN_W = DATA_W - ADDR_W;

  logic [ADDR_W-1:0] addr_q;
  logic [LEN_W-1:0]  remain_q;   // payload bytes still to come
  logic [DATA_W-1:0] parity_q;   // XOR of header and payload so far
  logic              drop_q;     // current packet is being discarded

  logic discard;   // this byte belongs to a dropped packet
  logic accept;    // a byte moves this cycle

  logic [LEN_W-1:0] hdr_len;
  assign hdr_len = in_data[DATA_W-1:ADDR_W];

  always_comb begin
    if (state == ST_HEADER) begin
      route_addr = in_data[ADDR_W-1:0];
      discard    = !addr_ok;
    end else begin
      route_addr = addr_q;
      discard    = drop_q;
    end
    in_ready = discard || !dest_full;
    accept   = in_valid && in_ready;
    wr       = accept && !discard;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_HEADER;
      addr_q     <= '0;
      remain_q   <= '0;
      parity_q   <= '0;
      drop_q     <= 1'b0;
      parity_err <= 1'b0;
      pkt_done   <= 1'b0;
      pkt_drop   <= 1'b0;
    end else begin
      parity_err <= 1'b0;
      pkt_done   <= 1'b0;
      pkt_drop   <= 1'b0;
      if (accept) begin
        unique case (state)
          ST_HEADER: begin
            addr_q   <= in_data[ADDR_W-1:0];
            remain_q <= hdr_len;
            parity_q <= in_data;
            drop_q   <= !addr_ok;
            pkt_drop <= !addr_ok;
            state    <= (hdr_len == '0) ? ST_PARITY : ST_DATA;
          end
          ST_DATA: begin
            parity_q <= parity_q ^ in_data;
            remain_q <= remain_q - 1'b1;
            if (remain_q == LEN_W'(1)) state <= ST_PARITY;
          end
          ST_PARITY: begin
            parity_err <= !drop_q && (in_data != parity_q);
            pkt_done   <= 1'b1;
            state      <= ST_HEADER;
          end
          default: state <= ST_HEADER;
        endcase
      end
    end
  end

endmodule
