// tb_router_top: end-to-end self-checking testbench for router_top.
//
// Runs the router at its default parameters. Phase 1 sends the two packets of
// the reference timing diagrams (to port 0, three payload bytes and then a
// longer one) into an idle router and checks the latency of the first byte
// (2 cycles from acceptance to valid_out, over the direct path) and the throughput of one byte per
// cycle. Phase 2 sends random packets to all addresses, some to an address
// with no port and some with a wrong parity byte, while the receivers lower
// ready_out at random and sometimes for long stretches. A scoreboard per port
// checks that every byte of every routable packet leaves its port once and in
// order, and the testbench counts each mechanism: input stall on congestion
// (valid_in high, ready_in low), a port FIFO full, output backpressure,
// bytes sent over the direct path and bytes buffered in a FIFO,
// dropped packet, parity error, zero-length packet. One that never happens is
// a failure.
module tb_router_top;
  import router_pkg::*;
  localparam int unsigned NPORT = RT_NUM_PORTS;
  localparam int unsigned DW    = RT_DATA_W;
  localparam int unsigned NPKT  = 600;

  logic clk = 1'b0;
  logic rst_n;
  logic [DW-1:0] data_in;
  logic valid_in, ready_in;
  logic [DW-1:0] data_out [NPORT];
  logic valid_out [NPORT];
  logic ready_out [NPORT];
  logic parity_err, pkt_done, pkt_drop;

  router_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // ---------------- stimulus ----------------
  logic [DW-1:0] stream [$];        // bytes to send, in order
  logic [DW-1:0] expq [NPORT][$];   // expected bytes per port
  int exp_err = 0, exp_drop = 0, exp_pkts = 0, n_zero = 0;

  task automatic add_packet(logic [1:0] a, int len, bit bad, logic [DW-1:0] first = '0);
    logic [DW-1:0] b, par;
    b = {6'(len), a};
    par = b;
    stream.push_back(b);
    if (a < NPORT) expq[a].push_back(b);
    for (int i = 0; i < len; i++) begin
      b = (first != '0) ? DW'(first + i) : DW'($urandom);
      par ^= b;
      stream.push_back(b);
      if (a < NPORT) expq[a].push_back(b);
    end
    b = bad ? ~par : par;
    stream.push_back(b);
    if (a < NPORT) expq[a].push_back(b);
    exp_pkts++;
    if (a >= NPORT) exp_drop++;
    else if (bad) exp_err++;
    if (len == 0) n_zero++;
  endtask

  int gap_pct = 0;
  int sidx = 0;
  int accept_cycle [$];

  always @(posedge clk) begin
    if (!rst_n) begin
      valid_in <= 1'b0;
      data_in  <= '0;
    end else begin
      if (valid_in && ready_in) begin
        accept_cycle.push_back(cycle);
        sidx = sidx + 1;
      end
      if (!valid_in || ready_in) begin
        valid_in <= (sidx < stream.size()) && ($urandom_range(0, 99) >= gap_pct);
        data_in  <= (sidx < stream.size()) ? stream[sidx] : '0;
      end
    end
  end

  // ---------------- receivers ----------------
  int ready_pct [NPORT];
  int blocked   [NPORT];   // cycles left of a long ready_out=0 stretch
  int got [NPORT];
  int first_out_cycle [NPORT];
  int n_direct = 0, n_buffered = 0;
  int n_stall_in = 0, n_full = 0, n_backpressure = 0, n_err = 0, n_drop = 0, n_done = 0;
  bit long_blocks = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) begin
        ready_out[p] <= 1'b0; got[p] <= 0; blocked[p] <= 0; first_out_cycle[p] <= -1;
      end
    end else begin
      if (valid_in && !ready_in) n_stall_in++;
      if (|dut.fifo_full) n_full++;
      if (|dut.byp_take) n_direct++;
      if (|(dut.fifo_we & ~dut.byp_take)) n_buffered++;
      if (parity_err) n_err++;
      if (pkt_drop) n_drop++;
      if (pkt_done) n_done++;
      for (int p = 0; p < NPORT; p++) begin
        if (valid_out[p] && first_out_cycle[p] < 0) first_out_cycle[p] <= cycle;
        if (valid_out[p] && !ready_out[p]) n_backpressure++;
        if (valid_out[p] && ready_out[p]) begin
          if (expq[p].size() == 0) check(1'b0, $sformatf("port %0d: unexpected byte", p));
          else begin
            check(data_out[p] == expq[p][0], $sformatf("port %0d: byte order/content", p));
            void'(expq[p].pop_front());
          end
          got[p] <= got[p] + 1;
        end
        if (blocked[p] > 0) begin
          blocked[p] <= blocked[p] - 1;
          ready_out[p] <= 1'b0;
        end else begin
          if (long_blocks && $urandom_range(0, 199) == 0) blocked[p] <= $urandom_range(20, 60);
          ready_out[p] <= ($urandom_range(0, 99) < ready_pct[p]);
        end
      end
    end
  end

  function automatic bit all_empty();
    for (int p = 0; p < NPORT; p++) if (expq[p].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int c0, n0;
    rst_n = 1'b0;
    for (int p = 0; p < NPORT; p++) ready_pct[p] = 100;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Phase 1: the reference packets, to port 0, receiver ready
    add_packet(2'd0, 3, 1'b0, 8'hA0);
    add_packet(2'd0, 8, 1'b0, 8'hB0);
    while (accept_cycle.size() == 0) @(posedge clk);
    c0 = accept_cycle[0];
    while (first_out_cycle[0] < 0) @(posedge clk);
    check(first_out_cycle[0] - c0 == 2, $sformatf("latency %0d cycles, expected 2", first_out_cycle[0] - c0));
    while (!all_empty()) @(posedge clk);
    check(accept_cycle.size() == 15 && accept_cycle[14] - accept_cycle[0] == 14, "input at one byte per cycle");
    check(got[0] == 15, "port 0 received both packets");

    // Phase 2: random traffic with congestion
    for (int p = 0; p < NPORT; p++) ready_pct[p] = 40 + 20 * p;
    long_blocks = 1;
    gap_pct = 10;
    for (int i = 0; i < NPKT; i++) begin
      logic [1:0] a;
      a = 2'($urandom_range(0, 3));
      add_packet(a, (i % 9 == 0) ? 0 : $urandom_range(1, 40), $urandom_range(0, 5) == 0);
    end
    while (sidx != stream.size()) @(posedge clk);
    long_blocks = 0;
    for (int p = 0; p < NPORT; p++) ready_pct[p] = 100;
    repeat (200) @(posedge clk);
    for (int p = 0; p < NPORT; p++) check(expq[p].size() == 0, $sformatf("port %0d: all bytes delivered", p));
    check(n_done == exp_pkts, "pkt_done count");
    check(n_drop == exp_drop, "pkt_drop count");
    check(n_err == exp_err, "parity_err count");
    check(n_stall_in > 0, "input stall on congestion happened");
    check(n_full > 0, "a port FIFO was full");
    check(n_backpressure > 0, "output backpressure happened");
    check(exp_drop > 0, "a packet was dropped");
    check(n_direct > 0, "direct transmission happened");
    check(n_buffered > 0, "FIFO buffering happened");
    check(exp_err > 0, "a parity error happened");
    check(n_zero > 0, "a zero-length packet was sent");
    $display("direct_bytes=%0d buffered_bytes=%0d", n_direct, n_buffered);
    $display("packets=%0d dropped=%0d parity_err=%0d zero_len=%0d input_stall_cycles=%0d fifo_full_cycles=%0d backpressure=%0d",
             exp_pkts, n_drop, n_err, n_zero, n_stall_in, n_full, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
