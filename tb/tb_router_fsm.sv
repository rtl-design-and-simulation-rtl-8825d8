// tb_router_fsm: self-checking testbench for router_fsm.
//
// Generates random packets (header {len, addr}, len payload bytes, parity
// byte), some to an address with no port and some with a wrong parity byte,
// and offers them byte by byte with random gaps. The routing logic is modelled
// here: addr_ok for addresses 0..2 and a random per-port full flag. For every
// byte the testbench checks that route_addr names the packet's address, that
// the byte is taken exactly when its FIFO has room (or the packet is dropped),
// that wr is raised only for bytes of routable packets, and that parity_err,
// pkt_done and pkt_drop pulse once for the right packets.
module tb_router_fsm;
  import router_pkg::*;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 2;
  localparam int unsigned NPKT   = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic [DATA_W-1:0] in_data;
  logic in_valid, in_ready, addr_ok, dest_full, wr;
  logic [ADDR_W-1:0] route_addr;
  fsm_state_t state;
  logic parity_err, pkt_done, pkt_drop;

  logic [2:0] full_vec;

  int checks = 0, failures = 0;

  router_fsm #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  assign addr_ok   = (route_addr < 2'd3);
  assign dest_full = addr_ok && full_vec[route_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // expected stream
  typedef struct {
    logic [DATA_W-1:0] data;
    logic [ADDR_W-1:0] addr;
    bit drop;
    bit last;
    bit bad;
  } beat_t;
  beat_t beats [$];
  bit    pkt_bad [$];   // expected parity_err per packet, in order

  int exp_err = 0, exp_drop = 0, n_err = 0, n_drop = 0, n_done = 0, n_full_stall = 0;

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      logic [ADDR_W-1:0] a;
      int len;
      logic [DATA_W-1:0] par, b;
      bit bad;
      a   = ADDR_W'($urandom_range(0, 3));
      len = (p % 7 == 0) ? 0 : $urandom_range(1, 12);
      b   = {6'(len), a};
      par = b;
      beats.push_back('{b, a, a == 2'd3, 1'b0, 1'b0});
      for (int i = 0; i < len; i++) begin
        b = DATA_W'($urandom);
        par ^= b;
        beats.push_back('{b, a, a == 2'd3, 1'b0, 1'b0});
      end
      bad = ($urandom_range(0, 4) == 0);
      beats.push_back('{bad ? ~par : par, a, a == 2'd3, 1'b1, bad});
      pkt_bad.push_back(bad && a != 2'd3);
      if (a == 2'd3) exp_drop++;
      else if (bad) exp_err++;
    end
  end

  int idx = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      full_vec <= '0;
    end else begin
      if (parity_err) n_err++;
      if (pkt_drop) n_drop++;
      if (pkt_done) begin
        check(n_done < pkt_bad.size() && parity_err == pkt_bad[n_done], "parity_err of this packet");
        n_done++;
      end
      if (parity_err) check(pkt_done, "parity_err only with pkt_done");
      if (in_valid) begin
        check(route_addr == beats[idx].addr, "route_addr");
        check(in_ready == (beats[idx].drop || !full_vec[beats[idx].addr]), "in_ready");
        check(wr == (in_ready && !beats[idx].drop), "wr");
        if (!in_ready) n_full_stall++;
      end else begin
        check(!wr, "no wr without valid");
      end
      if (in_valid && in_ready) idx = idx + 1;
      if (!in_valid || in_ready) begin
        in_valid <= (idx < beats.size()) && ($urandom_range(0, 9) != 0);
        in_data  <= (idx < beats.size()) ? beats[idx].data : '0;
      end
      full_vec <= 3'($urandom) & 3'($urandom);
    end
  end

  initial begin
    rst_n = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (idx == beats.size());
    repeat (4) @(posedge clk);
    check(n_done == NPKT, "pkt_done count");
    check(n_drop == exp_drop, "pkt_drop count");
    check(n_err == exp_err, "parity_err count");
    check(exp_err > 0 && exp_drop > 0 && n_full_stall > 0, "all cases exercised");
    check(state == ST_HEADER, "idle at end");
    $display("dropped=%0d parity_err=%0d stalls=%0d", n_drop, n_err, n_full_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
