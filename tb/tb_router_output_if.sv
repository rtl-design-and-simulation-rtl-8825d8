// tb_router_output_if: self-checking testbench for router_output_if.
//
// The output interface is paired with a router_fifo as in the router. A
// producer offers numbered bytes at random (only when the FIFO has room); a
// byte the output interface takes directly (byp_take) is not written into the
// FIFO. The receiver raises ready_out at random and sometimes holds it low for
// long stretches. Checks: every byte reaches data_out once and in order; a
// word offered on data_out stays until taken; the direct path is used only
// when the FIFO is empty; both the direct path and FIFO buffering happen;
// into an idle port a byte shows on data_out one cycle after it is offered;
// with the receiver always ready a port drains one byte per cycle.
module tb_router_output_if;
  localparam int unsigned DATA_W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic [DATA_W-1:0] fifo_data, data_out, byp_data;
  logic fifo_empty, fifo_rd, valid_out, ready_out, byp_wr, byp_take, fifo_full;

  int checks = 0, failures = 0;
  int sent = 0, got = 0, stalls = 0, n_direct = 0, n_buffered = 0;
  int fill_pct, ready_pct, blocked;
  bit allow_block = 1'b0;

  router_fifo #(.DATA_W(DATA_W), .DEPTH(16)) u_fifo (
    .clk, .rst_n,
    .wr_en(byp_wr && !byp_take), .wr_data(byp_data),
    .rd_en(fifo_rd), .rd_data(fifo_data),
    .full(fifo_full), .empty(fifo_empty), .count()
  );

  router_output_if #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
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

  logic held; logic [DATA_W-1:0] held_data;

  // drive at the falling edge, so every input is steady at the rising edge
  always @(negedge clk) begin
    if (!rst_n) begin
      byp_wr = 1'b0; byp_data = '0; ready_out = 1'b0; blocked = 0;
    end else begin
      byp_wr   = !fifo_full && ($urandom_range(0, 99) < fill_pct);
      byp_data = DATA_W'(sent);
      if (blocked > 0) begin
        blocked--;
        ready_out = 1'b0;
      end else begin
        if (allow_block && $urandom_range(0, 99) == 0) blocked = $urandom_range(10, 40);
        ready_out = ($urandom_range(0, 99) < ready_pct);
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      held <= 1'b0;
    end else begin
      if (held) check(valid_out && data_out == held_data, "output held until taken");
      if (valid_out && ready_out) begin
        check(data_out == DATA_W'(got), "output order");
        got <= got + 1;
      end
      if (byp_take) check(fifo_empty, "direct path only with an empty FIFO");
      if (byp_wr) begin
        sent <= sent + 1;
        if (byp_take) n_direct++; else n_buffered++;
      end
      if (valid_out && !ready_out) stalls++;
      held <= valid_out && !ready_out;
      held_data <= data_out;
    end
  end

  initial begin
    int n0;
    rst_n = 1'b0; fill_pct = 40; ready_pct = 60; allow_block = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5000) @(posedge clk);
    // drain completely
    fill_pct = 0; ready_pct = 100; allow_block = 1'b0;
    repeat (100) @(posedge clk);
    check(got == sent, "all words delivered");
    check(!valid_out && fifo_empty, "idle when drained");
    // idle port: one byte offered, seen on data_out after the next edge
    @(posedge clk); #1 fill_pct = 100;
    @(negedge clk); #1 fill_pct = 0;
    check(byp_wr && byp_take, "idle port takes the byte directly");
    @(posedge clk); #1;
    check(valid_out && data_out == DATA_W'(sent - 1), "direct byte after one cycle");
    // receiver always ready, producer every cycle: one byte per cycle
    fill_pct = 100;
    repeat (5) @(posedge clk);
    #1 n0 = got;
    repeat (50) @(posedge clk);
    #1 check(got - n0 == 50, "one word per cycle");
    fill_pct = 0;
    repeat (40) @(posedge clk);
    check(got == sent, "all words delivered at the end");
    check(stalls > 100, "receiver stalls exercised");
    check(n_direct > 0 && n_buffered > 0, "direct path and FIFO buffering both used");
    $display("direct=%0d buffered=%0d stalls=%0d", n_direct, n_buffered, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
