// tb_router_input_if: self-checking testbench for router_input_if.
//
// A sender offers a numbered byte stream with random gaps and a core takes
// words with random stalls. The testbench checks that every byte reaches the
// core once and in order, that ready_in follows the register state
// (ready_in = !core_valid || core_ready), that a held word does not change
// while the core stalls, and that with no gaps and no stalls the stage
// passes one byte per cycle with one cycle of latency.
module tb_router_input_if;
  localparam int unsigned DATA_W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic [DATA_W-1:0] data_in, core_data;
  logic valid_in, ready_in, core_valid, core_ready;

  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  int stalls = 0;

  router_input_if #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  int gap_pct, stall_pct;
  logic [DATA_W-1:0] last_core;
  logic last_stalled;

  // sender: holds its byte while not ready
  always @(posedge clk) begin
    if (!rst_n) begin
      valid_in <= 1'b0; data_in <= '0; sent <= 0;
    end else begin
      if (valid_in && ready_in) sent <= sent + 1;
      if (!valid_in || ready_in) begin
        valid_in <= ($urandom_range(0, 99) >= gap_pct);
        data_in  <= DATA_W'((valid_in && ready_in) ? sent + 1 : sent);
      end
    end
  end

  // receiver side
  always @(posedge clk) begin
    if (rst_n) begin
      if (core_valid && core_ready) begin
        check(core_data == DATA_W'(got), "core byte order");
        got <= got + 1;
      end
      if (last_stalled) check(core_valid && core_data == last_core, "held while stalled");
      last_stalled <= core_valid && !core_ready;
      if (core_valid && !core_ready) stalls++;
      last_core <= core_data;
      core_ready <= ($urandom_range(0, 99) >= stall_pct);
    end else begin
      last_stalled <= 1'b0;
      core_ready <= 1'b0;
    end
  end

  always @(negedge clk) if (rst_n) check(ready_in == (!core_valid || core_ready), "ready_in rule");

  initial begin
    int t0, n0;
    rst_n = 1'b0; gap_pct = 30; stall_pct = 30;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    // full rate: no gaps, no stalls
    gap_pct = 0; stall_pct = 0;
    repeat (20) @(posedge clk);
    n0 = got;
    repeat (100) @(posedge clk);
    check(got - n0 == 100, "one byte per cycle");
    // latency: a byte accepted at an edge is on core_data right after it
    @(negedge clk);
    check(core_valid && core_data == DATA_W'(got), "one-cycle latency");
    gap_pct = 100; stall_pct = 0;
    repeat (10) @(posedge clk);
    check(got == sent, "all bytes delivered");
    check(stalls > 100, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
