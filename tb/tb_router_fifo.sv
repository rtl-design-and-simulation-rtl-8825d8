// tb_router_fifo: self-checking testbench for router_fifo.
//
// Drives random writes and reads (never writing when full nor reading when
// empty, as the router guarantees) and compares rd_data, full, empty and count
// every cycle with a queue model. It also fills the FIFO to DEPTH words and
// drains it, checking the flags at both ends and the word order.
module tb_router_fifo;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned DEPTH  = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic wr_en, rd_en, full, empty;
  logic [DATA_W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] model [$];

  router_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

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

  task automatic compare();
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    check(int'(count) == model.size(), "count");
    if (model.size() != 0) check(rd_data == model[0], "head word");
  endtask

  // one cycle: apply requests, clock, update the model
  task automatic step(bit w, bit r, logic [DATA_W-1:0] d);
    wr_en = w && !full;
    rd_en = r && !empty;
    wr_data = d;
    @(posedge clk);
    if (rd_en) void'(model.pop_front());
    if (wr_en) model.push_back(d);
    #1 compare();
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1 compare();
    // fill to full
    for (int i = 0; i < DEPTH; i++) step(1, 0, DATA_W'(8'h40 + i));
    check(full, "full after DEPTH writes");
    // a write to a full FIFO is held back by the caller: step masks it
    step(1, 0, 8'hEE);
    // drain
    for (int i = 0; i < DEPTH; i++) begin
      check(rd_data == DATA_W'(8'h40 + i), "drain order");
      step(0, 1, '0);
    end
    check(empty, "empty after drain");
    // simultaneous read and write at every fill level
    for (int i = 0; i < 4000; i++) step($urandom_range(0, 2) != 0, $urandom_range(0, 2) != 0, DATA_W'($urandom));
    // reset clears it
    step(1, 0, 8'h11);
    wr_en = 1'b0; rd_en = 1'b0;
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    model.delete();
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
