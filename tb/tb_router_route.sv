// tb_router_route: self-checking testbench for router_route.
//
// Exhaustive over every address, write strobe and pattern of full FIFOs:
// checks addr_ok (address names a port), dest_full (the addressed FIFO is
// full) and that the write goes to the addressed FIFO alone, and only when it
// has room.
module tb_router_route;
  localparam int unsigned NUM_PORTS = 3;
  localparam int unsigned ADDR_W    = 2;

  logic [ADDR_W-1:0]    addr;
  logic                 wr;
  logic [NUM_PORTS-1:0] fifo_full, fifo_we;
  logic                 addr_ok, dest_full;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  router_route #(.NUM_PORTS(NUM_PORTS), .ADDR_W(ADDR_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s addr=%0d wr=%0d full=%b", what, addr, wr, fifo_full);
    end
  endtask

  initial begin
    for (int a = 0; a < (1 << ADDR_W); a++)
      for (int w = 0; w < 2; w++)
        for (int f = 0; f < (1 << NUM_PORTS); f++) begin
          logic ok, df;
          logic [NUM_PORTS-1:0] we;
          addr = ADDR_W'(a); wr = w[0]; fifo_full = NUM_PORTS'(f);
          @(posedge clk);
          ok = (a < NUM_PORTS);
          df = ok && fifo_full[a];
          we = '0;
          if (ok && w == 1 && !df) we[a] = 1'b1;
          check(addr_ok == ok, "addr_ok");
          check(dest_full == df, "dest_full");
          check(fifo_we == we, "fifo_we");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
