// tb_timer32: self-checking testbench of the cycle timer.
//
// Resets, starts, lets the timer run a known number of cycles, stops it and
// checks the count, checks that a stopped timer holds, that a restart
// continues from the held value, that reset clears it, and that the count
// wraps (with an 8-bit instance). A watchdog ends a hung run.
module tb_timer32;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rst_cnt = 1'b0, start = 1'b0, stop = 1'b0;
  logic [31:0] count;
  logic running;
  logic rst8 = 1'b0, start8 = 1'b0;
  logic [7:0] count8;
  logic running8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timer32 dut (.clk, .rst_n, .rst_cnt, .start, .stop, .count, .running);
  timer32 #(.WIDTH(8)) dut8 (.clk, .rst_n, .rst_cnt(rst8), .start(start8), .stop(1'b0),
                             .count(count8), .running(running8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !running, "reset state");
    pulse(start);                 // start seen at one edge; counting from the next
    check(running && count == 0, "running after start");
    repeat (99) @(negedge clk);
    pulse(stop);
    check(count == 101, $sformatf("count %0d exp 101", count));  // 99 + the pulse edges
    repeat (20) @(negedge clk);
    check(count == 101 && !running, "holds while stopped");
    pulse(start);
    repeat (9) @(negedge clk);
    pulse(stop);
    check(count == 112, $sformatf("continued count %0d exp 112", count));
    pulse(rst_cnt);
    check(count == 0, "cleared by reset");
    // reset and start together restart from zero
    @(negedge clk) begin rst_cnt = 1'b1; start = 1'b1; end
    @(negedge clk) begin rst_cnt = 1'b0; start = 1'b0; end
    repeat (5) @(negedge clk);
    check(count == 5, $sformatf("restart count %0d exp 5", count));
    // wrap with 8 bits
    pulse(start8);
    repeat (259) @(negedge clk);
    check(count8 == 8'd3, $sformatf("wrapped count %0d exp 3", count8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
