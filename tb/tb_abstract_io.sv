// tb_abstract_io: self-checking testbench of the word I/O port.
//
// Puts words from the processor side and drains them on the off-chip tx
// stream, with an off-chip receiver that is sometimes not ready; sends words
// in on the rx stream and gets them on the processor side. Checks order and
// values, that tx_full rises after DEPTH unread puts and a further put is
// dropped, that rx_ready falls when the receive FIFO is full, and rx_avail.
// A watchdog ends a hung run.
module tb_abstract_io;
  localparam int DEPTH = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic put = 1'b0, get = 1'b0;
  logic [31:0] put_data = '0, get_data;
  logic tx_full, rx_avail;
  logic tx_valid, tx_ready = 1'b0;
  logic [31:0] tx_data;
  logic rx_valid = 1'b0, rx_ready;
  logic [31:0] rx_data = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  abstract_io #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .put, .put_data, .get, .get_data, .tx_full, .rx_avail,
                                    .tx_valid, .tx_data, .tx_ready, .rx_valid, .rx_data, .rx_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!tx_valid && !rx_avail && rx_ready && !tx_full, "empty after reset");
    // fill tx beyond capacity
    for (int i = 0; i <= DEPTH; i++) begin
      put = 1'b1; put_data = 32'hA000_0000 + i;
      @(negedge clk);
    end
    put = 1'b0;
    check(tx_full, "tx_full after DEPTH puts");
    // drain with a stalling receiver
    got = 0;
    for (int c = 0; c < 40 && got < DEPTH + 1; c++) begin
      tx_ready = (c % 3 != 1);
      #1;
      if (tx_valid && tx_ready) begin
        check(tx_data == 32'hA000_0000 + got, $sformatf("tx word %0d = %h", got, tx_data));
        got++;
      end
      @(negedge clk);
    end
    tx_ready = 1'b0;
    check(got == DEPTH, $sformatf("words out %0d exp %0d (extra put dropped)", got, DEPTH));
    // receive
    for (int i = 0; i < DEPTH; i++) begin
      rx_valid = 1'b1; rx_data = 32'hB000_0000 + i;
      @(negedge clk);
    end
    check(!rx_ready, "rx_ready low when rx FIFO full");
    rx_valid = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      check(rx_avail && get_data == 32'hB000_0000 + i, $sformatf("get word %0d = %h", i, get_data));
      get = 1'b1;
      @(negedge clk);
      get = 1'b0;
    end
    check(!rx_avail, "rx empty after gets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
