// tb_sha1: self-checking testbench of the SHA-1 accelerator.
//
// Pads messages in the testbench (FIPS 180-1 padding: 0x80, zeros, 64-bit
// bit length), feeds them block by block and compares the digest with the
// standard's published test vectors: "abc" (one block) and the 56-character
// "abcdbcde...nopq" (two blocks), plus the empty message. Checks that done
// comes 81 clock edges after start, that busy is high meanwhile, and that
// init restores the initial chaining value. A watchdog ends a hung run.
module tb_sha1;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0, start = 1'b0;
  logic [31:0] block_w [16];
  logic [31:0] digest [5];
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha1 dut (.clk, .rst_n, .init, .start, .block_w, .digest, .busy, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hash_msg(input string msg, input logic [159:0] expect_d);
    byte unsigned b [$];
    int n, nblk, cyc;
    logic [63:0] bits;
    logic [159:0] got;
    foreach (msg[i]) b.push_back(msg[i]);
    n = b.size();
    bits = 64'(n) * 8;
    b.push_back(8'h80);
    while ((b.size() % 64) != 56) b.push_back(8'h00);
    for (int i = 7; i >= 0; i--) b.push_back(bits[8*i +: 8]);
    nblk = b.size() / 64;
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    check(digest[0] == 32'h67452301 && digest[4] == 32'hC3D2E1F0, "init value");
    for (int k = 0; k < nblk; k++) begin
      for (int w = 0; w < 16; w++)
        block_w[w] = {b[64*k+4*w], b[64*k+4*w+1], b[64*k+4*w+2], b[64*k+4*w+3]};
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      check(busy, "busy after start");
      while (!done && cyc < 500) begin @(negedge clk); cyc++; end
      // 82 edges counting the one that samples start: 80 rounds + final addition
      check(cyc == 82, $sformatf("latency %0d exp 82", cyc));
    end
    got = {digest[0], digest[1], digest[2], digest[3], digest[4]};
    check(got == expect_d, $sformatf("digest of \"%s\": %h exp %h", msg, got, expect_d));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (block_w[i]) block_w[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    hash_msg("abc", 160'hA9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D);
    hash_msg("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq",
             160'h84983E44_1C3BD26E_BAAE4AA1_F95129E5_E54670F1);
    hash_msg("", 160'hDA39A3EE_5E6B4B0D_3255BFEF_95601890_AFD80709);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
