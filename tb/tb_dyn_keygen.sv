// tb_dyn_keygen: the per-frame key sequence. After reset with a key, each
// group's four frame keys must be the key with every byte raised by the
// frame's sequence number (mod 256), idle cycles must not move the
// sequence, last_key must follow the latest consumed frame, the sequence
// must run past 256 frames (byte wrap-around), and a second reset must
// restart it from a new key.
module tb_dyn_keygen;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, adv = 0;
  logic [127:0] keyin, last;
  logic [127:0] fk [4];
  always #5 clk = ~clk;

  dyn_keygen #(.FRAMES(4)) u_dut (
    .clk(clk), .rst(rst), .keyin(keyin), .advance(adv),
    .frame_key(fk), .last_key(last));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic session(input logic [127:0] k, input int groups);
    int n = 0;
    rst = 1; keyin = k;
    @(negedge clk); @(negedge clk);
    rst = 0;
    keyin = rand_blk();          // must be ignored outside reset
    check(last == k, "last_key is the agreed key after reset");
    for (int g = 0; g < groups; g++) begin
      adv = ($urandom_range(3) != 0);
      #1;
      for (int f = 0; f < 4; f++) check(fk[f] == frame_key(k, n + f + 1), "frame key");
      @(negedge clk);
      if (adv) begin
        n += 4;
        check(last == frame_key(k, n), "last_key");
      end
    end
    adv = 0;
  endtask

  initial begin
    session(128'h000102030405060708090a0b0c0d0e0f, 20);
    session({16{8'hfe}}, 100);   // wraps bytes early and runs past 256 frames
    session(rand_blk(), 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
