// tb_aes_tx: a session of groups of four frames through aes_tx, with
// random idle cycles. Frame n of the session (counting from 1 across all
// groups) must be processed under the agreed key with every byte plus n;
// results are compared with the reference model, the latency must be 11
// cycles and keyout must be the key of the latest frame taken in.
module tb_aes_tx;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic         in_valid = 0, out_valid;
  logic [511:0] din, dout, exp_v;
  logic [127:0] keyin, keyout;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  aes_tx #(.FRAMES(4), .C(4'h3)) u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .plain(din), .keyin(keyin),
    .out_valid(out_valid), .cipher(dout), .keyout(keyout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [511:0] exp_q [$];
  int           t_q   [$];
  int           n_in = 0, n_out = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    n_out++;
    if (exp_q.size() == 0) check(0, "unexpected output");
    else begin
      exp_v = exp_q.pop_front();
      for (int f = 0; f < 4; f++)
        check(dout[128*f +: 128] == exp_v[128*f +: 128], "frame vs model");
      check(cycle - t_q.pop_front() == 11, "latency 11 cycles");
    end
  end

  initial begin
    logic [127:0] k, p, c, fk;
    logic [511:0] d, e;
    int n = 0;
    k = 128'h0f0e0d0c0b0a09080706050403020100;
    keyin = k;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int g = 0; g < 12; g++) begin
      for (int f = 0; f < 4; f++) begin
        fk = frame_key(k, n + f + 1);
        p = rand_blk(); c = encrypt(p, fk, 4'h3);
        d[128*f +: 128] = p; e[128*f +: 128] = c;
      end
      n += 4;
      in_valid = 1; din = d; exp_q.push_back(e); t_q.push_back(cycle); n_in++;
      @(negedge clk);
      check(keyout == frame_key(k, n), "keyout is the latest frame key");
      if ($urandom_range(2) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (15) @(negedge clk);
    check(n_out == n_in, "every group came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
