// tb_aes_encrypt: streams random blocks, each with its own random key, through
// aes_encrypt, mostly back to back with random idle cycles in between. Every
// output is compared with the reference model and must leave exactly 11
// clock edges after its input; the output count must match the input
// count.
module tb_aes_encrypt;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic         in_valid, out_valid;
  logic [127:0] din, key, dout;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;  // edges so far

  aes_encrypt #(.C(4'h3)) u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .plain(din), .key(key),
    .out_valid(out_valid), .cipher(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [127:0] exp_q [$];
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
      check(dout == exp_q.pop_front(), "data vs model");
      check(cycle - t_q.pop_front() == 11, "latency 11 cycles");
    end
  end

  initial begin
    logic [127:0] p, k, c;
    // The model itself against the FIPS-197 example (standard S-box).
    check(encrypt(128'h00112233445566778899aabbccddeeff,
                  128'h000102030405060708090a0b0c0d0e0f, 4'h0, 1)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "model vs FIPS-197");
    in_valid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      p = rand_blk(); k = rand_blk(); c = encrypt(p, k, 4'h3);
      check(decrypt(c, k, 4'h3) == p, "model round trip");
      in_valid = 1; key = k;
      din = p; exp_q.push_back(c);
      t_q.push_back(cycle);
      n_in++;
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (15) @(negedge clk);
    check(n_out == n_in, "every block came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
