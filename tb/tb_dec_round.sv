// tb_dec_round: an inner (ROUND=9) and the last (ROUND=0) inverse round
// stage. Each is given the state and round key ROUND+1 and must return,
// one clock edge later, the reference state and round key ROUND.
module tb_dec_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic         v_in, v9, v0;
  logic [127:0] s_in9, k_in9, s_in0, k_in0, s9, k9, s0, k0;
  always #5 clk = ~clk;

  dec_round #(.C(4'h3), .ROUND(9)) u_r9 (
    .clk(clk), .rst(rst), .in_valid(v_in), .in_state(s_in9), .in_key(k_in9),
    .out_valid(v9), .out_state(s9), .out_key(k9));
  dec_round #(.C(4'h3), .ROUND(0)) u_r0 (
    .clk(clk), .rst(rst), .in_valid(v_in), .in_state(s_in0), .in_key(k_in0),
    .out_valid(v0), .out_state(s0), .out_key(k0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] key, a, b, e9, e0;
    v_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!v9 && !v0, "valid low after reset");
    for (int i = 0; i < 50; i++) begin
      key = rand_blk(); a = rand_blk(); b = rand_blk();
      e9 = mix(sub(shift(a, 1), 4'h3, 1, 0) ^ round_key(key, 9, 4'h3, 0), 1);
      e0 = sub(shift(b, 1), 4'h3, 1, 0) ^ key;
      v_in <= 1;
      s_in9 <= a; k_in9 <= round_key(key, 10, 4'h3, 0);
      s_in0 <= b; k_in0 <= round_key(key, 1, 4'h3, 0);
      @(posedge clk);
      v_in <= 0;
      #1;
      check(v9 && v0, "valid one cycle after input");
      check(s9 == e9, "round 9 state");
      check(k9 == round_key(key, 9, 4'h3, 0), "round key 9");
      check(s0 == e0, "last state (no InvMixColumns)");
      check(k0 == key, "cipher key recovered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
