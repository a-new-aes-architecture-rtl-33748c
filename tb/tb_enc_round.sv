// tb_enc_round: a first (ROUND=1) and a final (ROUND=10) encryption round
// stage, fed random states and the matching round keys of the reference
// schedule. Each result must appear one clock edge after in_valid, with
// the next round key, and out_valid must follow in_valid by one cycle.
module tb_enc_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic         v_in, v1, v10;
  logic [127:0] s_in, k_in, s1, k1, s10, k10, s_in10, k_in10;
  always #5 clk = ~clk;

  enc_round #(.C(4'h3), .ROUND(1)) u_r1 (
    .clk(clk), .rst(rst), .in_valid(v_in), .in_state(s_in), .in_key(k_in),
    .out_valid(v1), .out_state(s1), .out_key(k1));
  enc_round #(.C(4'h3), .ROUND(10)) u_r10 (
    .clk(clk), .rst(rst), .in_valid(v_in), .in_state(s_in10), .in_key(k_in10),
    .out_valid(v10), .out_state(s10), .out_key(k10));

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
    logic [127:0] key, st, st10, e1, e10;
    v_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!v1 && !v10, "valid low after reset");
    for (int i = 0; i < 50; i++) begin
      key = rand_blk(); st = rand_blk(); st10 = rand_blk();
      e1  = mix(shift(sub(st, 4'h3, 0, 0), 0), 0) ^ round_key(key, 1, 4'h3, 0);
      e10 = shift(sub(st10, 4'h3, 0, 0), 0) ^ round_key(key, 10, 4'h3, 0);
      v_in <= 1; s_in <= st; k_in <= key;
      s_in10 <= st10; k_in10 <= round_key(key, 9, 4'h3, 0);
      @(posedge clk);
      v_in <= 0;
      #1;
      check(v1 && v10, "valid one cycle after input");
      check(s1 == e1, "round 1 state");
      check(k1 == round_key(key, 1, 4'h3, 0), "round 1 key");
      check(s10 == e10, "final round state (no MixColumns)");
      check(k10 == round_key(key, 10, 4'h3, 0), "round 10 key");
      @(posedge clk); #1;
      check(!v1 && !v10, "valid drops with in_valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
