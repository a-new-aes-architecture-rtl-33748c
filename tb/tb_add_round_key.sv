// tb_add_round_key: XOR of state and round key on random values.
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, k, dout;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  add_round_key u_dut (.din(din), .rkey(k), .dout(dout));
  initial begin
    for (int i = 0; i < 50; i++) begin
      din = rand_blk(); k = rand_blk(); #1;
      for (int b = 0; b < 128; b += 37) check(dout[b] == (din[b] != k[b]), "bit");
      check((dout ^ k) == din, "recover state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
