// tb_sub_bytes: SubBytes and InvSubBytes on random blocks, compared with
// the reference model, plus the round trip through both.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, back;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  sub_bytes #(.C(4'h3), .INVERSE(1'b0)) u_f (.din(din), .dout(dout));
  sub_bytes #(.C(4'h3), .INVERSE(1'b1)) u_i (.din(dout), .dout(back));
  initial begin
    din = {2{64'h0123456789abcdef}}; #1;
    check(dout == {2{64'h34fb2170cd596ea8}}, "published table, every nibble");
    for (int i = 0; i < 200; i++) begin
      din = rand_blk(); #1;
      check(dout == sub(din, 4'h3, 0, 0), "forward vs model");
      check(back == din, "inverse undoes forward");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
