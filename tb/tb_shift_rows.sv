// tb_shift_rows: ShiftRows and InvShiftRows, against a fixed example and
// the reference model on random blocks.
module tb_shift_rows;
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
  shift_rows #(.INVERSE(1'b0)) u_f (.din(din), .dout(dout));
  shift_rows #(.INVERSE(1'b1)) u_i (.din(dout), .dout(back));
  initial begin
    din = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check(dout == 128'h00050a0f04090e03080d02070c01060b, "fixed example");
    for (int i = 0; i < 100; i++) begin
      din = rand_blk(); #1;
      check(dout == shift(din, 0), "forward vs model");
      check(back == din, "inverse undoes forward");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
