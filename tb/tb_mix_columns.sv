// tb_mix_columns: MixColumns against the FIPS-197 example column
// (db 13 53 45 -> 8e 4d a1 bc) and the reference model; InvMixColumns
// must undo it.
module tb_mix_columns;
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
  mix_columns #(.INVERSE(1'b0)) u_f (.din(din), .dout(dout));
  mix_columns #(.INVERSE(1'b1)) u_i (.din(dout), .dout(back));
  initial begin
    din = 128'hdb135345f20a225c01010101c6c6c6c6; #1;
    check(dout == 128'h8e4da1bc9fdc589d01010101c6c6c6c6, "known columns");
    for (int i = 0; i < 100; i++) begin
      din = rand_blk(); #1;
      check(dout == mix(din, 0), "forward vs model");
      check(back == din, "inverse undoes forward");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
