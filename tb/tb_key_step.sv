// tb_key_step: every forward step of the key schedule against the
// reference model's round keys, and every backward step recovering the
// previous round key, for random cipher keys.
module tb_key_step;
  import aes_ref_pkg::*;
  logic [127:0] kin, kout, kin_b, kout_b;
  logic [3:0]   round;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  key_step #(.C(4'h3), .INVERSE(1'b0)) u_f (.kin(kin), .round(round), .kout(kout));
  key_step #(.C(4'h3), .INVERSE(1'b1)) u_b (.kin(kin_b), .round(round), .kout(kout_b));
  initial begin
    logic [127:0] key;
    for (int t = 0; t < 20; t++) begin
      key = rand_blk();
      for (int r = 1; r <= 10; r++) begin
        round = 4'(r);
        kin   = round_key(key, r - 1, 4'h3, 0);
        kin_b = round_key(key, r, 4'h3, 0);
        #1;
        check(kout == kin_b, "forward step");
        check(kout_b == kin, "backward step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
