// tb_sbox4: exhaustive check of the modified 4-bit S-box and its inverse.
// The C=3 forward and inverse outputs are compared with the published
// tables and with the reference model; a second pair of instances with
// C=8 is checked against the model and for the absence of fixed points.
module tb_sbox4;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, y3, yi3, y8, yi8;
  // Published tables for C = 3, entry x at nibble 15-x.
  localparam logic [63:0] FWD3 = 64'h34FB2170CD596EA8;
  localparam logic [63:0] INV3 = 64'h75401AC6FBE389D2;

  sbox4 #(.C(4'h3), .INVERSE(1'b0)) u_f3 (.a(a), .y(y3));
  sbox4 #(.C(4'h3), .INVERSE(1'b1)) u_i3 (.a(a), .y(yi3));
  sbox4 #(.C(4'h8), .INVERSE(1'b0)) u_f8 (.a(a), .y(y8));
  sbox4 #(.C(4'h8), .INVERSE(1'b1)) u_i8 (.a(a), .y(yi8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%h", what, a); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      a = 4'(x); #1;
      check(y3 == FWD3[4*(15-x) +: 4], "C=3 forward vs table");
      check(yi3 == INV3[4*(15-x) +: 4], "C=3 inverse vs table");
      check(y3 == sbox4(a, 4'h3), "C=3 forward vs model");
      check(y8 == sbox4(a, 4'h8), "C=8 forward vs model");
      check(yi8 == sbox4_inv(a, 4'h8), "C=8 inverse vs model");
      check(y3 != a && y8 != a, "no fixed point");
    end
    // Worked example: input A gives 5 with C = 3.
    a = 4'ha; #1; check(y3 == 4'h5, "worked example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
