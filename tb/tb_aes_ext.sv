// tb_aes_ext: end-to-end test of the transmitter-receiver pair at its
// default size (four 16-byte frames per group). Three sessions, each
// started by a reset with a new agreed key, send groups of random frames,
// partly back to back and partly with idle cycles. For every group the
// ciphertext must match the reference model under the per-frame dynamic
// keys and appear 11 cycles after input, the recovered plaintext must equal
// the input 22 cycles after input, and keyout must be the latest frame key.
// It also counts the mechanisms exercised: key change per frame, key
// bytes wrapping past 0xff, back-to-back groups, idle gaps and session
// restarts; one that never happened counts as a failure. Finally the two
// published example inputs (aesin = 576 and 12345, keyin = 56) are run.
module tb_aes_ext;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic         in_valid = 0, out_valid, cipher_valid;
  logic [511:0] aesin, aesout, cipher;
  logic [127:0] keyin, keyout;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  aes_ext u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .aesin(aesin), .keyin(keyin),
    .out_valid(out_valid), .aesout(aesout), .keyout(keyout),
    .cipher_valid(cipher_valid), .cipher(cipher));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [511:0] pt_q [$], ct_q [$];
  int           tp_q [$], tc_q [$];
  int n_in = 0, n_out = 0;
  int m_keychange = 0, m_wrap = 0, m_b2b = 0, m_gap = 0, m_restart = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (cipher_valid) begin
      if (ct_q.size() == 0) check(0, "unexpected ciphertext");
      else begin
        check(cipher == ct_q.pop_front(), "ciphertext vs model");
        check(cycle - tc_q.pop_front() == 11, "ciphertext latency 11");
      end
    end
    if (out_valid) begin
      n_out++;
      if (pt_q.size() == 0) check(0, "unexpected plaintext");
      else begin
        check(aesout == pt_q.pop_front(), "aesout equals aesin");
        check(cycle - tp_q.pop_front() == 22, "round-trip latency 22");
      end
    end
  end

  task automatic session(input logic [127:0] k, input int groups);
    int n = 0;
    logic [127:0] p, fk, prev;
    logic [511:0] d, e;
    rst = 1; keyin = k; in_valid = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    if (n_in > 0) m_restart++;
    prev = k;
    for (int g = 0; g < groups; g++) begin
      for (int f = 0; f < 4; f++) begin
        n++;
        fk = frame_key(k, n);
        if (fk != prev) m_keychange++;
        for (int j = 0; j < 16; j++) if (fk[8*j +: 8] < k[8*j +: 8]) begin m_wrap++; break; end
        prev = fk;
        p = rand_blk();
        d[128*f +: 128] = p;
        e[128*f +: 128] = encrypt(p, fk, 4'h3);
      end
      in_valid = 1; aesin = d;
      pt_q.push_back(d); ct_q.push_back(e); tp_q.push_back(cycle); tc_q.push_back(cycle);
      n_in++;
      @(negedge clk);
      check(keyout == frame_key(k, n), "keyout is the latest frame key");
      if ($urandom_range(2) == 0) begin
        in_valid = 0; m_gap++;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end else m_b2b++;
    end
    in_valid = 0;
    repeat (25) @(negedge clk);   // drain before the next reset
  endtask

  // One group with given contents under a given agreed key, after reset.
  task automatic directed(input logic [127:0] k, input logic [511:0] d);
    logic [511:0] e;
    rst = 1; keyin = k; in_valid = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    m_restart++;
    for (int f = 0; f < 4; f++) e[128*f +: 128] = encrypt(d[128*f +: 128], frame_key(k, f + 1), 4'h3);
    in_valid = 1; aesin = d;
    pt_q.push_back(d); ct_q.push_back(e); tp_q.push_back(cycle); tc_q.push_back(cycle);
    n_in++;
    @(negedge clk);
    in_valid = 0;
    repeat (25) @(negedge clk);
  endtask

  initial begin
    session(128'h000102030405060708090a0b0c0d0e0f, 10);
    session({8'hff, 8'hfe, {14{8'h56}}}, 8);   // first bytes wrap at frames 1 and 2
    session(rand_blk(), 6);
    // The two simulated cases of the design's results: aesin = 576 and
    // aesin = 12345 (decimal), keyin = 56.
    directed(128'd56, 512'd576);
    directed(128'd56, 512'd12345);
    check(n_out == n_in, "every group came back");
    $display("mechanisms: key_change=%0d wrap=%0d back_to_back=%0d gap=%0d restart=%0d",
             m_keychange, m_wrap, m_b2b, m_gap, m_restart);
    check(m_keychange > 0, "key change exercised");
    check(m_wrap > 0, "key byte wrap exercised");
    check(m_b2b > 0, "back-to-back groups exercised");
    check(m_gap > 0, "idle gaps exercised");
    check(m_restart > 0, "session restart exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
