// tb_sub_bytes: runs SubBytes and InvSubBytes on random and fixed states,
// compares them with the reference, and checks that `done` comes exactly
// 17 cycles after `start`, as a single pulse, with `busy` high meanwhile.
module tb_sub_bytes;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic [127:0] din;
  logic         busy_f, done_f, busy_i, done_i;
  logic [127:0] dout_f, dout_i;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  sub_bytes #(.INVERSE(1'b0)) dut_f (.clk(clk), .rst(rst), .start(start), .din(din),
                                     .busy(busy_f), .done(done_f), .dout(dout_f));
  sub_bytes #(.INVERSE(1'b1)) dut_i (.clk(clk), .rst(rst), .start(start), .din(din),
                                     .busy(busy_i), .done(done_i), .dout(dout_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [127:0] v);
    int cyc, pulses;
    din   = v;
    start = 1'b1;
    cyc = 0;
    pulses = 0;
    do begin
      @(negedge clk);
      start = 1'b0;
      din   = '1;               // input must have been latched
      cyc++;
      if (cyc <= 17) check(busy_f && busy_i && !done_f && !done_i, "busy, not done, before cycle 17");
    end while (!done_f && cyc < 100);
    check(cyc - 1 == 17, $sformatf("latency %0d edges, expected 17", cyc - 1));
    check(done_i, "inverse done together with forward");
    check(dout_f == rsub(v, 0), $sformatf("SubBytes(%h)=%h", v, dout_f));
    check(dout_i == rsub(v, 1), $sformatf("InvSubBytes(%h)=%h", v, dout_i));
    @(negedge clk);
    check(!done_f && !done_i && !busy_f, "done is a single pulse");
    check(dout_f == rsub(v, 0), "result holds after done");
  endtask

  initial begin
    rst = 1'b1;
    start = 1'b0;
    din = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run(128'h00112233445566778899aabbccddeeff);
    run(128'h193de3bea0f4e22b9ac68d2ae9f84808);   // FIPS-197 B, round 1 input
    check(dout_f == 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 round 1 SubBytes");
    for (int t = 0; t < 20; t++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
