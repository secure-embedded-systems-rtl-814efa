// tb_aes_inv_round: runs one decryption round on random states and keys, with the
// MixColumns stage enabled (rounds 1-9) and bypassed (the last round),
// compares with the reference and checks the 17-cycle round latency.
module tb_aes_inv_round;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic         last;
  logic [127:0] din, round_key, dout;
  logic         busy, done;
  int           checks = 0, failures = 0;
  int           n_last = 0, n_full = 0;

  always #5 clk = ~clk;

  aes_inv_round dut (.clk(clk), .rst(rst), .start(start), .last(last), .din(din),
                .round_key(round_key), .busy(busy), .done(done), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [127:0] v, input logic [127:0] k, input logic last_v);
    logic [127:0] e;
    int cyc;
    e = rsub(rshift(v, 1), 1) ^ k;
    if (!last_v) e = rmix(e, 1);
    din       = v;
    round_key = k;
    last      = last_v;
    start     = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      start = 1'b0;
      din   = ~v;
      cyc++;
    end while (!done && cyc < 100);
    check(cyc - 1 == 17, $sformatf("round latency %0d edges, expected 17", cyc - 1));
    check(dout == e, $sformatf("round(%h, last=%0d) = %h, expected %h", v, last_v, dout, e));
    if (last_v) n_last++; else n_full++;
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1;
    start = 1'b0;
    last = 1'b0;
    din = '0;
    round_key = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int t = 0; t < 20; t++)
      run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, 1'(t % 2));
    check(n_last > 0 && n_full > 0, "both round kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
