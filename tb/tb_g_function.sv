// tb_g_function: checks g(w) = SubWord(RotWord(w)) ^ {rcon,0,0,0} for the
// FIPS-197 first step (09cf4f3c, rcon 01 -> 8b84eb01) and random words with
// every round constant, and that `done` comes 5 cycles after `start`.
module tb_g_function;
  import aes_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        start;
  logic [31:0] word_in, word_out;
  logic [7:0]  rcon;
  logic        done;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  g_function dut (.clk(clk), .rst(rst), .start(start), .word_in(word_in), .rcon(rcon),
                  .done(done), .word_out(word_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [31:0] w, input logic [7:0] rc);
    logic [31:0] expv;
    int cyc;
    expv = {rsbox(w[23:16]) ^ rc, rsbox(w[15:8]), rsbox(w[7:0]), rsbox(w[31:24])};
    word_in = w;
    rcon    = rc;
    start   = 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      start   = 1'b0;
      word_in = ~w;
      rcon    = ~rc;
      cyc++;
    end while (!done && cyc < 50);
    check(cyc - 1 == 5, $sformatf("latency %0d edges, expected 5", cyc - 1));
    check(word_out == expv, $sformatf("g(%h, %h) = %h, expected %h", w, rc, word_out, expv));
    @(negedge clk);
    check(!done, "done is a single pulse");
  endtask

  initial begin
    logic [7:0] rc;
    rst = 1'b1;
    start = 1'b0;
    word_in = '0;
    rcon = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run(32'h09cf4f3c, 8'h01);
    check(word_out == 32'h8b84eb01, "FIPS-197 g(w3)");
    rc = 8'h01;
    for (int t = 0; t < 10; t++) begin
      run($urandom, rc);
      rc = rmul(rc, 8'h02);
    end
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
