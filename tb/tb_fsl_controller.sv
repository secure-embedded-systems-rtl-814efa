// tb_fsl_controller: checks the FSL session protocol of the controller
// against two simple behavioural cipher cores written in this testbench
// (the encrypting one returns din ^ key, the decrypting one returns din with
// its halves swapped ^ key, so results show which core ran).  The FSL links
// are modelled as FIFOs: the incoming one has random gaps before words, the
// outgoing one becomes full at random after writes.  Sessions: encrypt 3
// blocks, decrypt 2 blocks, a session with no blocks, then encrypt again.
// It checks every returned word, that only the selected core sees key loads
// and starts, that each word costs a wait and an acknowledge state, and that
// the input gaps and the output stalls both happened.
module tb_fsl_controller;
  import aes_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] fsl_s_data;
  logic        fsl_s_exists;
  logic        fsl_s_read;
  logic [31:0] fsl_m_data;
  logic        fsl_m_write;
  logic        fsl_m_full;
  cipher_req_t enc_req, dec_req;
  cipher_rsp_t enc_rsp, dec_rsp;
  mode_e       mode;
  logic        session_active;
  logic [31:0] blocks_left;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fsl_controller dut (
    .clk(clk), .rst(rst),
    .fsl_s_data(fsl_s_data), .fsl_s_exists(fsl_s_exists), .fsl_s_read(fsl_s_read),
    .fsl_m_data(fsl_m_data), .fsl_m_write(fsl_m_write), .fsl_m_full(fsl_m_full),
    .enc_req(enc_req), .enc_rsp(enc_rsp), .dec_req(dec_req), .dec_rsp(dec_rsp),
    .mode(mode), .session_active(session_active), .blocks_left(blocks_left)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- behavioural cipher cores -------------------------------------------
  int enc_loads = 0, dec_loads = 0, enc_starts = 0, dec_starts = 0;
  int enc_kcnt, dec_kcnt, enc_bcnt, dec_bcnt;
  logic [127:0] enc_key, dec_key, enc_din, dec_din;

  always @(posedge clk) begin
    if (rst) begin
      enc_rsp <= '0; dec_rsp <= '0;
      enc_kcnt <= 0; dec_kcnt <= 0; enc_bcnt <= 0; dec_bcnt <= 0;
    end else begin
      enc_rsp.done <= 1'b0;
      dec_rsp.done <= 1'b0;
      if (enc_req.key_load) begin
        enc_loads++; enc_key <= enc_req.key; enc_rsp.key_ready <= 1'b0; enc_kcnt <= 4;
      end else if (enc_kcnt > 0) begin
        enc_kcnt <= enc_kcnt - 1;
        if (enc_kcnt == 1) enc_rsp.key_ready <= 1'b1;
      end
      if (dec_req.key_load) begin
        dec_loads++; dec_key <= dec_req.key; dec_rsp.key_ready <= 1'b0; dec_kcnt <= 6;
      end else if (dec_kcnt > 0) begin
        dec_kcnt <= dec_kcnt - 1;
        if (dec_kcnt == 1) dec_rsp.key_ready <= 1'b1;
      end
      if (enc_req.start) begin
        enc_starts++; enc_din <= enc_req.din; enc_bcnt <= 5; enc_rsp.busy <= 1'b1;
      end else if (enc_bcnt > 0) begin
        enc_bcnt <= enc_bcnt - 1;
        if (enc_bcnt == 1) begin
          enc_rsp.done <= 1'b1; enc_rsp.busy <= 1'b0; enc_rsp.dout <= enc_din ^ enc_key;
        end
      end
      if (dec_req.start) begin
        dec_starts++; dec_din <= dec_req.din; dec_bcnt <= 7; dec_rsp.busy <= 1'b1;
      end else if (dec_bcnt > 0) begin
        dec_bcnt <= dec_bcnt - 1;
        if (dec_bcnt == 1) begin
          dec_rsp.done <= 1'b1; dec_rsp.busy <= 1'b0;
          dec_rsp.dout <= {dec_din[63:0], dec_din[127:64]} ^ dec_key;
        end
      end
    end
  end

  // ---- FSL FIFO models ------------------------------------------------------
  logic [31:0] in_q [$];
  logic [31:0] out_q [$];
  logic        avail;
  logic        rd_q, wr_q;
  logic [31:0] wd_q;
  int          gaps = 0, stalls = 0, back_to_back_reads = 0;

  assign fsl_s_exists = avail && (in_q.size() > 0);
  assign fsl_s_data   = (in_q.size() > 0) ? in_q[0] : 32'h0;

  always @(posedge clk) begin
    rd_q <= fsl_s_read;
    wr_q <= fsl_m_write;
    wd_q <= fsl_m_data;
    if (fsl_s_read && rd_q) back_to_back_reads++;
    if (!rst && in_q.size() > 0 && !avail) gaps++;
    if (!rst && fsl_m_full) stalls++;
  end

  always @(negedge clk) begin
    if (rd_q) begin
      void'(in_q.pop_front());
      avail = ($urandom_range(0, 2) != 0);
    end else if (!avail) begin
      avail = ($urandom_range(0, 1) != 0);
    end
    if (wr_q) begin
      out_q.push_back(wd_q);
      fsl_m_full = ($urandom_range(0, 2) == 0);
    end else if (fsl_m_full) begin
      fsl_m_full = ($urandom_range(0, 1) != 0);
    end
  end

  // ---- sessions ---------------------------------------------------------------
  task automatic session(input bit dec, input logic [127:0] key, input int nblk);
    logic [127:0] blk [];
    logic [127:0] expv;
    int e0, d0, es0, ds0, t;
    e0 = enc_loads; d0 = dec_loads; es0 = enc_starts; ds0 = dec_starts;
    blk = new[nblk];
    in_q.push_back({31'h0, dec});
    in_q.push_back(32'(nblk));
    for (int w = 0; w < 4; w++) in_q.push_back(key[127-32*w -: 32]);
    for (int b = 0; b < nblk; b++) begin
      blk[b] = {$urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 4; w++) in_q.push_back(blk[b][127-32*w -: 32]);
    end
    t = 0;
    while ((in_q.size() > 0 || out_q.size() < 4*nblk || session_active) && t < 5000) begin
      @(negedge clk);
      t++;
    end
    check(t < 5000, "session finished");
    check(out_q.size() == 4*nblk, $sformatf("%0d result words, expected %0d", out_q.size(), 4*nblk));
    for (int b = 0; b < nblk && out_q.size() >= 4; b++) begin
      expv = dec ? ({blk[b][63:0], blk[b][127:64]} ^ key) : (blk[b] ^ key);
      for (int w = 0; w < 4; w++) begin
        logic [31:0] got;
        got = out_q.pop_front();
        check(got == expv[127-32*w -: 32], $sformatf("block %0d word %0d = %h, expected %h",
                                                    b, w, got, expv[127-32*w -: 32]));
      end
    end
    check(mode == (dec ? MODE_DECRYPT : MODE_ENCRYPT), "mode register");
    check((enc_loads - e0) == (dec ? 0 : 1) && (dec_loads - d0) == (dec ? 1 : 0),
          "key loaded into the selected core only");
    check((enc_starts - es0) == (dec ? 0 : nblk) && (dec_starts - ds0) == (dec ? nblk : 0),
          "blocks started on the selected core only");
    check(blocks_left == 0, "block counter back to zero");
  endtask

  initial begin
    rst = 1'b1;
    avail = 1'b1;
    fsl_m_full = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!session_active && !fsl_s_read && !fsl_m_write, "idle after reset");
    session(1'b0, {$urandom, $urandom, $urandom, $urandom}, 3);
    session(1'b1, {$urandom, $urandom, $urandom, $urandom}, 2);
    session(1'b0, {$urandom, $urandom, $urandom, $urandom}, 0);
    session(1'b0, {$urandom, $urandom, $urandom, $urandom}, 4);
    check(back_to_back_reads == 0, "every word has a wait and an acknowledge state");
    check(gaps > 0, $sformatf("input gaps seen: %0d", gaps));
    check(stalls > 0, $sformatf("output stalls seen: %0d", stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
