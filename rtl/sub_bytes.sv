// sub_bytes: the AES SubBytes transformation (InvSubBytes when INVERSE is
// set) done by 16 successive reads of one S-box block memory.
//
// A `start` pulse latches `din`.  One byte is then sent as the address of
// the S-box memory in each of the next 16 cycles, byte 0 first; each read
// returns one cycle later and is written into its place in the output
// register.  `done` pulses for one cycle when all 16 bytes are in: it
// rises on the 17th clock edge after the edge that samples `start`, and `dout` holds the result until the
// next `start`.  `busy` is high from the cycle after `start` until `done`.
// Using one memory read per byte is the structure described for this
// design, and the reason SubBytes dominates a round; issuing the reads
// back to back (pipelined) is this design's choice.  A `start` while busy
// is ignored.
module sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  state_t din,
  output logic   busy,
  output logic   done,
  output state_t dout
);

  state_t     in_q;
  logic [3:0] cnt;        // byte whose address is on the memory
  logic       run;        // an address is being issued this cycle
  logic       rd_valid;   // the memory output holds a requested byte
  logic [3:0] rd_idx;     // which byte the memory output belongs to
  logic [7:0] rom_addr;
  logic [7:0] rom_dout;

  assign rom_addr = in_q[127 - 8*cnt -: 8];

  sbox_rom #(.INVERSE(INVERSE)) u_rom (
    .clk  (clk),
    .en   (run),
    .addr (rom_addr),
    .dout (rom_dout)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      run      <= 1'b0;
      cnt      <= '0;
      rd_valid <= 1'b0;
      rd_idx   <= '0;
      done     <= 1'b0;
      in_q     <= '0;
      dout     <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= run;
      rd_idx   <= cnt;
      if (start && !busy) begin
        in_q <= din;
        cnt  <= '0;
        run  <= 1'b1;
      end else if (run) begin
        cnt <= cnt + 4'd1;
        if (cnt == 4'd15) run <= 1'b0;
      end
      if (rd_valid) begin
        dout[127 - 8*rd_idx -: 8] <= rom_dout;
        if (rd_idx == 4'd15) done <= 1'b1;
      end
    end
  end

  assign busy = run | rd_valid;

endmodule
